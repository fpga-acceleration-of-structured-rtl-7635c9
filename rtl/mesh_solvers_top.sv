// mesh_solvers_top: the two structured-mesh solver engines side by side.
//
//  - Explicit solver (stencil_solver): advances a batch of 2D meshes by
//    n_iter = npass*P time steps of a five-point scheme, streaming the mesh
//    from external memory through P chained stencil kernels once per P steps.
//    Its external memory port is brought out (st_*).
//  - Implicit solver (tridiag_solver): solves streams of tridiagonal systems
//    with the Thomas algorithm, V systems per word, G words interleaved.
//    Its input and output streams are brought out (td_*).
//
// The two engines share only clock and reset. External memory and the host
// that loads data and starts runs are outside this design.
//
// Defaults follow the described designs: V = 8 cells per word and chains of
// kernels with 4096-cell window buffers for the stencil engine (unroll
// factor P = 2 is this design's choice), V = 8 systems per word and groups
// of G = 9 words for the tridiagonal engine, systems up to 64 rows.
module mesh_solvers_top
  import fp32_pkg::*;
#(
  parameter int ST_P    = 2,
  parameter int ST_V    = 8,
  parameter int ST_DMAX = 4096,
  parameter int ST_AW   = 32,
  parameter int TD_V    = 8,
  parameter int TD_G    = 9,
  parameter int TD_NMAX = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // explicit stencil solver
  input  logic                  st_start,
  input  logic [31:0]           st_npass,
  input  logic [31:0]           st_nx,
  input  logic [31:0]           st_nwords,
  input  logic [31:0]           st_ny,
  input  logic [31:0]           st_nrows,
  input  logic [31:0]           st_delay,
  input  logic [ST_AW-1:0]      st_base0,
  input  logic [ST_AW-1:0]      st_base1,
  input  fp32_t                 st_ca, st_cb, st_cc, st_cd, st_ce,
  output logic                  st_busy,
  output logic                  st_done,
  output logic [31:0]           st_stall_cycles,
  output logic [ST_AW-1:0]      st_rd_addr,
  input  logic [ST_V-1:0][31:0] st_rd_data,
  output logic                  st_wr_en,
  output logic [ST_AW-1:0]      st_wr_addr,
  output logic [ST_V-1:0][31:0] st_wr_data,
  // tridiagonal solver
  input  logic                  td_clear,
  input  logic [31:0]           td_n,
  input  fp32_t                 td_ca, td_cb, td_cc,
  input  logic                  td_in_valid,
  output logic                  td_in_ready,
  input  logic [TD_V-1:0][31:0] td_in_data,
  output logic                  td_out_valid,
  input  logic                  td_out_ready,
  output logic [TD_V-1:0][31:0] td_out_u,
  output logic [31:0]           td_out_row,
  output logic [31:0]           td_out_grp
);
  stencil_solver #(.P(ST_P), .V(ST_V), .DMAX(ST_DMAX), .AW(ST_AW)) u_stencil (
    .clk, .rst_n, .start(st_start), .npass(st_npass), .nx(st_nx), .nwords(st_nwords),
    .ny(st_ny), .nrows(st_nrows), .delay(st_delay), .base0(st_base0), .base1(st_base1),
    .ca(st_ca), .cb(st_cb), .cc(st_cc), .cd(st_cd), .ce(st_ce),
    .busy(st_busy), .done(st_done), .stall_cycles(st_stall_cycles),
    .rd_addr(st_rd_addr), .rd_data(st_rd_data), .wr_en(st_wr_en),
    .wr_addr(st_wr_addr), .wr_data(st_wr_data));

  tridiag_solver #(.V(TD_V), .G(TD_G), .NMAX(TD_NMAX)) u_tridiag (
    .clk, .rst_n, .clear(td_clear), .n(td_n), .ca(td_ca), .cb(td_cb), .cc(td_cc),
    .in_valid(td_in_valid), .in_ready(td_in_ready), .in_data(td_in_data),
    .out_valid(td_out_valid), .out_ready(td_out_ready), .out_u(td_out_u),
    .out_row(td_out_row), .out_grp(td_out_grp));
endmodule
