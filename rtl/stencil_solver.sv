// stencil_solver: the complete explicit structured-mesh solver. The memory
// loop (mem_rw_loop) streams a batch of meshes from external memory through
// the chain of P stencil kernels (stencil_chain) and writes it back, once
// per pass, for npass passes, so n_iter = npass*P time steps run without the
// host. Words hold V cells; a batch of B meshes of nx x ny cells is stored
// as nrows = ny*B rows of nwords = ceil(nx/V) words, row after row.
//
// Cycle count, when the delay covers the chain latency:
//   npass * (nwords*nrows + delay) plus a few cycles per run,
// which is the performance model's ceil(m/V)*n*B + delay per p time steps.
//
// Interface: start/done, configuration inputs, the coefficients a..e of the
// scheme, and the external memory port described in mem_rw_loop. The memory
// itself is outside this design.
module stencil_solver
  import fp32_pkg::*;
#(
  parameter int P    = 2,
  parameter int V    = 8,
  parameter int DMAX = 4096,
  parameter int AW   = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        npass,
  input  logic [31:0]        nx,
  input  logic [31:0]        nwords,
  input  logic [31:0]        ny,
  input  logic [31:0]        nrows,
  input  logic [31:0]        delay,
  input  logic [AW-1:0]      base0,
  input  logic [AW-1:0]      base1,
  input  fp32_t              ca, cb, cc, cd, ce,
  output logic               busy,
  output logic               done,
  output logic [31:0]        stall_cycles,
  output logic [AW-1:0]      rd_addr,
  input  logic [V-1:0][31:0] rd_data,
  output logic               wr_en,
  output logic [AW-1:0]      wr_addr,
  output logic [V-1:0][31:0] wr_data
);
  logic               push_valid, push_ready, pop_valid, pop_ready;
  logic [V-1:0][31:0] push_data, pop_data;

  mem_rw_loop #(.V(V), .AW(AW)) u_mem (
    .clk, .rst_n, .start, .npass, .total(nwords * nrows), .delay, .base0, .base1,
    .busy, .done, .stall_cycles, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data,
    .push_valid, .push_ready, .push_data, .pop_valid, .pop_ready, .pop_data);

  stencil_chain #(.P(P), .V(V), .DMAX(DMAX)) u_chain (
    .clk, .rst_n, .clear(start && !busy), .nx, .nwords, .ny, .nrows,
    .ca, .cb, .cc, .cd, .ce,
    .in_valid(push_valid), .in_ready(push_ready), .in_data(push_data),
    .out_valid(pop_valid), .out_ready(pop_ready), .out_data(pop_data));
endmodule
