// tridiag_solver: a batched, vectorised Thomas solver for many independent
// tridiagonal systems of N rows with constant coefficients a, b, c (a_0 and
// c_{N-1} are taken as zero) and per-system right-hand sides d.
//
// Data flow, each stage a kernel joined to the next by a pipe (pipe_fifo):
//   transpose8x8   : system-ordered burst words -> words of V systems
//   tri_interleave : G words of systems -> row-interleaved stream
//   r_generator    : r_i and c*_i from the constant coefficients
//   thomas_forward : d*_i = r_i (d_i - a d*_{i-1})
//   thomas_backward: u_i = d*_i - c*_i u_{i+1}, rows in reverse
//
// Input stream: for each group of G*V systems, for each word-group g of V
// systems, for each block of V rows, V words: word s holds rows
// r..r+V-1 of system g*V+s (a wide read of one system). N must be a
// multiple of V. Output stream: u words, V systems each, rows N-1 down to 0,
// word-groups 0..G-1 within a row, tagged with row and word-group.
// Throughput in steady state is one word (V solutions) per cycle; the
// latency is about two groups (the interleave and backward ping-pong
// buffers each hold one group).
//
// Following the published design: the kernel split, coefficient fusion, the r
// generator, the interleaving, the ping-pong buffers, the transpose and the
// vectorisation. This design's choices: one group size G for all kernels
// and single-cycle arithmetic (see the kernels), the pipe depths.
module tridiag_solver
  import fp32_pkg::*;
#(
  parameter int V          = 8,
  parameter int G          = 9,
  parameter int NMAX       = 64,
  parameter int PIPE_DEPTH = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [31:0]        n,
  input  fp32_t              ca, cb, cc,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [V-1:0][31:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [V-1:0][31:0] out_u,
  output logic [31:0]        out_row,
  output logic [31:0]        out_grp
);
  localparam int WW = 32 * V;

  logic               t_valid, t_ready, i_valid, i_ready, p1_valid, p1_ready;
  logic [V-1:0][31:0] t_data, i_data, p1_data;
  logic               rg_valid, rg_ready, p2_valid, p2_ready;
  fp32_t              rg_r, rg_c;
  logic [63:0]        p2_data;
  logic               f_valid, f_ready, p3_valid, p3_ready;
  fp32_t              f_c;
  logic [V-1:0][31:0] f_d;
  logic [WW+31:0]     p3_data;

  transpose8x8 #(.T(V), .EW(32)) u_tr (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .out_valid(t_valid), .out_ready(t_ready), .out_data(t_data));

  tri_interleave #(.V(V), .G(G), .NMAX(NMAX)) u_il (
    .clk, .rst_n, .n, .in_valid(t_valid), .in_ready(t_ready), .in_data(t_data),
    .out_valid(i_valid), .out_ready(i_ready), .out_data(i_data));

  pipe_fifo #(.W(WW), .DEPTH(PIPE_DEPTH)) u_p1 (
    .clk, .rst_n, .wr_valid(i_valid), .wr_ready(i_ready), .wr_data(i_data),
    .rd_valid(p1_valid), .rd_ready(p1_ready), .rd_data(p1_data), .level());

  r_generator #(.G(G)) u_rg (
    .clk, .rst_n, .clear, .n, .ca, .cb, .cc,
    .out_valid(rg_valid), .out_ready(rg_ready), .r(rg_r), .cstar(rg_c));

  pipe_fifo #(.W(64), .DEPTH(PIPE_DEPTH)) u_p2 (
    .clk, .rst_n, .wr_valid(rg_valid), .wr_ready(rg_ready), .wr_data({rg_r, rg_c}),
    .rd_valid(p2_valid), .rd_ready(p2_ready), .rd_data(p2_data), .level());

  thomas_forward #(.V(V), .G(G)) u_fw (
    .clk, .rst_n, .clear, .n, .ca,
    .d_valid(p1_valid), .d_ready(p1_ready), .d_data(p1_data),
    .r_valid(p2_valid), .r_ready(p2_ready), .r(p2_data[63:32]), .cstar(p2_data[31:0]),
    .out_valid(f_valid), .out_ready(f_ready), .out_cstar(f_c), .out_dstar(f_d));

  pipe_fifo #(.W(WW + 32), .DEPTH(PIPE_DEPTH)) u_p3 (
    .clk, .rst_n, .wr_valid(f_valid), .wr_ready(f_ready), .wr_data({f_c, f_d}),
    .rd_valid(p3_valid), .rd_ready(p3_ready), .rd_data(p3_data), .level());

  thomas_backward #(.V(V), .G(G), .NMAX(NMAX)) u_bw (
    .clk, .rst_n, .n, .in_valid(p3_valid), .in_ready(p3_ready),
    .in_cstar(p3_data[WW+31:WW]), .in_dstar(p3_data[WW-1:0]),
    .out_valid, .out_ready, .out_u, .out_row, .out_grp);
endmodule
