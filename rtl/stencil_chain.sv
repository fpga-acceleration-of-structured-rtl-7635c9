// stencil_chain: the unrolled time-marching loop of the explicit solver
// (step-parallel method). P stencil kernels are chained through P+1 pipes:
// kernel i reads pipe i and writes pipe i+1, so one pass of the mesh through
// the chain advances it by P time steps while each word is fetched from
// external memory only once. Pipe 0 is the chain's input and pipe P its
// output, both valid/ready streams of V-cell words.
//
// Timing: in steady state one word per cycle leaves the chain. Each kernel
// adds one row plus one word of buffer delay and one register, and each pipe
// one cycle, so the first word of a pass leaves about P*(W+3) cycles after
// the first word enters (W = words per row).
//
// Following the published design: the chain of identical kernels linked by indexed
// pipes (kernel i between pipes i and i+1). This design's choices: the pipe
// depth and the default unroll factor P = 2, taken from the unroll factor of
// the evaluated explicit application, as the published design gives no default
// for the generic kernel.
module stencil_chain
  import fp32_pkg::*;
#(
  parameter int P          = 2,     // iterative loop unroll factor p
  parameter int V          = 8,     // vectorisation factor
  parameter int DMAX       = 4096,  // longest row in cells
  parameter int PIPE_DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic [31:0]       nx,
  input  logic [31:0]       nwords,
  input  logic [31:0]       ny,
  input  logic [31:0]       nrows,
  input  fp32_t             ca, cb, cc, cd, ce,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [V-1:0][31:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [V-1:0][31:0] out_data
);
  localparam int W = 32 * V;

  // pipe i: written by kernel i-1 (or the chain input), read by kernel i
  logic [P:0]        pw_valid, pw_ready, pr_valid, pr_ready;
  logic [W-1:0]      pw_data [P+1];
  logic [W-1:0]      pr_data [P+1];

  assign pw_valid[0] = in_valid;
  assign in_ready    = pw_ready[0];
  assign pw_data[0]  = in_data;
  assign out_valid   = pr_valid[P];
  assign pr_ready[P] = out_ready;
  assign out_data    = pr_data[P];

  for (genvar i = 0; i <= P; i++) begin : g_pipe
    pipe_fifo #(.W(W), .DEPTH(PIPE_DEPTH)) u_pipe (
      .clk, .rst_n,
      .wr_valid(pw_valid[i]), .wr_ready(pw_ready[i]), .wr_data(pw_data[i]),
      .rd_valid(pr_valid[i]), .rd_ready(pr_ready[i]), .rd_data(pr_data[i]),
      .level());
  end

  for (genvar i = 0; i < P; i++) begin : g_kernel
    logic [V-1:0][31:0] kin, kout;
    assign kin = pr_data[i];
    assign pw_data[i+1] = kout;
    stencil_kernel #(.V(V), .DMAX(DMAX)) u_kernel (
      .clk, .rst_n, .clear, .nx, .nwords, .ny, .nrows,
      .ca, .cb, .cc, .cd, .ce,
      .in_valid(pr_valid[i]), .in_ready(pr_ready[i]), .in_data(kin),
      .out_valid(pw_valid[i+1]), .out_ready(pw_ready[i+1]), .out_data(kout),
      .pass_done());
  end
endmodule
