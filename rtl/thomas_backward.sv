// thomas_backward: the backward-substitution kernel of the Thomas solver,
//   u_{N-1} = d*_{N-1},   u_i = d*_i - c*_i u_{i+1},
// on V systems per word, G words interleaved row by row.
//
// The backward sweep needs the rows in reverse order, so a whole group
// (N rows of G words of (c*, d*)) is stored before it can start. Two banks of
// G*NMAX entries act as ping-pong buffers: the forward kernel fills one while
// this kernel sweeps the other from row N-1 down to row 0, G words per row.
// As in the forward kernel, u_{i+1} of a system was produced G words earlier
// and is taken from a G-word shift register of past results.
//
// The output is the solution u, one word per cycle, in the order rows N-1
// down to 0, words 0..G-1 within a row, tagged with its row and word index
// so that a writer can place it in memory.
//
// Following the published design: the backward substitution u_i = d*_i - c*_i u_{i+1}, the
// ping-pong buffering. This design's choices: the same group size G as the
// forward kernel (the source design used a smaller group of 6 here, matched
// to this loop's own latency), single-cycle arithmetic, the handshake, NMAX.
module thomas_backward
  import fp32_pkg::*;
#(
  parameter int V    = 8,
  parameter int G    = 9,
  parameter int NMAX = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        n,
  input  logic               in_valid,
  output logic               in_ready,
  input  fp32_t              in_cstar,
  input  logic [V-1:0][31:0] in_dstar,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [V-1:0][31:0] out_u,
  output logic [31:0]        out_row,
  output logic [31:0]        out_grp
);
  localparam int BANK = G * NMAX;
  localparam int AW   = $clog2(2 * BANK);
  typedef struct packed {
    logic [31:0]        cstar;
    logic [V-1:0][31:0] dstar;
  } entry_t;

  entry_t             mem [2 * BANK];
  logic [V-1:0][31:0] hist [G];     // u of the last G outputs, hist[G-1] oldest
  logic [1:0]         full;
  logic               wb, rb;
  logic [31:0]        wcnt, rg, rr, ri;   // rr counts rows done, ri = n-1-rr
  logic [31:0]        waddr, raddr;
  entry_t             e;

  assign ri        = n - 32'd1 - rr;
  assign waddr     = (wb ? 32'(BANK) : 32'd0) + wcnt;
  assign raddr     = (rb ? 32'(BANK) : 32'd0) + ri * 32'(G) + rg;
  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  assign e         = mem[raddr[AW-1:0]];
  assign out_row   = ri;
  assign out_grp   = rg;

  always_comb begin
    for (int l = 0; l < V; l++) begin
      if (ri + 32'd1 == n) out_u[l] = e.dstar[l];
      else                 out_u[l] = fp_sub(e.dstar[l], fp_mul(e.cstar, hist[G-1][l]));
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[waddr[AW-1:0]] <= '{cstar: in_cstar, dstar: in_dstar};
    if (out_valid && out_ready) begin
      hist[0] <= out_u;
      for (int k = 1; k < G; k++) hist[k] <= hist[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wcnt <= '0; rg <= '0; rr <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wcnt + 32'd1 == n * 32'(G)) begin
          wcnt <= '0;
          full[wb] <= 1'b1;
          wb <= ~wb;
        end else begin
          wcnt <= wcnt + 32'd1;
        end
      end
      if (out_valid && out_ready) begin
        if (rg + 32'd1 == 32'(G)) begin
          rg <= '0;
          if (rr + 32'd1 == n) begin
            rr <= '0;
            full[rb] <= 1'b0;
            rb <= ~rb;
          end else begin
            rr <= rr + 32'd1;
          end
        end else begin
          rg <= rg + 32'd1;
        end
      end
    end
  end
endmodule
