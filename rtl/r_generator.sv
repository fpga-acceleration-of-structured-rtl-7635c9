// r_generator: the coefficient kernel of the Thomas solver.
//
// In the forward sweep of the Thomas algorithm
//   r_i  = 1 / (b_i - a_i c*_{i-1}),   c*_i = r_i c_i,   d*_i = r_i (d_i - a_i d*_{i-1})
// only the last term needs the right-hand side. When a, b, c are known
// constants they can be generated on chip instead of being read and
// buffered, and r_i, c*_i can be computed by a kernel of their own and sent
// to the forward kernel through a pipe; that removes the slow division from
// the forward kernel's loop and shrinks the buffers it needs.
//
// Here a, b, c are the constant inputs ca, cb, cc, with a_0 = 0 and
// c_{N-1} = 0 at the ends of every system. As these coefficients are the
// same for every system, r_i and c*_i depend on the row only: the kernel
// computes them once per row and sends the pair with each of the G words of
// that row in the interleaved order (row 0 of G words, row 1 of G words, ...),
// wrapping to row 0 after row n-1 for the next group, without end.
//
// Timing: the division and the recurrence complete in one cycle here, so the
// recurrence c*_{i-1} -> c*_i needs no interleaving of independent systems
// (on the target device the 26-cycle divider made the source design
// interleave 37 systems in this kernel). Output valid is high whenever the
// kernel is out of reset and not cleared; a pair moves on out_ready.
//
// Following the published design: moving the r_i and c*_i recurrences into a
// separate kernel, the internal coefficient generation, a_0 = c_{N-1} = 0.
// This design's choices: one computation per row, single-cycle arithmetic.
module r_generator
  import fp32_pkg::*;
#(
  parameter int G = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,
  input  logic [31:0] n,
  input  fp32_t       ca, cb, cc,
  output logic        out_valid,
  input  logic        out_ready,
  output fp32_t       r,
  output fp32_t       cstar
);
  logic [31:0] i, g;
  fp32_t       cprev;
  fp32_t       ai, ci;

  assign ai        = (i == 32'd0) ? FP_ZERO : ca;
  assign ci        = (i + 32'd1 == n) ? FP_ZERO : cc;
  assign r         = fp_div(FP_ONE, fp_sub(cb, fp_mul(ai, cprev)));
  assign cstar     = fp_mul(r, ci);
  assign out_valid = 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; g <= '0; cprev <= FP_ZERO;
    end else if (clear) begin
      i <= '0; g <= '0; cprev <= FP_ZERO;
    end else if (out_valid && out_ready) begin
      if (g + 32'd1 == 32'(G)) begin
        g <= '0;
        if (i + 32'd1 == n) begin
          i <= '0;
          cprev <= FP_ZERO;
        end else begin
          i <= i + 32'd1;
          cprev <= cstar;
        end
      end else begin
        g <= g + 32'd1;
      end
    end
  end
endmodule
