// thomas_forward: the forward-sweep kernel of the Thomas solver,
//   d*_i = r_i (d_i - a_i d*_{i-1}),   with a_0 = 0,
// on V systems per word, G words interleaved row by row.
//
// It joins two pipes: the row-interleaved right-hand sides from
// tri_interleave and the (r_i, c*_i) pairs from r_generator, which arrive in
// the same order. Because the stream is interleaved, d*_{i-1} of a system
// was produced exactly G words earlier, so the previous results are kept in
// a G-word shift register that advances with every word: its oldest entry is
// the value the recurrence needs. The kernel outputs c*_i with d*_i, as the
// backward sweep needs both.
//
// Timing: one word per cycle; the result is registered, one cycle after the
// inputs are taken. Both input pipes are read together, only when the output
// register is free.
//
// Following the published design: the recurrence d*_i = r_i (d_i - a_i d*_{i-1}), r
// taken from a pipe, the interleaved systems and the group size G = 9. This
// design's choices: single-cycle arithmetic, the shift register for the
// per-system state, the joined handshake.
module thomas_forward
  import fp32_pkg::*;
#(
  parameter int V = 8,
  parameter int G = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               clear,
  input  logic [31:0]        n,
  input  fp32_t              ca,
  input  logic               d_valid,
  output logic               d_ready,
  input  logic [V-1:0][31:0] d_data,
  input  logic               r_valid,
  output logic               r_ready,
  input  fp32_t              r,
  input  fp32_t              cstar,
  output logic               out_valid,
  input  logic               out_ready,
  output fp32_t              out_cstar,
  output logic [V-1:0][31:0] out_dstar
);
  logic [V-1:0][31:0] hist [G];   // d* of the last G words, hist[G-1] oldest
  logic [31:0]        i, g;
  logic               slot, adv;
  logic [V-1:0][31:0] dstar;

  assign slot    = !out_valid || out_ready;
  assign adv     = d_valid && r_valid && slot;
  assign d_ready = r_valid && slot;
  assign r_ready = d_valid && slot;

  always_comb begin
    for (int l = 0; l < V; l++) begin
      if (i == 32'd0) dstar[l] = fp_mul(r, d_data[l]);
      else            dstar[l] = fp_mul(r, fp_sub(d_data[l], fp_mul(ca, hist[G-1][l])));
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      hist[0] <= dstar;
      for (int k = 1; k < G; k++) hist[k] <= hist[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0; g <= '0; out_valid <= 1'b0; out_cstar <= FP_ZERO; out_dstar <= '0;
    end else if (clear) begin
      i <= '0; g <= '0; out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (adv) begin
        out_valid <= 1'b1;
        out_cstar <= cstar;
        out_dstar <= dstar;
        if (g + 32'd1 == 32'(G)) begin
          g <= '0;
          i <= (i + 32'd1 == n) ? '0 : i + 32'd1;
        end else begin
          g <= g + 32'd1;
        end
      end
    end
  end
endmodule
