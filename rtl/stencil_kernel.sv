// stencil_kernel: one stencil compute kernel of the explicit solver. It
// applies one time step of the 2D five-point scheme
//   U'(x,y) = a U(x-1,y) + b U(x+1,y) + c U(x,y-1) + d U(x,y+1) + e U(x,y)
// to a mesh streamed in row by row, V cells per word (cell-parallel
// vectorisation), and streams the new mesh out in the same order.
//
// Window buffer: two circular row buffers and three word registers hold the
// last two rows plus two words, so every input word is read from the stream
// once and reused for all five taps. At loop iteration k the kernel accepts
// word k and updates the centre word k-W-1 (W = words per row): its upper
// neighbour comes out of row buffer 2, the right word out of row buffer 1,
// the lower word is the previous input, and the left word the previous
// centre. Lane 0 and lane V-1 take their horizontal neighbour from the left
// and right words. A pass over the mesh therefore runs W*R + W + 1
// iterations for R rows: one row and one word of buffer delay, the d_b of the
// delay model. The kernel then starts the next pass by itself, so a chain of
// kernels can run many time steps back to back.
//
// Boundary cells (first and last column, first and last row of every mesh)
// and padding lanes beyond the row length are passed through unchanged.
// Meshes of a batch are stacked along y: B meshes of ny rows form one stream
// of R = ny*B rows, and the row counter restarts its boundary test every ny
// rows.
//
// Interface: valid/ready stream in and out (the pipes), configuration inputs
// that must stay constant while the kernel runs, and a synchronous clear.
// Timing: one iteration per cycle when neither pipe blocks; the output word
// is registered, one cycle after its iteration.
//
// Following the published design: the scheme of eq. (1), the window buffer, the
// vectorised data path with boundary pass-through, the one-row delay and the
// batching by stacking meshes. This design's choices: the arithmetic is done
// in one cycle (the device's FP pipeline depth is not modelled), the extra
// word of delay for the horizontal taps, rows of at least two words, and the
// valid/ready form of the pipes.
module stencil_kernel
  import fp32_pkg::*;
#(
  parameter int V    = 8,      // vectorisation factor (cells per word)
  parameter int DMAX = 4096    // longest row in cells the window buffer holds
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,     // restart at iteration 0
  input  logic [31:0]       nx,        // cells per row (m)
  input  logic [31:0]       nwords,    // words per row, ceil(m/V), 2..DMAX/V
  input  logic [31:0]       ny,        // rows per mesh (n)
  input  logic [31:0]       nrows,     // rows in the stream, ny*B
  input  fp32_t             ca, cb, cc, cd, ce,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [V-1:0][31:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [V-1:0][31:0] out_data,
  output logic              pass_done  // pulses with the last iteration of a pass
);
  localparam int WMAX = DMAX / V;
  localparam int PW   = $clog2(WMAX);
  typedef logic [V-1:0][31:0] word_t;

  word_t mem1 [WMAX];
  word_t mem2 [WMAX];
  logic [PW-1:0] p1, p2;
  word_t r_down, r_ctr, r_left;
  word_t w_right, w_up;
  logic [31:0] k, k_total, n_in;
  logic [31:0] cx, cy;             // centre word column, row within mesh
  logic        need_in, need_out, adv;
  word_t       result;

  assign n_in     = nwords * nrows;
  assign k_total  = n_in + nwords + 32'd1;
  assign need_in  = (k < n_in);
  assign need_out = (k >= nwords + 32'd1);
  assign adv      = (!need_in || in_valid) && (!need_out || !out_valid || out_ready);
  assign in_ready = need_in && (!need_out || !out_valid || out_ready);

  assign w_right = mem1[p1];
  assign w_up    = mem2[p2];

  always_comb begin
    for (int l = 0; l < V; l++) begin
      logic [31:0] gx;
      fp32_t left, right, acc;
      gx    = cx * V + 32'(l);
      left  = (l == 0)     ? r_left[V-1] : r_ctr[l-1];
      right = (l == V - 1) ? w_right[0]  : r_ctr[l+1];
      acc   = fp_mul(ca, left);
      acc   = fp_add(acc, fp_mul(cb, right));
      acc   = fp_add(acc, fp_mul(cc, w_up[l]));
      acc   = fp_add(acc, fp_mul(cd, r_down[l]));
      acc   = fp_add(acc, fp_mul(ce, r_ctr[l]));
      if (gx > 0 && gx < nx - 1 && cy > 0 && cy < ny - 1) result[l] = acc;
      else                                              result[l] = r_ctr[l];
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      mem1[p1] <= r_down;
      mem2[p2] <= r_ctr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k <= '0; p1 <= '0; p2 <= '0; cx <= '0; cy <= '0;
      r_down <= '0; r_ctr <= '0; r_left <= '0;
      out_valid <= 1'b0; out_data <= '0; pass_done <= 1'b0;
    end else if (clear) begin
      k <= '0; p1 <= '0; p2 <= '0; cx <= '0; cy <= '0;
      out_valid <= 1'b0; pass_done <= 1'b0;
    end else begin
      pass_done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (adv) begin
        r_down <= need_in ? in_data : '0;
        r_ctr  <= w_right;
        r_left <= r_ctr;
        p1 <= (32'(p1) + 32'd1 >= nwords - 32'd1) ? '0 : p1 + 1'b1;
        p2 <= (32'(p2) + 32'd1 >= nwords)         ? '0 : p2 + 1'b1;
        if (need_out) begin
          out_valid <= 1'b1;
          out_data  <= result;
          if (cx + 32'd1 == nwords) begin
            cx <= '0;
            cy <= (cy + 32'd1 == ny) ? '0 : cy + 32'd1;
          end else begin
            cx <= cx + 32'd1;
          end
        end
        if (k + 32'd1 == k_total) begin
          k <= '0; p1 <= '0; p2 <= '0; cx <= '0; cy <= '0;
          pass_done <= 1'b1;
        end else begin
          k <= k + 32'd1;
        end
      end
    end
  end

  // A word is never dropped: the output register is only overwritten when empty or read.
  assert property (@(posedge clk) disable iff (!rst_n) (adv && need_out) |-> (!out_valid || out_ready));
endmodule
