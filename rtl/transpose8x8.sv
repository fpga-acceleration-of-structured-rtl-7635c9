// transpose8x8: the block transpose that turns system-ordered data into
// lane-ordered words for the vectorised tridiagonal solver.
//
// Systems sit one after another in memory, so a wide burst read returns T
// consecutive values of one system. The vectorised solver instead needs one
// value from each of T different systems per word. This unit collects T
// input words (from T systems, rows r..r+T-1 each) into a T x T register
// block and emits T output words, word j holding row r+j of all T systems:
// out[j][s] = in[s][j]. Two register blocks work as ping-pong buffers, so
// one block fills while the other drains and a steady stream passes at one
// word per cycle, with T words of latency. With T = 8 and 32-bit elements
// the buffers hold 2 x 8 x 8 x 32 = 4096 bits of registers.
//
// Following the published design: the 8x8 transpose with ping-pong buffers and its
// register budget. This design's choices: the valid/ready stream interface.
module transpose8x8 #(
  parameter int T  = 8,
  parameter int EW = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [T-1:0][EW-1:0] in_data,
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [T-1:0][EW-1:0] out_data
);
  localparam int CW = $clog2(T);
  logic [T-1:0][EW-1:0] blk [2][T];   // blk[bank][system] = T rows of that system
  logic [1:0]    full;
  logic          wb, rb;
  logic [CW-1:0] wc, rc;

  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  always_comb begin
    for (int s = 0; s < T; s++) out_data[s] = blk[rb][s][rc];
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) blk[wb][wc] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0; wc <= '0; rc <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (32'(wc) == T - 1) begin
          wc <= '0;
          full[wb] <= 1'b1;
          wb <= ~wb;
        end else begin
          wc <= wc + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (32'(rc) == T - 1) begin
          rc <= '0;
          full[rb] <= 1'b0;
          rb <= ~rb;
        end else begin
          rc <= rc + 1'b1;
        end
      end
    end
  end
endmodule
