// tri_interleave: the interleaving kernel of the tridiagonal solver.
//
// The Thomas algorithm carries a dependency from row i-1 to row i of a
// system, so a pipelined solver would idle if it worked on one system at a
// time. This kernel regroups the right-hand sides: it receives a group of G
// words, each word holding V systems side by side, stored system word after
// system word (all N rows of word 0, then all N rows of word 1, ...), and
// emits them row-interleaved: row 0 of words 0..G-1, then row 1 of words
// 0..G-1, and so on. Consecutive outputs then belong to independent systems
// and the row i-1 value of a system lies exactly G outputs back.
//
// Two banks of G*NMAX words are used as ping-pong buffers: one group is
// written while the previous one is read, so groups stream back to back at
// one word per cycle after a latency of one group. Only d is buffered: the
// coefficients a, b, c are generated inside the solver (coefficient fusion).
//
// Interface: valid/ready stream in and out; n (rows per system, 1..NMAX) must
// stay constant while data flows. Read is asynchronous from the bank array.
//
// Following the published design: interleaving of G systems, ping-pong buffering, the
// group size G = 9 of the forward kernel when r is generated separately.
// This design's choice: the handshake and the NMAX default of 64 rows,
// the largest system of the evaluated application.
module tri_interleave #(
  parameter int V    = 8,
  parameter int G    = 9,
  parameter int NMAX = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [31:0]        n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [V-1:0][31:0] in_data,
  output logic               out_valid,
  input  logic               out_ready,
  output logic [V-1:0][31:0] out_data
);
  localparam int BANK = G * NMAX;
  localparam int AW   = $clog2(2 * BANK);
  logic [V-1:0][31:0] mem [2 * BANK];
  logic [1:0]  full;
  logic        wb, rb;
  logic [31:0] wg, wi, rg, ri;
  logic [31:0] waddr, raddr;

  assign waddr = (wb ? 32'(BANK) : 32'd0) + wg * n + wi;
  assign raddr = (rb ? 32'(BANK) : 32'd0) + rg * n + ri;
  assign in_ready  = !full[wb];
  assign out_valid = full[rb];
  assign out_data  = mem[raddr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[waddr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full <= '0; wb <= 1'b0; rb <= 1'b0;
      wg <= '0; wi <= '0; rg <= '0; ri <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (wi + 32'd1 == n) begin
          wi <= '0;
          if (wg + 32'd1 == 32'(G)) begin
            wg <= '0;
            full[wb] <= 1'b1;
            wb <= ~wb;
          end else begin
            wg <= wg + 32'd1;
          end
        end else begin
          wi <= wi + 32'd1;
        end
      end
      if (out_valid && out_ready) begin
        if (rg + 32'd1 == 32'(G)) begin
          rg <= '0;
          if (ri + 32'd1 == n) begin
            ri <= '0;
            full[rb] <= 1'b0;
            rb <= ~rb;
          end else begin
            ri <= ri + 32'd1;
          end
        end else begin
          rg <= rg + 32'd1;
        end
      end
    end
  end
endmodule
