// pipe_fifo: the channel that links two kernels, the hardware counterpart of
// a SYCL pipe.
//
// Kernels of both solvers pass wide words (V floats) to each other through
// these FIFOs instead of through external memory. A write blocks while the
// FIFO is full and a read blocks while it is empty, as pipe accesses do; here
// that is a valid/ready handshake on each side: a word moves when valid and
// ready are both high on a rising clock edge. The storage is a circular
// buffer of DEPTH words (a power of two). The read side is first-word
// fall-through: rd_data shows the oldest word whenever rd_valid is high.
// Throughput is one word per cycle, latency from write to read one cycle.
// The depth is this design's choice; the published design gives none.
module pipe_fifo #(
  parameter int W     = 32,
  parameter int DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_valid,
  output logic         wr_ready,
  input  logic [W-1:0] wr_data,
  output logic         rd_valid,
  input  logic         rd_ready,
  output logic [W-1:0] rd_data,
  output logic [$clog2(DEPTH):0] level
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW:0]   wptr, rptr;
  logic          do_wr, do_rd;

  assign level    = wptr - rptr;
  assign wr_ready = (level != (AW+1)'(DEPTH));
  assign rd_valid = (level != '0);
  assign rd_data  = mem[rptr[AW-1:0]];
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  // Pointers never pass each other.
  assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));
endmodule
