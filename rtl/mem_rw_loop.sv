// mem_rw_loop: the global-memory read/write kernel of the explicit solver,
// with the time-marching loop moved onto the device.
//
// One kernel both reads and writes external memory, so no data dependence
// between a separate reader and writer can hang the kernel pipeline. The
// outer loop runs npass passes (n_iter/p). In each pass the inner loop runs
// total+delay iterations: iteration i reads word i of the source buffer and
// pushes it into the compute pipe while i < total, and, once i >= delay, pops
// one result from the return pipe and writes it to word i-delay of the
// destination buffer. The two buffers swap roles every pass (ping-pong), so
// after an odd number of passes the result is in buffer 1.
//
// Pipe accesses block: an iteration only completes when its push is accepted
// and its pop has data. The read delay therefore decides the throughput. If
// it covers the latency of the compute chain, no iteration ever waits; if it
// is shorter but not shorter than the buffer delay of the chain, iterations
// stall until results arrive; if the chain cannot return a result before the
// loop stops feeding it, the loop deadlocks, as the published analysis predicts.
// stall_cycles counts cycles in which an iteration waited.
//
// Interface: start pulse, configuration held constant while busy, done
// pulse. Memory port: asynchronous read (rd_data valid in the cycle rd_addr
// is shown), synchronous write; word addresses of V floats. Buffer b starts
// at word address base[b].
//
// Following the published design: the fused read/write loop, the ping-pong swap and
// the delayed pipe read. This design's choices: the read address i and write
// address i-delay (the printed loop reads at i+delay and writes at i, which
// would write results before they exist), the memory port timing and the
// handshake signals.
module mem_rw_loop #(
  parameter int V  = 8,
  parameter int AW = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [31:0]        npass,
  input  logic [31:0]        total,     // words in one pass (the whole batch)
  input  logic [31:0]        delay,     // read delay d in iterations
  input  logic [AW-1:0]      base0,
  input  logic [AW-1:0]      base1,
  output logic               busy,
  output logic               done,
  output logic [31:0]        stall_cycles,
  // external memory
  output logic [AW-1:0]      rd_addr,
  input  logic [V-1:0][31:0] rd_data,
  output logic               wr_en,
  output logic [AW-1:0]      wr_addr,
  output logic [V-1:0][31:0] wr_data,
  // pipes to and from the compute chain
  output logic               push_valid,
  input  logic               push_ready,
  output logic [V-1:0][31:0] push_data,
  input  logic               pop_valid,
  output logic               pop_ready,
  input  logic [V-1:0][31:0] pop_data
);
  logic [31:0] itr, i;
  logic        do_push, do_pop, adv;
  logic [AW-1:0] src, dst;

  assign src     = itr[0] ? base1 : base0;
  assign dst     = itr[0] ? base0 : base1;
  assign do_push = busy && (i < total);
  assign do_pop  = busy && (i >= delay);
  assign adv     = busy && (!do_push || push_ready) && (!do_pop || pop_valid);

  assign rd_addr    = src + AW'(i);
  assign push_valid = do_push && (!do_pop || pop_valid);
  assign push_data  = rd_data;
  assign pop_ready  = do_pop && (!do_push || push_ready);
  assign wr_en      = do_pop && adv;
  assign wr_addr    = dst + AW'(i - delay);
  assign wr_data    = pop_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; itr <= '0; i <= '0; stall_cycles <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= (npass != 0);
        done <= (npass == 0);
        itr <= '0; i <= '0; stall_cycles <= '0;
      end else if (busy) begin
        if (!adv) stall_cycles <= stall_cycles + 32'd1;
        else if (i + 32'd1 == total + delay) begin
          i <= '0;
          if (itr + 32'd1 == npass) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
          itr <= itr + 32'd1;
        end else begin
          i <= i + 32'd1;
        end
      end
    end
  end

  // A push and a pop of the same iteration always happen together.
  assert property (@(posedge clk) disable iff (!rst_n)
    (push_valid && push_ready && do_pop) |-> (pop_valid && pop_ready));
endmodule
