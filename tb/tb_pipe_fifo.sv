// tb_pipe_fifo: pushes a numbered sequence through the FIFO with random
// stalls on both sides and checks order, full/empty blocking and that a
// steady stream moves one word per cycle.
module tb_pipe_fifo;
  localparam int W = 16, DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic wr_valid, wr_ready, rd_valid, rd_ready;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(DEPTH):0] level;
  int checks = 0, failures = 0;
  int sent = 0, rcvd = 0, cyc = 0;
  int full_seen = 0;

  pipe_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    wr_valid = 0; rd_ready = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: fill without reading; must block at DEPTH
    @(negedge clk);
    for (int i = 0; i < DEPTH + 3; i++) begin
      wr_valid = 1; wr_data = W'(sent);
      @(posedge clk);
      if (wr_ready) sent++;
      @(negedge clk);
    end
    wr_valid = 0;
    checks++;
    if (sent != DEPTH || level != DEPTH || wr_ready) begin failures++; $display("FAIL fill %0d", sent); end
    // phase 2: random traffic
    for (int i = 0; i < 3000; i++) begin
      wr_valid = ($urandom_range(0, 3) != 0) && sent < 2000;
      wr_data  = W'(sent);
      rd_ready = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (wr_valid && wr_ready) sent++;
      if (rd_valid && rd_ready) begin
        checks++;
        if (rd_data != W'(rcvd)) begin failures++; $display("FAIL order %0d %0d", rd_data, rcvd); end
        rcvd++;
      end
      if (!wr_ready) full_seen++;
      @(negedge clk);
    end
    // phase 3: drain, then a steady stream must sustain one word per cycle
    wr_valid = 0; rd_ready = 1;
    while (rcvd < sent) begin
      @(posedge clk);
      if (rd_valid) begin
        checks++;
        if (rd_data != W'(rcvd)) failures++;
        rcvd++;
      end
      @(negedge clk);
    end
    checks++;
    if (rd_valid) begin failures++; $display("FAIL not empty"); end
    t0 = 0;
    for (int i = 0; i < 100; i++) begin
      wr_valid = 1; wr_data = W'(sent); rd_ready = 1;
      @(posedge clk);
      if (wr_ready) sent++;
      if (rd_valid) begin
        checks++;
        if (rd_data != W'(rcvd)) failures++;
        rcvd++; t0++;
      end
      @(negedge clk);
    end
    checks++;
    if (t0 != 99) begin failures++; $display("FAIL throughput %0d", t0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
