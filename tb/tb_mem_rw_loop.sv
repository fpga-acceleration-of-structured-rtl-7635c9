// tb_mem_rw_loop: drives the fused memory read/write loop against a model
// memory and a model compute pipeline that returns each pushed word plus
// one (per lane, as integers) after LAT cycles. Checks:
//  - after npass passes the ping-pong buffers hold input+npass in the
//    buffer the last pass wrote;
//  - with delay >= LAT no iteration stalls and a run takes
//    npass*(total+delay) cycles;
//  - with a shorter delay the loop stalls but still finishes correctly.
module tb_mem_rw_loop;
  localparam int V = 2, AW = 16, LAT = 9, TOTAL = 40;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] npass, total, delay, stall_cycles;
  logic [AW-1:0] base0, base1, rd_addr, wr_addr;
  logic busy, done, wr_en, push_valid, push_ready, pop_valid, pop_ready;
  logic [V-1:0][31:0] rd_data, wr_data, push_data, pop_data;
  logic [V-1:0][31:0] mem [2*TOTAL];
  logic [V-1:0][31:0] q_data [$];
  int               q_time [$];
  int checks = 0, failures = 0, cyc = 0;
  int stalled_runs = 0;

  mem_rw_loop #(.V(V), .AW(AW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign rd_data   = mem[rd_addr];
  assign push_ready = 1'b1;
  assign pop_valid = (q_time.size() > 0) && (q_time[0] <= cyc);
  assign pop_data  = (q_data.size() > 0) ? q_data[0] : '0;

  // Handshakes are sampled on the rising edge and the model's queues change
  // on the falling edge, so the design never sees them change mid-edge.
  logic               pp, ps, we;
  logic [V-1:0][31:0] w, wd;
  logic [AW-1:0]      wa;
  initial begin pp = 0; ps = 0; we = 0; end
  always @(posedge clk) begin
    pp <= pop_valid && pop_ready;
    ps <= push_valid && push_ready;
    we <= wr_en; wa <= wr_addr; wd <= wr_data;
    for (int l = 0; l < V; l++) w[l] <= push_data[l] + 32'd1;
  end
  always @(negedge clk) begin
    if (we) mem[wa] = wd;
    if (pp) begin
      void'(q_data.pop_front());
      void'(q_time.pop_front());
    end
    if (ps) begin
      q_data.push_back(w);
      q_time.push_back(cyc + LAT - 1);
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int np, input int d);
    int t0, t1, fin;
    for (int a = 0; a < TOTAL; a++)
      for (int l = 0; l < V; l++) mem[a][l] = 32'(a * 100 + l);
    npass = np; delay = d;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    t1 = cyc;
    repeat (2) @(negedge clk);
    fin = (np % 2 == 1) ? TOTAL : 0;
    for (int a = 0; a < TOTAL; a++)
      for (int l = 0; l < V; l++) begin
        checks++;
        if (mem[fin + a][l] != 32'(a * 100 + l + np)) begin
          failures++;
          $display("FAIL np=%0d d=%0d a=%0d got %0d", np, d, a, mem[fin + a][l]);
        end
      end
    checks++;
    if (d >= LAT + 1) begin
      if (stall_cycles != 0 || (t1 - t0) != np * (TOTAL + d) + 1) begin
        failures++;
        $display("FAIL timing np=%0d d=%0d cycles=%0d stalls=%0d", np, d, t1 - t0, stall_cycles);
      end
    end else begin
      if (stall_cycles == 0) begin failures++; $display("FAIL expected stalls"); end
      else stalled_runs++;
    end
  endtask

  initial begin
    total = TOTAL; base0 = 0; base1 = TOTAL; npass = 0; delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(3, LAT + 1);
    run(2, LAT + 5);
    run(3, 4);
    checks++;
    if (stalled_runs != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
