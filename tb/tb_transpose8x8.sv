// tb_transpose8x8: streams random 8x8 blocks through the transpose with
// random gaps and back-pressure and checks out[j][s] = in[s][j] for every
// block, then checks that an unstalled stream of blocks passes at one word
// per cycle after a latency of one block.
module tb_transpose8x8;
  localparam int T = 8, EW = 32, NB = 20;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [T-1:0][EW-1:0] in_data, out_data;
  logic [T-1:0][EW-1:0] words [NB*T];
  int checks = 0, failures = 0;

  transpose8x8 #(.T(T), .EW(EW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit stalls, output int cycles);
    int sent = 0, got = 0, c = 0;
    for (int k = 0; k < NB * T; k++) for (int j = 0; j < T; j++) words[k][j] = $urandom;
    while (got < NB * T) begin
      @(negedge clk);
      in_valid = (sent < NB * T) && (!stalls || $urandom_range(0, 2) != 0);
      in_data = (sent < NB * T) ? words[sent] : '0;
      out_ready = !stalls || $urandom_range(0, 2) != 0;
      @(posedge clk);
      c++;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        int blk = got / T, j = got % T;
        for (int s = 0; s < T; s++) begin
          checks++;
          if (out_data[s] != words[blk * T + s][j]) begin
            failures++; $display("FAIL block %0d row %0d system %0d", blk, j, s);
          end
        end
        got++;
      end
    end
    cycles = c;
  endtask

  initial begin
    int cycles;
    in_valid = 0; out_ready = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, cycles);
    run(0, cycles);
    checks++;
    if (cycles != NB * T + T) begin failures++; $display("FAIL cycles %0d", cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
