// tb_tri_interleave: sends groups of G words x N rows (tagged values) in
// system order and checks that they come out row-interleaved, row i of words
// 0..G-1 before row i+1, with random gaps and back-pressure. An unstalled
// run checks that groups stream back to back at one word per cycle.
module tb_tri_interleave;
  localparam int V = 2, G = 3, NMAX = 8, N = 6, NG = 6;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [V-1:0][31:0] in_data, out_data;
  int checks = 0, failures = 0;

  tri_interleave #(.V(V), .G(G), .NMAX(NMAX)) dut (.clk, .rst_n, .n(N), .*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // value of lane l, row i, word g, group k
  function automatic logic [31:0] tag(int k, int g, int i, int l);
    return 32'(k * 10000 + g * 1000 + i * 10 + l);
  endfunction

  task automatic run(input bit stalls, output int cycles);
    int sent = 0, got = 0, c = 0;
    while (got < NG * G * N) begin
      @(negedge clk);
      in_valid = (sent < NG * G * N) && (!stalls || $urandom_range(0, 2) != 0);
      for (int l = 0; l < V; l++)
        in_data[l] = tag(sent / (G * N), (sent % (G * N)) / N, sent % N, l);
      out_ready = !stalls || $urandom_range(0, 2) != 0;
      @(posedge clk);
      c++;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        int k = got / (G * N), i = (got % (G * N)) / G, g = got % G;
        for (int l = 0; l < V; l++) begin
          checks++;
          if (out_data[l] != tag(k, g, i, l)) begin
            failures++; $display("FAIL out %0d got %0d want %0d", got, out_data[l], tag(k, g, i, l));
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
    if (cycles != NG * G * N + G * N) begin failures++; $display("FAIL cycles %0d", cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
