// tb_r_generator: reads the (r, c*) stream for two groups of systems with
// random back-pressure and compares it with the Thomas recurrence
// r_i = 1/(b - a c*_{i-1}), c*_i = r_i c (a_0 = 0, c_{N-1} = 0) in real
// arithmetic; every row must repeat for the G words of its group.
module tb_r_generator;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int G = 4, N = 7;
  logic clk = 0, rst_n = 0, clear = 0;
  logic out_valid, out_ready;
  fp32_t ca, cb, cc, r, cstar;
  real a, b, c;
  real rr [N];
  real cs [N];
  int checks = 0, failures = 0;

  r_generator #(.G(G)) dut (.clk, .rst_n, .clear, .n(N), .ca, .cb, .cc, .out_valid, .out_ready, .r, .cstar);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got = 0;
    a = -0.7; b = 2.1; c = -0.9;
    ca = r2f(a); cb = r2f(b); cc = r2f(c);
    a = f2r(ca); b = f2r(cb); c = f2r(cc);
    for (int i = 0; i < N; i++) begin
      rr[i] = 1.0 / (b - ((i == 0) ? 0.0 : a * cs[i-1]));
      cs[i] = (i == N - 1) ? 0.0 : rr[i] * c;
    end
    out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < 2 * G * N) begin
      @(negedge clk);
      out_ready = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (out_valid && out_ready) begin
        automatic int i = (got % (G * N)) / G;
        checks += 2;
        if (!close(f2r(r), rr[i], 1e-6, 1e-9)) begin failures++; $display("FAIL r row %0d got %g want %g", i, f2r(r), rr[i]); end
        if (!close(f2r(cstar), cs[i], 1e-6, 1e-9)) begin failures++; $display("FAIL c* row %0d got %g want %g", i, f2r(cstar), cs[i]); end
        got++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
