// tb_thomas_forward: feeds row-interleaved right-hand sides of G words x V
// systems, together with (r, c*) pairs from a reference computed in real
// arithmetic, through the forward kernel with random gaps on both input
// pipes and random back-pressure, and checks each d*_i and the c*_i passed
// along against the recurrence d*_i = r_i (d_i - a d*_{i-1}).
module tb_thomas_forward;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int V = 2, G = 3, N = 6, NG = 3;
  logic clk = 0, rst_n = 0, clear = 0;
  logic d_valid, d_ready, r_valid, r_ready, out_valid, out_ready;
  logic [V-1:0][31:0] d_data, out_dstar;
  fp32_t ca, r, cstar, out_cstar;
  real a, b, c;
  real rr [N];
  real cs [N];
  real dd [NG][G][V][N];
  real ds [NG][G][V][N];
  int checks = 0, failures = 0;

  thomas_forward #(.V(V), .G(G)) dut (.clk, .rst_n, .clear, .n(N), .ca, .*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sd = 0, sr = 0, got = 0, total;
    a = -0.4; b = 1.9; c = -0.6;
    ca = r2f(a); a = f2r(ca);
    for (int i = 0; i < N; i++) begin
      rr[i] = f2r(r2f(1.0 / (b - ((i == 0) ? 0.0 : a * cs[i-1]))));
      cs[i] = f2r(r2f((i == N - 1) ? 0.0 : rr[i] * c));
    end
    for (int k = 0; k < NG; k++)
      for (int g = 0; g < G; g++)
        for (int l = 0; l < V; l++)
          for (int i = 0; i < N; i++) begin
            dd[k][g][l][i] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
            ds[k][g][l][i] = rr[i] * (dd[k][g][l][i] - ((i == 0) ? 0.0 : a * ds[k][g][l][i-1]));
          end
    total = NG * G * N;
    d_valid = 0; r_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    while (got < total) begin
      @(negedge clk);
      d_valid = (sd < total) && $urandom_range(0, 3) != 0;
      r_valid = (sr < total) && $urandom_range(0, 3) != 0;
      for (int l = 0; l < V; l++)
        d_data[l] = r2f(dd[sd / (G * N)][sd % G][l][(sd % (G * N)) / G]);
      r = r2f(rr[(sr % (G * N)) / G]);
      cstar = r2f(cs[(sr % (G * N)) / G]);
      out_ready = $urandom_range(0, 2) != 0;
      @(posedge clk);
      if (d_valid && d_ready) sd++;
      if (r_valid && r_ready) sr++;
      if (out_valid && out_ready) begin
        automatic int k = got / (G * N), i = (got % (G * N)) / G, g = got % G;
        checks++;
        if (out_cstar != r2f(cs[i])) begin failures++; $display("FAIL c* %0d", got); end
        for (int l = 0; l < V; l++) begin
          checks++;
          if (!close(f2r(out_dstar[l]), ds[k][g][l][i], 1e-5, 1e-5)) begin
            failures++;
            $display("FAIL k=%0d g=%0d i=%0d l=%0d got %g want %g", k, g, i, l, f2r(out_dstar[l]), ds[k][g][l][i]);
          end
        end
        got++;
      end
    end
    checks++;
    if (sd != sr) begin failures++; $display("FAIL pipes read unevenly"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
