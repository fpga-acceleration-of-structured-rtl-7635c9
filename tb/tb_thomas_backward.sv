// tb_thomas_backward: sends groups of (c*, d*) in forward row-interleaved
// order with random gaps and back-pressure and checks that the kernel
// returns u_i = d*_i - c*_i u_{i+1} for rows N-1 down to 0, each tagged with
// its row and word, computed in real arithmetic. An unstalled run checks
// that groups stream back to back at one word per cycle.
module tb_thomas_backward;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int V = 2, G = 3, NMAX = 8, N = 5, NG = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  fp32_t in_cstar;
  logic [V-1:0][31:0] in_dstar, out_u;
  logic [31:0] out_row, out_grp;
  real cs [NG][N];
  real ds [NG][G][V][N];
  real uu [NG][G][V][N];
  int checks = 0, failures = 0;

  thomas_backward #(.V(V), .G(G), .NMAX(NMAX)) dut (.clk, .rst_n, .n(N), .*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit stalls, output int cycles);
    int sent = 0, got = 0, c = 0, total = NG * G * N;
    for (int k = 0; k < NG; k++) begin
      for (int i = 0; i < N; i++) cs[k][i] = f2r(r2f(real'($urandom_range(0, 1000)) / 2000.0 - 0.25));
      for (int g = 0; g < G; g++)
        for (int l = 0; l < V; l++) begin
          for (int i = 0; i < N; i++) ds[k][g][l][i] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
          uu[k][g][l][N-1] = ds[k][g][l][N-1];
          for (int i = N - 2; i >= 0; i--) uu[k][g][l][i] = ds[k][g][l][i] - cs[k][i] * uu[k][g][l][i+1];
        end
    end
    while (got < total) begin
      @(negedge clk);
      in_valid = (sent < total) && (!stalls || $urandom_range(0, 2) != 0);
      in_cstar = r2f(cs[sent / (G * N)][(sent % (G * N)) / G]);
      for (int l = 0; l < V; l++) in_dstar[l] = r2f(ds[sent / (G * N)][sent % G][l][(sent % (G * N)) / G]);
      out_ready = !stalls || $urandom_range(0, 2) != 0;
      @(posedge clk);
      c++;
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        int k, i, g;
        k = got / (G * N); i = N - 1 - (got % (G * N)) / G; g = got % G;
        checks++;
        if (out_row != 32'(i) || out_grp != 32'(g)) begin failures++; $display("FAIL tags %0d", got); end
        for (int l = 0; l < V; l++) begin
          checks++;
          if (!close(f2r(out_u[l]), uu[k][g][l][i], 1e-5, 1e-5)) begin
            failures++;
            $display("FAIL k=%0d g=%0d i=%0d got %g want %g", k, g, i, f2r(out_u[l]), uu[k][g][l][i]);
          end
        end
        got++;
      end
    end
    cycles = c;
  endtask

  initial begin
    int cycles;
    in_valid = 0; out_ready = 1; in_cstar = '0; in_dstar = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, cycles);
    run(0, cycles);
    checks++;
    if (cycles != (NG + 1) * G * N) begin failures++; $display("FAIL cycles %0d", cycles); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
