// tb_tridiag_solver: solves several groups of random tridiagonal systems
// with the full kernel chain and compares each solution with the Thomas
// algorithm run in double precision on the same (FP32-rounded) inputs.
// Groups are sent back to back with random input gaps and output
// back-pressure; a second run without stalls checks that a long stream
// moves at one word per cycle (total cycles within K*G*N plus the latency of
// about two groups).
module tb_tridiag_solver;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int V = 4, G = 3, NMAX = 16, N = 8, K = 4;
  localparam int S = G * V;   // systems per group
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [V-1:0][31:0] in_data, out_u;
  logic [31:0] out_row, out_grp;
  fp32_t ca, cb, cc;
  real a, b, c;
  real dd  [K][S][N];
  real sol [K][S][N];
  int checks = 0, failures = 0, cyc = 0;
  bit seen [K][G][N];

  tridiag_solver #(.V(V), .G(G), .NMAX(NMAX)) dut (
    .clk, .rst_n, .clear, .n(N), .ca, .cb, .cc, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_u, .out_row, .out_grp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic thomas(input int k, input int s);
    real cs [N];
    real ds [N];
    real r;
    cs[0] = c / b; ds[0] = dd[k][s][0] / b;
    for (int i = 1; i < N; i++) begin
      r = 1.0 / (b - a * cs[i-1]);
      ds[i] = r * (dd[k][s][i] - a * ds[i-1]);
      cs[i] = (i == N - 1) ? 0.0 : r * c;
    end
    sol[k][s][N-1] = ds[N-1];
    for (int i = N - 2; i >= 0; i--) sol[k][s][i] = ds[i] - cs[i] * sol[k][s][i+1];
  endtask

  task automatic run(input bit stalls, output int cycles);
    int t0, sent, got, total;
    logic [V-1:0][31:0] words [$];
    for (int k = 0; k < K; k++) begin
      for (int s = 0; s < S; s++) begin
        for (int i = 0; i < N; i++) dd[k][s][i] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
        thomas(k, s);
      end
      for (int g = 0; g < G; g++)
        for (int rb = 0; rb < N / V; rb++)
          for (int s = 0; s < V; s++) begin
            logic [V-1:0][31:0] w;
            for (int j = 0; j < V; j++) w[j] = r2f(dd[k][g * V + s][rb * V + j]);
            words.push_back(w);
          end
    end
    for (int k = 0; k < K; k++) for (int g = 0; g < G; g++) for (int i = 0; i < N; i++) seen[k][g][i] = 0;
    total = words.size();
    sent = 0; got = 0; t0 = cyc;
    while (got < total) begin
      @(negedge clk);
      in_valid = (sent < total) && (!stalls || $urandom_range(0, 3) != 0);
      in_data  = (sent < total) ? words[sent] : '0;
      out_ready = !stalls || ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) sent++;
      if (out_valid && out_ready) begin
        int k = got / (G * N);
        checks++;
        if (out_row >= N || out_grp >= G || seen[k][out_grp][out_row]) begin
          failures++; $display("FAIL tag row=%0d grp=%0d", out_row, out_grp);
        end else begin
          seen[k][out_grp][out_row] = 1;
          for (int l = 0; l < V; l++) begin
            real want = sol[k][out_grp * V + l][out_row];
            checks++;
            if (!close(f2r(out_u[l]), want, 1e-4, 1e-4)) begin
              failures++;
              $display("FAIL k=%0d g=%0d row=%0d lane=%0d got %g want %g", k, out_grp, out_row, l, f2r(out_u[l]), want);
            end
          end
        end
        got++;
      end
    end
    cycles = cyc - t0;
  endtask

  initial begin
    int cycles;
    a = -0.3; b = 1.6; c = -0.45;
    ca = r2f(a); cb = r2f(b); cc = r2f(c);
    a = f2r(ca); b = f2r(cb); c = f2r(cc);
    in_valid = 0; out_ready = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(1, cycles);
    run(0, cycles);
    checks++;
    if (cycles > K * G * N + 2 * G * N + 2 * V + 12) begin
      failures++; $display("FAIL throughput: %0d cycles for %0d words", cycles, K * G * N);
    end
    $display("no-stall run: %0d cycles for %0d words", cycles, K * G * N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
