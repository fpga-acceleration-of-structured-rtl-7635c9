// tb_mesh_solvers_top: end-to-end test of both engines at the design's
// default parameters (V = 8, 4096-cell windows, P = 2; V = 8, G = 9,
// systems up to 64 rows).
//
// Explicit engine: a batch of two 64 x 64 meshes is advanced 2*P time steps
// through a model external memory and compared with the five-point scheme in
// real arithmetic; then the read delay is shortened so that the loop stalls,
// and set to 0 so that it deadlocks (cleared with reset).
// Implicit engine: two groups of 72 tridiagonal systems of 64 rows are
// solved with random input gaps and output back-pressure and compared with
// the Thomas algorithm in double precision.
// Each mechanism (no-stall run, stalled run, deadlock, ping-pong buffer
// swap, batching of meshes, tridiagonal back-pressure, overlapped groups)
// is counted and must occur at least once.
module tb_mesh_solvers_top;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int SV = 8, SP = 2;
  localparam int NX = 64, NW = NX / SV, NY = 64, B = 2, NR = NY * B, TOT = NW * NR;
  localparam int TV = 8, TG = 9, TN = 64, TK = 2, TS = TG * TV;

  logic clk = 0, rst_n = 0;
  // stencil side
  logic st_start = 0, st_busy, st_done, st_wr_en;
  logic [31:0] st_npass, st_delay, st_stall_cycles, st_rd_addr, st_wr_addr;
  logic [SV-1:0][31:0] st_rd_data, st_wr_data;
  fp32_t st_ca, st_cb, st_cc, st_cd, st_ce;
  logic [SV-1:0][31:0] smem [2*TOT];
  // tridiagonal side
  logic td_clear = 0, td_in_valid, td_in_ready, td_out_valid, td_out_ready;
  logic [TV-1:0][31:0] td_in_data, td_out_u;
  logic [31:0] td_out_row, td_out_grp;
  fp32_t td_ca, td_cb, td_cc;

  real mesh [NR][NX];
  real nxt  [NR][NX];
  real coef [5];
  real ta, tb_, tc;
  real dd  [TK][TS][TN];
  real sol [TK][TS][TN];
  int checks = 0, failures = 0, cyc = 0;
  int n_nostall = 0, n_stall = 0, n_deadlock = 0, n_swap = 0, n_batch = 0, n_bp = 0, n_overlap = 0;

  mesh_solvers_top dut (
    .clk, .rst_n,
    .st_start, .st_npass, .st_nx(32'(NX)), .st_nwords(32'(NW)), .st_ny(32'(NY)), .st_nrows(32'(NR)),
    .st_delay, .st_base0(32'd0), .st_base1(32'(TOT)),
    .st_ca, .st_cb, .st_cc, .st_cd, .st_ce,
    .st_busy, .st_done, .st_stall_cycles, .st_rd_addr, .st_rd_data, .st_wr_en, .st_wr_addr, .st_wr_data,
    .td_clear, .td_n(32'(TN)), .td_ca, .td_cb, .td_cc,
    .td_in_valid, .td_in_ready, .td_in_data, .td_out_valid, .td_out_ready, .td_out_u,
    .td_out_row, .td_out_grp);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign st_rd_data = smem[st_rd_addr];
  always @(posedge clk) if (st_wr_en) smem[st_wr_addr] <= st_wr_data;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NX; x++) begin
        int ym = y % NY;
        if (x == 0 || x == NX - 1 || ym == 0 || ym == NY - 1) nxt[y][x] = mesh[y][x];
        else nxt[y][x] = coef[0] * mesh[y][x-1] + coef[1] * mesh[y][x+1] + coef[2] * mesh[y-1][x]
                       + coef[3] * mesh[y+1][x] + coef[4] * mesh[y][x];
      end
    mesh = nxt;
  endtask

  task automatic stencil_run(input int np, input int d, output int cycles);
    int t0, fin, bad;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NX; x++) begin
        mesh[y][x] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
        smem[y * NW + x / SV][x % SV] = r2f(mesh[y][x]);
      end
    st_npass = np; st_delay = d;
    @(negedge clk); st_start = 1; t0 = cyc;
    @(negedge clk); st_start = 0;
    while (!st_done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
    for (int s = 0; s < np * SP; s++) step();
    fin = (np % 2 == 1) ? TOT : 0;
    bad = 0;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NX; x++) begin
        checks++;
        if (!close(f2r(smem[fin + y * NW + x / SV][x % SV]), mesh[y][x], 1e-5, 1e-4)) begin
          failures++; bad++;
          if (bad < 5) $display("FAIL stencil y=%0d x=%0d got %g want %g", y, x,
                                f2r(smem[fin + y * NW + x / SV][x % SV]), mesh[y][x]);
        end
      end
    if (np >= 2) n_swap++;
    if (bad == 0) n_batch++;
  endtask

  task automatic thomas(input int k, input int s);
    real cs [TN];
    real ds [TN];
    real r;
    cs[0] = tc / tb_; ds[0] = dd[k][s][0] / tb_;
    for (int i = 1; i < TN; i++) begin
      r = 1.0 / (tb_ - ta * cs[i-1]);
      ds[i] = r * (dd[k][s][i] - ta * ds[i-1]);
      cs[i] = (i == TN - 1) ? 0.0 : r * tc;
    end
    sol[k][s][TN-1] = ds[TN-1];
    for (int i = TN - 2; i >= 0; i--) sol[k][s][i] = ds[i] - cs[i] * sol[k][s][i+1];
  endtask

  task automatic tridiag_run();
    int sent, got, total, bad;
    logic [TV-1:0][31:0] words [$];
    for (int k = 0; k < TK; k++) begin
      for (int s = 0; s < TS; s++) begin
        for (int i = 0; i < TN; i++) dd[k][s][i] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
        thomas(k, s);
      end
      for (int g = 0; g < TG; g++)
        for (int rb = 0; rb < TN / TV; rb++)
          for (int s = 0; s < TV; s++) begin
            logic [TV-1:0][31:0] w;
            for (int j = 0; j < TV; j++) w[j] = r2f(dd[k][g * TV + s][rb * TV + j]);
            words.push_back(w);
          end
    end
    total = words.size();
    sent = 0; got = 0; bad = 0;
    while (got < total) begin
      @(negedge clk);
      td_in_valid = (sent < total) && $urandom_range(0, 4) != 0;
      td_in_data = (sent < total) ? words[sent] : '0;
      td_out_ready = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (td_out_valid && !td_out_ready) n_bp++;
      if (td_in_valid && td_in_ready && td_out_valid) n_overlap++;
      if (td_in_valid && td_in_ready) sent++;
      if (td_out_valid && td_out_ready) begin
        int k;
        k = got / (TG * TN);
        for (int l = 0; l < TV; l++) begin
          real want;
          want = sol[k][td_out_grp * TV + l][td_out_row];
          checks++;
          if (!close(f2r(td_out_u[l]), want, 1e-4, 1e-4)) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL tridiag k=%0d row=%0d grp=%0d got %g want %g", k, td_out_row, td_out_grp,
                                  f2r(td_out_u[l]), want);
          end
        end
        got++;
      end
    end
  endtask

  initial begin
    int cycles, dmin, dfull;
    coef[0] = 0.1; coef[1] = 0.15; coef[2] = 0.2; coef[3] = 0.125; coef[4] = 0.4;
    st_ca = r2f(coef[0]); st_cb = r2f(coef[1]); st_cc = r2f(coef[2]); st_cd = r2f(coef[3]); st_ce = r2f(coef[4]);
    for (int i = 0; i < 5; i++) coef[i] = f2r(r2f(coef[i]));
    ta = -0.4; tb_ = 2.0; tc = -0.7;
    td_ca = r2f(ta); td_cb = r2f(tb_); td_cc = r2f(tc);
    ta = f2r(td_ca); tb_ = f2r(td_cb); tc = f2r(td_cc);
    st_npass = 0; st_delay = 0; td_in_valid = 0; td_out_ready = 0; td_in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    dmin  = SP * (NW + 1) + 1;       // words the window buffers must hold before a result
    dfull = dmin + 3 * SP + 4;       // plus registers and pipes of the chain
    stencil_run(2, dfull, cycles);
    $display("stencil: %0d cycles for 2 passes of %0d words, delay %0d", cycles, TOT, dfull);
    checks++;
    if (st_stall_cycles == 0 && cycles <= 2 * (TOT + dfull) + 4) n_nostall++;
    else begin failures++; $display("FAIL no-stall run: cycles=%0d stalls=%0d", cycles, st_stall_cycles); end
    stencil_run(1, dmin, cycles);
    if (st_stall_cycles > 0) n_stall++;
    st_npass = 1; st_delay = 0;
    @(negedge clk); st_start = 1;
    @(negedge clk); st_start = 0;
    repeat (500) @(negedge clk);
    if (st_busy && !st_done) n_deadlock++;
    rst_n = 0; @(negedge clk); rst_n = 1;
    tridiag_run();
    checks++;
    if (n_nostall == 0 || n_stall == 0 || n_deadlock == 0 || n_swap == 0 || n_batch == 0 || n_bp == 0 || n_overlap == 0)
      failures++;
    $display("mechanisms: no-stall %0d, stalled %0d, deadlock %0d, ping-pong %0d, batch %0d, back-pressure %0d, overlapped groups %0d",
             n_nostall, n_stall, n_deadlock, n_swap, n_batch, n_bp, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
