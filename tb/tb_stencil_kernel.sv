// tb_stencil_kernel: streams two batches of random meshes through one
// stencil kernel, with random gaps on the input and back-pressure on the
// output, and compares every output cell with the five-point scheme worked
// out in real arithmetic. A third pass runs without stalls and checks that
// a pass takes W*R + W + 1 cycles.
module tb_stencil_kernel;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int V = 4, DMAX = 64;
  localparam int NX = 10, NW = 3, NY = 5, B = 2, NR = NY * B;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid, in_ready, out_valid, out_ready, pass_done;
  logic [V-1:0][31:0] in_data, out_data;
  fp32_t ca, cb, cc, cd, ce;
  int checks = 0, failures = 0;
  real mesh [NR][NW*V];
  real coef [5];

  stencil_kernel #(.V(V), .DMAX(DMAX)) dut (
    .clk, .rst_n, .clear, .nx(NX), .nwords(NW), .ny(NY), .nrows(NR),
    .ca, .cb, .cc, .cd, .ce, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data, .pass_done);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expect_cell(int y, int x);
    int ym = y % NY;
    if (x == 0 || x >= NX - 1 || ym == 0 || ym == NY - 1) return mesh[y][x];
    return coef[0] * mesh[y][x-1] + coef[1] * mesh[y][x+1] + coef[2] * mesh[y-1][x]
         + coef[3] * mesh[y+1][x] + coef[4] * mesh[y][x];
  endfunction

  task automatic run_pass(input bit stalls, output int cycles);
    int ki, ko, c;
    ki = 0; ko = 0; c = 0;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NW * V; x++)
        mesh[y][x] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
    while (ko < NW * NR) begin
      @(negedge clk);
      in_valid = (ki < NW * NR) && (!stalls || $urandom_range(0, 3) != 0);
      for (int l = 0; l < V; l++) in_data[l] = r2f(mesh[ki / NW][(ki % NW) * V + l]);
      out_ready = !stalls || ($urandom_range(0, 2) != 0);
      @(posedge clk);
      c++;
      if (in_valid && in_ready) ki++;
      if (out_valid && out_ready) begin
        for (int l = 0; l < V; l++) begin
          real want, got;
          int y = ko / NW, x = (ko % NW) * V + l;
          want = expect_cell(y, x);
          got  = f2r(out_data[l]);
          checks++;
          if (!close(got, want, 1e-6, 2e-5)) begin
            failures++;
            $display("FAIL y=%0d x=%0d got %g want %g", y, x, got, want);
          end
        end
        ko++;
      end
    end
    cycles = c;
  endtask

  initial begin
    int cyc;
    coef[0] = 0.1; coef[1] = 0.2; coef[2] = 0.125; coef[3] = 0.175; coef[4] = 0.4;
    ca = r2f(coef[0]); cb = r2f(coef[1]); cc = r2f(coef[2]); cd = r2f(coef[3]); ce = r2f(coef[4]);
    for (int i = 0; i < 5; i++) coef[i] = f2r(r2f(coef[i]));
    in_valid = 0; out_ready = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_pass(1, cyc);
    run_pass(1, cyc);
    // let the kernel finish its flush iterations of this pass
    @(negedge clk); in_valid = 0; out_ready = 1;
    @(posedge clk);
    run_pass(0, cyc);
    checks++;
    // the pass ends at iteration W*R+W+1; the last word leaves one cycle after it is produced
    if (cyc != NW * NR + NW + 2) begin failures++; $display("FAIL cycles %0d", cyc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
