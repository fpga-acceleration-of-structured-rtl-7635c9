// tb_stencil_chain: sends two batches of meshes through a chain of three
// kernels with random input gaps and output back-pressure, and checks that
// every cell equals three time steps of the five-point scheme computed in
// real arithmetic.
module tb_stencil_chain;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 3, V = 4, DMAX = 64;
  localparam int NX = 11, NW = 3, NY = 6, B = 2, NR = NY * B;
  logic clk = 0, rst_n = 0, clear = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [V-1:0][31:0] in_data, out_data;
  fp32_t ca, cb, cc, cd, ce;
  int checks = 0, failures = 0;
  real mesh [NR][NW*V];
  real nxt  [NR][NW*V];
  real coef [5];

  stencil_chain #(.P(P), .V(V), .DMAX(DMAX)) dut (
    .clk, .rst_n, .clear, .nx(NX), .nwords(NW), .ny(NY), .nrows(NR),
    .ca, .cb, .cc, .cd, .ce, .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NW * V; x++) begin
        int ym = y % NY;
        if (x == 0 || x >= NX - 1 || ym == 0 || ym == NY - 1) nxt[y][x] = mesh[y][x];
        else nxt[y][x] = coef[0] * mesh[y][x-1] + coef[1] * mesh[y][x+1] + coef[2] * mesh[y-1][x]
                       + coef[3] * mesh[y+1][x] + coef[4] * mesh[y][x];
      end
  endtask

  task automatic run_batch();
    real inm [NR][NW*V];
    int ki = 0, ko = 0;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NW * V; x++) begin
        mesh[y][x] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
        inm[y][x] = mesh[y][x];
      end
    for (int s = 0; s < P; s++) begin
      step();
      mesh = nxt;
    end
    while (ko < NW * NR) begin
      @(negedge clk);
      in_valid = (ki < NW * NR) && ($urandom_range(0, 3) != 0);
      for (int l = 0; l < V; l++) in_data[l] = r2f(inm[ki / NW][(ki % NW) * V + l]);
      out_ready = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (in_valid && in_ready) ki++;
      if (out_valid && out_ready) begin
        for (int l = 0; l < V; l++) begin
          int y = ko / NW, x = (ko % NW) * V + l;
          checks++;
          if (!close(f2r(out_data[l]), mesh[y][x], 1e-5, 1e-4)) begin
            failures++;
            $display("FAIL y=%0d x=%0d got %g want %g", y, x, f2r(out_data[l]), mesh[y][x]);
          end
        end
        ko++;
      end
    end
  endtask

  initial begin
    coef[0] = 0.15; coef[1] = 0.1; coef[2] = 0.125; coef[3] = 0.2; coef[4] = 0.4;
    ca = r2f(coef[0]); cb = r2f(coef[1]); cc = r2f(coef[2]); cd = r2f(coef[3]); ce = r2f(coef[4]);
    for (int i = 0; i < 5; i++) coef[i] = f2r(r2f(coef[i]));
    in_valid = 0; out_ready = 1; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_batch();
    run_batch();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
