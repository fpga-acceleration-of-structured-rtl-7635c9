// tb_stencil_solver: runs the explicit solver end to end against a model of
// external memory. A batch of two random meshes is advanced npass*P time
// steps and compared cell by cell with the five-point scheme computed in real
// arithmetic. Three read delays are tried:
//  - a delay that covers the chain latency: no stall, and the run takes
//    npass*(words + delay) cycles plus at most a few per pass;
//  - a delay just long enough to prime the window buffers: the loop stalls
//    but finishes with the right answer;
//  - delay 0: the loop deadlocks (checked, then cleared by reset).
module tb_stencil_solver;
  import fp32_pkg::*;
  import tb_fp_pkg::*;
  localparam int P = 2, V = 4, DMAX = 64, AW = 16;
  localparam int NX = 10, NW = 3, NY = 6, B = 2, NR = NY * B, TOT = NW * NR;
  logic clk = 0, rst_n = 0, start = 0;
  logic [31:0] npass, delay, stall_cycles;
  logic busy, done, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [V-1:0][31:0] rd_data, wr_data;
  logic [V-1:0][31:0] mem [2*TOT];
  fp32_t ca, cb, cc, cd, ce;
  real mesh [NR][NW*V];
  real nxt  [NR][NW*V];
  real coef [5];
  int checks = 0, failures = 0, cyc = 0;
  int n_nostall = 0, n_stall = 0, n_deadlock = 0;

  stencil_solver #(.P(P), .V(V), .DMAX(DMAX), .AW(AW)) dut (
    .clk, .rst_n, .start, .npass, .nx(NX), .nwords(NW), .ny(NY), .nrows(NR), .delay,
    .base0(AW'(0)), .base1(AW'(TOT)), .ca, .cb, .cc, .cd, .ce,
    .busy, .done, .stall_cycles, .rd_addr, .rd_data, .wr_en, .wr_addr, .wr_data);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign rd_data = mem[rd_addr];
  always @(posedge clk) if (wr_en) mem[wr_addr] <= wr_data;

  initial begin
    repeat (200000) @(posedge clk);
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
    mesh = nxt;
  endtask

  task automatic run(input int np, input int d, output int cycles);
    int t0, fin;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NW * V; x++) begin
        mesh[y][x] = f2r(r2f((real'($urandom_range(0, 20000)) - 10000.0) / 1000.0));
        mem[y * NW + x / V][x % V] = r2f(mesh[y][x]);
      end
    npass = np; delay = d;
    @(negedge clk); start = 1; t0 = cyc;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    @(negedge clk);
    for (int s = 0; s < np * P; s++) step();
    fin = (np % 2 == 1) ? TOT : 0;
    for (int y = 0; y < NR; y++)
      for (int x = 0; x < NW * V; x++) begin
        checks++;
        if (!close(f2r(mem[fin + y * NW + x / V][x % V]), mesh[y][x], 1e-5, 1e-4)) begin
          failures++;
          $display("FAIL d=%0d y=%0d x=%0d got %g want %g", d, y, x,
                   f2r(mem[fin + y * NW + x / V][x % V]), mesh[y][x]);
        end
      end
  endtask

  initial begin
    int cycles;
    coef[0] = 0.1; coef[1] = 0.15; coef[2] = 0.2; coef[3] = 0.125; coef[4] = 0.4;
    ca = r2f(coef[0]); cb = r2f(coef[1]); cc = r2f(coef[2]); cd = r2f(coef[3]); ce = r2f(coef[4]);
    for (int i = 0; i < 5; i++) coef[i] = f2r(r2f(coef[i]));
    npass = 0; delay = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // delay covering the chain latency: P*(W+1) buffer delay plus registers and pipes
    run(3, P * (NW + 1) + 3 * P + 4, cycles);
    checks++;
    if (stall_cycles == 0 && cycles <= 3 * (TOT + P * (NW + 1) + 3 * P + 4) + 4) n_nostall++;
    else begin failures++; $display("FAIL no-stall run: cycles=%0d stalls=%0d", cycles, stall_cycles); end
    // delay equal to the buffer delay only: P*(W+1) words held in the windows, plus one
    run(2, P * (NW + 1) + 1, cycles);
    checks++;
    if (stall_cycles > 0) n_stall++;
    else begin failures++; $display("FAIL expected stalls"); end
    // delay 0: the first pop can never be served
    npass = 1; delay = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    repeat (300) @(negedge clk);
    checks++;
    if (busy && !done && stall_cycles > 290) n_deadlock++;
    else begin failures++; $display("FAIL expected deadlock"); end
    rst_n = 0; @(negedge clk); rst_n = 1;
    run(1, P * (NW + 1) + 3 * P + 4, cycles);
    $display("runs: no-stall %0d, stalled %0d, deadlocked %0d", n_nostall, n_stall, n_deadlock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
