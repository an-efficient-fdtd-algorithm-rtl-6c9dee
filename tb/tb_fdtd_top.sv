// tb_fdtd_top: end-to-end test of the FDTD engine on a reduced grid
// (N = 8 cells, M = 2 strips of R = 4 rows, 32-bit words, 16-entry source
// table). The host loads random multiplication factors, random initial
// fields and a sampled sine source, runs 5 time steps, then 3 more
// (continuing from the swapped memories), and after each run reads back
// every Ez, Hx and Hy cell and both monitor records. All values must equal
// the bit-exact reference model; the run length in clocks is checked too.
// It counts the engine's mechanisms and fails if one never happened: the
// Hx hand-over from the strip below, the Ez hand-over from the strip above,
// source injection, memory swap, the extra H-only column, monitor capture.
module tb_fdtd_top;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;
  localparam int unsigned N = 8, M = 2, W = 32, FRAC = 24, NT = 16;
  localparam int unsigned R = N / M;
  localparam int unsigned STEP_CLK = (N + 1) * R + ENGINE_LAT + 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, host_we, host_re, host_rvalid;
  logic [4:0] n_steps, step;
  logic [2:0] src_x, src_y, host_x, host_y;
  logic [1:0][2:0] mon_x, mon_y;
  logic [3:0] host_n;
  host_sel_e host_sel;
  logic [W-1:0] host_wdata, host_rdata;

  fdtd_top #(.N(N), .M(M), .W(W), .FRAC(FRAC), .NT(NT)) dut (.*);

  int checks = 0, failures = 0;
  int n_hx_xchg = 0, n_ez_xchg = 0, n_src = 0, n_swap = 0, n_hcol = 0, n_mon = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  logic sel_d;
  always @(posedge clk) if (!rst_n) sel_d <= dut.sel;
  else begin
    sel_d <= dut.sel;
    if (dut.sel != sel_d) n_swap++;
    if (dut.g_strip[1].u_eng.v1 && dut.g_strip[1].u_eng.row1 == 0 &&
        dut.g_strip[1].u_eng.col1 < N && dut.g_strip[1].u_eng.hx_below_top != 0) n_hx_xchg++;
    if (dut.g_strip[0].u_eng.h_go && dut.g_strip[0].u_eng.p5.row == R - 1 &&
        dut.g_strip[0].u_eng.ez_above_bot != 0) n_ez_xchg++;
    if (|dut.src_hit) n_src++;
    if (dut.slot_valid && dut.col == N) n_hcol++;
    if (dut.u_mon.hit != 0) n_mon++;
  end

  task automatic hwrite(host_sel_e s, int x, int y, int n, longint d);
    host_we = 1; host_sel = s; host_x = 3'(x); host_y = 3'(y); host_n = 4'(n);
    host_wdata = W'(d);
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic hread(host_sel_e s, int x, int y, int n, output longint d);
    host_re = 1; host_sel = s; host_x = 3'(x); host_y = 3'(y); host_n = 4'(n);
    @(posedge clk); #1 host_re = 0;
    if (!host_rvalid) begin failures++; $display("no rvalid"); end
    d = wrap(longint'(host_rdata), W);
  endtask

  function automatic longint frnd(real lo, real hi);
    real r = lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
    return longint'(r * real'(1 << FRAC));
  endfunction

  fdtd_ref ref_m;
  longint src_tab [NT];
  longint mon_exp [2][NT];

  task automatic run_and_check(int steps, int t0);
    int cyc;
    longint d;
    start = 1; n_steps = 5'(steps);
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != steps * STEP_CLK + 1) begin
      failures++; $display("run of %0d steps took %0d clocks, expected %0d", steps, cyc, steps * STEP_CLK + 1);
    end
    for (int s = 0; s < steps; s++) begin
      ref_m.step(src_tab[s], int'(src_x), int'(src_y));
      for (int m = 0; m < 2; m++) begin
        int mx, my;
        mx = int'(mon_x[m]); my = int'(mon_y[m]);
        mon_exp[m][t0 + s] = ref_m.ez[mx * N + my];
      end
    end
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        hread(SEL_EZ, x, y, 0, d); checks++;
        if (d != ref_m.ez[x*N + y]) begin failures++; $display("Ez(%0d,%0d) %0d exp %0d", x, y, d, ref_m.ez[x*N+y]); end
        hread(SEL_HX, x, y, 0, d); checks++;
        if (d != ref_m.hx[x*N + y]) begin failures++; $display("Hx(%0d,%0d) %0d exp %0d", x, y, d, ref_m.hx[x*N+y]); end
        hread(SEL_HY, x, y, 0, d); checks++;
        if (d != ref_m.hy[x*N + y]) begin failures++; $display("Hy(%0d,%0d) %0d exp %0d", x, y, d, ref_m.hy[x*N+y]); end
      end
    // monitor records of this run (the step index restarts at each run)
    for (int m = 0; m < 2; m++)
      for (int s = 0; s < steps; s++) begin
        hread(m == 0 ? SEL_MON0 : SEL_MON1, 0, 0, s, d); checks++;
        if (d != mon_exp[m][t0 + s]) begin failures++; $display("mon%0d[%0d] %0d exp %0d", m, s, d, mon_exp[m][t0+s]); end
      end
  endtask

  initial begin
    start = 0; n_steps = 0; host_we = 0; host_re = 0; host_sel = SEL_EZ;
    host_x = 0; host_y = 0; host_n = 0; host_wdata = 0;
    src_x = 2; src_y = 3;                  // top row of strip 0
    mon_x[0] = 5; mon_y[0] = 4;            // bottom row of strip 1
    mon_x[1] = 1; mon_y[1] = 1;
    ref_m = new(N, W, FRAC);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int k;
        k = x*N + y;
        ref_m.ceze[k] = frnd(0.5, 1.0);  hwrite(SEL_CEZE, x, y, 0, ref_m.ceze[k]);
        ref_m.cezh[k] = frnd(0.0, 0.5);  hwrite(SEL_CEZH, x, y, 0, ref_m.cezh[k]);
        ref_m.chxh[k] = frnd(0.5, 1.0);  hwrite(SEL_CHXH, x, y, 0, ref_m.chxh[k]);
        ref_m.chxe[k] = frnd(0.0, 0.5);  hwrite(SEL_CHXE, x, y, 0, ref_m.chxe[k]);
        ref_m.chyh[k] = frnd(0.5, 1.0);  hwrite(SEL_CHYH, x, y, 0, ref_m.chyh[k]);
        ref_m.chye[k] = frnd(0.0, 0.5);  hwrite(SEL_CHYE, x, y, 0, ref_m.chye[k]);
        ref_m.ez[k] = frnd(-1.0, 1.0);   hwrite(SEL_EZ, x, y, 0, ref_m.ez[k]);
        ref_m.hx[k] = frnd(-1.0, 1.0);   hwrite(SEL_HX, x, y, 0, ref_m.hx[k]);
        ref_m.hy[k] = frnd(-1.0, 1.0);   hwrite(SEL_HY, x, y, 0, ref_m.hy[k]);
      end
    for (int n = 0; n < NT; n++) begin
      src_tab[n] = longint'($sin(2.0 * 3.14159265 * n / 7.0) * real'(1 << FRAC));
      hwrite(SEL_SRC, 0, 0, n, src_tab[n]);
    end
    run_and_check(5, 0);
    run_and_check(3, 5);
    checks += 6;
    if (n_hx_xchg == 0) begin failures++; $display("no Hx hand-over between strips"); end
    if (n_ez_xchg == 0) begin failures++; $display("no Ez hand-over between strips"); end
    if (n_src != 8)     begin failures++; $display("source injected %0d times", n_src); end
    if (n_swap != 8)    begin failures++; $display("memory swapped %0d times", n_swap); end
    if (n_hcol != 8*R)  begin failures++; $display("H-only slots %0d", n_hcol); end
    if (n_mon != 16)    begin failures++; $display("monitor samples %0d", n_mon); end
    $display("mechanisms: hx_xchg=%0d ez_xchg=%0d src=%0d swap=%0d hcol=%0d mon=%0d",
             n_hx_xchg, n_ez_xchg, n_src, n_swap, n_hcol, n_mon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
