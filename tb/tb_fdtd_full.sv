// tb_fdtd_full: the engine at its default size (124 x 124 grid, 4 strips,
// 32-bit words, 1000-entry source table) simulating a 90-degree bend in a
// 7 x 7 photonic crystal of square silicon rods.
//
// Model (cell size dx = 4.65 um / 124 = 37.5 nm): rods of 4 x 4 cells
// (0.15 um) on a 12-cell (0.45 um) pitch, centred in the grid; the rods of
// the middle row from the left edge to the centre and of the middle column
// below the centre are removed to form the bent guide. Silicon eps_r = 12.1.
// Courant number S = c*dt/dx = 0.5, fields normalised so that
//   Ceze = Chxh = Chyh = (1 - g)/(1 + g),  Cezh = S/eps_r/(1 + g),
//   Chxe = Chye = S/(1 + g),
// with g a loss that grows quadratically over a 10-cell absorbing border
// (a matched lossy layer standing in for the PML). A soft sine source of
// wavelength 1.55 um (82.7 steps per period) drives the left end of the
// guide; monitor 0 sits just after it, monitor 1 at the lower exit.
//
// It runs STEPS time steps in one run and compares every field value and
// both monitor records with the bit-exact reference, and the run length
// with (N+1)*R + ENGINE_LAT + 3 clocks per step.
module tb_fdtd_full;
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;
  localparam int unsigned N = DEF_N, M = DEF_M, W = DEF_W, FRAC = DEF_FRAC, NT = DEF_NT;
  localparam int unsigned R = N / M;
  localparam int unsigned STEP_CLK = (N + 1) * R + ENGINE_LAT + 3;
  localparam int unsigned STEPS = 1000;
  localparam int unsigned PML = 10;
  localparam real S = 0.5, EPS_SI = 12.1, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, host_we, host_re, host_rvalid;
  logic [9:0] n_steps, step, host_n;
  logic [6:0] src_x, src_y, host_x, host_y;
  logic [1:0][6:0] mon_x, mon_y;
  host_sel_e host_sel;
  logic [W-1:0] host_wdata, host_rdata;

  fdtd_top dut (.*);

  int checks = 0, failures = 0;
  int n_src = 0, n_swap = 0, n_mon = 0;
  logic sel_d;
  always @(posedge clk) if (!rst_n) sel_d <= dut.sel;
  else begin
    sel_d <= dut.sel;
    if (dut.sel != sel_d) n_swap++;
    if (|dut.src_hit) n_src++;
    if (dut.u_mon.hit != 0) n_mon++;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic hwrite(host_sel_e s, int x, int y, int n, longint d);
    host_we = 1; host_sel = s; host_x = 7'(x); host_y = 7'(y); host_n = 10'(n);
    host_wdata = d[W-1:0];
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic hread(host_sel_e s, int x, int y, int n, output longint d);
    host_re = 1; host_sel = s; host_x = 7'(x); host_y = 7'(y); host_n = 10'(n);
    @(posedge clk); #1 host_re = 0;
    d = wrap(longint'(host_rdata), W);
  endtask

  function automatic longint fx(real v);
    return longint'(v * real'(1 << FRAC));
  endfunction

  fdtd_ref ref_m;
  longint src_tab [NT];

  initial begin
    int cyc, ysrc;
    longint d;
    real e2;
    start = 0; n_steps = 0; host_we = 0; host_re = 0; host_sel = SEL_EZ;
    host_x = 0; host_y = 0; host_n = 0; host_wdata = 0;
    ysrc = (N - 84) / 2 + 3 * 12 + 6;      // centre row of the guide
    src_x = 7'(PML + 3); src_y = 7'(ysrc);
    mon_x[0] = 7'(PML + 6);  mon_y[0] = 7'(ysrc);
    mon_x[1] = 7'((N - 84) / 2 + 3 * 12 + 6); mon_y[1] = 7'(PML + 4);
    ref_m = new(N, W, FRAC);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int k;
        real g, er;
        k = x*N + y;
        g = pc_loss(N, PML, x, y);
        er = pc_is_si(N, x, y) ? EPS_SI : 1.0;
        ref_m.ceze[k] = fx((1.0 - g) / (1.0 + g));
        ref_m.cezh[k] = fx(S / er / (1.0 + g));
        ref_m.chxh[k] = ref_m.ceze[k];
        ref_m.chyh[k] = ref_m.ceze[k];
        ref_m.chxe[k] = fx(S / (1.0 + g));
        ref_m.chye[k] = ref_m.chxe[k];
        hwrite(SEL_CEZE, x, y, 0, ref_m.ceze[k]);
        hwrite(SEL_CEZH, x, y, 0, ref_m.cezh[k]);
        hwrite(SEL_CHXH, x, y, 0, ref_m.chxh[k]);
        hwrite(SEL_CHXE, x, y, 0, ref_m.chxe[k]);
        hwrite(SEL_CHYH, x, y, 0, ref_m.chyh[k]);
        hwrite(SEL_CHYE, x, y, 0, ref_m.chye[k]);
        hwrite(SEL_EZ, x, y, 0, 0);
        hwrite(SEL_HX, x, y, 0, 0);
        hwrite(SEL_HY, x, y, 0, 0);
      end
    for (int n = 0; n < NT; n++) begin
      src_tab[n] = fx($sin(2.0 * PI * real'(n) * S * 0.0375 / 1.55));
      hwrite(SEL_SRC, 0, 0, n, src_tab[n]);
    end
    start = 1; n_steps = 10'(STEPS);
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != STEPS * STEP_CLK + 1) begin failures++; $display("run took %0d clocks", cyc); end
    for (int s = 0; s < STEPS; s++) begin
      int mx0, my0, mx1, my1;
      ref_m.step(src_tab[s], int'(src_x), int'(src_y));
      mx0 = int'(mon_x[0]); my0 = int'(mon_y[0]); mx1 = int'(mon_x[1]); my1 = int'(mon_y[1]);
      hread(SEL_MON0, 0, 0, s, d); checks++;
      if (d != ref_m.ez[mx0*N + my0]) begin failures++; $display("mon0[%0d] %0d exp %0d", s, d, ref_m.ez[mx0*N+my0]); end
      hread(SEL_MON1, 0, 0, s, d); checks++;
      if (d != ref_m.ez[mx1*N + my1]) begin failures++; $display("mon1[%0d] %0d exp %0d", s, d, ref_m.ez[mx1*N+my1]); end
    end
    e2 = 0.0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int k;
        k = x*N + y;
        hread(SEL_EZ, x, y, 0, d); checks++;
        e2 += (real'(d) / real'(1 << FRAC)) ** 2;
        if (d != ref_m.ez[k]) begin failures++; if (failures < 10) $display("Ez(%0d,%0d) %0d exp %0d", x, y, d, ref_m.ez[k]); end
        hread(SEL_HX, x, y, 0, d); checks++;
        if (d != ref_m.hx[k]) begin failures++; if (failures < 10) $display("Hx(%0d,%0d)", x, y); end
        hread(SEL_HY, x, y, 0, d); checks++;
        if (d != ref_m.hy[k]) begin failures++; if (failures < 10) $display("Hy(%0d,%0d)", x, y); end
      end
    checks += 4;
    if (n_src != STEPS) begin failures++; $display("source injected %0d times", n_src); end
    if (n_swap != STEPS) begin failures++; $display("swapped %0d times", n_swap); end
    if (n_mon != 2 * STEPS) begin failures++; $display("monitor samples %0d", n_mon); end
    if (e2 == 0.0) begin failures++; $display("no field"); end
    $display("after %0d steps: sum Ez^2 = %f, run %0d clocks", STEPS, e2, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
