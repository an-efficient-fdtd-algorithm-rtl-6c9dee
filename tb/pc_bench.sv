// pc_bench: runs one engine configuration (word width W, FRAC fraction
// bits, full 124 x 124 grid) on the photonic-crystal bend for STEPS time
// steps and compares its fields bit for bit with the fixed-point reference.
// It also measures, against a double-precision model of the same structure,
// the mean absolute Ez error over the grid and the relative error
// (sum |error| / sum |Ez|) after the last step. Used by tb_fdtd_wordlen.
// Results are left in checks, failures, abs_err, rel_err; finished is set
// at the end.
module pc_bench
  import fdtd_pkg::*;
  import fdtd_ref_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned FRAC  = 24,
  parameter int unsigned STEPS = 300
) ();
  localparam int unsigned N = DEF_N, NT = DEF_NT, PML = 10;
  localparam real S = 0.5, EPS_SI = 12.1, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, host_we, host_re, host_rvalid;
  logic [9:0] n_steps, step, host_n;
  logic [6:0] src_x, src_y, host_x, host_y;
  logic [1:0][6:0] mon_x, mon_y;
  host_sel_e host_sel;
  logic [W-1:0] host_wdata, host_rdata;

  fdtd_top #(.W(W), .FRAC(FRAC)) dut (.*);

  int  checks = 0, failures = 0;
  bit  finished = 0;
  real abs_err, rel_err;

  task automatic hwrite(host_sel_e s, int x, int y, int n, longint d);
    host_we = 1; host_sel = s; host_x = 7'(x); host_y = 7'(y); host_n = 10'(n);
    host_wdata = d[W-1:0];
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic hread(host_sel_e s, int x, int y, output longint d);
    host_re = 1; host_sel = s; host_x = 7'(x); host_y = 7'(y); host_n = 0;
    @(posedge clk); #1 host_re = 0;
    d = wrap(longint'(host_rdata), W);
  endtask

  function automatic longint fx(real v);
    return longint'(v * (2.0 ** FRAC));
  endfunction

  fdtd_ref  ref_m;
  fdtd_real dbl;

  initial begin
    int ysrc;
    longint d;
    real sum_e, sum_d, v;
    start = 0; n_steps = 0; host_we = 0; host_re = 0; host_sel = SEL_EZ;
    host_x = 0; host_y = 0; host_n = 0; host_wdata = 0;
    ysrc = (N - 84) / 2 + 3 * 12 + 6;
    src_x = 7'(PML + 3); src_y = 7'(ysrc);
    mon_x[0] = 7'(PML + 6); mon_y[0] = 7'(ysrc);
    mon_x[1] = 7'(ysrc);    mon_y[1] = 7'(PML + 4);
    ref_m = new(N, W, FRAC);
    dbl = new(N);
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int k;
        real g, er;
        k = x*N + y;
        g = pc_loss(N, PML, x, y);
        er = pc_is_si(N, x, y) ? EPS_SI : 1.0;
        dbl.ceze[k] = (1.0 - g) / (1.0 + g);
        dbl.cezh[k] = S / er / (1.0 + g);
        dbl.chxh[k] = dbl.ceze[k]; dbl.chyh[k] = dbl.ceze[k];
        dbl.chxe[k] = S / (1.0 + g); dbl.chye[k] = dbl.chxe[k];
        ref_m.ceze[k] = fx(dbl.ceze[k]); ref_m.cezh[k] = fx(dbl.cezh[k]);
        ref_m.chxh[k] = fx(dbl.chxh[k]); ref_m.chyh[k] = fx(dbl.chyh[k]);
        ref_m.chxe[k] = fx(dbl.chxe[k]); ref_m.chye[k] = fx(dbl.chye[k]);
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
    for (int n = 0; n < NT; n++)
      hwrite(SEL_SRC, 0, 0, n, fx($sin(2.0 * PI * real'(n) * S * 0.0375 / 1.55)));
    start = 1; n_steps = 10'(STEPS);
    @(posedge clk); #1 start = 0;
    while (!done) begin @(posedge clk); #1; end
    for (int s = 0; s < STEPS; s++) begin
      real sv;
      sv = $sin(2.0 * PI * real'(s) * S * 0.0375 / 1.55);
      ref_m.step(fx(sv), int'(src_x), int'(src_y));
      dbl.step(sv, int'(src_x), int'(src_y));
    end
    sum_e = 0.0; sum_d = 0.0;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        int k;
        k = x*N + y;
        hread(SEL_EZ, x, y, d); checks++;
        if (d != ref_m.ez[k]) begin failures++; if (failures < 5) $display("W=%0d Ez(%0d,%0d) %0d exp %0d", W, x, y, d, ref_m.ez[k]); end
        v = real'(d) / (2.0 ** FRAC);
        sum_d += (v > dbl.ez[k]) ? v - dbl.ez[k] : dbl.ez[k] - v;
        sum_e += (dbl.ez[k] > 0.0) ? dbl.ez[k] : -dbl.ez[k];
        hread(SEL_HX, x, y, d); checks++;
        if (d != ref_m.hx[k]) failures++;
        hread(SEL_HY, x, y, d); checks++;
        if (d != ref_m.hy[k]) failures++;
      end
    abs_err = sum_d / real'(N * N);
    rel_err = sum_d / sum_e;
    finished = 1;
  end
endmodule
