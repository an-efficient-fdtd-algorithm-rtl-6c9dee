// tb_strip_engine: one strip engine (rows 3..5, the middle strip of a 9 x 9
// grid cut into strips of R = 3 rows) runs two time steps. The testbench
// plays the field memories (one-clock reads) and the two neighbouring
// strips: it returns the old top-row Hx of the strip below and the new
// bottom-row Ez of the strip above at the clocks the engine needs them. Every
// Ez and Hx/Hy write is compared with the full-grid reference model, and
// the write clocks are checked: Ez 5 and H 8 clocks after the slot.
module tb_strip_engine;
  import fdtd_ref_pkg::*;
  localparam int unsigned N = 9, R = 3, IDX = 1, W = 32, FRAC = 24;
  localparam int unsigned BASE = IDX * R;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic slot_valid;
  logic [3:0] col;
  logic [1:0] row;
  logic [4:0] rd_addr, rd_top_addr, ez_waddr, h_waddr, c_addr;
  logic signed [W-1:0] ez_rd, hx_rd, hy_rd, hx_below_top, ez_above_bot, ez_bot_prev;
  logic ez_we, h_we, ce_we, ch_we, src_hit;
  logic signed [W-1:0] ez_wdata, hx_wdata, hy_wdata, src_val;
  logic [3:0] ez_wcol, src_x, src_y;
  logic [1:0] ez_wrow, c_lane;
  logic [W-1:0] c_wdata;

  strip_engine #(.N(N), .R(R), .IDX(IDX), .W(W), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, n_ez = 0, n_h = 0, n_hit = 0;
  fdtd_ref ref_m;
  longint old_ez[], old_hx[], old_hy[];
  int slot_t [int];   // address -> clock its slot was issued

  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // field memories of this strip and the strip below (previous step)
  always @(posedge clk) begin
    int x, y, xt;
    longint a, b, c, d;
    x = int'(rd_addr) / R; y = BASE + int'(rd_addr) % R;
    xt = int'(rd_top_addr) / R;
    a = old_ez[x*N + y]; b = old_hx[x*N + y]; c = old_hy[x*N + y];
    d = old_hx[xt*N + BASE - 1];
    ez_rd <= a[W-1:0];
    hx_rd <= b[W-1:0];
    hy_rd <= c[W-1:0];
    hx_below_top <= d[W-1:0];
  end

  // strip above: new Ez of its bottom row, column c-1, five clocks after slot c
  logic [3:0] col_d [6];
  always @(posedge clk) begin
    col_d[0] <= col;
    for (int k = 1; k < 6; k++) col_d[k] <= col_d[k-1];
  end
  always_comb begin
    int c;
    longint e;
    c = int'(col_d[4]);
    e = (c >= 1 && c <= N) ? ref_m.ez[(c-1)*N + BASE + R] : 0;
    ez_above_bot = e[W-1:0];
  end

  // compare writes
  always @(posedge clk) if (rst_n) begin
    if (ez_we) begin
      int x, y;
      x = int'(ez_waddr) / R; y = BASE + int'(ez_waddr) % R;
      checks += 2; n_ez++;
      if (longint'(ez_wdata) != ref_m.ez[x*N + y]) begin failures++; $display("Ez(%0d,%0d) %0d exp %0d", x, y, ez_wdata, ref_m.ez[x*N+y]); end
      if (cyc - slot_t[x*R + y - BASE] != 5) begin failures++; $display("Ez latency %0d", cyc - slot_t[x*R + y - BASE]); end
    end
    if (h_we) begin
      int x, y;
      x = int'(h_waddr) / R; y = BASE + int'(h_waddr) % R;
      checks += 3; n_h++;
      if (longint'(hx_wdata) != ref_m.hx[x*N + y]) begin failures++; $display("Hx(%0d,%0d) %0d exp %0d", x, y, hx_wdata, ref_m.hx[x*N+y]); end
      if (longint'(hy_wdata) != ref_m.hy[x*N + y]) begin failures++; $display("Hy(%0d,%0d) %0d exp %0d", x, y, hy_wdata, ref_m.hy[x*N+y]); end
      if (cyc - slot_t[(x+1)*R + y - BASE] != 8) begin failures++; $display("H latency %0d", cyc - slot_t[(x+1)*R + y - BASE]); end
    end
    if (src_hit) n_hit++;
  end

  function automatic longint frnd(real lo, real hi);
    real r = lo + (hi - lo) * real'($urandom % 10000) / 10000.0;
    return longint'(r * real'(1 << FRAC));
  endfunction

  task automatic cwrite(bit h, int lane, int x, int r, longint d);
    ce_we = !h; ch_we = h; c_lane = 2'(lane); c_addr = 5'(x*R + r); c_wdata = W'(d);
    @(posedge clk); #1 ce_we = 0; ch_we = 0;
  endtask

  initial begin
    slot_valid = 0; col = 0; row = 0; ce_we = 0; ch_we = 0; c_lane = 0; c_addr = 0; c_wdata = 0;
    src_x = 4; src_y = 4; src_val = 0;
    ref_m = new(N, W, FRAC);
    foreach (ref_m.ez[k]) begin
      ref_m.ceze[k] = frnd(0.5, 1.0); ref_m.cezh[k] = frnd(0.0, 0.5);
      ref_m.chxh[k] = frnd(0.5, 1.0); ref_m.chxe[k] = frnd(0.0, 0.5);
      ref_m.chyh[k] = frnd(0.5, 1.0); ref_m.chye[k] = frnd(0.0, 0.5);
      ref_m.ez[k] = frnd(-1.0, 1.0); ref_m.hx[k] = frnd(-1.0, 1.0); ref_m.hy[k] = frnd(-1.0, 1.0);
    end
    old_ez = ref_m.ez; old_hx = ref_m.hx; old_hy = ref_m.hy;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int x = 0; x < N; x++)
      for (int r = 0; r < R; r++) begin
        int k;
        k = x*N + BASE + r;
        cwrite(0, 0, x, r, ref_m.ceze[k]); cwrite(0, 1, x, r, ref_m.cezh[k]);
        cwrite(1, 0, x, r, ref_m.chxh[k]); cwrite(1, 1, x, r, ref_m.chxe[k]);
        cwrite(1, 2, x, r, ref_m.chyh[k]); cwrite(1, 3, x, r, ref_m.chye[k]);
      end
    for (int s = 0; s < 2; s++) begin
      longint sv;
      sv = frnd(-1.0, 1.0);
      old_ez = ref_m.ez; old_hx = ref_m.hx; old_hy = ref_m.hy;
      ref_m.step(sv, 4, 4);
      src_val = W'(sv);
      for (int c = 0; c <= N; c++)
        for (int r = 0; r < R; r++) begin
          slot_valid = 1; col = 4'(c); row = 2'(r);
          slot_t[c*R + r] = cyc + 1;
          @(posedge clk); #1;
        end
      slot_valid = 0;
      repeat (12) @(posedge clk);
      #1;
    end
    checks += 3;
    if (n_ez != 2*N*R) begin failures++; $display("%0d Ez writes", n_ez); end
    if (n_h != 2*N*R)  begin failures++; $display("%0d H writes", n_h); end
    if (n_hit != 2)    begin failures++; $display("%0d source hits", n_hit); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
