// tb_ez_pipe: streams random cells (with random gaps) through the Ez
// pipeline and checks every result against the reference arithmetic and its
// latency of exactly 3 clocks.
module tb_ez_pipe;
  import fdtd_ref_pkg::*;
  localparam int unsigned W = 32, FRAC = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [W-1:0] ez, hy, hy_w, hx, hx_s, ceze, cezh, ez_new;
  int checks = 0, failures = 0, cyc = 0;
  longint exp_q[$];
  int     t_q[$];

  ez_pipe #(.W(W), .FRAC(FRAC)) dut (.*);

  always @(posedge clk) cyc++;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(int sh);
    return longint'($signed($urandom)) >>> sh;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
    else begin
      longint e; int t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      if (longint'(ez_new) != e) begin failures++; $display("ez got %0d exp %0d", ez_new, e); end
      if (cyc - t != 3) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      longint c, e;
      in_valid = ($urandom % 4) != 0;
      ez = W'(rnd(4)); hy = W'(rnd(6)); hy_w = W'(rnd(6)); hx = W'(rnd(6)); hx_s = W'(rnd(6));
      ceze = W'(rnd(7)); cezh = W'(rnd(6));
      if (k == 0) begin  // a hand-worked case: Ez=1, Ceze=0.5, curl=2-1-(0.5-0)=0.5, Cezh=0.25
        ez = 1 << FRAC; ceze = 1 << (FRAC-1); hy = 2 << FRAC; hy_w = 1 << FRAC;
        hx = 1 << (FRAC-1); hx_s = 0; cezh = 1 << (FRAC-2); in_valid = 1;
      end
      c = wrap(wrap(longint'(hy) - longint'(hy_w), W) - wrap(longint'(hx) - longint'(hx_s), W), W);
      e = wrap(fmul(ceze, ez, W, FRAC) + fmul(cezh, c, W, FRAC), W);
      if (k == 0) begin
        checks++;
        if (e != ((1 << (FRAC-1)) + (1 << (FRAC-3)))) begin failures++; $display("hand case model"); end
      end
      if (in_valid) begin exp_q.push_back(e); t_q.push_back(cyc + 1); end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
