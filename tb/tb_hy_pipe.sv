// tb_hy_pipe: streams random cells (with random gaps) through the Hy
// pipeline and checks every result against the reference arithmetic and its
// latency of exactly 3 clocks.
module tb_hy_pipe;
  import fdtd_ref_pkg::*;
  localparam int unsigned W = 32, FRAC = 24;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic signed [W-1:0] hy, ez, ez_e, chyh, chye, hy_new;
  int checks = 0, failures = 0, cyc = 0;
  longint exp_q[$];
  int     t_q[$];

  hy_pipe #(.W(W), .FRAC(FRAC)) dut (.*);

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
      if (longint'(hy_new) != e) begin failures++; $display("hy got %0d exp %0d", hy_new, e); end
      if (cyc - t != 3) begin failures++; $display("latency %0d", cyc - t); end
    end
  end

  initial begin
    in_valid = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      longint e;
      in_valid = ($urandom % 4) != 0;
      hy = W'(rnd(4)); ez = W'(rnd(6)); ez_e = W'(rnd(6));
      chyh = W'(rnd(7)); chye = W'(rnd(6));
      if (k == 0) begin  // hand-worked: H=1, Chh=1, Che=0.5, dE=3-1=2 -> 1 + 1
        hy = 1 << FRAC; chyh = 1 << FRAC; chye = 1 << (FRAC-1);
        ez_e = 3 << FRAC; ez = 1 << FRAC; in_valid = 1;
      end
      e = wrap(fmul(chyh, hy, W, FRAC) + fmul(chye, wrap(longint'(ez_e) - longint'(ez), W), W, FRAC), W);
      if (k == 0) begin
        checks++;
        if (e != (1 + 1) * (1 << FRAC)) begin failures++; $display("hand case model"); end
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
