// tb_fxp_mul: random and corner-case products of the fixed-point multiplier,
// checked against a 128-bit integer model and, for in-range operands,
// against real-number multiplication; also checks the one-clock latency.
module tb_fxp_mul;
  import fdtd_ref_pkg::*;
  localparam int unsigned W = 32, FRAC = 24;
  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [W-1:0] a, b, p;
  int checks = 0, failures = 0;

  fxp_mul #(.W(W), .FRAC(FRAC)) dut (.clk(clk), .a(a), .b(b), .p(p));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(longint x, longint y);
    longint exp;
    real r;
    a = W'(x); b = W'(y);
    exp = fmul(wrap(x, W), wrap(y, W), W, FRAC);
    @(posedge clk); #1;
    checks++;
    if (longint'(p) != exp) begin
      failures++;
      $display("mul %0d*%0d: got %0d exp %0d", x, y, p, exp);
    end
    // in range: result equals the exact product rounded down
    r = (real'(wrap(x, W)) * real'(wrap(y, W))) / (2.0 ** FRAC);
    if (r < 2.0 ** (W - 1) - 1.0 && r > -(2.0 ** (W - 1))) begin
      checks++;
      if (r - real'(p) >= 1.0 || r - real'(p) < 0.0) begin
        failures++;
        $display("mul %0d*%0d: %0d is not floor(%f)", x, y, p, r);
      end
    end
  endtask

  initial begin
    one(1 << FRAC, 1 << FRAC);             // 1*1
    one(-(1 << FRAC), 3 << (FRAC - 1));    // -1*1.5
    one(1, 1);                             // underflows to 0
    one(-1, 1);                            // truncation toward -inf: -1
    for (int k = 0; k < 2000; k++)
      one(longint'($signed($urandom)) >>> ($urandom % 8), longint'($signed($urandom)) >>> ($urandom % 12 + 6));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
