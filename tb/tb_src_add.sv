// tb_src_add: random Ez stream over a small grid; the source sample must be
// added exactly at the source cell (one clock later) and nowhere else.
module tb_src_add;
  localparam int unsigned W = 32, N = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid, hit;
  logic signed [W-1:0] ez_in, src_val, ez_out;
  logic [3:0] x, y, src_x, src_y;
  int checks = 0, failures = 0, hits = 0;

  src_add #(.W(W), .N(N)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [W-1:0] e_exp;
    logic h_exp, v_exp;
    in_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      in_valid = $urandom % 3 != 0;
      ez_in = $urandom; src_val = $urandom;
      x = $urandom % (N + 1); y = $urandom % N;
      src_x = 3; src_y = 7;
      if (k % 50 == 0) begin x = 3; y = 7; end   // visit the source cell
      if (k % 50 == 1) begin x = 7; y = 3; end   // the transposed cell is not it
      v_exp = in_valid;
      h_exp = in_valid && x == 3 && y == 7;
      e_exp = h_exp ? ez_in + src_val : ez_in;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v_exp || hit !== h_exp || (v_exp && ez_out !== e_exp)) begin
        failures++;
        $display("k=%0d v=%b/%b hit=%b/%b ez=%0d/%0d", k, out_valid, v_exp, hit, h_exp, ez_out, e_exp);
      end
      if (h_exp) hits++;
    end
    checks++;
    if (hits < 20) begin failures++; $display("source cell hit only %0d times", hits); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
