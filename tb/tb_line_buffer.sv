// tb_line_buffer: pushes a random stream with gaps and checks that dout is
// the word pushed R pushes earlier and dout_next the word pushed R-1 earlier.
module tb_line_buffer;
  localparam int unsigned W = 32, R = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push;
  logic [W-1:0] din, dout, dout_next;
  logic [W-1:0] hist[$];
  int checks = 0, failures = 0;

  line_buffer #(.W(W), .R(R)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      push = $urandom % 4 != 0;
      din = $urandom;
      if (push) begin
        if (hist.size() >= R) begin
          checks += 2;
          if (dout !== hist[hist.size() - R]) begin failures++; $display("dout %h exp %h", dout, hist[hist.size() - R]); end
          if (dout_next !== hist[hist.size() - R + 1]) begin failures++; $display("dout_next wrong"); end
        end
        hist.push_back(din);
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
