// tb_src_ram: fills the source table with a sampled sine, reads every entry
// back in random order and checks the one-clock read latency.
module tb_src_ram;
  localparam int unsigned W = 32, NT = 1000;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [9:0] waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [NT];
  int checks = 0, failures = 0;

  src_ram #(.W(W), .NT(NT)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; raddr = 0;
    for (int k = 0; k < NT; k++) begin
      model[k] = W'($rtoi($sin(2.0 * 3.14159265 * k / 20.0) * 16777216.0));
      we = 1; waddr = 10'(k); wdata = model[k];
      @(posedge clk); #1;
    end
    we = 0;
    for (int k = 0; k < 3000; k++) begin
      int a;
      a = $urandom % NT;
      raddr = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("src[%0d] %h exp %h", a, rdata, model[a]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
