// tb_coef_ram: writes each lane of a 4-lane factor RAM separately with random
// data and checks that a read returns all four lanes of the cell, one clock
// after the address, and that a lane write leaves the other lanes alone.
module tb_coef_ram;
  localparam int unsigned W = 32, K = 4, DEPTH = 40;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we;
  logic [1:0] wlane;
  logic [5:0] waddr, raddr;
  logic [W-1:0] wdata;
  logic [K*W-1:0] rdata;
  logic [W-1:0] model [DEPTH][K];
  int checks = 0, failures = 0;

  coef_ram #(.W(W), .K(K), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(int a);
    raddr = 6'(a); we = 0;
    @(posedge clk); #1;
    for (int k = 0; k < K; k++) begin
      checks++;
      if (rdata[k*W +: W] !== model[a][k]) begin
        failures++; $display("cell %0d lane %0d: %h exp %h", a, k, rdata[k*W +: W], model[a][k]);
      end
    end
  endtask

  initial begin
    we = 0; raddr = 0;
    for (int a = 0; a < DEPTH; a++)
      for (int k = 0; k < K; k++) begin
        model[a][k] = $urandom;
        we = 1; wlane = 2'(k); waddr = 6'(a); wdata = model[a][k];
        @(posedge clk); #1;
      end
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    for (int r = 0; r < 500; r++) begin
      int a, k;
      a = $urandom % DEPTH; k = $urandom % K;
      model[a][k] = $urandom;
      we = 1; wlane = 2'(k); waddr = 6'(a); wdata = model[a][k];
      @(posedge clk); #1;
      rd_check($urandom % DEPTH);
      rd_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
