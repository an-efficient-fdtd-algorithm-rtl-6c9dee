// tb_field_bank: loads the previous copy, writes a new step into the current
// copy while reading the previous one on both ports, swaps, and checks that
// reads now see the new step and that the old data was never disturbed.
module tb_field_bank;
  localparam int unsigned W = 32, DEPTH = 48;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sel, we, wprev;
  logic [5:0] ra_addr, rb_addr, waddr;
  logic [W-1:0] ra_data, rb_data, wdata;
  logic [W-1:0] copy [2][DEPTH];   // model indexed by physical copy
  int checks = 0, failures = 0, swaps = 0;

  field_bank #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wprev = 0; ra_addr = 0; rb_addr = 0;
    sel = 0;
    // host load of the previous copy
    for (int a = 0; a < DEPTH; a++) begin
      copy[0][a] = $urandom;
      we = 1; wprev = 1; waddr = 6'(a); wdata = copy[0][a];
      @(posedge clk); #1;
    end
    for (int step = 0; step < 6; step++) begin
      for (int a = 0; a < DEPTH; a++) begin
        int b;
        logic [W-1:0] ea, eb;
        b = $urandom % DEPTH;
        ra_addr = 6'(a); rb_addr = 6'(b);
        ea = copy[sel][a]; eb = copy[sel][b];
        we = 1; wprev = 0; waddr = 6'(a); wdata = $urandom;
        copy[!sel][a] = wdata;
        @(posedge clk); #1;
        checks += 2;
        if (ra_data !== ea) begin failures++; $display("step %0d A[%0d] %h exp %h", step, a, ra_data, ea); end
        if (rb_data !== eb) begin failures++; $display("step %0d B[%0d] %h exp %h", step, b, rb_data, eb); end
      end
      we = 0;
      sel = !sel; swaps++;
    end
    checks++;
    if (swaps != 6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
