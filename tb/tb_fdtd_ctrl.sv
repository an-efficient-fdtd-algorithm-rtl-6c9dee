// tb_fdtd_ctrl: runs the controller for a few steps on a small grid and
// checks the slot order (columns 0..N, rows 0..R-1 inside each column), the
// memory swap and step count after each step, the step length of
// (N+1)*R + DRAIN + 1 clocks, the done pulse, and the n_steps = 0 case.
module tb_fdtd_ctrl;
  localparam int unsigned N = 6, R = 3, NT = 20, DRAIN = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, slot_valid, sel, busy, done;
  logic [4:0] n_steps, step;
  logic [2:0] col;
  logic [1:0] row;
  int checks = 0, failures = 0;

  fdtd_ctrl #(.N(N), .R(R), .NT(NT), .DRAIN(DRAIN)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int ec, er, cyc, first_slot, step_len;
    logic sel0;
    start = 0; n_steps = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // zero steps: immediate done
    start = 1; n_steps = 0;
    @(posedge clk); #1 start = 0;
    chk(done && !busy, "n_steps=0 done");
    @(posedge clk); #1;
    // three steps
    sel0 = sel;
    start = 1; n_steps = 3;
    @(posedge clk); #1 start = 0;
    for (int s = 0; s < 3; s++) begin
      ec = 0; er = 0; cyc = 0;
      while (!slot_valid) begin @(posedge clk); #1; cyc++; end
      chk(step == 5'(s), "step index during step");
      for (int k = 0; k < (N + 1) * R; k++) begin
        chk(slot_valid && col == 3'(ec) && row == 2'(er), $sformatf("slot %0d,%0d got %0d,%0d v=%b", ec, er, col, row, slot_valid));
        er++; if (er == R) begin er = 0; ec++; end
        @(posedge clk); #1; cyc++;
      end
      chk(!slot_valid, "gap after scan");
      step_len = (N + 1) * R;
      while (step == 5'(s)) begin @(posedge clk); #1; step_len++; end
      chk(step_len == (N + 1) * R + DRAIN + 1, $sformatf("step length %0d", step_len));
      chk(sel == (sel0 ^ (s % 2 == 0)), "swap after step");
      chk(done == (s == 2), "done pulse only at the end");
    end
    chk(!busy, "idle after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
