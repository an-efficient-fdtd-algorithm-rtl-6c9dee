// tb_fdtd_wordlen: the three word widths the engine is offered in (32, 40
// and 48 bits, with 24, 32 and 40 fraction bits) run the photonic-crystal
// bend on the full 124 x 124 grid for 1000 time steps side by side. Each is
// checked bit for bit against its fixed-point reference, and each one's
// Ez error against double precision is reported; a wider word must give a
// smaller error.
module tb_fdtd_wordlen;
  localparam int unsigned STEPS = 1000;
  int checks = 0, failures = 0;

  pc_bench #(.W(32), .FRAC(24), .STEPS(STEPS)) u_w32 ();
  pc_bench #(.W(40), .FRAC(32), .STEPS(STEPS)) u_w40 ();
  pc_bench #(.W(48), .FRAC(40), .STEPS(STEPS)) u_w48 ();

  initial begin
    #(64'd200_000_000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wait (u_w32.finished && u_w40.finished && u_w48.finished);
    checks   = u_w32.checks + u_w40.checks + u_w48.checks + 2;
    failures = u_w32.failures + u_w40.failures + u_w48.failures;
    $display("32 bit: mean |Ez error| %e, relative %e", u_w32.abs_err, u_w32.rel_err);
    $display("40 bit: mean |Ez error| %e, relative %e", u_w40.abs_err, u_w40.rel_err);
    $display("48 bit: mean |Ez error| %e, relative %e", u_w48.abs_err, u_w48.rel_err);
    if (!(u_w32.abs_err > u_w40.abs_err)) begin failures++; $display("40 bit not better than 32"); end
    if (!(u_w40.abs_err > u_w48.abs_err)) begin failures++; $display("48 bit not better than 40"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
