// tb_field_monitor: replays the Ez write stream of M=3 strips on a 6x6 grid
// for several steps, with the two monitors on different strips, and checks
// the recorded samples read back by the host against the stream.
module tb_field_monitor;
  localparam int unsigned N = 6, M = 3, R = 2, W = 32, NT = 8;
  logic clk = 0;
  always #5 clk = ~clk;
  logic e_valid, rd_en, rd_mon;
  logic [2:0] e_col;
  logic e_row;
  logic [M-1:0][W-1:0] e_data;
  logic [2:0] step, rd_n;
  logic [1:0][2:0] mon_x, mon_y;
  logic [W-1:0] rdata;
  logic [W-1:0] exp_rec [2][NT];
  int checks = 0, failures = 0;

  field_monitor #(.N(N), .M(M), .R(R), .W(W), .NT(NT)) dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e_valid = 0; rd_en = 0; rd_mon = 0; rd_n = 0; step = 0;
    mon_x[0] = 1; mon_y[0] = 3;   // strip 1, row 1
    mon_x[1] = 4; mon_y[1] = 4;   // strip 2, row 0
    for (int s = 0; s < NT; s++) begin
      step = 3'(s);
      for (int c = 0; c < N; c++)
        for (int r = 0; r < R; r++) begin
          e_valid = 1; e_col = 3'(c); e_row = 1'(r);
          for (int m = 0; m < M; m++) begin
            e_data[m] = $urandom;
            if (c == 1 && m * R + r == 3) exp_rec[0][s] = e_data[m];
            if (c == 4 && m * R + r == 4) exp_rec[1][s] = e_data[m];
          end
          @(posedge clk); #1;
        end
      e_valid = 0;
      @(posedge clk); #1;
    end
    for (int mm = 0; mm < 2; mm++)
      for (int s = 0; s < NT; s++) begin
        rd_en = 1; rd_mon = 1'(mm); rd_n = 3'(s);
        @(posedge clk); #1;
        checks++;
        if (rdata !== exp_rec[mm][s]) begin failures++; $display("mon%0d[%0d] %h exp %h", mm, s, rdata, exp_rec[mm][s]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
