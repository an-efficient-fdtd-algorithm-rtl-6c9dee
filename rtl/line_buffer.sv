// line_buffer: column delay buffer of one strip.
//
// The strip is scanned column by column, R cells per column, so the value
// pushed R pushes ago belongs to the same row of the previous column: dout is
// that value, available combinationally while the current one is pushed.
// dout_next is the value pushed R-1 pushes ago (the next row up of the
// previous column). A circular buffer of R words with one write pointer; the
// contents are not cleared, the user masks the first column.
// Timing: dout/dout_next are read before the push of the same clock.
module line_buffer #(
  parameter int unsigned W = 32,
  parameter int unsigned R = 31,
  localparam int unsigned PW = (R > 1) ? $clog2(R) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout,
  output logic [W-1:0] dout_next
);

  logic [W-1:0]  mem [R];
  logic [PW-1:0] ptr, ptr_next;

  assign ptr_next  = (ptr == PW'(R - 1)) ? '0 : ptr + 1'b1;
  assign dout      = mem[ptr];
  assign dout_next = mem[ptr_next];

  always_ff @(posedge clk) begin
    if (!rst_n) ptr <= '0;
    else if (push) begin
      mem[ptr] <= din;
      ptr      <= ptr_next;
    end
  end

  initial assert (R >= 2) else $error("line_buffer needs R >= 2");

endmodule
