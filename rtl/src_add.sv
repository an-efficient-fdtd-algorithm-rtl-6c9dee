// src_add: injects the excitation into the freshly computed Ez stream.
//
// Every clock one new Ez value arrives with its cell (column x, global row
// y). When the cell is the source cell, the source sample of the current
// time step is added to it; all other values pass unchanged. The adder sits
// between the Ez pipeline and the H pipelines, so the H update of the same
// time step already sees the excited field. Adding (a soft source) rather
// than overwriting is this design's reading of the "source add" unit.
// Timing: one register stage; out_valid, ez_out and hit follow the inputs by
// one clock.
module src_add #(
  parameter int unsigned W  = 32,
  parameter int unsigned N  = 124,
  localparam int unsigned XW = $clog2(N + 1),
  localparam int unsigned YW = $clog2(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] ez_in,
  input  logic [XW-1:0]       x,
  input  logic [YW-1:0]       y,
  input  logic signed [W-1:0] src_val,
  input  logic [YW-1:0]       src_x,
  input  logic [YW-1:0]       src_y,
  output logic                out_valid,
  output logic signed [W-1:0] ez_out,
  output logic                hit
);

  logic match;
  assign match = in_valid && (x == XW'(src_x)) && (y == src_y);

  always_ff @(posedge clk) begin
    ez_out <= match ? ez_in + src_val : ez_in;
    if (!rst_n) begin
      out_valid <= 1'b0;
      hit       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      hit       <= match;
    end
  end

endmodule
