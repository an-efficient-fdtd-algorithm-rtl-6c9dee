// field_bank: ping-pong memory pair for one field (Ez, Hx or Hy) of one strip.
//
// One copy holds the field of the previous time step and is only read; the
// other receives the field of the step being computed. At the end of every
// time step the controller toggles sel and the two copies swap roles, so no
// value is copied. sel = 0: copy 0 is "previous", copy 1 is "current";
// sel = 1: the reverse.
//
// Two read ports look into the previous copy: port A streams the strip's own
// cells, port B fetches the top row for the strip above. The single write
// port writes the current copy, or the previous copy when wprev is set
// (loading an initial field from the host before a run). The memories stand
// in for the board memory the field matrices would live in on a large grid.
// Timing: synchronous reads, data one clock after the address.
module field_bank #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 124 * 31,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          sel,
  input  logic [AW-1:0] ra_addr,
  output logic [W-1:0]  ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [W-1:0]  rb_data,
  input  logic          we,
  input  logic          wprev,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem0 [DEPTH];
  logic [W-1:0] mem1 [DEPTH];

  // copy written: the current one (the one sel does not point at) unless wprev
  logic wsel;
  assign wsel = wprev ? sel : ~sel;

  always_ff @(posedge clk) begin
    if (we && !wsel) mem0[waddr] <= wdata;
    if (we &&  wsel) mem1[waddr] <= wdata;
    ra_data <= sel ? mem1[ra_addr] : mem0[ra_addr];
    rb_data <= sel ? mem1[rb_addr] : mem0[rb_addr];
  end

endmodule
