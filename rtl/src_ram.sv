// src_ram: block RAM with one excitation sample per time step.
//
// The sinusoidal source is sampled before the run and loaded by the host
// (write port); during the run the controller reads the sample of the
// current time step. Depth NT = 1000 samples covers the longest run the
// engine was evaluated with.
// Timing: synchronous read, rdata is valid one clock after raddr.
module src_ram #(
  parameter int unsigned W  = 32,
  parameter int unsigned NT = 1000,
  localparam int unsigned AW = $clog2(NT)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [NT];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
