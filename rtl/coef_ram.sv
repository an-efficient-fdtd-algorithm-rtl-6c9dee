// coef_ram: block RAM of per-cell multiplication factors for one strip.
//
// Holds K factor matrices of DEPTH cells each (one lane per factor, W bits
// per entry). The factors are computed before the run, once for all time
// steps, and loaded by the host one factor at a time through the write
// port (wlane selects the matrix). The engine reads all K factors of a cell
// in one access. Each strip has two of these: K = 2 for the Ez factors and
// K = 4 for the Hx and Hy factors, since Ez and H are updated at different
// cells in the same clock.
// Timing: synchronous read, rdata is valid one clock after raddr; lane k
// occupies rdata[k*W +: W].
module coef_ram #(
  parameter int unsigned W     = 32,
  parameter int unsigned K     = 2,
  parameter int unsigned DEPTH = 124 * 31,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned LW   = (K > 1) ? $clog2(K) : 1
) (
  input  logic            clk,
  input  logic            we,
  input  logic [LW-1:0]   wlane,
  input  logic [AW-1:0]   waddr,
  input  logic [W-1:0]    wdata,
  input  logic [AW-1:0]   raddr,
  output logic [K*W-1:0]  rdata
);

  for (genvar k = 0; k < K; k++) begin : g_lane
    logic [W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && wlane == LW'(k)) mem[waddr] <= wdata;
      rdata[k*W +: W] <= mem[raddr];
    end
  end

endmodule
