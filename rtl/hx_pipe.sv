// hx_pipe: pipelined update of one Hx cell of the 2-D TMz grid per clock.
//
//   Hx' = Chxh * Hx - Chxe * (Ez(i,j+1) - Ez(i,j))
//
// The Ez values are those of the new time step (H is half a step behind E in
// the leapfrog scheme); Chxh and Chxe are the cell's multiplication
// factors, computed before the run. The engine's data flow only names a
// "pipelined Hx" unit; the equation is the standard Yee form, the
// finite difference running along y, and the three stages are this
// design's own: 1. difference of E, 2. the two products, 3. the difference.
// Timing: a new cell can enter every clock; hx_new and out_valid appear
// PIPE_LAT = 3 clocks after the operands.
module hx_pipe
#(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] hx,     // Hx(i,j), previous step
  input  logic signed [W-1:0] ez,     // Ez(i,j), new step
  input  logic signed [W-1:0] ez_n,   // Ez(i,j+1), new step
  input  logic signed [W-1:0] chxh,
  input  logic signed [W-1:0] chxe,
  output logic                out_valid,
  output logic signed [W-1:0] hx_new
);

  logic signed [W-1:0] d_q, h_q, chh_q, che_q;
  logic signed [W-1:0] p_h, p_e;
  logic [1:0]          v_q;

  // stage 1: difference of E
  always_ff @(posedge clk) begin
    d_q   <= ez_n - ez;
    h_q   <= hx;
    chh_q <= chxh;
    che_q <= chxe;
  end

  // stage 2: products
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_h (.clk(clk), .a(chh_q), .b(h_q), .p(p_h));
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_e (.clk(clk), .a(che_q), .b(d_q), .p(p_e));

  // stage 3
  always_ff @(posedge clk) hx_new <= p_h - p_e;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v_q       <= '0;
      out_valid <= 1'b0;
    end else begin
      v_q       <= {v_q[0], in_valid};
      out_valid <= v_q[1];
    end
  end

endmodule
