// hy_pipe: pipelined update of one Hy cell of the 2-D TMz grid per clock.
//
//   Hy' = Chyh * Hy + Chye * (Ez(i+1,j) - Ez(i,j))
//
// The Ez values are those of the new time step (H is half a step behind E in
// the leapfrog scheme); Chyh and Chye are the cell's multiplication
// factors, computed before the run. The engine's data flow only names a
// "pipelined Hy" unit; the equation is the standard Yee form, the
// finite difference running along x, and the three stages are this
// design's own: 1. difference of E, 2. the two products, 3. the sum.
// Timing: a new cell can enter every clock; hy_new and out_valid appear
// PIPE_LAT = 3 clocks after the operands.
module hy_pipe
#(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] hy,     // Hy(i,j), previous step
  input  logic signed [W-1:0] ez,     // Ez(i,j), new step
  input  logic signed [W-1:0] ez_e,   // Ez(i+1,j), new step
  input  logic signed [W-1:0] chyh,
  input  logic signed [W-1:0] chye,
  output logic                out_valid,
  output logic signed [W-1:0] hy_new
);

  logic signed [W-1:0] d_q, h_q, chh_q, che_q;
  logic signed [W-1:0] p_h, p_e;
  logic [1:0]          v_q;

  // stage 1: difference of E
  always_ff @(posedge clk) begin
    d_q   <= ez_e - ez;
    h_q   <= hy;
    chh_q <= chyh;
    che_q <= chye;
  end

  // stage 2: products
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_h (.clk(clk), .a(chh_q), .b(h_q), .p(p_h));
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_e (.clk(clk), .a(che_q), .b(d_q), .p(p_e));

  // stage 3
  always_ff @(posedge clk) hy_new <= p_h + p_e;

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
