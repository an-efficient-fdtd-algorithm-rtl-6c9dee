// ez_pipe: pipelined update of one Ez cell of the 2-D TMz grid per clock.
//
//   Ez' = Ceze * Ez + Cezh * ((Hy(i,j) - Hy(i-1,j)) - (Hx(i,j) - Hx(i,j-1)))
//
// Ceze and Cezh are the cell's multiplication factors, computed before the
// run (they fold in the time step, cell size, permittivity and any loss such
// as a PML layer). All values are W-bit fixed point with FRAC fraction bits.
// The engine's data flow only names a "pipelined Ez" unit; the equation is the
// standard Yee form and the three stages are this design's own:
//   1. curl of H (two subtractions),
//   2. the two products (fxp_mul, registered),
//   3. their sum.
// Timing: a new cell can enter every clock; ez_new and out_valid appear
// PIPE_LAT = 3 clocks after the operands.
module ez_pipe
#(
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] ez,     // Ez(i,j), previous step
  input  logic signed [W-1:0] hy,     // Hy(i,j)
  input  logic signed [W-1:0] hy_w,   // Hy(i-1,j)
  input  logic signed [W-1:0] hx,     // Hx(i,j)
  input  logic signed [W-1:0] hx_s,   // Hx(i,j-1)
  input  logic signed [W-1:0] ceze,
  input  logic signed [W-1:0] cezh,
  output logic                out_valid,
  output logic signed [W-1:0] ez_new
);

  logic signed [W-1:0] curl_q, ez_q, ceze_q, cezh_q;
  logic signed [W-1:0] p_e, p_h;
  logic [1:0]          v_q;

  // stage 1: curl of H
  always_ff @(posedge clk) begin
    curl_q <= (hy - hy_w) - (hx - hx_s);
    ez_q   <= ez;
    ceze_q <= ceze;
    cezh_q <= cezh;
  end

  // stage 2: products
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_e (.clk(clk), .a(ceze_q), .b(ez_q),   .p(p_e));
  fxp_mul #(.W(W), .FRAC(FRAC)) u_mul_h (.clk(clk), .a(cezh_q), .b(curl_q), .p(p_h));

  // stage 3: sum
  always_ff @(posedge clk) ez_new <= p_e + p_h;

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
