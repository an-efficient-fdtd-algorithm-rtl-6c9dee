// fdtd_ctrl: time-step controller of the FDTD engine.
//
// A run of n_steps time steps is started by a pulse on start. Each time step
// the controller emits one scan slot per clock, in the order all strips walk
// their cells: column 0..N (the extra column N lets the H update, which runs
// one column behind, finish column N-1), and within a column row 0..R-1
// from bottom to top. After the last slot it waits DRAIN clocks until the
// strip pipelines have written their last results, then swaps the
// previous/current field memories (sel), counts the step, and either starts
// the next step or ends the run with a one-clock done pulse.
// step counts the steps completed in this run; during a step it is also the
// index of the source sample in use. sel keeps its value between runs, so a
// second run continues from the fields the first one left.
// Timing: slot outputs are registered; a step takes (N+1)*R + DRAIN + 1
// clocks.
module fdtd_ctrl #(
  parameter int unsigned N     = 124,
  parameter int unsigned R     = 31,
  parameter int unsigned NT    = 1000,
  parameter int unsigned DRAIN = 10,
  localparam int unsigned CW   = $clog2(N + 1),
  localparam int unsigned RW   = $clog2(R),
  localparam int unsigned SW   = $clog2(NT + 1),
  localparam int unsigned DW   = $clog2(DRAIN + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [SW-1:0] n_steps,
  output logic          slot_valid,
  output logic [CW-1:0] col,
  output logic [RW-1:0] row,
  output logic          sel,
  output logic [SW-1:0] step,
  output logic          busy,
  output logic          done
);

  typedef enum logic [1:0] {IDLE, SCAN, DRAIN_WAIT} state_e;
  state_e        state;
  logic [SW-1:0] n_q;
  logic [DW-1:0] dcnt;

  assign busy       = (state != IDLE);
  assign slot_valid = (state == SCAN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= IDLE;
      col   <= '0;
      row   <= '0;
      sel   <= 1'b0;
      step  <= '0;
      n_q   <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          step <= '0;
          n_q  <= n_steps;
          col  <= '0;
          row  <= '0;
          if (n_steps == '0) done  <= 1'b1;
          else               state <= SCAN;
        end
        SCAN: begin
          if (row == RW'(R - 1)) begin
            row <= '0;
            if (col == CW'(N)) begin
              col   <= '0;
              dcnt  <= '0;
              state <= DRAIN_WAIT;
            end else begin
              col <= col + 1'b1;
            end
          end else begin
            row <= row + 1'b1;
          end
        end
        DRAIN_WAIT: begin
          if (dcnt == DW'(DRAIN)) begin
            sel  <= ~sel;
            step <= step + 1'b1;
            if (step + 1'b1 == n_q) begin
              state <= IDLE;
              done  <= 1'b1;
            end else begin
              state <= SCAN;
            end
          end else begin
            dcnt <= dcnt + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
