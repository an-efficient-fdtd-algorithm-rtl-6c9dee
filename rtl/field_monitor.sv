// field_monitor: two time-domain field monitors.
//
// Each monitor is a cell (mon_x, mon_y) of the grid. The monitor watches the
// new Ez values the M strips write in lockstep (one value per strip and
// clock, all at the same column e_col and strip row e_row) and, when the
// watched cell goes by, stores its value in a record of one word per time
// step. The host reads the two records after the run and derives the
// reflection and transmission (S11, S21) from them in software. Point
// monitors, rather than line monitors, are this design's simplification.
// Timing: records are written in the clock the value is presented; host
// reads (rd_en, rd_mon, rd_n) return rdata one clock later.
module field_monitor #(
  parameter int unsigned N  = 124,
  parameter int unsigned M  = 4,
  parameter int unsigned R  = 31,
  parameter int unsigned W  = 32,
  parameter int unsigned NT = 1000,
  localparam int unsigned CW = $clog2(N + 1),
  localparam int unsigned RW = $clog2(R),
  localparam int unsigned YW = $clog2(N),
  localparam int unsigned TW = $clog2(NT)
) (
  input  logic                 clk,
  input  logic                 e_valid,
  input  logic [CW-1:0]        e_col,
  input  logic [RW-1:0]        e_row,
  input  logic [M-1:0][W-1:0]  e_data,
  input  logic [TW-1:0]        step,
  input  logic [1:0][YW-1:0]   mon_x,
  input  logic [1:0][YW-1:0]   mon_y,
  input  logic                 rd_en,
  input  logic                 rd_mon,
  input  logic [TW-1:0]        rd_n,
  output logic [W-1:0]         rdata
);

  logic [W-1:0] rec0 [NT];
  logic [W-1:0] rec1 [NT];

  logic [1:0]         hit;
  logic [1:0][W-1:0]  val;

  always_comb begin
    for (int m = 0; m < 2; m++) begin
      hit[m] = e_valid && (e_col == CW'(mon_x[m])) &&
               (32'(mon_y[m]) % R == 32'(e_row));
      val[m] = e_data[32'(mon_y[m]) / R];
    end
  end

  always_ff @(posedge clk) begin
    if (hit[0]) rec0[step] <= val[0];
    if (hit[1]) rec1[step] <= val[1];
    if (rd_en)  rdata <= rd_mon ? rec1[rd_n] : rec0[rd_n];
  end

endmodule
