// strip_engine: one of the M parallel compute modules of the FDTD engine.
//
// The N x N grid is cut into M horizontal strips of R = N/M rows. Every strip
// engine walks its strip in the same order, in lockstep with the others:
// column by column from left to right, each column from bottom to top. In
// each clock it updates one Ez cell and, one column behind, one Hx/Hy pair:
//
//   slot (c, r):  Ez(c, r)      from the previous step's Ez and H,
//                 Hx, Hy(c-1, r) from the previous step's H and the new Ez.
//
// Running E one column ahead is what lets E and H of the same time step be
// computed at the same time: the H update of a cell needs the new Ez of the
// cell itself, of its right neighbour and of its upper neighbour, and by then
// all three exist. The first column of a step therefore computes Ez only;
// an extra slot column c = N computes only H of column N-1.
//
// Data paths (the clock each value is used at is in brackets):
//   t0  slot from the controller; read addresses go to the field memories
//       and coefficient RAMs.
//   t1  previous-step fields arrive. Line buffers give the previous column
//       of Hx and Hy; Hx of the row below is the previous slot's read, or,
//       in the bottom row, the top-row Hx of the strip below (hx_below_top).
//       Ez pipeline starts.
//   t5  new Ez leaves ez_pipe (t4) and src_add (t5); it is written to the
//       current Ez memory and pushed into the Ez line buffer, whose outputs
//       give Ez(c-1, r) and Ez(c-1, r+1). In the top row Ez(c-1, r+1) is the
//       bottom-row Ez of the strip above, held for one column
//       (ez_above_bot). Hx/Hy pipelines start.
//   t8  new Hx, Hy written to the current H memories.
// The shift registers that carry old H, factors and cell indices from t1 to
// t5 are the engine's passing registers. Outside the grid, fields read as 0.
// The whole schedule, equations and boundary handling are this design's
// reading of the strip-parallel, one-row-skewed scheme the engine is built
// on; the per-cell multiplication factors come from coef_ram.
module strip_engine
  import fdtd_pkg::*;
#(
  parameter int unsigned N    = 124,
  parameter int unsigned R    = 31,
  parameter int unsigned IDX  = 0,      // strip index, rows IDX*R .. IDX*R+R-1
  parameter int unsigned W    = 32,
  parameter int unsigned FRAC = 24,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned RW  = $clog2(R),
  localparam int unsigned YW  = $clog2(N),
  localparam int unsigned AW  = $clog2(N * R)
) (
  input  logic                clk,
  input  logic                rst_n,
  // scan slot (t0)
  input  logic                slot_valid,
  input  logic [CW-1:0]       col,
  input  logic [RW-1:0]       row,
  // previous-step field memories of this strip
  output logic [AW-1:0]       rd_addr,      // own cells
  output logic [AW-1:0]       rd_top_addr,  // top row, for the strip above
  input  logic signed [W-1:0] ez_rd,
  input  logic signed [W-1:0] hx_rd,
  input  logic signed [W-1:0] hy_rd,
  // neighbour exchange
  input  logic signed [W-1:0] hx_below_top, // strip below: Hx top row (t1)
  input  logic signed [W-1:0] ez_above_bot, // strip above: ez_bot_prev (t5)
  output logic signed [W-1:0] ez_bot_prev,  // new Ez(c-1, bottom row)
  // current-step field memories of this strip
  output logic                ez_we,
  output logic [AW-1:0]       ez_waddr,
  output logic signed [W-1:0] ez_wdata,
  output logic [CW-1:0]       ez_wcol,
  output logic [RW-1:0]       ez_wrow,
  output logic                h_we,
  output logic [AW-1:0]       h_waddr,
  output logic signed [W-1:0] hx_wdata,
  output logic signed [W-1:0] hy_wdata,
  // multiplication factor loading (lanes: E 0=Ceze 1=Cezh, H 0=Chxh 1=Chxe
  // 2=Chyh 3=Chye)
  input  logic                ce_we,
  input  logic                ch_we,
  input  logic [1:0]          c_lane,
  input  logic [AW-1:0]       c_addr,
  input  logic [W-1:0]        c_wdata,
  // source
  input  logic signed [W-1:0] src_val,
  input  logic [YW-1:0]       src_x,
  input  logic [YW-1:0]       src_y,
  output logic                src_hit
);

  localparam int unsigned DLY = PIPE_LAT + 1;  // t1 -> t5
  localparam logic [YW-1:0] BASE = YW'(IDX * R);

  // ---------------------------------------------------------------- t0
  logic          in_grid0;
  logic [AW-1:0] h_addr0;
  assign in_grid0    = (col < CW'(N));
  assign rd_addr     = in_grid0 ? AW'(col * R + row) : '0;
  assign rd_top_addr = in_grid0 ? AW'(col * R + R - 1) : '0;
  assign h_addr0     = (col != '0) ? AW'((32'(col) - 1) * R + 32'(row)) : '0;

  logic [2*W-1:0] ce_rd;
  logic [4*W-1:0] ch_rd;

  coef_ram #(.W(W), .K(2), .DEPTH(N * R)) u_coef_e (
    .clk(clk), .we(ce_we), .wlane(c_lane[0]), .waddr(c_addr), .wdata(c_wdata),
    .raddr(rd_addr), .rdata(ce_rd));

  coef_ram #(.W(W), .K(4), .DEPTH(N * R)) u_coef_h (
    .clk(clk), .we(ch_we), .wlane(c_lane), .waddr(c_addr), .wdata(c_wdata),
    .raddr(h_addr0), .rdata(ch_rd));

  // ---------------------------------------------------------------- t1
  logic          v1;
  logic [CW-1:0] col1;
  logic [RW-1:0] row1;
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= slot_valid;
    col1 <= col;
    row1 <= row;
  end

  logic signed [W-1:0] hy_lb_out, hx_lb_out, lb_unused_y, lb_unused_x;
  line_buffer #(.W(W), .R(R)) u_lb_hy (
    .clk(clk), .rst_n(rst_n), .push(v1), .din(hy_rd),
    .dout(hy_lb_out), .dout_next(lb_unused_y));
  line_buffer #(.W(W), .R(R)) u_lb_hx (
    .clk(clk), .rst_n(rst_n), .push(v1), .din(hx_rd),
    .dout(hx_lb_out), .dout_next(lb_unused_x));

  logic signed [W-1:0] hx_prev;
  always_ff @(posedge clk) if (v1) hx_prev <= hx_rd;

  logic signed [W-1:0] hy_w1, hx_w1, hx_s1;
  assign hy_w1 = (col1 == '0) ? '0 : hy_lb_out;   // Hy(c-1, r)
  assign hx_w1 = (col1 == '0) ? '0 : hx_lb_out;   // Hx(c-1, r), for H update
  assign hx_s1 = (row1 == '0) ? hx_below_top : hx_prev;  // Hx(c, r-1)

  logic                ez_v4;
  logic signed [W-1:0] ez_new4;
  ez_pipe #(.W(W), .FRAC(FRAC)) u_ez (
    .clk(clk), .rst_n(rst_n), .in_valid(v1 && col1 < CW'(N)),
    .ez(ez_rd), .hy(hy_rd), .hy_w(hy_w1), .hx(hx_rd), .hx_s(hx_s1),
    .ceze(ce_rd[0 +: W]), .cezh(ce_rd[W +: W]),
    .out_valid(ez_v4), .ez_new(ez_new4));

  // passing registers t1 -> t5 (slot, old H of column c-1, H factors)
  typedef struct packed {
    logic                v;
    logic [CW-1:0]       col;
    logic [RW-1:0]       row;
    logic signed [W-1:0] hx;
    logic signed [W-1:0] hy;
    logic [4*W-1:0]      ch;
  } pass_t;

  pass_t pass_q [DLY];
  always_ff @(posedge clk) begin
    pass_q[0] <= '{v: v1, col: col1, row: row1, hx: hx_w1, hy: hy_w1, ch: ch_rd};
    for (int k = 1; k < DLY; k++) pass_q[k] <= pass_q[k-1];
    if (!rst_n)
      for (int k = 0; k < DLY; k++) pass_q[k].v <= 1'b0;
  end

  // ---------------------------------------------------------------- t4/t5
  pass_t         p5;
  logic [CW-1:0] col4;
  logic [RW-1:0] row4;
  assign col4 = pass_q[DLY-2].col;
  assign row4 = pass_q[DLY-2].row;
  assign p5   = pass_q[DLY-1];

  logic                ez_v5;
  logic signed [W-1:0] ez_new5;
  src_add #(.W(W), .N(N)) u_src (
    .clk(clk), .rst_n(rst_n), .in_valid(ez_v4), .ez_in(ez_new4),
    .x(col4), .y(BASE + YW'(row4)),
    .src_val(src_val), .src_x(src_x), .src_y(src_y),
    .out_valid(ez_v5), .ez_out(ez_new5), .hit(src_hit));

  logic signed [W-1:0] e_cur;           // Ez(c, r), 0 in the extra column
  assign e_cur = ez_v5 ? ez_new5 : '0;

  assign ez_we    = ez_v5;
  assign ez_waddr = AW'(p5.col * R + p5.row);
  assign ez_wdata = ez_new5;
  assign ez_wcol  = p5.col;
  assign ez_wrow  = p5.row;

  logic signed [W-1:0] e_w, e_wn;       // Ez(c-1, r), Ez(c-1, r+1)
  line_buffer #(.W(W), .R(R)) u_lb_ez (
    .clk(clk), .rst_n(rst_n), .push(p5.v), .din(e_cur),
    .dout(e_w), .dout_next(e_wn));

  logic signed [W-1:0] bot_cur;
  always_ff @(posedge clk) begin
    if (p5.v && p5.row == '0) begin
      bot_cur     <= e_cur;
      ez_bot_prev <= bot_cur;
    end
  end

  logic signed [W-1:0] e_n5;
  assign e_n5 = (p5.row == RW'(R - 1)) ? ez_above_bot : e_wn;

  logic h_go;
  assign h_go = p5.v && (p5.col != '0);

  logic hx_v8, hy_v8;
  hx_pipe #(.W(W), .FRAC(FRAC)) u_hx (
    .clk(clk), .rst_n(rst_n), .in_valid(h_go),
    .hx(p5.hx), .ez(e_w), .ez_n(e_n5),
    .chxh(p5.ch[0 +: W]), .chxe(p5.ch[W +: W]),
    .out_valid(hx_v8), .hx_new(hx_wdata));
  hy_pipe #(.W(W), .FRAC(FRAC)) u_hy (
    .clk(clk), .rst_n(rst_n), .in_valid(h_go),
    .hy(p5.hy), .ez(e_w), .ez_e(e_cur),
    .chyh(p5.ch[2*W +: W]), .chye(p5.ch[3*W +: W]),
    .out_valid(hy_v8), .hy_new(hy_wdata));

  // ---------------------------------------------------------------- t8
  logic [AW-1:0] h_addr_q [PIPE_LAT];
  always_ff @(posedge clk) begin
    h_addr_q[0] <= AW'((32'(p5.col) - 1) * R + 32'(p5.row));
    for (int k = 1; k < PIPE_LAT; k++) h_addr_q[k] <= h_addr_q[k-1];
  end

  assign h_we    = hx_v8;
  assign h_waddr = h_addr_q[PIPE_LAT-1];

  // both H pipelines are fed together and must stay in step
  always_ff @(posedge clk) if (rst_n) assert (hx_v8 == hy_v8);

endmodule
