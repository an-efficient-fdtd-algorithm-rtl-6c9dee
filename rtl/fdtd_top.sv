// fdtd_top: 2-D finite-difference time-domain (FDTD) engine for TMz
// photonic structures (fields Ez, Hx, Hy on an N x N Yee grid).
//
// Work split. Everything that is the same for every time step - the per-cell
// multiplication factors (material, cell size, time step, absorbing PML
// loss) and the sampled source - is computed before the run by the host and
// loaded into block RAM. The engine only runs the update equations.
//
// Parallelism. The grid is cut into M horizontal strips of R = N/M rows. M
// strip engines work in lockstep, each walking its strip column by column,
// bottom to top, and each updates one Ez cell and one Hx/Hy pair per clock
// (Ez one column ahead of H), so the engine does 2*M cell updates per clock.
// Neighbouring strips exchange the values their edge rows need.
//
// Memories. Every field of every strip has a ping-pong pair of memories
// (field_bank): the previous step is read from one copy, the new step
// written to the other, and the copies swap at each step. Each strip has its
// own coefficient RAMs; one source RAM holds a sample per time step. Two
// monitors record Ez at chosen cells every step.
//
// Interface. The host port loads fields (into the "previous" copy),
// factors and source samples while the engine is idle, and reads fields of
// the latest step and monitor records (one clock latency). start runs
// n_steps steps; done pulses at the end. host_sel codes: see fdtd_pkg.
// Fields are W-bit fixed point with FRAC fraction bits.
// Timing: one time step takes (N+1)*R + ENGINE_LAT + 3 clocks.
// Some per-strip outputs are left open on purpose: the top-row Hx read of
// the top strip (no strip above), the second read port of the Ez and Hy
// memories (only Hx crosses a strip edge that way), the source-hit flags and
// the duplicate column/row indices of strips 1..M-1.
// The strip layout, scan order, E/H skew, ping-pong memories and the split
// between offline factors and on-chip update follow the engine's published
// organisation; M, FRAC, the equations' exact form, the boundary handling
// and the host port are this design's choices.
module fdtd_top
  import fdtd_pkg::*;
#(
  parameter int unsigned N    = DEF_N,
  parameter int unsigned M    = DEF_M,
  parameter int unsigned W    = DEF_W,
  parameter int unsigned FRAC = DEF_FRAC,
  parameter int unsigned NT   = DEF_NT,
  localparam int unsigned R   = N / M,
  localparam int unsigned CW  = $clog2(N + 1),
  localparam int unsigned RW  = $clog2(R),
  localparam int unsigned YW  = $clog2(N),
  localparam int unsigned AW  = $clog2(N * R),
  localparam int unsigned SW  = $clog2(NT + 1),
  localparam int unsigned TW  = $clog2(NT),
  localparam int unsigned MW  = (M > 1) ? $clog2(M) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // run control
  input  logic                start,
  input  logic [SW-1:0]       n_steps,
  input  logic [YW-1:0]       src_x,
  input  logic [YW-1:0]       src_y,
  input  logic [1:0][YW-1:0]  mon_x,
  input  logic [1:0][YW-1:0]  mon_y,
  output logic                busy,
  output logic                done,
  output logic [SW-1:0]       step,
  // host port
  input  logic                host_we,
  input  logic                host_re,
  input  host_sel_e           host_sel,
  input  logic [YW-1:0]       host_x,
  input  logic [YW-1:0]       host_y,
  input  logic [TW-1:0]       host_n,
  input  logic [W-1:0]        host_wdata,
  output logic [W-1:0]        host_rdata,
  output logic                host_rvalid
);

  initial assert (N % M == 0 && N / M >= 2)
    else $error("fdtd_top: N must be a multiple of M with N/M >= 2");

  // ------------------------------------------------------------ control
  logic          slot_valid, sel;
  logic [CW-1:0] col;
  logic [RW-1:0] row;

  fdtd_ctrl #(.N(N), .R(R), .NT(NT), .DRAIN(ENGINE_LAT + 2)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .n_steps(n_steps),
    .slot_valid(slot_valid), .col(col), .row(row), .sel(sel),
    .step(step), .busy(busy), .done(done));

  // ------------------------------------------------------------ host decode
  logic [MW-1:0] h_strip;
  logic [AW-1:0] h_addr;
  assign h_strip = MW'(32'(host_y) / R);
  assign h_addr  = AW'(32'(host_x) * R + 32'(host_y) % R);

  logic h_field, h_ce, h_ch;
  logic [1:0] h_lane;
  always_comb begin
    h_field = host_sel inside {SEL_EZ, SEL_HX, SEL_HY};
    h_ce    = host_sel inside {SEL_CEZE, SEL_CEZH};
    h_ch    = host_sel inside {SEL_CHXH, SEL_CHXE, SEL_CHYH, SEL_CHYE};
    unique case (host_sel)
      SEL_CEZH, SEL_CHXE: h_lane = 2'd1;
      SEL_CHYH:           h_lane = 2'd2;
      SEL_CHYE:           h_lane = 2'd3;
      default:            h_lane = 2'd0;
    endcase
  end

  // ------------------------------------------------------------ source
  logic signed [W-1:0] src_val;
  src_ram #(.W(W), .NT(NT)) u_src_ram (
    .clk(clk), .we(host_we && host_sel == SEL_SRC && !busy),
    .waddr(host_n), .wdata(host_wdata),
    .raddr(TW'(step)), .rdata(src_val));

  // ------------------------------------------------------------ strips
  logic [M-1:0][AW-1:0]  rd_addr, rd_top_addr, ez_waddr, h_waddr;
  logic [M-1:0][W-1:0]   ez_rd, hx_rd, hy_rd, hx_top_rd, hy_top_unused, ez_top_unused;
  logic [M-1:0][W-1:0]   ez_bot_prev, ez_wdata, hx_wdata, hy_wdata;
  logic [M-1:0]          ez_we, h_we, src_hit;
  logic [M-1:0][CW-1:0]  ez_wcol;
  logic [M-1:0][RW-1:0]  ez_wrow;

  for (genvar s = 0; s < M; s++) begin : g_strip
    logic          h_this, fw;
    logic [AW-1:0] ra;
    assign h_this = (h_strip == MW'(s)) && !busy;
    assign ra     = busy ? rd_addr[s] : h_addr;

    strip_engine #(.N(N), .R(R), .IDX(s), .W(W), .FRAC(FRAC)) u_eng (
      .clk(clk), .rst_n(rst_n),
      .slot_valid(slot_valid), .col(col), .row(row),
      .rd_addr(rd_addr[s]), .rd_top_addr(rd_top_addr[s]),
      .ez_rd(ez_rd[s]), .hx_rd(hx_rd[s]), .hy_rd(hy_rd[s]),
      .hx_below_top((s == 0) ? '0 : hx_top_rd[(s == 0) ? 0 : s - 1]),
      .ez_above_bot((s == M - 1) ? '0 : ez_bot_prev[(s == M - 1) ? s : s + 1]),
      .ez_bot_prev(ez_bot_prev[s]),
      .ez_we(ez_we[s]), .ez_waddr(ez_waddr[s]), .ez_wdata(ez_wdata[s]),
      .ez_wcol(ez_wcol[s]), .ez_wrow(ez_wrow[s]),
      .h_we(h_we[s]), .h_waddr(h_waddr[s]),
      .hx_wdata(hx_wdata[s]), .hy_wdata(hy_wdata[s]),
      .ce_we(host_we && h_ce && h_this), .ch_we(host_we && h_ch && h_this),
      .c_lane(h_lane), .c_addr(h_addr), .c_wdata(host_wdata),
      .src_val(src_val), .src_x(src_x), .src_y(src_y), .src_hit(src_hit[s]));

    // host writes go to the "previous" copy, engine writes to the current one
    assign fw = host_we && h_field && h_this;

    field_bank #(.W(W), .DEPTH(N * R)) u_ez (
      .clk(clk), .sel(sel),
      .ra_addr(ra), .ra_data(ez_rd[s]),
      .rb_addr(rd_top_addr[s]), .rb_data(ez_top_unused[s]),
      .we(ez_we[s] || (fw && host_sel == SEL_EZ)), .wprev(!busy),
      .waddr(busy ? ez_waddr[s] : h_addr),
      .wdata(busy ? ez_wdata[s] : host_wdata));

    field_bank #(.W(W), .DEPTH(N * R)) u_hx (
      .clk(clk), .sel(sel),
      .ra_addr(ra), .ra_data(hx_rd[s]),
      .rb_addr(rd_top_addr[s]), .rb_data(hx_top_rd[s]),
      .we(h_we[s] || (fw && host_sel == SEL_HX)), .wprev(!busy),
      .waddr(busy ? h_waddr[s] : h_addr),
      .wdata(busy ? hx_wdata[s] : host_wdata));

    field_bank #(.W(W), .DEPTH(N * R)) u_hy (
      .clk(clk), .sel(sel),
      .ra_addr(ra), .ra_data(hy_rd[s]),
      .rb_addr(rd_top_addr[s]), .rb_data(hy_top_unused[s]),
      .we(h_we[s] || (fw && host_sel == SEL_HY)), .wprev(!busy),
      .waddr(busy ? h_waddr[s] : h_addr),
      .wdata(busy ? hy_wdata[s] : host_wdata));
  end

  // ------------------------------------------------------------ monitors
  logic [W-1:0] mon_rdata;
  field_monitor #(.N(N), .M(M), .R(R), .W(W), .NT(NT)) u_mon (
    .clk(clk), .e_valid(ez_we[0]), .e_col(ez_wcol[0]), .e_row(ez_wrow[0]),
    .e_data(ez_wdata), .step(TW'(step)), .mon_x(mon_x), .mon_y(mon_y),
    .rd_en(host_re && host_sel inside {SEL_MON0, SEL_MON1}),
    .rd_mon(host_sel == SEL_MON1), .rd_n(host_n), .rdata(mon_rdata));

  // ------------------------------------------------------------ host read
  host_sel_e     rsel_q;
  logic [MW-1:0] rstrip_q;
  always_ff @(posedge clk) begin
    if (!rst_n) host_rvalid <= 1'b0;
    else        host_rvalid <= host_re && !busy;
    rsel_q   <= host_sel;
    rstrip_q <= h_strip;
  end

  always_comb begin
    unique case (rsel_q)
      SEL_EZ:             host_rdata = ez_rd[rstrip_q];
      SEL_HX:             host_rdata = hx_rd[rstrip_q];
      SEL_HY:             host_rdata = hy_rd[rstrip_q];
      SEL_MON0, SEL_MON1: host_rdata = mon_rdata;
      default:            host_rdata = '0;
    endcase
  end

endmodule
