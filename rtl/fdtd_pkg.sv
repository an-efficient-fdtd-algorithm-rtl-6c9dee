// fdtd_pkg: constants and types shared by the 2-D FDTD engine.
//
// The engine works on two's complement fixed-point words: one sign bit,
// (W-1-FRAC) integer bits and FRAC fraction bits. The word width W follows
// the 32-bit configuration the engine was evaluated with (40 and 48 bits are
// the other configurations); the split into integer and fraction bits is a
// choice of this design (7 integer bits leave room for fields normalised to
// about +-1 and for update factors up to a few units).
//
// host_sel_e selects the target of a host write or read: a field memory, one
// of the six per-cell multiplication factor matrices, the source table or a
// monitor record.
package fdtd_pkg;

  localparam int unsigned DEF_N    = 124;   // grid is DEF_N x DEF_N cells
  localparam int unsigned DEF_M    = 4;     // parallel strips (own choice)
  localparam int unsigned DEF_W    = 32;    // word width
  localparam int unsigned DEF_FRAC = 24;    // fraction bits (own choice)
  localparam int unsigned DEF_NT   = 1000;  // source table depth (time steps)

  // latency of each field update pipeline (ez_pipe, hx_pipe, hy_pipe)
  localparam int unsigned PIPE_LAT = 3;

  // clocks from a scan slot leaving the controller to the H write of that
  // slot in strip_engine: 1 (memory read) + PIPE_LAT (Ez) + 1 (source add)
  // + PIPE_LAT (Hx/Hy)
  localparam int unsigned ENGINE_LAT = 2 + 2 * PIPE_LAT;

  typedef enum logic [3:0] {
    SEL_EZ   = 4'd0,
    SEL_HX   = 4'd1,
    SEL_HY   = 4'd2,
    SEL_CEZE = 4'd3,
    SEL_CEZH = 4'd4,
    SEL_CHXH = 4'd5,
    SEL_CHXE = 4'd6,
    SEL_CHYH = 4'd7,
    SEL_CHYE = 4'd8,
    SEL_SRC  = 4'd9,
    SEL_MON0 = 4'd10,
    SEL_MON1 = 4'd11
  } host_sel_e;

endpackage
