// mcmg_pkg: shared types and constants of the multi-context multi-grain
// (MCMG) logic block.
//
// The logic block is built around a 6-input, 3-output look-up table whose
// 64-bit truth-table plane can be used in six ways (modes (a)-(f)). A context
// is one complete configuration of the LUT: the 64 table bits, the 3 mode
// bits, and (a choice of this design) one bit per output that selects the
// registered or the combinational output. The configuration data cache (CDC)
// stores several contexts; the control logic copies one into the LUT.
//
// The 6-input/3-output size, the six modes and the 3 mode bits follow the
// proposal; the numeric mode codes and the context field layout are this
// design's own.
package mcmg_pkg;

  // LUT size: K inputs, NOUT outputs, 2^K table bits.
  localparam int unsigned K        = 6;
  localparam int unsigned NOUT     = 3;
  localparam int unsigned LUT_BITS = 1 << K;

  // Three mode bits select one of six configurations.
  typedef enum logic [2:0] {
    MODE_A_2LUT_X3  = 3'd0,  // (a) three independent 2-LUTs
    MODE_B_3LUT_X2  = 3'd1,  // (b) two independent 3-LUTs
    MODE_C_6LUT     = 3'd2,  // (c) one 6-LUT
    MODE_D_3LUT_P8  = 3'd3,  // (d) one 3-LUT, 8 context planes
    MODE_E_4LUT_P4  = 3'd4,  // (e) one 4-LUT, 4 context planes
    MODE_F_5LUT_P2  = 3'd5,  // (f) one 5-LUT, 2 context planes
    MODE_RSVD6      = 3'd6,  // reserved: outputs 0
    MODE_RSVD7      = 3'd7   // reserved: outputs 0
  } lut_mode_e;

  // One context as stored in the CDC and held in the active register.
  typedef struct packed {
    logic [NOUT-1:0]     use_ff;  // per output: 1 = registered, 0 = combinational
    lut_mode_e           mode;    // configuration mode
    logic [LUT_BITS-1:0] bits;    // truth-table plane
  } context_t;


endpackage
