// Shared types and constants for the power-gated example designs.
// pmb_state_e : states of the power management block sequencer. The order
//               of the down and up steps follows the power shut-off protocol:
//               isolate, retain, switch off; then switch on, release
//               retention, release isolation.
// alu_op_e    : opcodes the ALU encoder produces from the one-hot select.
// idct_phase_e, IDCT_COS : phases and cosine constants of the 8x8 IDCT.
package lp_pkg;

  typedef enum logic [2:0] {
    PMB_ACTIVE   = 3'd0,  // domain powered, outputs released
    PMB_DN_ISO   = 3'd1,  // isolation on
    PMB_DN_RET   = 3'd2,  // retention on
    PMB_OFF      = 3'd3,  // supply off, clock gated
    PMB_UP_PWR   = 3'd4,  // supply and clock back on, rails settling
    PMB_UP_RET   = 3'd5   // retention released, still isolated
  } pmb_state_e;

  typedef enum logic [2:0] {
    OP_AND = 3'd0,
    OP_OR  = 3'd1,
    OP_ADD = 3'd2,
    OP_SUB = 3'd3,
    OP_SHL = 3'd4,
    OP_SHR = 3'd5,
    OP_MUL = 3'd6,
    OP_DIV = 3'd7
  } alu_op_e;

  // Phases of the 8x8 IDCT: collect coefficients, column pass, row pass,
  // deliver pixels.
  typedef enum logic [1:0] {
    IDCT_LOAD = 2'd0,
    IDCT_COL  = 2'd1,
    IDCT_ROW  = 2'd2,
    IDCT_OUT  = 2'd3
  } idct_phase_e;

  // cos(k*pi/16) * 2^12, k = 0..8, rounded: the only distinct magnitudes of
  // the 8-point IDCT basis.
  localparam int IDCT_COS [9] = '{4096, 4017, 3784, 3406, 2896, 2276, 1567, 799, 0};

endpackage
