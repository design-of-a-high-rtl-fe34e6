// Shared constants and types of the AHL variable-latency multiplier.
//
// OP_W is the operand width of the complete multiplier (64 bits, the size
// the design is presented at); HALF_W is the width of each of the four
// column-bypassing sub-multipliers it is built from. vl_state_t names the
// three states of the variable-latency controller in ahl_mult_top: no
// operation, first cycle of an operation, and second (hold) cycle of an
// operation that the adaptive hold logic judged to need two cycles.
package ahl_mult_pkg;
  localparam int unsigned OP_W   = 64;
  localparam int unsigned HALF_W = OP_W / 2;

  typedef enum logic [1:0] {
    VL_IDLE = 2'd0,  // no operation in the multiplier
    VL_EXEC = 2'd1,  // first cycle of an operation
    VL_HOLD = 2'd2   // second cycle of a two-cycle operation
  } vl_state_t;
endpackage
