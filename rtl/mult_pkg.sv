// mult_pkg: constants and types shared by the Booth and Pekmestzi multipliers.
//
// WIDTH is the operand width of every multiplier in this design; eight bits is
// the operand size used throughout the comparison. booth_op_e names the three
// things one Booth step can do with the multiplicand, chosen by the two bits
// (q0, q_prev) the step looks at: 00 and 11 shift only, 01 adds, 10 subtracts.
package mult_pkg;

  localparam int unsigned WIDTH = 8;

  typedef enum logic [1:0] {
    BOOTH_SHIFT = 2'b00,  // q0,q_prev = 00 or 11: no arithmetic, shift only
    BOOTH_ADD   = 2'b01,  // q0,q_prev = 01: A + M, then shift
    BOOTH_SUB   = 2'b10   // q0,q_prev = 10: A - M, then shift
  } booth_op_e;

endpackage
