// fpu_pkg: types and constants shared by the multi-mode floating point unit.
//
// The unit works in three IEEE 754 binary formats chosen by a 2-bit mode
// (00 half, 01 single, 11 double, as the design specifies; 10 is unused and
// reported as illegal) and performs the operation chosen by a 2-bit function
// code fpf (00 add, 01 subtract as specified; 10 multiply is this design's own
// encoding; 11 is unused). Every arithmetic unit reports the same set of flags.
package fpu_pkg;

  // Precision select.
  typedef enum logic [1:0] {
    MODE_HALF   = 2'b00,
    MODE_SINGLE = 2'b01,
    MODE_RSVD   = 2'b10,
    MODE_DOUBLE = 2'b11
  } fp_mode_e;

  // Function select (fpf).
  typedef enum logic [1:0] {
    FPF_ADD  = 2'b00,
    FPF_SUB  = 2'b01,
    FPF_MUL  = 2'b10,
    FPF_RSVD = 2'b11
  } fp_func_e;

  // Exception flags of one result.
  //   overflow  : the exact result is beyond the largest finite number
  //   underflow : the exact result is non-zero and below the smallest normal
  //   zero      : the delivered result is a (signed) zero
  //   infinity  : an input operand is an infinity
  //   invalid   : the operation has no numeric result (inf-inf, 0*inf)
  typedef struct packed {
    logic overflow;
    logic underflow;
    logic zero;
    logic infinity;
    logic invalid;
  } fp_flags_t;

  localparam int unsigned HALF_EXP_W   = 5;
  localparam int unsigned HALF_MAN_W   = 10;
  localparam int unsigned SINGLE_EXP_W = 8;
  localparam int unsigned SINGLE_MAN_W = 23;
  localparam int unsigned DOUBLE_EXP_W = 11;
  localparam int unsigned DOUBLE_MAN_W = 52;

endpackage
