// fpmul_pkg: constants shared by the single-precision multiplier.
//
// The operand format is IEEE 754 binary32: one sign bit, an 8-bit exponent
// stored with a bias of 127, and a 23-bit fraction whose leading 1 (the
// hidden bit) is not stored, giving a 24-bit significand. The bias and the
// field widths are those of the standard.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;          // exponent field width
  localparam int unsigned FRAC_W = 23;         // stored fraction width
  localparam int unsigned SIG_W  = FRAC_W + 1; // significand incl. hidden bit
  localparam int unsigned PROD_W = 2 * SIG_W;  // full significand product

  localparam logic [EXP_W-1:0] BIAS = 8'd127;

endpackage
