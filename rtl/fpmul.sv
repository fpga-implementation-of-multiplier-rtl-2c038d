// fpmul: IEEE 754 binary32 floating-point multiplier (combinational).
//
// The product of (s1, e1, f1) and (s2, e2, f2) is formed in four steps:
//   sign      : sout = s1 ^ s2.
//   significand: the hidden 1 is prepended to each fraction and the two
//              24-bit significands are multiplied by the shift-add
//              multiplier into a 48-bit product.
//   normalise : the normalize unit keeps the 24 leading product bits and
//              reports the exponent correction in biased form (127 or 128).
//   exponent  : a first 8-bit hierarchical adder forms the intermediate
//              exponent e1 + e2 - 127; a second one adds the correction and
//              removes its bias again, giving eout = e1 + e2 - 127 + p[47].
// fout is the normalised significand without its hidden bit. Low product bits
// are truncated. The structure (one multiplier, one normalize unit, two 8-bit
// adders, sign by XOR) is the design's. As in the design, the hidden bit is
// always taken as 1 and there is no handling of zero, subnormal, infinite or
// NaN operands, nor of exponent overflow or underflow: results are correct for
// normal operands whose product exponent stays within 1..254.
//
// Interface: 2 x (1 + 8 + 23) operand pins, 1 + 8 + 23 result pins, no clock.
module fpmul
  import fpmul_pkg::*;
(
  input  logic              s1,
  input  logic              s2,
  input  logic [EXP_W-1:0]  e1,
  input  logic [EXP_W-1:0]  e2,
  input  logic [FRAC_W-1:0] f1,
  input  logic [FRAC_W-1:0] f2,
  output logic              sout,
  output logic [EXP_W-1:0]  eout,
  output logic [FRAC_W-1:0] fout
);

  logic [PROD_W-1:0] p;          // 48-bit significand product
  logic [SIG_W-1:0]  np;         // normalised 24-bit significand
  logic [EXP_W-1:0]  shift;      // biased exponent correction (127 / 128)
  logic [EXP_W-1:0]  e_inter;    // intermediate exponent e1 + e2 - 127
  logic              c_inter, c_out;

  assign sout = s1 ^ s2;

  multiplier #(.N(SIG_W)) a0 (
    .a ({1'b1, f1}),
    .b ({1'b1, f2}),
    .p (p)
  );

  normalize #(.N(SIG_W)) a1 (
    .p     (p),
    .np    (np),
    .shift (shift)
  );

  hadder a2 (.cin(1'b0), .x(e1),      .y(e2),    .sum(e_inter), .cout(c_inter));
  hadder a3 (.cin(1'b0), .x(e_inter), .y(shift), .sum(eout),    .cout(c_out));

  assign fout = np[FRAC_W-1:0];

  // The adders' carries and the hidden bit of np carry no information that
  // the design passes on (np[23] is always 1 for normal operands).
  logic unused;
  assign unused = c_inter ^ c_out ^ np[SIG_W-1];

endmodule
