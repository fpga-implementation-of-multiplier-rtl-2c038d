// fpmul_de2: top level of the single-precision floating-point multiplier as
// demonstrated on a Cyclone II development board.
//
// The multiplier core (fpmul) is fully combinational and brings out all 96
// operand and result pins: two signs, two 8-bit exponents and two 23-bit
// fractions in, one sign, one 8-bit exponent and one 23-bit fraction out.
// Alongside it, the display driver (s7d) shows on the eight seven-segment
// digits the five leading significand bits of each operand in decimal and the
// four leading fraction bits of the product in binary, which is how a
// product such as 28 x 20 = 1.000110000b x 2^9 is read off the board.
//
// There is no clock and no register: every output follows the inputs after
// the combinational delay. The exponent pins are ordinary inputs here; on the
// board they would be tied to constants or switches by the pin assignment.
module fpmul_de2
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
  output logic [FRAC_W-1:0] fout,
  output logic [6:0]        hex [8]
);

  fpmul u_fpmul (
    .s1, .s2, .e1, .e2, .f1, .f2,
    .sout, .eout, .fout
  );

  s7d a4 (
    .mx  ({1'b1, f1[FRAC_W-1 -: 4]}),
    .my  ({1'b1, f2[FRAC_W-1 -: 4]}),
    .fr  (fout[FRAC_W-1 -: 4]),
    .hex (hex)
  );

endmodule
