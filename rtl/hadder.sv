// hadder: 8-bit hierarchical exponent adder with bias removal.
//
// Two 4-bit carry look-ahead adders (cla) are chained: the low one adds
// x[3:0] + y[3:0] + cin, its carry out feeds the carry input of the high one,
// which adds x[7:4] + y[7:4]. The two 4-bit sums form the raw 8-bit sum.
// Because both addends are exponents stored with a bias of 127, the raw sum
// holds the bias twice; a final constant adder subtracts 127 (adds 8'h81
// modulo 256) so that the output is again a biased exponent:
//   sum = (x + y + cin - 127) mod 256
// cout is the carry out of the high CLA, i.e. it is set when x + y + cin
// overflows 8 bits before the bias is removed.
//
// The two-CLA hierarchy and the bias subtraction follow the design; the use of
// the high CLA's carry as cout is this design's reading of the adder drawing.
// Purely combinational.
module hadder
  import fpmul_pkg::*;
(
  input  logic       cin,
  input  logic [7:0] x,
  input  logic [7:0] y,
  output logic [7:0] sum,
  output logic       cout
);

  logic [7:0] raw;
  logic       c_mid;

  // First (low) CLA.
  cla u_lo (.cin(cin),   .x(x[3:0]), .y(y[3:0]), .sum(raw[3:0]), .cout(c_mid));
  // Second (high) CLA, chained on the first one's carry.
  cla u_hi (.cin(c_mid), .x(x[7:4]), .y(y[7:4]), .sum(raw[7:4]), .cout(cout));

  // Remove one bias: raw - 127 == raw + (256 - 127) modulo 256.
  assign sum = raw - BIAS;

endmodule
