// normalize: normalises the 2N-bit significand product to N bits.
//
// Both significands lie in [1, 2), so their product lies in [1, 4) and its
// leading 1 is either at bit 2N-1 or at bit 2N-2:
//   p[2N-1] = 1 : product is 1x.xxx; take np = p[2N-1:N]; the binary point
//                 moves one place, so the exponent must grow by 1:
//                 shift = 127 + 1 = 128.
//   p[2N-1] = 0 : product is 01.xxx; take np = p[2N-2:N-1] (the product shifted
//                 left by one); exponent unchanged: shift = 127 + 0 = 127.
// The exponent correction is given in biased form (base 127) so that the
// exponent adder can remove the bias as for any other exponent. Low product
// bits that do not fit in np are dropped (truncation, no rounding).
// This is the design's normalisation rule; no other case is handled, so a
// zero or subnormal operand is not treated specially.
//
// Interface: p (2N bits) -> np (N bits, hidden bit in np[N-1]), shift (8 bits).
// Purely combinational.
module normalize
  import fpmul_pkg::*;
#(
  parameter int unsigned N = 24
) (
  input  logic [2*N-1:0] p,
  output logic [N-1:0]   np,
  output logic [7:0]     shift
);

  always_comb begin
    if (p[2*N-1]) begin
      np    = p[2*N-1:N];
      shift = BIAS + 8'd1;
    end else begin
      np    = p[2*N-2:N-1];
      shift = BIAS;
    end
  end

endmodule
