// multiplier: combinational shift-add multiplier, N x N -> 2N bits.
//
// Implements the textbook shift-and-add algorithm, fully unrolled in space:
//   P = 0
//   for i = 0 .. N-1: if b[i] then P = P + (a << i)
// Every iteration is one 2N-bit adder whose second operand is either the
// multiplicand shifted left by i or zero, so the circuit is a chain of N
// adders with no registers; the product is valid one combinational delay
// after the operands. The algorithm and the absence of registers follow the
// design; N = 24 is the binary32 significand width.
//
// Interface: a, b (N bits, unsigned) -> p (2N bits, unsigned).
module multiplier #(
  parameter int unsigned N = 24
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // Partial sums: acc[i] is the running product after bits 0..i-1 of b.
  logic [2*N-1:0] acc [N+1];

  always_comb begin
    acc[0] = '0;
    for (int unsigned i = 0; i < N; i++) begin
      if (b[i]) acc[i+1] = acc[i] + ({{N{1'b0}}, a} << i);
      else      acc[i+1] = acc[i];
    end
  end

  assign p = acc[N];

endmodule
