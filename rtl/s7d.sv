// s7d: seven-segment display driver for the board demonstration.
//
// Drives the eight seven-segment digits HEX7..HEX0 of the development board:
//   HEX7 HEX6 : operand A's 5 leading significand bits (hidden 1 and four
//               fraction bits), shown as a two-digit decimal number 0..31;
//   HEX5 HEX4 : operand B's 5 leading significand bits, likewise;
//   HEX3..HEX0: the four leading fraction bits of the product, one binary
//               digit (0 or 1) per display, most significant on HEX3.
// E.g. A = 1.1100b x 2^e shows "28", B = 1.0100b shows "20", and their product
// 1.00011b shows "0001". Which values are shown, and where, follows the board
// demonstration; the digit layout per display and the segment code are this
// design's choice.
//
// Segment code: hex[k][0] .. hex[k][6] drive segments a .. g of digit k; a
// segment lights when its bit is 0 (common-anode displays, as on the DE2).
// Purely combinational.
module s7d (
  input  logic [4:0] mx,        // operand A, hidden bit + 4 fraction bits
  input  logic [4:0] my,        // operand B, hidden bit + 4 fraction bits
  input  logic [3:0] fr,        // product fraction bits 22..19
  output logic [6:0] hex [8]    // hex[7] = HEX7 (leftmost) .. hex[0] = HEX0
);

  // Active-low pattern for one decimal digit; blank for anything above 9.
  function automatic logic [6:0] seg(input logic [3:0] d);
    unique case (d)            //  gfedcba
      4'd0:    seg = ~7'b0111111;
      4'd1:    seg = ~7'b0000110;
      4'd2:    seg = ~7'b1011011;
      4'd3:    seg = ~7'b1001111;
      4'd4:    seg = ~7'b1100110;
      4'd5:    seg = ~7'b1101101;
      4'd6:    seg = ~7'b1111101;
      4'd7:    seg = ~7'b0000111;
      4'd8:    seg = ~7'b1111111;
      4'd9:    seg = ~7'b1101111;
      default: seg = 7'b1111111;
    endcase
  endfunction

  // Tens and units of a 5-bit value (0..31).
  function automatic logic [7:0] bcd(input logic [4:0] v);
    logic [4:0] tens;
    tens = v / 5'd10;
    bcd  = {tens[3:0], 4'(v - tens * 5'd10)};
  endfunction

  logic [7:0] bx, by;

  always_comb begin
    bx = bcd(mx);
    by = bcd(my);
    hex[7] = seg(bx[7:4]);
    hex[6] = seg(bx[3:0]);
    hex[5] = seg(by[7:4]);
    hex[4] = seg(by[3:0]);
    for (int k = 0; k < 4; k++) hex[k] = seg({3'b000, fr[k]});
  end

endmodule
