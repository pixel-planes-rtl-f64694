// serial_adder: one-bit adder with carry storage, the element every
// bit-serial sum in the engine is built from (multiplier trees, the pixel
// adder and the pixel depth comparator).
//
// Operands arrive least significant bit first, one bit per clock. The sum
// bit is combinational; the carry is kept in a flip-flop for the next bit.
// On the first bit of a word (first = 1) the stored carry is ignored and
// CIN0 is used as carry-in instead, so that words can follow back to back:
// CIN0 = 0 gives a + b, CIN0 = 1 with an inverted b gives a - b.
// The carry-reset rule and the CIN0 parameter are this design's choices;
// the document gives only the element itself.
module serial_adder #(
  parameter bit CIN0 = 1'b0
) (
  input  logic clk,
  input  logic first,  // this bit is bit 0 of a new word
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q;
  logic cin;

  always_comb begin
    cin = first ? CIN0 : carry_q;
    s   = a ^ b ^ cin;
  end

  always_ff @(posedge clk) carry_q <= (a & b) | (a & cin) | (b & cin);

endmodule
