// full_adder: the 1-bit carry-save adder cell.
//
// A carry-save adder bit is the same circuit as a full adder: it takes three
// bits of equal weight (x, y, z) and returns their sum bit and a carry bit of
// twice the weight. A row of these cells reduces three numbers to two (a
// sum vector and a carry vector) with no carry propagation between bits.
// Purely combinational. The function follows the document; the gate-level
// form (XOR for the sum, majority for the carry) is the textbook one.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic z,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = x ^ y ^ z;
    cout = (x & y) | (x & z) | (y & z);
  end

endmodule
