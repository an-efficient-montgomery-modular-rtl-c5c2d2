// zero_d: zero detector Zero_D.
//
// Flags that the carry vector SC of the carry-save register pair is all
// zero, i.e. that the pair already holds a plain binary number in SS. The
// format conversion loops (B-hat + N-hat at the start, the final result at
// the end) stop on this flag. It is one wide NOR; purely combinational.
// Follows the document.
module zero_d #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] sc,
  output logic         zero
);

  assign zero = ~(|sc);

endmodule
