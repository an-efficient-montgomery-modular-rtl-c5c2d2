// skip_d: skip detector Skip_D.
//
// Runs beside the carry-save adder during Montgomery iteration i and decides
// what iteration i+1 will do, from the three low bits of the operands the
// adder is adding this cycle (ss, sc = SS[i], SC[i]), the stored selection
// bit q_hat = q_i, bit 2 of N-hat, and the next two multiplier bits
// A_{i+1}, A_{i+2}:
//   q_{i+1}    = SS[i+1]_0 ^ SC[i+1]_0
//   skip_{i+1} = ~(A_{i+1} | q_{i+1} | SS[i+1]_0)
//   q_{i+2}    = SS[i+1]_1 ^ SC[i+1]_1   (valid when iteration i+1 is skipped)
//   (q_hat_o, a_hat_o) = skip ? (q_{i+2}, A_{i+2}) : (q_{i+1}, A_{i+1})
// where (SS[i+1], SC[i+1]) = (SS[i] + SC[i] + x) / 2 in carry-save form.
// When skip is 1 iteration i+1 would add x = 0 to a pair whose low bits are
// both zero, so it is replaced by a plain shift by two.
//
// Only three low bits of x are needed, and they are fixed by the operands'
// form: B-hat = B << 3 has zero low bits and N-hat = 1 (mod 4) is required, so
// x_0 = q_hat, x_1 = 0 and x_2 = q_hat & N-hat_2. In the loop q_hat always
// equals SS[i]_0 ^ SC[i]_0, and then a skip is only possible with q_hat = 0,
// so the x_2 term never changes q_{i+2} there; it keeps the block exact for
// any q_hat. Purely combinational; the caller registers the three outputs.
//
// The inputs, the outputs, the skip equation and the output selection follow
// the document. The bit equations for q_{i+1} and q_{i+2} are derived here
// from the adder's arithmetic; the document's own equations for them are not
// available, so this is this design's form and not its gate list.
module skip_d (
  input  logic [2:0] ss,       // SS[i]_{2:0}
  input  logic [2:0] sc,       // SC[i]_{2:0}
  input  logic       n_hat2,   // N-hat bit 2
  input  logic       q_hat,    // q_i selecting x this cycle
  input  logic       a_next1,  // A_{i+1}
  input  logic       a_next2,  // A_{i+2}
  output logic       q_hat_o,  // q for the next executed iteration
  output logic       a_hat_o,  // A bit for the next executed iteration
  output logic       skip      // skip_{i+1}
);

  logic x2;
  logic ss1_0, sc1_0;  // SS[i+1]_0, SC[i+1]_0
  logic ss1_1, sc1_1;  // SS[i+1]_1, SC[i+1]_1
  logic q1, q2;

  always_comb begin
    x2    = n_hat2 & q_hat;
    ss1_0 = ss[1] ^ sc[1];           // sum bit 1, x_1 = 0
    sc1_0 = (ss[0] & sc[0]) | (ss[0] & q_hat) | (sc[0] & q_hat);  // carry of bit 0
    ss1_1 = ss[2] ^ sc[2] ^ x2;      // sum bit 2
    sc1_1 = ss[1] & sc[1];           // carry out of bit 1, x_1 = 0
    q1    = ss1_0 ^ sc1_0;
    q2    = ss1_1 ^ sc1_1;
    skip  = ~(a_next1 | q1 | ss1_0);
    q_hat_o = skip ? q2 : q1;
    a_hat_o = skip ? a_next2 : a_next1;
  end

endmodule
