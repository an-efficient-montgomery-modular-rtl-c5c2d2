// sm3: simplified 4-to-1 multiplexer SM3 choosing the addend x.
//
// One Montgomery iteration adds x = 0, N-hat, B-hat or D-hat = B-hat + N-hat
// according to the stored selection bits: a_hat (the multiplier bit A_i) and
// q_hat (the quotient bit q_i):
//   a_hat q_hat : 00 -> 0, 01 -> N-hat, 10 -> B-hat, 11 -> D-hat.
// Instead of a full 4-to-1 multiplexer it gates N-hat with q_hat, picks
// B-hat or D-hat with q_hat, and then picks between the two with a_hat.
// Purely combinational. The selection table and this structure follow the
// document; the document's cell outputs ~x for a complemented-input adder,
// while this one outputs x itself.
module sm3 #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] n_hat,
  input  logic [W-1:0] b_hat,
  input  logic [W-1:0] d_hat,
  input  logic         q_hat,
  input  logic         a_hat,
  output logic [W-1:0] x
);

  logic [W-1:0] n_gated;  // N-hat or 0
  logic [W-1:0] bd;       // B-hat or D-hat

  always_comb begin
    n_gated = n_hat & {W{q_hat}};
    bd      = q_hat ? d_hat : b_hat;
    x       = a_hat ? bd : n_gated;
  end

endmodule
