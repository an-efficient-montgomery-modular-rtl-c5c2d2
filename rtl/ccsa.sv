// ccsa: one-level configurable carry-save adder (CCSA).
//
// This is the only adder the Montgomery loop uses. It has two modes, chosen
// by alpha:
//   alpha = 0  full-adder mode: one row of 1-bit carry-save cells reduces
//              ss + sc + x to a sum vector and a carry vector (a "1F_CSA").
//              Used for every Montgomery iteration and to start B-hat + N-hat.
//   alpha = 1  two-half-adder mode: x is ignored and two rows of half adders
//              in series (the second row taking the first row's carries one
//              bit up) add ss + sc (a "2H_CSA"). Repeating this until the
//              carry vector is zero turns a carry-save pair into binary, two
//              carry positions per clock.
// Outputs are unshifted: ss_o + sc_o == ss + sc (+ x) modulo 2^W. The carry
// vector sc_o is already weighted (bit 0 is always 0). The division by two
// of the algorithm is left to the operand multiplexers of the next cycle.
// Purely combinational.
//
// The two modes and their use follow the document. Building the half adders
// from the same full-adder cell with its third input forced to 0, so that
// the first row serves both modes, is this design's own form; the document's
// complemented-input cell (operand ~x) is not reproduced at gate level.
module ccsa #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] ss,
  input  logic [W-1:0] sc,
  input  logic [W-1:0] x,
  input  logic         alpha,
  output logic [W-1:0] ss_o,
  output logic [W-1:0] sc_o
);

  logic [W-1:0] z1;       // third input of the first row
  logic [W-1:0] s1, c1;   // first row: sum and carry (carry not yet weighted)
  logic [W-1:0] c1w;      // first-row carries moved to their weight
  logic [W-1:0] s2, c2;   // second (half-adder) row

  assign z1  = alpha ? '0 : x;
  assign c1w = {c1[W-2:0], 1'b0};

  for (genvar j = 0; j < W; j++) begin : g_bit
    full_adder u_row1 (.x(ss[j]), .y(sc[j]), .z(z1[j]),  .sum(s1[j]), .cout(c1[j]));
    full_adder u_row2 (.x(s1[j]), .y(c1w[j]), .z(1'b0),  .sum(s2[j]), .cout(c2[j]));
  end

  always_comb begin
    if (alpha) begin
      ss_o = s2;
      sc_o = {c2[W-2:0], 1'b0};
    end else begin
      ss_o = s1;
      sc_o = c1w;
    end
  end

endmodule
