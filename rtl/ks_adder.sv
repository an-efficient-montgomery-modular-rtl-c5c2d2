// ks_adder: Kogge-Stone parallel prefix adder.
//
// Adds a + b + cin in ceil(log2(WIDTH)) prefix levels. Each bit first forms
// a propagate p = a ^ b and a generate g = a & b (the carry-in is folded into
// the generate of bit 0). Level l combines every bit j >= 2^l with bit
// j - 2^l: P = P_j & P_prev, G = (P_j & G_prev) | G_j; bits below 2^l pass
// through. After the last level G_j is the carry out of bit j, and the sum
// bit is p_j ^ carry-in of bit j. Purely combinational.
//
// The cell equations and the Kogge-Stone wiring follow the document; the
// 32-bit default width is the size it synthesises. In the multiplier it is
// instantiated at the datapath width to add B-hat + N-hat and to convert the
// final carry-save result to binary in one clock each.
module ks_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p0;                 // bit propagate, kept for the sum
  logic [WIDTH-1:0] gl [LEVELS+1];      // group generate per level
  logic [WIDTH-1:0] pl [LEVELS+1];      // group propagate per level
  logic [WIDTH-1:0] carry_in;           // carry into each bit

  assign p0    = a ^ b;
  assign pl[0] = p0;
  assign gl[0] = (a & b) | WIDTH'(p0[0] & cin);   // carry-in folded into bit 0

  // One prefix level per generate step, written word-wide: bit j of the
  // shifted vectors is node j - 2^l. Bits below 2^l see zeros in the shifted
  // generate and ones in the propagate mask, so they pass unchanged.
  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    localparam int unsigned D = 1 << l;                        // span of this level
    localparam logic [WIDTH-1:0] LOW = ~({WIDTH{1'b1}} << D);  // bits j < D
    assign gl[l+1] = gl[l] | (pl[l] & (gl[l] << D));
    assign pl[l+1] = pl[l] & ((pl[l] << D) | LOW);
  end

  if (WIDTH > 1) begin : g_wide
    assign carry_in = {gl[LEVELS][WIDTH-2:0], cin};
  end else begin : g_one
    assign carry_in = cin;
  end

  assign sum  = p0 ^ carry_in;
  assign cout = gl[LEVELS][WIDTH-1];

endmodule
