// tb_skip_d: exhaustive test of the skip detector.
//
// For every 3-bit SS[i], SC[i], N-hat bit 2 and the next two multiplier bits,
// with q_hat = SS[i]_0 ^ SC[i]_0 (the loop keeps the pair's sum even), the
// reference forms the integer t = SS + SC + x with x_0 = q_hat, x_1 = 0,
// x_2 = q_hat & N-hat_2. Then q_{i+1} is bit 1 of t, SS[i+1]_0 is bit 1 of
// the bitwise XOR SS ^ SC ^ x, skip = ~(A_{i+1} | q_{i+1} | SS[i+1]_0), and
// when skipping the next quotient bit is bit 2 of t (the pair is divided by
// four exactly). Also checks that t is even.
module tb_skip_d;
  logic [2:0] ss, sc;
  logic n_hat2, q_hat, a1, a2, q_o, a_o, skip;
  int checks = 0, failures = 0;

  skip_d dut (.ss, .sc, .n_hat2, .q_hat, .a_next1(a1), .a_next2(a2),
              .q_hat_o(q_o), .a_hat_o(a_o), .skip);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] xv, xs;
    int t;
    logic e_q1, e_skip, e_q, e_a;
    int n_skip = 0;
    for (int v = 0; v < 512; v++) begin
      {ss, sc, n_hat2, a1, a2} = 9'(v);
      q_hat = ss[0] ^ sc[0];
      xv = {n_hat2 & q_hat, 1'b0, q_hat};
      t = int'(ss) + int'(sc) + int'(xv);
      xs = ss ^ sc ^ xv;
      e_q1   = 1'(t >> 1);
      e_skip = !(a1 || e_q1 || xs[1]);
      e_q    = e_skip ? 1'(t >> 2) : e_q1;
      e_a    = e_skip ? a2 : a1;
      #1;
      checks++;
      if (t % 2 != 0) begin failures++; $display("FAIL odd sum"); end
      checks++;
      if (skip != e_skip || q_o != e_q || a_o != e_a) begin
        failures++;
        $display("FAIL ss=%b sc=%b n2=%b a=%b%b: skip=%b q=%b a=%b expected %b %b %b",
                 ss, sc, n_hat2, a2, a1, skip, q_o, a_o, e_skip, e_q, e_a);
      end
      if (skip) n_skip++;
    end
    checks++;
    if (n_skip == 0) begin failures++; $display("FAIL no skip seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
