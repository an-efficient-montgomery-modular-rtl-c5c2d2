// tb_sm3: test of the addend multiplexer SM3. For random N-hat, B-hat and
// D-hat and all four (a_hat, q_hat) codes, x must be 0, N-hat, B-hat or D-hat
// as the selection table gives.
module tb_sm3;
  localparam int unsigned W = 32;
  logic [W-1:0] n_hat, b_hat, d_hat, x, expect_x;
  logic q_hat, a_hat;
  int checks = 0, failures = 0;

  sm3 dut (.n_hat, .b_hat, .d_hat, .q_hat, .a_hat, .x);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      n_hat = $urandom; b_hat = $urandom; d_hat = $urandom;
      for (int c = 0; c < 4; c++) begin
        {a_hat, q_hat} = 2'(c);
        case (c)
          0: expect_x = '0;
          1: expect_x = n_hat;
          2: expect_x = b_hat;
          default: expect_x = d_hat;
        endcase
        #1;
        checks++;
        if (x != expect_x) begin
          failures++;
          $display("FAIL a=%b q=%b x=%h expected %h", a_hat, q_hat, x, expect_x);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
