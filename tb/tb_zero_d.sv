// tb_zero_d: test of the zero detector: zero must be 1 for an all-zero
// carry vector and 0 for every one-hot vector and random nonzero vectors.
module tb_zero_d;
  localparam int unsigned W = 32;
  logic [W-1:0] sc;
  logic zero;
  int checks = 0, failures = 0;

  zero_d dut (.sc, .zero);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] v);
    sc = v;
    #1;
    checks++;
    if (zero != (v == '0)) begin
      failures++;
      $display("FAIL sc=%h zero=%b", v, zero);
    end
  endtask

  initial begin
    chk('0);
    chk('1);
    for (int j = 0; j < int'(W); j++) chk(W'(1) << j);
    for (int t = 0; t < 500; t++) chk($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
