// tb_full_adder: exhaustive test of the 1-bit carry-save cell. For all eight
// input combinations, {cout, sum} must equal the integer count of ones.
module tb_full_adder;
  logic x, y, z, sum, cout;
  int checks = 0, failures = 0;

  full_adder dut (.x, .y, .z, .sum, .cout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {x, y, z} = 3'(v);
      #1;
      checks++;
      if (int'({cout, sum}) != int'(x) + int'(y) + int'(z)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b -> cout=%b sum=%b", x, y, z, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
