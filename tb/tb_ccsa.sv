// tb_ccsa: random and corner test of the configurable carry-save adder.
// Full-adder mode: ss_o + sc_o must equal ss + sc + x (mod 2^W) and sc_o[0]
// must be 0. Two-half-adder mode: ss_o + sc_o must equal ss + sc (x ignored),
// and repeating the step on its own outputs must reach sc = 0 with ss equal
// to the binary sum within W steps. Run at the default width.
module tb_ccsa;
  localparam int unsigned W = 32;
  logic [W-1:0] ss, sc, x, ss_o, sc_o;
  logic alpha;
  int checks = 0, failures = 0;

  ccsa dut (.ss, .sc, .x, .alpha, .ss_o, .sc_o);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_fa(input logic [W-1:0] p, input logic [W-1:0] q, input logic [W-1:0] r);
    ss = p; sc = q; x = r; alpha = 1'b0;
    #1;
    checks++;
    if (W'(ss_o + sc_o) != W'(p + q + r) || sc_o[0]) begin
      failures++;
      $display("FAIL FA %h+%h+%h -> %h,%h", p, q, r, ss_o, sc_o);
    end
  endtask

  task automatic check_conv(input logic [W-1:0] p, input logic [W-1:0] q);
    logic [W-1:0] target;
    int steps;
    target = p + q;
    ss = p; sc = q; x = $urandom; alpha = 1'b1;
    #1;
    checks++;
    if (W'(ss_o + sc_o) != target) begin
      failures++;
      $display("FAIL 2HA %h+%h -> %h,%h", p, q, ss_o, sc_o);
    end
    steps = 0;
    while (sc != '0 && steps <= int'(W)) begin
      ss = ss_o; sc = sc_o;
      #1;
      steps++;
    end
    checks++;
    if (sc != '0 || ss != target) begin
      failures++;
      $display("FAIL conversion of %h+%h: ss=%h sc=%h after %0d steps", p, q, ss, sc, steps);
    end
  endtask

  initial begin
    check_fa('0, '0, '0);
    check_fa('1, '1, '1);
    check_fa('1, 1, '0);
    check_conv('1, 1);
    check_conv('1, '1);
    check_conv(32'h5555_5555, 32'haaaa_aaab);
    for (int t = 0; t < 2000; t++) begin
      check_fa($urandom, $urandom, $urandom);
      check_conv($urandom, {$urandom} << 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
