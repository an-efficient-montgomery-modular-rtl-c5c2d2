// tb_ks_adder: test of the Kogge-Stone adder at its default 32-bit width and
// at 1, 5 and 70 bits. {cout, sum} must equal a + b + cin for the 4-bit
// example values (1001 + 1100), carry-chain corners and random operands.
module tb_ks_adder;
  int checks = 0, failures = 0;

  logic [31:0] a32, b32, s32;
  logic        c32, o32;
  logic [0:0]  a1, b1, s1;
  logic        c1, o1;
  logic [4:0]  a5, b5, s5;
  logic        c5, o5;
  logic [69:0] a70, b70, s70;
  logic        c70, o70;

  ks_adder                u32 (.a(a32), .b(b32), .cin(c32), .sum(s32), .cout(o32));
  ks_adder #(.WIDTH(1))  u1  (.a(a1),  .b(b1),  .cin(c1),  .sum(s1),  .cout(o1));
  ks_adder #(.WIDTH(5))  u5  (.a(a5),  .b(b5),  .cin(c5),  .sum(s5),  .cout(o5));
  ks_adder #(.WIDTH(70)) u70 (.a(a70), .b(b70), .cin(c70), .sum(s70), .cout(o70));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic t32(input logic [31:0] p, input logic [31:0] q, input logic ci);
    a32 = p; b32 = q; c32 = ci;
    #1;
    checks++;
    if ({o32, s32} != 33'(p) + 33'(q) + 33'(ci)) begin
      failures++;
      $display("FAIL 32: %h + %h + %b -> %b %h", p, q, ci, o32, s32);
    end
  endtask

  task automatic t70(input logic [69:0] p, input logic [69:0] q, input logic ci);
    a70 = p; b70 = q; c70 = ci;
    #1;
    checks++;
    if ({o70, s70} != 71'(p) + 71'(q) + 71'(ci)) begin
      failures++;
      $display("FAIL 70: %h + %h + %b", p, q, ci);
    end
  endtask

  initial begin
    // 4-bit example: 1001 + 1100 = 10101
    t32(32'b1001, 32'b1100, 1'b0);
    checks++;
    if (s32[4:0] != 5'b10101) begin failures++; $display("FAIL example"); end
    t32('1, 32'd1, 1'b0);
    t32('1, '0, 1'b1);
    t32('1, '1, 1'b1);
    t32(32'h8000_0000, 32'h8000_0000, 1'b0);
    t70('1, 70'd1, 1'b0);
    t70('1, '0, 1'b1);
    for (int t = 0; t < 3000; t++) begin
      t32($urandom, $urandom, 1'($urandom));
      t70({$urandom, $urandom, $urandom}, {$urandom, $urandom, $urandom}, 1'($urandom));
    end
    for (int v = 0; v < 8; v++) begin
      a1 = v[0]; b1 = v[1]; c1 = v[2];
      #1;
      checks++;
      if ({o1, s1} != 2'(a1) + 2'(b1) + 2'(c1)) begin failures++; $display("FAIL 1-bit"); end
    end
    for (int v = 0; v < 2048; v++) begin
      a5 = v[4:0]; b5 = v[9:5]; c5 = v[10];
      #1;
      checks++;
      if ({o5, s5} != 6'(a5) + 6'(b5) + 6'(c5)) begin failures++; $display("FAIL 5-bit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
