// tb_mm_ctrl: test of the multiplier controller on its own, at K = 8.
//
// Two controllers run from the same stimulus: one for prefix-adder
// conversion, one for carry-save conversion. The testbench plays the
// datapath: it drives random skip flags during the loop, random stored skip
// bits, and holds the zero flag low for a random number of conversion
// cycles. It checks, cycle by cycle, the state sequence, the control word of
// each state (operand select, CCSA mode, register writes), that a skip is
// refused only in the last iteration, that the loop index follows
// i <- i + 1 or i + 2 from -1 until it passes K + 4, and that done pulses
// once per operation with busy low again.
module tb_mm_ctrl;
  import mm_pkg::*;

  localparam int unsigned K = 8;
  localparam int unsigned LAST = K + 5;

  logic clk = 1'b0, rst_n = 1'b0, start_p = 1'b0, start_c = 1'b0;
  logic zero, skip, skip_r;
  ctrl_t ctrl_p, ctrl_c;
  ctrl_state_e st_p, st_c;
  logic busy_p, busy_c, done_p, done_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  mm_ctrl #(.K(K), .PPA_CONV(1'b1)) dut_p (.clk, .rst_n, .start(start_p), .zero, .skip, .skip_r,
    .ctrl(ctrl_p), .state(st_p), .busy(busy_p), .done(done_p));
  mm_ctrl #(.K(K), .PPA_CONV(1'b0)) dut_c (.clk, .rst_n, .start(start_c), .zero, .skip, .skip_r,
    .ctrl(ctrl_c), .state(st_c), .busy(busy_c), .done(done_c));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One operation on one controller; the other is kept idle.
  task automatic run(input bit ppa, input int zero_wait_pre, input int zero_wait_post,
                     input int skip_pct);
    int i, loops, waited;
    ctrl_t c;
    ctrl_state_e s;
    @(negedge clk);
    start_p = ppa; start_c = !ppa; zero = 1'b0; skip = 1'b0; skip_r = 1'b0;
    #1;
    c = ppa ? ctrl_p : ctrl_c;
    chk(c.load, "load on start");
    @(negedge clk);
    start_p = 1'b0; start_c = 1'b0;
    s = ppa ? st_p : st_c;
    chk(s == ST_PRE, "PRE after start");
    chk((ppa ? busy_p : busy_c), "busy");
    c = ppa ? ctrl_p : ctrl_c;
    chk(c.m_sel == SEL_LOAD && !c.alpha, "PRE operands B-hat, N-hat in full-adder mode");
    chk(ppa ? (c.d_we_ppa && c.ss_clr) : (c.ss_we && !c.d_we_ppa), "PRE writes");
    if (!ppa) begin
      waited = 0;
      @(negedge clk);
      while (waited < zero_wait_pre) begin
        chk(st_c == ST_PRE_CONV && ctrl_c.alpha && ctrl_c.ss_we && ctrl_c.m_sel == SEL_REG,
            "PRE_CONV half-adder step");
        @(negedge clk);
        waited++;
      end
      zero = 1'b1;
      #1;
      chk(st_c == ST_PRE_CONV && ctrl_c.d_we_ss && ctrl_c.ss_clr && !ctrl_c.ss_we, "D-hat <= SS on zero");
    end
    @(negedge clk);
    zero = 1'b0;
    i = -1; loops = 0;
    while (i <= int'(K) + 4) begin
      skip_r = 1'($urandom);
      skip = ($urandom % 100) < skip_pct;
      #1;
      s = ppa ? st_p : st_c;
      c = ppa ? ctrl_p : ctrl_c;
      chk(s == ST_LOOP, "in LOOP");
      chk(c.m_sel == (skip_r ? SEL_SHR2 : SEL_SHR1), "loop shift select");
      chk(c.ss_we && c.sd_we && !c.alpha, "loop writes, full-adder mode");
      chk(c.skip_ok == (i != int'(K) + 4), "skip refused only in the last iteration");
      i += (skip && i != int'(K) + 4) ? 2 : 1;
      loops++;
      @(negedge clk);
    end
    skip = 1'b0;
    skip_r = 1'($urandom);
    #1;
    s = ppa ? st_p : st_c;
    c = ppa ? ctrl_p : ctrl_c;
    chk(s == ST_FINAL, "FINAL after the loop");
    chk(c.m_sel == (skip_r ? SEL_SHR2 : SEL_SHR1) && c.sd_clr, "FINAL shift and FF clear");
    chk(ppa ? c.res_we_ppa : (c.alpha && c.ss_we), "FINAL conversion");
    if (!ppa) begin
      @(negedge clk);
      waited = 0;
      while (waited < zero_wait_post) begin
        chk(st_c == ST_POST_CONV && ctrl_c.alpha && ctrl_c.ss_we && !ctrl_c.res_we_ss,
            "POST_CONV step");
        @(negedge clk);
        waited++;
      end
      zero = 1'b1;
      #1;
      chk(st_c == ST_POST_CONV && ctrl_c.res_we_ss, "result <= SS on zero");
    end
    @(negedge clk);
    zero = 1'b0;
    chk(ppa ? (done_p && !busy_p) : (done_c && !busy_c), "done pulse, idle");
    @(negedge clk);
    chk(ppa ? !done_p : !done_c, "done is one cycle");
    chk(loops <= int'(K) + 6, "at most K+6 loop cycles");
  endtask

  initial begin
    zero = 1'b0; skip = 1'b0; skip_r = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(1'b1, 0, 0, 0);      // no skips: K + 6 iterations
    run(1'b1, 0, 0, 100);    // skip whenever flagged
    run(1'b0, 0, 0, 0);
    run(1'b0, 5, 3, 100);
    for (int t = 0; t < 200; t++) begin
      run(1'($urandom), $urandom % 12, $urandom % 12, $urandom % 101);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
