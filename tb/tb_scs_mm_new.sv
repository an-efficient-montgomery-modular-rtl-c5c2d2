// tb_scs_mm_new: end-to-end test of the Montgomery multiplier.
//
// Two multipliers of the same reduced width K run side by side on the same
// operands: one converting with the Kogge-Stone adder (PPA_CONV = 1), one
// with the repeated two-half-adder steps (PPA_CONV = 0). For every operation
// the testbench checks
//   * the result by plain modular arithmetic: S * 2^(K+2) = A * B (mod N-hat)
//     and S < 2 * N-hat,
//   * the result and the latency against an algorithm-level model of the
//     skipping loop (wide integer vectors, no hardware structure),
// and counts how often each mechanism occurred: skipped and executed
// iterations, each of the four addends x, a skip refused in the last
// iteration, one-cycle prefix-adder conversions, multi-step carry-save
// conversions and start pulses during an operation (which must be ignored). A mechanism that never occurred counts as a failure.
// Operands: corner values, random values and chains that feed a result back
// as the next multiplier.
module tb_scs_mm_new;

  localparam int unsigned K     = 32;
  localparam int unsigned W     = K + 6;
  localparam int unsigned NRAND = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [K:0]   a, b;
  logic [K-1:0] n_hat;
  logic busy_p, done_p, busy_c, done_c;
  logic [K:0] s_p, s_c;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  scs_mm_new #(.K(K), .PPA_CONV(1'b1)) dut_p (
    .clk, .rst_n, .start, .a, .b, .n_hat, .busy(busy_p), .done(done_p), .s(s_p));
  scs_mm_new #(.K(K), .PPA_CONV(1'b0)) dut_c (
    .clk, .rst_n, .start, .a, .b, .n_hat, .busy(busy_c), .done(done_c), .s(s_c));

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400 * (NRAND + 40) * (K + 20)) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------- mechanism counters
  int n_skip = 0, n_exec = 0, n_refused = 0;
  int n_x[4] = '{0, 0, 0, 0};
  int n_ppa_conv = 0, n_csa_conv_multi = 0, n_conv_steps = 0;

  always @(posedge clk) begin
    if (rst_n && dut_p.ctrl.sd_we) begin
      n_exec++;
      n_x[{dut_p.a_hat_r, dut_p.q_hat_r}]++;
      if (dut_p.skip_eff) n_skip++;
      if (dut_p.sd_skip && !dut_p.ctrl.skip_ok) n_refused++;
    end
    if (rst_n && (dut_p.ctrl.res_we_ppa || dut_p.ctrl.d_we_ppa)) n_ppa_conv++;
    if (rst_n && dut_c.ctrl.ss_we && dut_c.ctrl.alpha) n_conv_steps++;
  end

  // ----------------------------------------------------------- reference model
  function automatic logic [W-1:0] maj(logic [W-1:0] p, logic [W-1:0] q, logic [W-1:0] r);
    return (p & q) | (p & r) | (q & r);
  endfunction

  // Two half-adder rows in series: one conversion step on (s, c).
  function automatic void two_ha(ref logic [W-1:0] s, ref logic [W-1:0] c);
    logic [W-1:0] s1, c1;
    s1 = s ^ c;
    c1 = (s & c) << 1;
    s  = s1 ^ c1;
    c  = (s1 & c1) << 1;
  endfunction

  // Runs the algorithm on integer vectors. Returns the result and the
  // cycle counts: loop iterations, and conversion steps before and after.
  function automatic void model(input logic [K:0] av, input logic [K:0] bv,
                                input logic [K-1:0] nv, output logic [W-1:0] res,
                                output int loops, output int pre_steps,
                                output int post_steps);
    logic [W-1:0] bh, nh, dh, ss, sc, x, ssn, scn, sum_v;
    logic [K+7:0] abits;
    logic qh, ah, q1, skip;
    int cnt;
    bh = W'(bv) << 3;
    nh = W'(nv);
    dh = bh + nh;
    abits = (K+8)'(av);
    // B-hat + N-hat by carry-save steps, for the PPA_CONV = 0 latency
    ss = bh ^ nh;
    sc = maj(bh, nh, '0) << 1;
    pre_steps = 0;
    while (sc != '0) begin two_ha(ss, sc); pre_steps++; end
    // main loop, index cnt = i + 1
    ss = '0; sc = '0; qh = 1'b0; ah = 1'b0; cnt = 0; loops = 0;
    while (cnt <= int'(K) + 5) begin
      x = ah ? (qh ? dh : bh) : (qh ? nh : '0);
      sum_v = ss ^ sc ^ x;
      if (sum_v[0]) begin
        $display("model: odd sum at cnt=%0d", cnt);
        failures++;
      end
      ssn = sum_v >> 1;
      scn = maj(ss, sc, x);
      q1 = ssn[0] ^ scn[0];
      skip = !(abits[cnt] || q1 || ssn[0]) && (cnt != int'(K) + 5);
      if (skip) begin
        ss = ssn >> 1; sc = scn >> 1;
        qh = ss[0] ^ sc[0];
        ah = abits[cnt + 1];
        cnt += 2;
      end else begin
        ss = ssn; sc = scn;
        qh = q1;
        ah = abits[cnt];
        cnt += 1;
      end
      loops++;
    end
    res = ss + sc;
    // final conversion by carry-save steps: first step, then until SC = 0
    two_ha(ss, sc);
    post_steps = 0;
    while (sc != '0) begin two_ha(ss, sc); post_steps++; end
    if (ss != res) begin
      $display("model: conversion mismatch");
      failures++;
    end
  endfunction

  // ------------------------------------------------------------ one operation
  int lat_p, lat_c;
  bit got_p, got_c;

  int n_poke = 0;

  // poke: pulse start with other operands in the middle of the operation;
  // both multipliers must ignore it.
  task automatic run_one(input logic [K:0] av, input logic [K:0] bv, input logic [K-1:0] nv,
                         input bit poke = 1'b0);
    logic [W-1:0] ref_s;
    int loops, pre_steps, post_steps;
    logic [3*K+8:0] lhs, rhs, nn;
    model(av, bv, nv, ref_s, loops, pre_steps, post_steps);
    if (post_steps > 0) n_csa_conv_multi++;
    @(negedge clk);
    a = av; b = bv; n_hat = nv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    a = '0; b = '0; n_hat = 'h1;
    lat_p = 1; lat_c = 1; got_p = 0; got_c = 0;
    while (!(got_p && got_c)) begin
      @(posedge clk);
      #1;
      start = 1'b0;
      if (poke && lat_p == 6) begin
        start = 1'b1;
        a = ~av; b = bv >> 1; n_hat = 'h5;
        n_poke++;
      end
      if (done_p && !got_p) got_p = 1; else if (!got_p) lat_p++;
      if (done_c && !got_c) got_c = 1; else if (!got_c) lat_c++;
    end
    // independent modular check
    nn  = (3*K+9)'(nv);
    lhs = ((3*K+9)'(s_p) << (K + 2)) % nn;
    rhs = ((3*K+9)'(av) * (3*K+9)'(bv)) % nn;
    checks++;
    if (lhs != rhs || (3*K+9)'(s_p) >= 2 * nn) begin
      failures++;
      $display("FAIL modular: a=%h b=%h n=%h s=%h", av, bv, nv, s_p);
    end
    checks++;
    if (W'(s_p) != ref_s) begin
      failures++;
      $display("FAIL ppa result vs model: s=%h ref=%h", s_p, ref_s);
    end
    checks++;
    if (s_c != s_p) begin
      failures++;
      $display("FAIL csa-conversion result: s=%h ppa=%h", s_c, s_p);
    end
    checks++;
    if (lat_p != loops + 2) begin
      failures++;
      $display("FAIL ppa latency %0d, expected %0d", lat_p, loops + 2);
    end
    checks++;
    if (lat_c != loops + pre_steps + post_steps + 4) begin
      failures++;
      $display("FAIL csa latency %0d, expected %0d", lat_c, loops + pre_steps + post_steps + 4);
    end
    checks++;
    if (loops > int'(K) + 6) begin
      failures++;
      $display("FAIL more than K+6 loop cycles: %0d", loops);
    end
  endtask

  function automatic logic [K-1:0] rand_nhat();
    logic [K-1:0] v;
    for (int j = 0; j < K; j += 32) v[j +: 32] = $urandom;
    v[K-1] = 1'b1;
    v[1:0] = 2'b01;
    return v;
  endfunction

  function automatic logic [K:0] rand_below(input logic [K:0] lim);
    logic [K+32:0] v;
    for (int j = 0; j < K + 33; j += 32) v[j +: 32] = $urandom;
    return (K+1)'(v % (K+33)'(lim));
  endfunction

  // -------------------------------------------------------------------- main
  initial begin
    logic [K-1:0] nv;
    logic [K:0] av, bv, n2;
    a = '0; b = '0; n_hat = 'h1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // corner cases
    nv = {K{1'b1}}; nv[1] = 1'b0;           // largest N-hat = 1 (mod 4)
    n2 = (K+1)'(nv) << 1;
    run_one('0, '0, nv);
    run_one(n2 - 1, n2 - 1, nv);
    run_one(1, n2 - 1, nv);
    run_one(n2 - 1, 1, nv);
    run_one('0, n2 - 1, nv);
    nv = K'(5);                              // smallest useful N-hat
    run_one(9, 9, nv);
    run_one(3, 7, nv);
    nv = K'(1) << (K - 1); nv[0] = 1'b1;     // 100...001
    n2 = (K+1)'(nv) << 1;
    run_one(n2 - 1, n2 - 2, nv);
    run_one((K+1)'(1) << K, (K+1)'(1) << K, nv);

    // random operands
    for (int t = 0; t < NRAND; t++) begin
      nv = rand_nhat();
      n2 = (K+1)'(nv) << 1;
      av = rand_below(n2);
      bv = rand_below(n2);
      if (t % 7 == 0) av = av >> (K / 2);     // sparse multiplier: long skip runs
      run_one(av, bv, nv, t % 10 == 3);
    end

    // chains: each result is the next multiplier
    for (int c = 0; c < 5; c++) begin
      nv = rand_nhat();
      n2 = (K+1)'(nv) << 1;
      av = rand_below(n2);
      bv = rand_below(n2);
      for (int t = 0; t < 8; t++) begin
        run_one(av, bv, nv);
        av = s_p;
      end
    end

    // mechanisms
    $display("skipped=%0d executed=%0d refused_last=%0d x0=%0d xN=%0d xB=%0d xD=%0d",
             n_skip, n_exec, n_refused, n_x[0], n_x[1], n_x[2], n_x[3]);
    $display("ppa_conversions=%0d csa_conv_steps=%0d multi_step_final_conversions=%0d",
             n_ppa_conv, n_conv_steps, n_csa_conv_multi);
    checks++; if (n_skip == 0)      begin failures++; $display("FAIL no skip"); end
    checks++; if (n_refused == 0)   begin failures++; $display("FAIL no refused skip"); end
    for (int j = 0; j < 4; j++) begin
      checks++; if (n_x[j] == 0) begin failures++; $display("FAIL addend %0d never used", j); end
    end
    checks++; if (n_poke == 0)      begin failures++; $display("FAIL no start while busy"); end
    checks++; if (n_ppa_conv == 0)  begin failures++; $display("FAIL no ppa conversion"); end
    checks++; if (n_csa_conv_multi == 0) begin failures++; $display("FAIL no multi-step conversion"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
