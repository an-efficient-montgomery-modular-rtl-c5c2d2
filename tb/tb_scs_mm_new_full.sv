// tb_scs_mm_new_full: the multiplier at its default size (K = 1024, prefix
// adder conversion), no parameter overridden.
//
// Runs corner operands, random operands and a short square-and-multiply
// exponentiation in the Montgomery domain (the way an RSA modular
// exponentiation uses the multiplier), all with random 1024-bit moduli
// N-hat = 1 (mod 4). Each result is checked by plain modular arithmetic
// (S * 2^(K+2) = A * B mod N-hat, S < 2 * N-hat) and the latency against the
// bound of K + 6 loop cycles plus two. The exponentiation result is checked
// against a square-and-multiply done with ordinary modular arithmetic.
module tb_scs_mm_new_full;

  localparam int unsigned K  = 1024;
  localparam int unsigned WL = 3 * K + 16;   // width for reference arithmetic

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K:0] a, b, s;
  logic [K-1:0] n_hat;
  logic busy, done;
  int checks = 0, failures = 0;
  int n_skip = 0, n_iter = 0;

  always #5 clk = ~clk;

  scs_mm_new dut (.clk, .rst_n, .start, .a, .b, .n_hat, .busy, .done, .s);

  initial begin
    repeat (200 * (K + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dut.ctrl.sd_we) begin
      n_iter++;
      if (dut.skip_eff) n_skip++;
    end
  end

  function automatic logic [K-1:0] rand_nhat();
    logic [K-1:0] v;
    for (int j = 0; j < int'(K); j += 32) v[j +: 32] = $urandom;
    v[K-1] = 1'b1;
    v[1:0] = 2'b01;
    return v;
  endfunction

  function automatic logic [K:0] rand_below(input logic [K:0] lim);
    logic [K+32:0] v;
    for (int j = 0; j < int'(K) + 33; j += 32) v[j +: 32] = $urandom;
    return (K+1)'(v % (K+33)'(lim));
  endfunction

  function automatic logic [WL-1:0] mulmod(input logic [WL-1:0] p, input logic [WL-1:0] q,
                                           input logic [WL-1:0] m);
    return (p * q) % m;
  endfunction

  task automatic mm(input logic [K:0] av, input logic [K:0] bv, input logic [K-1:0] nv,
                    output logic [K:0] res);
    int lat;
    logic [WL-1:0] nn;
    @(negedge clk);
    a = av; b = bv; n_hat = nv; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    res = s;
    nn = WL'(nv);
    checks++;
    if ((((WL'(res)) << (K + 2)) % nn) != mulmod(WL'(av), WL'(bv), nn) || WL'(res) >= 2 * nn) begin
      failures++;
      $display("FAIL modular check");
    end
    checks++;
    if (lat > int'(K) + 8 || lat < 2) begin
      failures++;
      $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    logic [K-1:0] nv;
    logic [K:0] n2, av, bv, r;
    logic [WL-1:0] nn, rmod, base, acc_ref, x_m, acc_m, one_m;
    logic [15:0] e;
    a = '0; b = '0; n_hat = 'h1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // corners
    nv = {K{1'b1}}; nv[1] = 1'b0;
    n2 = (K+1)'(nv) << 1;
    mm(n2 - 1, n2 - 1, nv, r);
    mm('0, n2 - 1, nv, r);
    // random
    for (int t = 0; t < 4; t++) begin
      nv = rand_nhat();
      n2 = (K+1)'(nv) << 1;
      av = rand_below(n2);
      bv = rand_below(n2);
      mm(av, bv, nv, r);
    end

    // exponentiation base^e mod N-hat, Montgomery constant R = 2^(K+2)
    nv = rand_nhat();
    nn = WL'(nv);
    base = WL'(rand_below((K+1)'(nv)));
    e = 16'hb5;
    rmod = (WL'(1) << (K + 2)) % nn;
    x_m = (base * rmod) % nn;             // base in the Montgomery domain
    one_m = rmod;                          // 1 in the Montgomery domain
    acc_m = one_m;
    for (int j = 7; j >= 0; j--) begin
      mm((K+1)'(acc_m), (K+1)'(acc_m), nv, r);
      acc_m = WL'(r);
      if (e[j]) begin
        mm((K+1)'(acc_m), (K+1)'(x_m), nv, r);
        acc_m = WL'(r);
      end
    end
    mm((K+1)'(acc_m), (K+1)'(1), nv, r);   // leave the Montgomery domain
    acc_ref = 1;
    for (int j = 7; j >= 0; j--) begin
      acc_ref = (acc_ref * acc_ref) % nn;
      if (e[j]) acc_ref = (acc_ref * base) % nn;
    end
    checks++;
    if ((WL'(r) % nn) != acc_ref) begin
      failures++;
      $display("FAIL exponentiation");
    end

    $display("iterations=%0d skipped=%0d", n_iter, n_skip);
    checks++;
    if (n_skip == 0) begin failures++; $display("FAIL no skip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
