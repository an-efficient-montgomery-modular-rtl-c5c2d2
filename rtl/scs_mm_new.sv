// scs_mm_new: radix-2 Montgomery modular multiplier, SCS-MM-New form with a
// Kogge-Stone parallel prefix adder.
//
// Computes S = A * B * 2^-(K+2) mod N-hat, with S < 2 * N-hat, for a K-bit
// modulus N-hat = 1 (mod 4) and operands A, B < 2 * N-hat, so results can be
// fed back as operands. A Montgomery iteration adds x in {0, N-hat, B-hat,
// D-hat} to a carry-save pair (SS, SC) in one carry-save adder row and halves
// it, so a clock cycle costs one 4-to-1 multiplexer plus one full adder:
//   * B-hat = B << 3 has three zero low bits, so the quotient bits depend
//     only on SS and SC and K + 5 halvings (three more than usual) are done;
//   * D-hat = B-hat + N-hat is formed once, before the loop;
//   * the selection bits q-hat and A-hat for iteration i+1 are computed and
//     registered during iteration i (Skip_D), and the halving of iteration i
//     is done by the operand multiplexers M1/M2 in the next cycle;
//   * an iteration that would add x = 0 to an even pair is skipped: the pair
//     is shifted by two and the index advances by two.
// The carry-propagate additions (B-hat + N-hat, and the final carry-save to
// binary conversion) are done by the Kogge-Stone adder in one cycle each when
// PPA_CONV = 1 (default). With PPA_CONV = 0 they are done the document's base
// way: repeated two-half-adder steps of the CCSA until Zero_D sees SC = 0.
//
// Interface: pulse start for one cycle while busy is low, with a, b, n_hat
// valid in that cycle (they are latched). done pulses for one cycle with s
// valid; s holds until the next result. Latency with PPA_CONV = 1 is L + 2
// cycles from the start edge to done, where L = K + 6 minus the number of
// skipped iterations (K + 6 loop cycles at most).
//
// Datapath width W = K + 6: the registers hold a carry-save value below
// 2 * D-hat < 2^(K+6) before its delayed halving.
//
// Follows the document: the algorithm, the block set (CCSA, M1, M2, SM3,
// Skip_D, Zero_D, M4/M5, registers) and the use of a prefix adder. This
// design's own: widths, the handshake, the N-hat = 1 (mod 4) rule as the
// interface contract, and where the prefix adder sits (it adds the same two
// operands M1 and M2 present to the CCSA).
module scs_mm_new
  import mm_pkg::*;
#(
  parameter int unsigned K        = 1024,
  parameter bit          PPA_CONV = 1'b1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [K:0]   a,       // multiplier, < 2 * n_hat
  input  logic [K:0]   b,       // multiplicand, < 2 * n_hat
  input  logic [K-1:0] n_hat,   // modulus, odd and = 1 (mod 4)
  output logic         busy,
  output logic         done,
  output logic [K:0]   s        // A * B * 2^-(K+2) mod n_hat, < 2 * n_hat
);

  localparam int unsigned W = K + 6;

  ctrl_t       ctrl;
  ctrl_state_e state;

  // Registers of the datapath
  logic [W-1:0] ss_r, sc_r;             // carry-save pair, before halving
  logic [W-1:0] b_hat_r, n_hat_r, d_hat_r;
  logic [K+1:0] a_sh;                   // A >> (i + 1): A_{i+1}, A_{i+2} at bits 0, 1
  logic         q_hat_r, a_hat_r, skip_r;
  logic [K:0]   s_r;

  // Combinational nets
  logic [W-1:0] op_sc, op_ss;           // M1, M2 outputs
  logic [W-1:0] x;                      // SM3 output
  logic [W-1:0] csa_ss, csa_sc;         // CCSA outputs
  logic [W-1:0] ppa_sum;
  logic         ppa_cout;
  logic [2:0]   low_sc, low_ss;         // M4, M5 outputs: SC[i]_{2:0}, SS[i]_{2:0}
  logic         sd_q, sd_a, sd_skip, skip_eff;
  logic         zero;

  // M1 and M2: 4-to-1 operand multiplexers
  always_comb begin
    unique case (ctrl.m_sel)
      SEL_REG:  begin op_sc = sc_r;      op_ss = ss_r;      end
      SEL_SHR1: begin op_sc = sc_r >> 1; op_ss = ss_r >> 1; end
      SEL_SHR2: begin op_sc = sc_r >> 2; op_ss = ss_r >> 2; end
      default:  begin op_sc = n_hat_r;   op_ss = b_hat_r;   end
    endcase
  end

  // M4 and M5: 3-bit 2-to-1 multiplexers feeding Skip_D quickly
  assign low_sc = skip_r ? sc_r[4:2] : sc_r[3:1];
  assign low_ss = skip_r ? ss_r[4:2] : ss_r[3:1];

  sm3 #(.W(W)) u_sm3 (
    .n_hat (n_hat_r), .b_hat (b_hat_r), .d_hat (d_hat_r),
    .q_hat (q_hat_r), .a_hat (a_hat_r), .x     (x)
  );

  ccsa #(.W(W)) u_ccsa (
    .ss (op_ss), .sc (op_sc), .x (x), .alpha (ctrl.alpha),
    .ss_o (csa_ss), .sc_o (csa_sc)
  );

  ks_adder #(.WIDTH(W)) u_ppa (
    .a (op_ss), .b (op_sc), .cin (1'b0), .sum (ppa_sum), .cout (ppa_cout)
  );

  skip_d u_skip_d (
    .ss (low_ss), .sc (low_sc), .n_hat2 (n_hat_r[2]), .q_hat (q_hat_r),
    .a_next1 (a_sh[0]), .a_next2 (a_sh[1]),
    .q_hat_o (sd_q), .a_hat_o (sd_a), .skip (sd_skip)
  );

  zero_d #(.W(W)) u_zero_d (.sc (sc_r), .zero (zero));

  mm_ctrl #(.K(K), .PPA_CONV(PPA_CONV)) u_ctrl (
    .clk, .rst_n, .start, .zero, .skip (sd_skip), .skip_r,
    .ctrl, .state, .busy, .done
  );

  assign skip_eff = sd_skip & ctrl.skip_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ss_r    <= '0;
      sc_r    <= '0;
      b_hat_r <= '0;
      n_hat_r <= '0;
      d_hat_r <= '0;
      a_sh    <= '0;
      q_hat_r <= 1'b0;
      a_hat_r <= 1'b0;
      skip_r  <= 1'b0;
      s_r     <= '0;
    end else begin
      if (ctrl.load) begin
        b_hat_r <= W'(b) << 3;
        n_hat_r <= W'(n_hat);
        a_sh    <= (K+2)'(a);
      end else if (ctrl.sd_we) begin
        a_sh    <= skip_eff ? (a_sh >> 2) : (a_sh >> 1);
      end

      if (ctrl.load || ctrl.ss_clr) begin
        ss_r <= '0;
        sc_r <= '0;
      end else if (ctrl.ss_we) begin
        ss_r <= csa_ss;
        sc_r <= csa_sc;
      end

      if (ctrl.load || ctrl.sd_clr) begin
        q_hat_r <= 1'b0;
        a_hat_r <= 1'b0;
        skip_r  <= 1'b0;
      end else if (ctrl.sd_we) begin
        q_hat_r <= sd_q;
        a_hat_r <= sd_a;
        skip_r  <= skip_eff;
      end

      if (ctrl.d_we_ppa)      d_hat_r <= ppa_sum;
      else if (ctrl.d_we_ss)  d_hat_r <= ss_r;

      if (ctrl.res_we_ppa)     s_r <= ppa_sum[K:0];
      else if (ctrl.res_we_ss) s_r <= ss_r[K:0];
    end
  end

  assign s = s_r;

  // Interface rule: N-hat must be 1 modulo 4 (x_0 = q-hat, x_1 = 0).
  a_nhat_form: assert property (@(posedge clk) disable iff (!rst_n)
    start && !busy |-> n_hat[1:0] == 2'b01);
  // In range operands give a result below 2^(K+1): nothing is cut off.
  a_res_fits: assert property (@(posedge clk) disable iff (!rst_n)
    ctrl.res_we_ppa |-> ppa_sum[W-1:K+1] == '0 && !ppa_cout);

endmodule
