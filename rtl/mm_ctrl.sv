// mm_ctrl: controller of the SCS-MM-New Montgomery multiplier.
//
// Sequences one modular multiplication and drives the datapath through a
// ctrl_t control word each cycle. It keeps the loop index as cnt = i + 1
// (the algorithm's index i starts at -1) and ends the loop once i > K + 4.
//
//   IDLE      wait for start; on start latch the operands (load).
//   PRE       M1/M2 pass N-hat and B-hat. With PPA_CONV = 1 the prefix adder
//             writes D-hat = B-hat + N-hat and the loop starts next cycle.
//             Otherwise the CCSA (x = 0) starts the sum in carry-save form.
//   PRE_CONV  (PPA_CONV = 0) two-half-adder steps on SS, SC until Zero_D
//             flags SC = 0; then D-hat <= SS and SS, SC are cleared.
//   LOOP      one Montgomery iteration a cycle. M1/M2 shift the registers by
//             one, or by two when the stored skip bit says the previous
//             iteration skipped the next one. The index advances by 1, or by
//             2 when Skip_D flags a skip. A skip is refused in the last
//             iteration (i = K + 4), so that exactly K + 5 halvings happen.
//   FINAL     the registers, shifted by one or two, are the carry-save
//             result. With PPA_CONV = 1 the prefix adder converts it into the
//             result register and done follows. Otherwise one
//             two-half-adder step is taken, then
//   POST_CONV further steps until SC = 0; result <= SS.
// done is a one-cycle pulse in the cycle after the result register is
// written; busy is high from the cycle after start until then. start is
// ignored while busy.
//
// The order of operations follows the document's algorithm; the document
// does not draw the control part, so the states, the handshake and the
// refusal of a skip in the last iteration are this design's own.
module mm_ctrl
  import mm_pkg::*;
#(
  parameter int unsigned K        = 1024,  // modulus width in bits
  parameter bit          PPA_CONV = 1'b1   // 1: conversions by the prefix adder
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        zero,      // Zero_D: SC register is all zero
  input  logic        skip,      // Skip_D output this cycle (before gating)
  input  logic        skip_r,    // stored skip bit of the previous iteration
  output ctrl_t       ctrl,
  output ctrl_state_e state,
  output logic        busy,
  output logic        done
);

  localparam int unsigned CW   = $clog2(K + 8) + 1;
  localparam int unsigned LAST = K + 5;   // cnt of the last iteration, i = K + 4

  ctrl_state_e state_n;
  logic [CW-1:0] cnt, cnt_n;
  logic          done_n;
  logic          skip_eff;
  opsel_e        shr_sel;

  assign shr_sel  = skip_r ? SEL_SHR2 : SEL_SHR1;
  assign skip_eff = skip && (cnt != CW'(LAST));

  always_comb begin
    ctrl    = '0;
    ctrl.m_sel = SEL_REG;
    state_n = state;
    cnt_n   = cnt;
    done_n  = 1'b0;
    unique case (state)
      ST_IDLE: begin
        if (start) begin
          ctrl.load = 1'b1;
          state_n   = ST_PRE;
        end
      end
      ST_PRE: begin
        ctrl.m_sel = SEL_LOAD;
        if (PPA_CONV) begin
          ctrl.d_we_ppa = 1'b1;
          ctrl.ss_clr   = 1'b1;
          cnt_n         = '0;
          state_n       = ST_LOOP;
        end else begin
          ctrl.ss_we = 1'b1;
          state_n    = ST_PRE_CONV;
        end
      end
      ST_PRE_CONV: begin
        ctrl.alpha = 1'b1;
        if (zero) begin
          ctrl.d_we_ss = 1'b1;
          ctrl.ss_clr  = 1'b1;
          cnt_n        = '0;
          state_n      = ST_LOOP;
        end else begin
          ctrl.ss_we = 1'b1;
        end
      end
      ST_LOOP: begin
        ctrl.m_sel   = shr_sel;
        ctrl.ss_we   = 1'b1;
        ctrl.sd_we   = 1'b1;
        ctrl.skip_ok = (cnt != CW'(LAST));
        cnt_n        = cnt + (skip_eff ? CW'(2) : CW'(1));
        if (cnt_n > CW'(LAST)) state_n = ST_FINAL;
      end
      ST_FINAL: begin
        ctrl.m_sel  = shr_sel;
        ctrl.sd_clr = 1'b1;
        if (PPA_CONV) begin
          ctrl.res_we_ppa = 1'b1;
          done_n          = 1'b1;
          state_n         = ST_IDLE;
        end else begin
          ctrl.alpha = 1'b1;
          ctrl.ss_we = 1'b1;
          state_n    = ST_POST_CONV;
        end
      end
      ST_POST_CONV: begin
        ctrl.alpha = 1'b1;
        if (zero) begin
          ctrl.res_we_ss = 1'b1;
          done_n         = 1'b1;
          state_n        = ST_IDLE;
        end else begin
          ctrl.ss_we = 1'b1;
        end
      end
      default: state_n = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      state <= state_n;
      cnt   <= cnt_n;
      done  <= done_n;
    end
  end

  assign busy = (state != ST_IDLE);

  // The loop index only grows, and the loop always ends on the last index.
  a_loop_ends: assert property (@(posedge clk) disable iff (!rst_n)
    state == ST_LOOP |-> cnt <= CW'(LAST));

endmodule
