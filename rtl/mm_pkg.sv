// mm_pkg: types shared by the SCS-MM-New Montgomery multiplier.
//
// opsel_e encodes the select of the two 4-to-1 operand multiplexers M1 and
// M2 in front of the carry-save adder. M1 picks the SC operand and M2 the SS
// operand: the register itself, the register shifted right by one or by two
// bit positions (the delayed division by two of a normal or of a skipped
// iteration), or the loaded operands N-hat (M1) and B-hat (M2) used to form
// D-hat = B-hat + N-hat. The four inputs follow the multiplier figure; the
// numeric encoding is this design's choice.
//
// ctrl_state_e lists the controller states. The states and their order are
// this design's own: the document leaves the control part undrawn.
package mm_pkg;

  typedef enum logic [1:0] {
    SEL_REG  = 2'd0,  // register value, unshifted (format conversion)
    SEL_SHR1 = 2'd1,  // register >> 1 (previous iteration not skipped)
    SEL_SHR2 = 2'd2,  // register >> 2 (previous iteration skipped)
    SEL_LOAD = 2'd3   // M1: N-hat, M2: B-hat (pre-computation of D-hat)
  } opsel_e;

  typedef enum logic [2:0] {
    ST_IDLE     = 3'd0,  // waiting for start
    ST_PRE      = 3'd1,  // B-hat + N-hat through the adder
    ST_PRE_CONV = 3'd2,  // carry-save conversion of B-hat + N-hat (no PPA)
    ST_LOOP     = 3'd3,  // while loop of the algorithm, one iteration a cycle
    ST_FINAL    = 3'd4,  // first step of the final format conversion
    ST_POST_CONV= 3'd5   // further carry-save conversion steps (no PPA)
  } ctrl_state_e;

  // Control word from the controller to the datapath, one cycle's worth.
  typedef struct packed {
    opsel_e m_sel;       // select of M1 (SC operand) and M2 (SS operand)
    logic   alpha;       // CCSA mode: 0 full adder, 1 two half adders
    logic   load;        // latch A, B-hat = B << 3 and N-hat; clear SS, SC and the FFs
    logic   ss_we;       // write the CCSA outputs into SS and SC
    logic   ss_clr;      // clear SS and SC (start of the Montgomery loop)
    logic   sd_we;       // write q-hat, A-hat and skip FFs from Skip_D
    logic   sd_clr;      // clear q-hat, A-hat and skip FFs
    logic   skip_ok;     // a skip may be taken this iteration
    logic   d_we_ppa;    // D-hat <= parallel prefix sum of the operands
    logic   d_we_ss;     // D-hat <= SS (after carry-save conversion)
    logic   res_we_ppa;  // result <= parallel prefix sum of the operands
    logic   res_we_ss;   // result <= SS (after carry-save conversion)
  } ctrl_t;

endpackage
