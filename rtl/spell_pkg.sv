// spell_pkg: types and constants shared by the spelling-correction array.
//
// The array compares one erroneous word y (held still, one character per
// column j) against a stream of dictionary references x (flowing through the
// array, one character per row i) by the edit-distance recurrence
//   D(i,j) = min( D(i-1,j-1) + sub(x_i,y_j),
//                 D(i-1,j)   + del(x_i),
//                 D(i,j-1)   + ins(y_j),
//                 D(i-2,j-2) + trans      if x_i=y_(j-1) and x_(i-1)=y_j ).
// The array size (15 characters, five diagonals, 69 processors) and the
// 8-bit arithmetic follow the chip; character width, cost width and the
// instruction encoding below are this design's own choices.
//
// Instruction word (external, one per clock, decoded by ucode_decoder):
//   bit 15      latch      : processors load neighbour results and the new cost
//   bit 14      ref_shift  : reference data array advances one systolic step
//   bit 13      drive_out  : result processor puts its accumulator on its bus
//   bit 12      write_res  : processors publish the accumulator as their result
//   bits 11:9   add_sel    : adder operands (see add_sel_e)
//   bits 8:7    acc_op     : accumulator operation (see acc_op_e)
//   bit 6       lookup     : column memories look up the cost of one row slot
//   bits 5:3    slot       : row slot (0..4, diagonal j-i = 2-slot) for lookup,
//                            constant write or capture
//   bits 2:0    cfg_op     : 0 for a step instruction (fields above)
// A word with cfg_op non-zero is a configuration instruction instead: its
// slot field (5:3) selects the processor row slot for CFG_CTE_WR and
// CFG_CAPTURE, bits 11:9 carry the constant register number (creg_e), and
// the step fields are ignored.
package spell_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned N_DEF      = 15;  // median diagonal / max word length
  localparam int unsigned BAND_DEF   = 2;   // diagonals each side of the median
  localparam int unsigned NSLOT      = 2 * BAND_DEF + 1;  // processors per column
  localparam int unsigned CHAR_W_DEF = 6;   // character code width
  localparam int unsigned COST_W     = 4;   // substitution / deletion cost width
  localparam int unsigned DIST_W     = 8;   // distance width (8-bit arithmetic)
  localparam int unsigned BUS_W      = DIST_W;  // column broadcast bus width

  typedef logic [DIST_W-1:0] dist_t;
  localparam dist_t DIST_INF = '1;      // saturating "infinity"

  // Memory word: deletion cost of the reference character in the upper
  // nibble, substitution cost against this column's character in the lower.
  typedef struct packed {
    logic [COST_W-1:0] del;
    logic [COST_W-1:0] sub;
  } cost_t;

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [2:0] {
    ADD_NONE   = 3'd0,
    ADD_DS     = 3'd1,  // D(i-1,j-1) + sub
    ADD_UD     = 3'd2,  // D(i-1,j)   + del
    ADD_LI     = 3'd3,  // D(i,j-1)   + ins
    ADD_TT     = 3'd4   // D(i-2,j-2) + trans
  } add_sel_e;

  typedef enum logic [1:0] {
    ACC_NONE   = 2'd0,
    ACC_LOAD   = 2'd1,  // acc <= adder result
    ACC_MIN    = 2'd2,  // acc <= min(acc, adder result)
    ACC_MINT   = 2'd3   // as ACC_MIN, only where a transposition is seen
  } acc_op_e;

  typedef enum logic [2:0] {
    CFG_NONE    = 3'd0,
    CFG_SHIFT   = 3'd1,  // shift configuration register by one bit
    CFG_MEM_WR  = 3'd2,  // write configuration words into the column memories
    CFG_CTE_WR  = 3'd3,  // write configuration words into one constant register
    CFG_CAPTURE = 3'd4   // capture accumulators of one slot into the register
  } cfg_op_e;

  // Constant registers of a processor (written through the column bus).
  typedef enum logic [2:0] {
    CR_INS   = 3'd0,  // insertion cost ins(y_j)
    CR_TRANS = 3'd1,  // transposition cost
    CR_BUP   = 3'd2,  // boundary D(0,j) for row-1 processors
    CR_BLEFT = 3'd3,  // boundary D(i,0) for column-1 processors
    CR_BDIAG = 3'd4,  // boundary D(i-1,j-1) for row-1 / column-1 processors
    CR_FLAGS = 3'd5   // bit 0: this processor drives the result
  } creg_e;
  localparam int unsigned NCREG = 6;

  typedef logic [15:0] instr_t;

  // Decoded micro-commands, one-hot where a choice is made.
  typedef struct packed {
    logic              latch;
    logic              ref_shift;
    logic              drive_out;
    logic              write_res;
    logic [3:0]        add_oh;     // one-hot DS, UD, LI, TT
    logic              add_en;
    acc_op_e           acc_op;
    logic              lookup;
    logic [NSLOT-1:0]  slot_oh;    // one-hot row slot
    logic              cfg_shift;
    logic              mem_wr;
    logic              cte_wr;
    logic [NCREG-1:0]  creg_oh;    // one-hot constant register
    logic              capture;
  } ucmd_t;

  // ------------------------------------------------------------ encoders
  function automatic instr_t enc_step(logic latch, logic ref_shift,
                                      logic drive_out, logic write_res,
                                      add_sel_e add, acc_op_e acc,
                                      logic lookup, logic [2:0] slot);
    return {latch, ref_shift, drive_out, write_res, add, acc, lookup, slot, 3'd0};
  endfunction

  function automatic instr_t enc_cfg(cfg_op_e op, logic [2:0] slot,
                                     logic [2:0] creg);
    return {4'b0000, creg, 2'b00, 1'b0, slot, op};
  endfunction

  // ------------------------------------------------ standard step programs
  // One systolic step is a short sequence of instructions issued by the host,
  // one per clock. Clock 0 of every step latches the neighbours' results,
  // advances the reference data array (which samples the next reference)
  // and outputs the previous step's result; clocks 1..5 fetch the five
  // costs of the next step, one row slot per clock, while the adder and the
  // minimizer evaluate the recurrence. Without transpositions a step takes
  // STEP_LEN_EDIT clocks, with them STEP_LEN_TRANS.
  localparam int unsigned STEP_LEN_EDIT  = 6;
  localparam int unsigned STEP_LEN_TRANS = 7;

  function automatic instr_t step_instr(logic trans, int unsigned c);
    unique case (c)
      0: return enc_step(1'b1, 1'b1, 1'b1, 1'b0, ADD_NONE, ACC_NONE, 1'b0, 3'd0);
      1: return enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_DS,   ACC_NONE, 1'b1, 3'd0);
      2: return enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_UD,   ACC_LOAD, 1'b1, 3'd1);
      3: return enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_LI,   ACC_MIN,  1'b1, 3'd2);
      4: return trans ? enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_TT,  ACC_MIN,  1'b1, 3'd3)
                      : enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_NONE, ACC_MIN, 1'b1, 3'd3);
      5: return trans ? enc_step(1'b0, 1'b0, 1'b0, 1'b0, ADD_NONE, ACC_MINT, 1'b1, 3'd4)
                      : enc_step(1'b0, 1'b0, 1'b0, 1'b1, ADD_NONE, ACC_NONE, 1'b1, 3'd4);
      6: return enc_step(1'b0, 1'b0, 1'b0, 1'b1, ADD_NONE, ACC_NONE, 1'b0, 3'd0);
      default: return '0;
    endcase
  endfunction

endpackage
