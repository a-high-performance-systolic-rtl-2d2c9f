// ucode_decoder: the common decoder of the chip.
//
// The chip is driven by one instruction per clock from outside; this block
// decodes it into the micro-commands that every processor, the reference
// data array, the memories and the configuration register obey, and
// registers them (the stage that redistributes the signals over the chip),
// so a command acts one clock after its instruction is presented.
//
// Instruction format (see spell_pkg): if bits 2:0 are non-zero the word is a
// configuration instruction (cfg_op in 2:0, slot in 5:3, constant register
// in 11:9) and every step field is taken as zero; otherwise it is a step
// instruction whose fields (latch, ref_shift, drive_out, write_res,
// add_sel, acc_op, lookup, slot) may be combined freely. The decoder turns
// the binary slot, adder selection and constant register number into
// one-hot lines; codes out of range select nothing. A common decoder fed
// from outside is the chip's; the encoding is this design's.
module ucode_decoder
  import spell_pkg::*;
(
  input  logic   clk_i,
  input  logic   rst_ni,
  input  instr_t instr_i,
  output ucmd_t  ucmd_o
);
  ucmd_t d;

  always_comb begin
    logic [2:0] slot, sel, op;
    slot = instr_i[5:3];
    sel  = instr_i[11:9];
    op   = instr_i[2:0];
    d = '0;
    for (int s = 0; s < int'(NSLOT); s++) d.slot_oh[s] = (slot == 3'(s));
    if (op != 3'd0) begin
      d.cfg_shift = (op == CFG_SHIFT);
      d.mem_wr    = (op == CFG_MEM_WR);
      d.cte_wr    = (op == CFG_CTE_WR);
      d.capture   = (op == CFG_CAPTURE);
      for (int r = 0; r < int'(NCREG); r++) d.creg_oh[r] = d.cte_wr && (sel == 3'(r));
    end else begin
      d.latch     = instr_i[15];
      d.ref_shift = instr_i[14];
      d.drive_out = instr_i[13];
      d.write_res = instr_i[12];
      for (int a = 0; a < 4; a++) d.add_oh[a] = (sel == 3'(a + 1));
      d.add_en    = |d.add_oh;
      d.acc_op    = acc_op_e'(instr_i[8:7]);
      d.lookup    = instr_i[6];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) ucmd_o <= '0;
    else         ucmd_o <= d;
  end
endmodule
