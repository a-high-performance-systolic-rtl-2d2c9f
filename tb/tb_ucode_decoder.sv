// tb_ucode_decoder: presents random instruction words and checks every
// decoded micro-command line, one clock later, against a decode written
// here from the instruction format.
module tb_ucode_decoder;
  import spell_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  instr_t ins = '0;
  ucmd_t u;
  int checks = 0, failures = 0;

  ucode_decoder dut (.clk_i(clk), .rst_ni(rst_n), .instr_i(ins), .ucmd_o(u));
  always #5 clk = ~clk;

  function automatic ucmd_t expect_of(instr_t w);
    ucmd_t e = '0;
    int slot = int'(w[5:3]), sel = int'(w[11:9]), op = int'(w[2:0]);
    if (slot < 5) e.slot_oh = 5'(1 << slot);
    if (op != 0) begin
      e.cfg_shift = (op == 1); e.mem_wr = (op == 2); e.cte_wr = (op == 3); e.capture = (op == 4);
      if (op == 3 && sel < 6) e.creg_oh = 6'(1 << sel);
    end else begin
      e.latch = w[15]; e.ref_shift = w[14]; e.drive_out = w[13]; e.write_res = w[12];
      if (sel >= 1 && sel <= 4) begin e.add_oh = 4'(1 << (sel - 1)); e.add_en = 1'b1; end
      e.acc_op = acc_op_e'(w[8:7]);
      e.lookup = w[6];
    end
    return e;
  endfunction

  initial begin
    instr_t prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev = '0;
    repeat (2000) begin
      @(negedge clk);
      checks++;
      if (u != expect_of(prev)) begin
        failures++; $display("FAIL instr %h: got %h exp %h", prev, u, expect_of(prev));
      end
      ins = ($urandom_range(1) != 0) ? 16'($urandom) : {16'($urandom) & 16'hfff8};
      prev = ins;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
