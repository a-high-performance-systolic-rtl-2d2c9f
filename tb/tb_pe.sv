// tb_pe: tests one interior processor and one corner processor P(1,1).
//
// Micro-commands are built here directly (no decoder). For each trial the
// testbench loads random constants through the bus, fetches a random cost
// word, latches random neighbour values twice (so that the two-step-old
// diagonal reaches DIAG2), runs the add/minimise sequence with and without
// the transposition steps and checks the result against
//   min(diag+sub, up+del, left+ins [, diag2+trans if both eq flags]),
// saturated at 255. It also checks the published old result, the diagonal
// and equality outputs, and that the accumulator is driven only when asked.
// The corner processor must use its boundary constants instead of inputs.
module tb_pe;
  import spell_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ucmd_t u;
  logic [BUS_W-1:0] bus;
  dist_t up, left, dp, dd;
  logic ue, le;
  dist_t res, resp, dg, acc, res1, resp1, dg1, acc1;
  logic eq, drv, eq1, drv1;
  int checks = 0, failures = 0;
  int n_trans = 0;

  pe #(.SLOT(2)) dut (.clk_i(clk), .rst_ni(rst_n), .ucmd_i(u), .bus_i(bus),
    .up_res_i(up), .up_eq_i(ue), .left_res_i(left), .left_eq_i(le),
    .diag_prev_i(dp), .diag_diag_i(dd), .res_o(res), .res_prev_o(resp),
    .diag_o(dg), .eq_o(eq), .drv_o(drv), .acc_o(acc));

  pe #(.SLOT(2), .HAS_UP(1'b0), .HAS_LEFT(1'b0), .HAS_DIAG(1'b0),
       .TOP_ROW(1'b1), .LEFT_COL(1'b1)) corner (
    .clk_i(clk), .rst_ni(rst_n), .ucmd_i(u), .bus_i(bus),
    .up_res_i(up), .up_eq_i(ue), .left_res_i(left), .left_eq_i(le),
    .diag_prev_i(dp), .diag_diag_i(dd), .res_o(res1), .res_prev_o(resp1),
    .diag_o(dg1), .eq_o(eq1), .drv_o(drv1), .acc_o(acc1));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic int sat(int a, int b);
    return (a + b > 255) ? 255 : a + b;
  endfunction
  function automatic int mn(int a, int b);
    return a < b ? a : b;
  endfunction

  task automatic step(ucmd_t c);
    @(negedge clk); u = c;
    @(negedge clk); u = '0;
  endtask

  task automatic cte(creg_e r, int v, int slot = 2);
    ucmd_t c = '0;
    c.cte_wr = 1'b1; c.slot_oh = 5'(1 << slot); c.creg_oh = 6'(1 << int'(r));
    bus = 8'(v);
    step(c);
  endtask

  task automatic lookup(int w, int slot = 2);
    ucmd_t c = '0;
    c.lookup = 1'b1; c.slot_oh = 5'(1 << slot);
    bus = 8'(w);
    step(c);
  endtask

  task automatic latch();
    ucmd_t c = '0;
    c.latch = 1'b1;
    step(c);
  endtask

  task automatic add(int a, acc_op_e op);
    ucmd_t c = '0;
    if (a > 0) begin c.add_oh = 4'(1 << (a - 1)); c.add_en = 1'b1; end
    c.acc_op = op;
    step(c);
  endtask

  task automatic compute(bit tr);
    ucmd_t c = '0;
    add(1, ACC_NONE);
    add(2, ACC_LOAD);
    add(3, ACC_MIN);
    if (tr) begin add(4, ACC_MIN); add(0, ACC_MINT); end
    else     add(0, ACC_MIN);
    c.write_res = 1'b1;
    step(c);
  endtask

  initial begin
    int ins, trc, bup, bleft, bdiag, sub, del, vu, vl, vd, v2, e, e1, old, old1;
    bit tu, tl, tr;
    ucmd_t c;
    u = '0; bus = '0; up = '0; left = '0; dp = '0; dd = '0; ue = 0; le = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    old = 255; old1 = 255;
    for (int t = 0; t < 300; t++) begin
      ins = $urandom_range(15); trc = $urandom_range(15);
      bup = $urandom_range(40); bleft = $urandom_range(40); bdiag = $urandom_range(40);
      cte(CR_INS, ins); cte(CR_TRANS, trc); cte(CR_BUP, bup); cte(CR_BLEFT, bleft);
      cte(CR_BDIAG, bdiag); cte(CR_FLAGS, t % 2);
      // a write to another slot must not reach this processor
      cte(CR_INS, 99, 1);
      sub = (t % 3 == 0) ? 0 : $urandom_range(15); del = $urandom_range(15);
      v2 = (t % 7 == 0) ? 255 : $urandom_range(255);
      dd = 8'(v2); dp = 8'($urandom); up = 8'($urandom); left = 8'($urandom);
      lookup($urandom);
      latch();
      lookup((del << 4) | sub);
      lookup(255, 3);  // other slot: ignored
      vu = (t % 5 == 0) ? 255 : $urandom_range(255);
      vl = $urandom_range(255); vd = $urandom_range(255);
      tu = ($urandom_range(2) != 0); tl = ($urandom_range(2) != 0);
      up = 8'(vu); left = 8'(vl); dp = 8'(vd); dd = 8'($urandom); ue = tu; le = tl;
      latch();
      chk(eq == (sub == 0), "eq output");
      chk(int'(dg) == vd, "diag output");
      chk(int'(dg1) == bdiag, "corner diag from constant");
      tr = (t % 2 == 1);
      compute(tr);
      e = mn(mn(sat(vd, sub), sat(vu, del)), sat(vl, ins));
      if (tr && tu && tl) begin
        if (sat(v2, trc) < e) n_trans++;
        e = mn(e, sat(v2, trc));
      end
      e1 = mn(mn(sat(bdiag, sub), sat(bup, del)), sat(bleft, ins));
      chk(int'(res) == e, $sformatf("trial %0d result %0d exp %0d", t, res, e));
      chk(int'(resp) == old, "previous result");
      chk(int'(res1) == e1, $sformatf("corner result %0d exp %0d", res1, e1));
      chk(int'(resp1) == old1, "corner previous result");
      old = e; old1 = e1;
      // driving the bus
      c = '0; c.drive_out = 1'b1;
      @(negedge clk); u = c; #1;
      chk(drv == (t % 2 == 1) && int'(acc) == e, "drive_out");
      c = '0; c.capture = 1'b1; c.slot_oh = 5'b00100;
      u = c; #1;
      chk(drv == 1'b1, "capture drive");
      c.slot_oh = 5'b01000;
      u = c; #1;
      chk(drv == 1'b0, "capture other slot");
      u = '0;
    end
    chk(n_trans > 0, "transposition term never won");
    $display("trans wins %0d", n_trans);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
