// tb_systolic_array: tests the 69-processor array on its own.
//
// The testbench plays the part of the column memories and of the reference
// data array: on each lookup it puts on column j's bus the cost word of the
// reference character that the selected slot's processor needs (character
// i of the reference loaded i+j-2 steps earlier). Micro-commands are built
// here directly from the step programs. After every systolic step it checks
// the accumulator of every processor against the model matrix of the
// reference that processor has just finished, so the whole wavefront, the
// band edges, the boundary constants and the transposition path are
// checked, and that only the flagged processor drives its bus on drive_out.
module tb_systolic_array;
  import spell_pkg::*;
  import spell_model_pkg::*;
  localparam int N = N_DEF;
  localparam int NREF = 30;
  logic clk = 1'b0, rst_n = 1'b0;
  ucmd_t u;
  logic [BUS_W-1:0] bus [N];
  logic drv [N][NSLOT];
  dist_t acc [N][NSLOT];
  int checks = 0, failures = 0;
  int n_trans_win = 0;

  systolic_array dut (.clk_i(clk), .rst_ni(rst_n), .ucmd_i(u), .bus_i(bus), .drv_o(drv), .acc_o(acc));
  always #5 clk = ~clk;

  int refs [NREF+1][1:N];
  mat_t dm [NREF+1];

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic ucmd_t ucmd_of(bit tr, int c);
    ucmd_t x = '0;
    case (c)
      0: begin x.latch = 1; x.ref_shift = 1; x.drive_out = 1; end
      1: begin x.add_oh = 4'b0001; x.add_en = 1; x.lookup = 1; x.slot_oh = 5'b00001; end
      2: begin x.add_oh = 4'b0010; x.add_en = 1; x.acc_op = ACC_LOAD; x.lookup = 1; x.slot_oh = 5'b00010; end
      3: begin x.add_oh = 4'b0100; x.add_en = 1; x.acc_op = ACC_MIN; x.lookup = 1; x.slot_oh = 5'b00100; end
      4: begin
           if (tr) begin x.add_oh = 4'b1000; x.add_en = 1; end
           x.acc_op = ACC_MIN; x.lookup = 1; x.slot_oh = 5'b01000;
         end
      5: begin
           if (tr) x.acc_op = ACC_MINT; else x.write_res = 1;
           x.lookup = 1; x.slot_oh = 5'b10000;
         end
      6: x.write_res = 1;
      default: ;
    endcase
    return x;
  endfunction

  function automatic int ref_at(int q);  // index of reference loaded at step q
    return (q >= 0 && q < NREF) ? q : NREF;
  endfunction

  task automatic cfg(int s, creg_e r, int n);
    ucmd_t x = '0;
    @(negedge clk);
    x.cte_wr = 1; x.slot_oh = 5'(1 << s); x.creg_oh = 6'(1 << int'(r));
    for (int j = 1; j <= N; j++) begin
      int i = j + s - B;
      int v;
      case (r)
        CR_INS:   v = ins_tab[j];
        CR_TRANS: v = trans_c;
        CR_BUP:   v = (i == 1) ? bnd_top(j) : 0;
        CR_BLEFT: v = (j == 1) ? bnd_left(i) : 0;
        CR_BDIAG: v = (i == 1) ? bnd_top(j - 1) : ((j == 1) ? bnd_left(i - 1) : 0);
        default:  v = (i == res_row(n) && j == n) ? 1 : 0;
      endcase
      bus[j-1] = 8'(v);
    end
    u = x;
    @(negedge clk); u = '0;
  endtask

  task automatic run(int n, bit unit_costs, bit tr);
    int plen = tr ? STEP_LEN_TRANS : STEP_LEN_EDIT;
    int steps = NREF + 2 * N;
    int m;
    make_config(n, unit_costs);
    for (int k = 0; k < NREF; k++) make_ref(refs[k], m, k % 5);
    for (int k = 1; k <= N; k++) refs[NREF][k] = 0;
    for (int k = 0; k <= NREF; k++) begin
      band_matrix(refs[k], tr, dm[k]);
      if (tr && k < NREF && band_dist(refs[k], 1'b1) < band_dist(refs[k], 1'b0)) n_trans_win++;
    end
    for (int s = 0; s < int'(NSLOT); s++)
      for (int r = 0; r < int'(NCREG); r++) cfg(s, creg_e'(r), n);
    for (int q = 0; q < steps; q++) begin
      for (int c = 0; c < plen; c++) begin
        ucmd_t x = ucmd_of(tr, c);
        @(negedge clk);
        if (c == 0 && q > 0) begin
          // every processor has finished its comparison of step q-1
          for (int j = 1; j <= N; j++)
            for (int s = 0; s < int'(NSLOT); s++) begin
              int i = j + s - B;
              int k = q - 1 - (i + j - 2) - 1;
              if (i < 1 || i > N || k < 0) continue;
              chk(int'(acc[j-1][s]) == dm[ref_at(k)][i][j],
                  $sformatf("n=%0d tr=%0d step %0d P(%0d,%0d)=%0d exp %0d", n, tr, q,
                            i, j, acc[j-1][s], dm[ref_at(k)][i][j]));
            end
        end
        for (int j = 1; j <= N; j++) begin
          bus[j-1] = '0;
          if (x.lookup) begin
            int s = $clog2(int'(x.slot_oh));
            int i = j + s - B;
            int ch = (i >= 1 && i <= N) ? refs[ref_at(q - (i + j - 2))][i] : 0;
            bus[j-1] = {4'(del_tab[ch]), 4'(sub_tab[ch][j])};
          end
        end
        u = x;
        if (c == 0) begin
          #1;
          for (int j = 1; j <= N; j++)
            for (int s = 0; s < int'(NSLOT); s++)
              chk(drv[j-1][s] == (j == n && j + s - B == res_row(n)), "drive_out by the flagged processor only");
        end
      end
    end
    @(negedge clk); u = '0;
  endtask

  initial begin
    u = '0;
    foreach (bus[j]) bus[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(8, 1'b1, 1'b1);
    run(15, 1'b0, 1'b0);
    run(5, 1'b0, 1'b1);
    chk(n_trans_win > 0, "transposition exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
