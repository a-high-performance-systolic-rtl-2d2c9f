// tb_spell_chip: end-to-end test of the spelling-correction co-processor at
// its default size (N = 15, five diagonals, 69 processors).
//
// For several erroneous words (lengths 2, 8, 13, 15; unit and random costs)
// the testbench loads every column memory and every constant register
// through the serial configuration register, then streams references made
// from the word by one random edit (copy, substitution, deletion, insertion,
// transposition) with the standard step program, with and without
// transpositions. Each distance on dout_o is compared with the band-limited
// model of spell_model_pkg and with the unrestricted distance; the step at
// which it appears checks the latency (n + r steps, r = min(n+2, 15)) and the
// spacing of outputs checks the rate (one result per step). Finally the
// accumulators of every row slot are captured into the configuration
// register, shifted out and compared with the model.
// Mechanisms counted, each must occur: transposition shortening a distance,
// padded references, both step programs, capture readout.
module tb_spell_chip;
  import spell_pkg::*;
  import spell_model_pkg::*;

  localparam int N   = N_DEF;
  localparam int CW  = CHAR_W_DEF;
  localparam int LEN = CW + N * BUS_W;
  localparam int NREF = 40;

  logic clk = 1'b0, rst_n = 1'b0;
  instr_t instr = '0;
  logic [CW-1:0] refw [N];
  logic si = 1'b0, so;
  dist_t dout;
  logic dvalid;

  spell_chip dut (.clk_i(clk), .rst_ni(rst_n), .instr_i(instr), .ref_i(refw),
                  .cfg_si_i(si), .cfg_so_o(so), .dout_o(dout), .dout_valid_o(dvalid));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_trans_win = 0, n_pad = 0, n_mode_edit = 0, n_mode_trans = 0, n_capture = 0;
  int n_kind [5] = '{default: 0};
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------------------------------------------------- configuration
  task automatic shift_frame(input logic [LEN-1:0] f);
    for (int k = 0; k <= LEN; k++) begin
      @(negedge clk);
      instr = (k < LEN) ? enc_cfg(CFG_SHIFT, 3'd0, 3'd0) : '0;
      si    = (k > 0) ? f[LEN-k] : 1'b0;
    end
  endtask

  task automatic issue(input instr_t i);
    @(negedge clk); instr = i;
    @(negedge clk); instr = '0;
  endtask

  function automatic logic [LEN-1:0] frame(int addr, int w [N]);
    logic [LEN-1:0] f = '0;
    f[LEN-1 -: CW] = CW'(addr);
    for (int j = 0; j < N; j++) f[BUS_W*j +: BUS_W] = BUS_W'(w[j]);
    return f;
  endfunction

  task automatic configure();
    int w [N];
    for (int x = 0; x < NCH; x++) begin
      for (int j = 0; j < N; j++) w[j] = (del_tab[x] << COST_W) | sub_tab[x][j+1];
      shift_frame(frame(x, w));
      issue(enc_cfg(CFG_MEM_WR, 3'd0, 3'd0));
    end
    for (int s = 0; s < int'(NSLOT); s++) begin
      for (int r = 0; r < int'(NCREG); r++) begin
        for (int j = 1; j <= N; j++) begin
          int i = j + s - B;
          int v = 0;
          case (creg_e'(r))
            CR_INS:   v = ins_tab[j];
            CR_TRANS: v = trans_c;
            CR_BUP:   v = (i == 1) ? bnd_top(j) : 0;
            CR_BLEFT: v = (j == 1) ? bnd_left(i) : 0;
            CR_BDIAG: v = (i == 1) ? bnd_top(j - 1) : ((j == 1) ? bnd_left(i - 1) : 0);
            CR_FLAGS: v = (i == res_row(n_len) && j == n_len) ? 1 : 0;
            default:  v = 0;
          endcase
          w[j-1] = v;
        end
        shift_frame(frame(0, w));
        issue(enc_cfg(CFG_CTE_WR, 3'(s), 3'(r)));
      end
    end
  endtask

  // ---------------------------------------------------------- streaming
  int refs [NREF][1:N];
  int mlen [NREF];
  int kinds [NREF];
  int got_q;               // results seen in the current run
  int got_val [$];
  longint got_cyc [$];
  bit collecting = 0;

  always @(posedge clk) if (collecting && dvalid) begin
    got_val.push_back(int'(dout));
    got_cyc.push_back(cyc);
  end

  task automatic run(int n, bit unit_costs, bit tr);
    int lat, steps, plen;
    int pad [1:N];
    mat_t dm;
    for (int k = 1; k <= N; k++) pad[k] = 0;
    make_config(n, unit_costs);
    configure();
    for (int q = 0; q < NREF; q++) begin
      kinds[q] = q % 5;
      make_ref(refs[q], mlen[q], kinds[q]);
    end
    lat   = n + res_row(n);
    steps = NREF + lat + 2;
    plen  = tr ? STEP_LEN_TRANS : STEP_LEN_EDIT;
    got_val.delete(); got_cyc.delete();
    collecting = 1;
    for (int q = 0; q < steps; q++) begin
      for (int c = 0; c < plen; c++) begin
        @(negedge clk);
        instr = step_instr(tr, c);
        if (c == 0)
          for (int k = 0; k < N; k++) refw[k] = CW'((q < NREF) ? refs[q][k+1] : 0);
      end
    end
    @(negedge clk); instr = '0;
    repeat (3) @(negedge clk);
    collecting = 0;
    if (tr) n_mode_trans++; else n_mode_edit++;
    // one result per step, plen clocks apart
    check(got_val.size() == steps, $sformatf("n=%0d results %0d of %0d", n, got_val.size(), steps));
    for (int q = 1; q < got_cyc.size(); q++)
      check(got_cyc[q] - got_cyc[q-1] == longint'(plen), "result spacing");
    for (int q = lat; q < got_val.size() && q - lat < NREF; q++) begin
      int k = q - lat;
      int e = band_dist(refs[k], tr);
      int f = full_dist(refs[k], mlen[k], tr);
      check(got_val[q] == e, $sformatf("n=%0d tr=%0d ref %0d kind %0d m=%0d: got %0d exp %0d",
                                       n, tr, k, kinds[k], mlen[k], got_val[q], e));
      check(e == f, $sformatf("band model %0d vs full distance %0d", e, f));
      if (tr && e < band_dist(refs[k], 1'b0)) n_trans_win++;
      if (mlen[k] < res_row(n)) n_pad++;
      if (e > 0) n_kind[kinds[k]]++;
    end
    // capture readout: accumulators of every slot after the last step
    for (int s = 0; s < int'(NSLOT); s++) begin
      logic [LEN-1:0] got;
      issue(enc_cfg(CFG_CAPTURE, 3'(s), 3'd0));
      // the capture acted; shift the frame out
      for (int k = 0; k <= LEN; k++) begin
        @(negedge clk);
        if (k > 0) got[LEN-k] = so;
        instr = (k < LEN) ? enc_cfg(CFG_SHIFT, 3'd0, 3'd0) : '0;
        si = 1'b0;
      end
      for (int j = 1; j <= N; j++) begin
        int i = j + s - B;
        int kk;
        if (i < 1 || i > N) continue;
        // processor (i,j) last worked, in step steps-1, on the reference
        // loaded in step steps-1-(i+j-2)-1
        kk = steps - 1 - (i + j - 2) - 1;
        if (kk < 0) continue;
        if (kk < NREF) band_matrix(refs[kk], tr, dm);
        else           band_matrix(pad, tr, dm);
        check(int'(got[BUS_W*(j-1) +: BUS_W]) == dm[i][j],
              $sformatf("capture P(%0d,%0d) got %0d exp %0d", i, j, got[BUS_W*(j-1) +: BUS_W], dm[i][j]));
      end
      n_capture++;
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) refw[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(8,  1'b1, 1'b0);
    run(8,  1'b1, 1'b1);
    run(15, 1'b0, 1'b1);
    run(2,  1'b0, 1'b0);
    run(13, 1'b0, 1'b1);
    $display("mechanisms: trans_win=%0d pad=%0d edit_runs=%0d trans_runs=%0d captures=%0d sub=%0d del=%0d ins=%0d trans=%0d",
             n_trans_win, n_pad, n_mode_edit, n_mode_trans, n_capture,
             n_kind[1], n_kind[2], n_kind[3], n_kind[4]);
    check(n_trans_win > 0, "transposition never shortened a distance");
    check(n_pad > 0, "no padded reference");
    check(n_mode_edit > 0 && n_mode_trans > 0, "both step programs");
    check(n_capture > 0, "capture readout");
    check(n_kind[1] > 0 && n_kind[2] > 0 && n_kind[3] > 0, "substitution/deletion/insertion");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
