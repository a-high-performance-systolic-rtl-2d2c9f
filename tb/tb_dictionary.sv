// tb_dictionary: the dictionary workload at full size.
//
// One erroneous word of 8 characters (the typical dictionary word length)
// is loaded, then NREF = 200,000 references are streamed through the chip
// with the transposition program, one per systolic step: random words of
// length 6..10 and, every fourth one, a copy of the erroneous word with one
// random edit. Every distance is compared with the band-limited model; the
// clock count of the whole run is printed as the time at 25 MHz and checked
// against one result every STEP_LEN_TRANS clocks. References within distance
// 1 are counted as correction candidates (and must include every one-edit
// copy with unit costs).
module tb_dictionary;
  import spell_pkg::*;
  import spell_model_pkg::*;

  localparam int N   = N_DEF;
  localparam int CW  = CHAR_W_DEF;
  localparam int LEN = CW + N * BUS_W;
  localparam int NREF = 200000;
  localparam int NW   = 8;

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
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
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
  // expected distances, in load order, kept until their result appears
  int exp_q [$];
  bit edit_q [$];
  int lat;
  int n_seen = 0, n_cand = 0, n_edit_cand = 0, n_edit = 0;
  longint first_cyc = 0, last_cyc = 0;
  bit collecting = 0;

  always @(posedge clk) if (collecting && dvalid) begin
    if (n_seen >= lat && exp_q.size() > 0) begin
      automatic int e = exp_q.pop_front();
      automatic bit ed = edit_q.pop_front();
      check(int'(dout) == e, $sformatf("result %0d: got %0d exp %0d", n_seen - lat, dout, e));
      if (e <= 1) n_cand++;
      if (ed && int'(dout) <= 1) n_edit_cand++;
      if (n_seen == lat) first_cyc = cyc;
      last_cyc = cyc;
    end
    n_seen++;
  end

  task automatic one_ref(int q, output int x [1:N], output bit ed);
    int m;
    if (q % 4 == 0) begin
      make_ref(x, m, 1 + (q / 4) % 4);
      ed = 1'b1;
    end else begin
      m = NW - 2 + int'($urandom_range(4));
      for (int k = 1; k <= N; k++) x[k] = (k <= m) ? 1 + int'($urandom_range(25)) : 0;
      ed = 1'b0;
    end
  endtask

  initial begin
    int x [1:N];
    bit ed;
    int steps;
    for (int k = 0; k < N; k++) refw[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    make_config(NW, 1'b1);
    configure();
    lat = NW + res_row(NW);
    steps = NREF + lat + 1;
    collecting = 1;
    for (int q = 0; q < steps; q++) begin
      if (q < NREF) begin
        one_ref(q, x, ed);
        exp_q.push_back(band_dist(x, 1'b1));
        edit_q.push_back(ed);
        if (ed) n_edit++;
      end else begin
        for (int k = 1; k <= N; k++) x[k] = 0;
      end
      for (int c = 0; c < int'(STEP_LEN_TRANS); c++) begin
        @(negedge clk);
        instr = step_instr(1'b1, c);
        if (c == 0) for (int k = 0; k < N; k++) refw[k] = CW'(x[k+1]);
      end
    end
    @(negedge clk); instr = '0;
    repeat (4) @(negedge clk);
    collecting = 0;
    check(exp_q.size() == 0, $sformatf("%0d results missing", exp_q.size()));
    check(last_cyc - first_cyc == (longint'(NREF) - 1) * longint'(STEP_LEN_TRANS),
          $sformatf("rate: %0d clocks for %0d results", last_cyc - first_cyc, NREF));
    check(n_edit_cand == n_edit, $sformatf("one-edit copies found %0d of %0d", n_edit_cand, n_edit));
    $display("dictionary of %0d words: %0d clocks from first to last distance, %0.1f ms at 25 MHz; %0d candidates within distance 1",
             NREF, last_cyc - first_cyc, real'(last_cyc - first_cyc) / 25.0e3, n_cand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
