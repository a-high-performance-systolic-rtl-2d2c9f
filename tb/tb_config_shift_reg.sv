// tb_config_shift_reg: shifts random frames in serially and checks the
// column words and address it presents, then captures random bus values and
// checks that they come out of so_o in order, most significant bit first.
module tb_config_shift_reg;
  import spell_pkg::*;
  localparam int N = N_DEF, CW = CHAR_W_DEF, LEN = CW + N * BUS_W;
  logic clk = 1'b0, rst_n = 1'b0, sh = 1'b0, si = 1'b0, so, cap = 1'b0;
  logic [BUS_W-1:0] bus [N], word [N];
  logic [CW-1:0] addr;
  int checks = 0, failures = 0;

  config_shift_reg dut (.clk_i(clk), .rst_ni(rst_n), .shift_i(sh), .si_i(si), .so_o(so),
                        .capture_i(cap), .bus_i(bus), .word_o(word), .addr_o(addr));
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    logic [LEN-1:0] f, got;
    foreach (bus[j]) bus[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (4) begin
      for (int k = 0; k < LEN; k++) f[k] = 1'($urandom);
      for (int k = LEN - 1; k >= 0; k--) begin
        @(negedge clk); sh = 1'b1; si = f[k];
      end
      @(negedge clk); sh = 1'b0;
      chk(addr == f[LEN-1 -: CW], "address field");
      for (int j = 0; j < N; j++) chk(word[j] == f[BUS_W*j +: BUS_W], $sformatf("word %0d", j));
      // capture and shift out
      foreach (bus[j]) bus[j] = 8'($urandom);
      cap = 1'b1;
      @(negedge clk); cap = 1'b0;
      for (int j = 0; j < N; j++) chk(word[j] == bus[j], $sformatf("capture %0d", j));
      for (int j = 0; j < N; j++) f[BUS_W*j +: BUS_W] = bus[j];
      for (int k = LEN - 1; k >= 0; k--) begin
        got[k] = so;
        sh = 1'b1; si = 1'b0;
        @(negedge clk);
      end
      sh = 1'b0;
      chk(got == f, "shift out");
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
