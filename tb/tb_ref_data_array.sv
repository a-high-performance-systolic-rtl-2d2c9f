// tb_ref_data_array: loads a random reference every systolic step and checks
// that the register feeding column j, slot s (row i = j+s-2) holds
// character i of the reference loaded i+j-2 steps earlier, and 0 for slots
// outside the array. Steps are separated by idle clocks to check the hold.
module tb_ref_data_array;
  import spell_pkg::*;
  localparam int N = N_DEF, CW = CHAR_W_DEF, B = BAND_DEF;
  logic clk = 1'b0, rst_n = 1'b0, sh = 1'b0;
  logic [CW-1:0] r [N];
  logic [CW-1:0] a [N][NSLOT];
  int hist [60][N];
  int checks = 0, failures = 0;

  ref_data_array dut (.clk_i(clk), .rst_ni(rst_n), .ref_shift_i(sh), .ref_i(r), .addr_o(a));
  always #5 clk = ~clk;

  initial begin
    int w [N];
    foreach (r[k]) r[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < 60; q++) begin
      foreach (w[k]) w[k] = int'($urandom_range(2**CW - 1));
      hist[q] = w;
      @(negedge clk);
      foreach (r[k]) r[k] = CW'(w[k]);
      sh = 1'b1;
      @(negedge clk);
      sh = 1'b0;
      foreach (r[k]) r[k] = '1;
      repeat (2) @(negedge clk);
      for (int j = 1; j <= N; j++)
        for (int s = 0; s < int'(NSLOT); s++) begin
          automatic int i = j + s - B;
          int e;
          if (i < 1 || i > N) e = 0;
          else if (i + j - 2 > q) continue;
          else e = hist[q-(i+j-2)][i-1];
          checks++;
          if (int'(a[j-1][s]) != e) begin
            failures++; $display("FAIL step %0d col %0d slot %0d: %0d exp %0d", q, j, s, a[j-1][s], e);
          end
        end
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
