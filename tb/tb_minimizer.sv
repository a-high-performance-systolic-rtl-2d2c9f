// tb_minimizer: checks the minimizer output against the smaller operand for
// exhaustive corner values and random pairs.
module tb_minimizer;
  logic clk = 1'b0;
  logic [7:0] a, c, m;
  int checks = 0, failures = 0;

  minimizer #(.W(8)) dut (.acc_i(a), .cand_i(c), .min_o(m));
  always #5 clk = ~clk;

  task automatic one(int x, int y);
    int e = (x < y) ? x : y;
    a = 8'(x); c = 8'(y);
    #1;
    checks++;
    if (int'(m) != e) begin failures++; $display("FAIL min(%0d,%0d)=%0d", x, y, m); end
  endtask

  initial begin
    static int v [6] = '{0, 1, 127, 128, 254, 255};
    foreach (v[p]) foreach (v[q]) one(v[p], v[q]);
    repeat (500) one(int'($urandom_range(255)), int'($urandom_range(255)));
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
