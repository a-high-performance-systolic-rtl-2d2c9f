// tb_sat_adder: checks the processor adder against integer addition clipped
// at 255, including the edge cases around saturation, and its one-clock
// latency and hold when not enabled.
module tb_sat_adder;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [7:0] a = '0, b = '0, s;
  int checks = 0, failures = 0;

  sat_adder #(.W(8)) dut (.clk_i(clk), .rst_ni(rst_n), .en_i(en), .a_i(a), .b_i(b), .sum_q(s));
  always #5 clk = ~clk;

  task automatic one(int x, int y);
    int e;
    logic [7:0] held;
    @(negedge clk); a = 8'(x); b = 8'(y); en = 1'b1;
    @(negedge clk); en = 1'b0;
    e = (x + y > 255) ? 255 : x + y;
    checks++;
    if (int'(s) != e) begin failures++; $display("FAIL %0d+%0d=%0d exp %0d", x, y, s, e); end
    held = s;
    a = ~a;
    @(negedge clk);
    checks++;
    if (s != held) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    one(0, 0); one(255, 0); one(255, 1); one(128, 127); one(128, 128); one(254, 1); one(200, 100);
    repeat (300) one(int'($urandom_range(255)), int'($urandom_range(255)));
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
