// tb_cost_memory: fills a column cost table with random words, then reads
// every entry back and random entries while writes are disabled.
module tb_cost_memory;
  import spell_pkg::*;
  localparam int CW = CHAR_W_DEF;
  logic clk = 1'b0, we = 1'b0;
  logic [CW-1:0] wa = '0, ra = '0;
  cost_t wd = '0, rd;
  logic [7:0] shadow [2**CW];
  int checks = 0, failures = 0;

  cost_memory dut (.clk_i(clk), .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));
  always #5 clk = ~clk;

  initial begin
    for (int x = 0; x < 2**CW; x++) begin
      @(negedge clk); we = 1'b1; wa = CW'(x); wd = cost_t'(8'($urandom)); shadow[x] = wd;
    end
    @(negedge clk); we = 1'b0; wd = '1;
    for (int x = 0; x < 2**CW; x++) begin
      @(negedge clk); wa = CW'(x); ra = CW'(x); #1;
      checks++;
      if (rd != shadow[x]) begin failures++; $display("FAIL addr %0d", x); end
    end
    repeat (200) begin
      @(negedge clk); ra = CW'($urandom); #1;
      checks++;
      if (rd != shadow[ra]) begin failures++; $display("FAIL addr %0d", ra); end
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
