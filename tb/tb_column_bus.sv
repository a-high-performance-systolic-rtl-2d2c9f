// tb_column_bus: drives random memory, configuration and processor values
// with each source selected in turn (and none) and checks the bus value.
module tb_column_bus;
  import spell_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  ucmd_t u;
  cost_t mem;
  logic [BUS_W-1:0] cfg, bus;
  logic drv [NSLOT];
  dist_t acc [NSLOT];
  int checks = 0, failures = 0;

  column_bus dut (.clk_i(clk), .rst_ni(rst_n), .ucmd_i(u), .mem_i(mem), .cfg_i(cfg),
                  .drv_i(drv), .acc_i(acc), .bus_o(bus));
  always #5 clk = ~clk;

  initial begin
    u = '0;
    foreach (drv[s]) begin drv[s] = 1'b0; acc[s] = '0; end
    mem = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (400) begin
      automatic int sel = int'($urandom_range(4));
      automatic int who = int'($urandom_range(NSLOT - 1));
      logic [7:0] e;
      @(negedge clk);
      u = '0;
      mem = cost_t'(8'($urandom)); cfg = 8'($urandom);
      foreach (drv[s]) begin drv[s] = 1'b0; acc[s] = 8'($urandom); end
      case (sel)
        0: begin u.lookup = 1'b1; e = mem; end
        1: begin u.mem_wr = 1'b1; e = cfg; end
        2: begin u.cte_wr = 1'b1; e = cfg; end
        3: begin u.drive_out = 1'b1; drv[who] = 1'b1; e = acc[who]; end
        default: e = '0;
      endcase
      #1;
      checks++;
      if (bus != e) begin failures++; $display("FAIL sel %0d bus %h exp %h", sel, bus, e); end
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
