// column_bus: the broadcast bus of one column.
//
// Every column of processors is tied to its memory by one bus. In a given
// clock exactly one source may drive it, chosen by the decoded micro-command:
//   lookup            the column memory's read data (a cost for one processor)
//   mem_wr / cte_wr   the column's word of the configuration shift register
//   drive_out/capture the accumulator of the processor(s) that request it
//                     (drv_i); at most one per column may ask
// With no source the bus reads 0. The processors, the memory write port and
// the configuration register all listen to bus_o. The sources follow the
// chip's description; the priority encoding is this design's.
module column_bus
  import spell_pkg::*;
(
  input  logic             clk_i,
  input  logic             rst_ni,
  input  ucmd_t            ucmd_i,
  input  cost_t            mem_i,
  input  logic [BUS_W-1:0] cfg_i,
  input  logic             drv_i [NSLOT],
  input  dist_t            acc_i [NSLOT],
  output logic [BUS_W-1:0] bus_o
);
  logic [BUS_W-1:0] pe_val;
  logic [NSLOT-1:0] drv_v;

  always_comb begin
    pe_val = '0;
    for (int s = 0; s < int'(NSLOT); s++) begin
      drv_v[s] = drv_i[s];
      if (drv_i[s]) pe_val |= acc_i[s];
    end
    if (ucmd_i.lookup)                         bus_o = mem_i;
    else if (ucmd_i.mem_wr || ucmd_i.cte_wr)   bus_o = cfg_i;
    else                                       bus_o = pe_val;
  end

  // one driver at a time
  a_one_source: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0({ucmd_i.lookup, ucmd_i.mem_wr | ucmd_i.cte_wr, |drv_v}));
  a_one_pe: assert property (@(posedge clk_i) disable iff (!rst_ni) $onehot0(drv_v));
endmodule
