// config_shift_reg: the configuration (and test) shift register.
//
// Before a dictionary is processed the column memories and the processors'
// constant registers must be loaded. The host shifts one configuration frame
// in serially, one bit per CFG_SHIFT, and then a CFG_MEM_WR or CFG_CTE_WR
// puts word j of the frame on column j's broadcast bus (all columns at
// once). For test, CFG_CAPTURE copies the column buses into the frame, which
// can then be shifted out on so_o while the next frame is shifted in.
//
// Frame layout (LEN = CHAR_W + N*BUS_W bits, bit LEN-1 leaves first):
//   [LEN-1 -: CHAR_W]     memory address for CFG_MEM_WR
//   [BUS_W*(j-1) +: BUS_W] word for column j
// Shifting: frame <= {frame[LEN-2:0], si_i}; so_o = frame[LEN-1].
// The chip has such a register for initialisation and test; its length,
// frame layout and serial width are this design's.
module config_shift_reg
  import spell_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned CHAR_W = CHAR_W_DEF
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              shift_i,
  input  logic              si_i,
  output logic              so_o,
  input  logic              capture_i,
  input  logic [BUS_W-1:0]  bus_i  [N],
  output logic [BUS_W-1:0]  word_o [N],
  output logic [CHAR_W-1:0] addr_o
);
  localparam int unsigned LEN = CHAR_W + N * BUS_W;
  logic [LEN-1:0] frame_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      frame_q <= '0;
    end else if (shift_i) begin
      frame_q <= {frame_q[LEN-2:0], si_i};
    end else if (capture_i) begin
      for (int j = 0; j < int'(N); j++) frame_q[BUS_W*j +: BUS_W] <= bus_i[j];
    end
  end

  for (genvar j = 0; j < int'(N); j++) begin : g_w
    assign word_o[j] = frame_q[BUS_W*j +: BUS_W];
  end
  assign addr_o = frame_q[LEN-1 -: CHAR_W];
  assign so_o   = frame_q[LEN-1];
endmodule
