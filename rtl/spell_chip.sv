// spell_chip: systolic co-processor for spelling correction.
//
// Compares one erroneous word (length n <= N) against a stream of dictionary
// references and returns, for every reference, its edit distance to the
// word, at the rate of one distance per systolic step. Substitutions,
// insertions, deletions and (if the instruction stream uses them) adjacent
// transpositions are counted with configurable costs.
//
// Structure (all from the chip's organisation):
//   ucode_decoder     decodes the external instruction into micro-commands
//   config_shift_reg  serial loading of memories and constants; test readout
//   ref_data_array    reference characters, one systolic step ahead
//   cost_memory x N   per-column cost table, addressed by ref_data_array
//   column_bus  x N   per-column broadcast bus
//   systolic_array    the 69-processor truncated array
//
// Interface:
//   instr_i        one instruction per clock; it acts one clock later
//   ref_i          the next reference (character k at ref_i[k-1], padded
//                  with code 0 up to N), sampled by the ref_shift command
//   cfg_si_i/so_o  serial configuration in / out
//   dout_o         distance put on the bus by the result processor,
//                  valid when dout_valid_o (one clock after drive_out acts)
// With the standard step programs (spell_pkg::step_instr) the
// distance of a reference loaded at step s appears at the drive_out of step
// s + n + r, where r = min(n+2, N) is the row of the result processor; the
// reference must be padded with a character of deletion cost 0 and a
// substitution cost not below the insertion costs so that D(r,n) = D(m,n).
module spell_chip
  import spell_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned CHAR_W = CHAR_W_DEF
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  instr_t            instr_i,
  input  logic [CHAR_W-1:0] ref_i [N],
  input  logic              cfg_si_i,
  output logic              cfg_so_o,
  output dist_t             dout_o,
  output logic              dout_valid_o
);
  ucmd_t             ucmd;
  logic [BUS_W-1:0]  bus      [N];
  logic [BUS_W-1:0]  cfg_word [N];
  logic [CHAR_W-1:0] cfg_addr;
  logic [CHAR_W-1:0] addr     [N][NSLOT];
  logic              drv      [N][NSLOT];
  dist_t             acc      [N][NSLOT];

  ucode_decoder u_dec (.clk_i, .rst_ni, .instr_i, .ucmd_o(ucmd));

  config_shift_reg #(.N(N), .CHAR_W(CHAR_W)) u_cfg (
    .clk_i, .rst_ni,
    .shift_i  (ucmd.cfg_shift),
    .si_i     (cfg_si_i),
    .so_o     (cfg_so_o),
    .capture_i(ucmd.capture),
    .bus_i    (bus),
    .word_o   (cfg_word),
    .addr_o   (cfg_addr)
  );

  ref_data_array #(.N(N), .CHAR_W(CHAR_W)) u_ref (
    .clk_i, .rst_ni,
    .ref_shift_i(ucmd.ref_shift),
    .ref_i,
    .addr_o     (addr)
  );

  for (genvar j = 0; j < int'(N); j++) begin : g_col
    logic [CHAR_W-1:0] raddr;
    cost_t             rdata;

    // the slot selected by the lookup command addresses the memory
    always_comb begin
      raddr = '0;
      for (int s = 0; s < int'(NSLOT); s++)
        if (ucmd.slot_oh[s]) raddr = addr[j][s];
    end

    cost_memory #(.CHAR_W(CHAR_W)) u_mem (
      .clk_i,
      .we_i   (ucmd.mem_wr),
      .waddr_i(cfg_addr),
      .wdata_i(cost_t'(bus[j])),
      .raddr_i(raddr),
      .rdata_o(rdata)
    );

    column_bus u_bus (
      .clk_i, .rst_ni,
      .ucmd_i(ucmd),
      .mem_i (rdata),
      .cfg_i (cfg_word[j]),
      .drv_i (drv[j]),
      .acc_i (acc[j]),
      .bus_o (bus[j])
    );
  end

  systolic_array #(.N(N)) u_array (
    .clk_i, .rst_ni,
    .ucmd_i(ucmd),
    .bus_i (bus),
    .drv_o (drv),
    .acc_o (acc)
  );

  // result port: the processors enabled by their flag register drive their
  // column bus on drive_out; only one of them should be enabled
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      dout_o       <= '0;
      dout_valid_o <= 1'b0;
    end else begin
      dout_valid_o <= ucmd.drive_out;
      if (ucmd.drive_out) begin
        dist_t v;
        v = '0;
        for (int j = 0; j < int'(N); j++) v |= bus[j];
        dout_o <= v;
      end
    end
  end
endmodule
