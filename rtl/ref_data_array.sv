// ref_data_array: registers that emulate the flow of reference characters.
//
// The computation array never moves characters: instead this array holds,
// for every processor P(i,j), the reference character x_i that P(i,j) needs
// and uses it to address column j's cost memory. Row i is a shift register
// that advances one position per systolic step (ref_shift_i) and is loaded
// at its head with character i of the reference word on ref_i. Position p of
// row i holds character i of the reference loaded p steps ago, so the
// register for column j sits at p = i+j-2: exactly where the wavefront of
// that reference reaches P(i,j), one step early, because the costs are
// fetched one systolic step before they are used. The first positions of the
// longer rows only delay the characters (the regular rectangular layout).
//
// Ports: ref_i[i-1] = character i of the next reference (0 = padding);
// addr_o[j-1][s] = character addressing column j's memory for slot s
// (row i = j+s-BAND), 0 where that row does not exist.
// The one-step-ahead timing and column-wise sharing follow the chip; the
// parallel reference input and the shift-register form are this design's.
module ref_data_array
  import spell_pkg::*;
#(
  parameter int unsigned N      = N_DEF,
  parameter int unsigned CHAR_W = CHAR_W_DEF
) (
  input  logic              clk_i,
  input  logic              rst_ni,
  input  logic              ref_shift_i,
  input  logic [CHAR_W-1:0] ref_i  [N],
  output logic [CHAR_W-1:0] addr_o [N][NSLOT]
);
  localparam int B = int'(BAND_DEF);

  for (genvar i = 1; i <= int'(N); i++) begin : g_row
    localparam int JMAX = (i + B < int'(N)) ? i + B : int'(N);
    localparam int JMIN = (i - B > 1) ? i - B : 1;
    localparam int L    = i + JMAX - 1;
    logic [CHAR_W-1:0] sr [L];

    always_ff @(posedge clk_i or negedge rst_ni) begin
      if (!rst_ni) begin
        for (int p = 0; p < L; p++) sr[p] <= '0;
      end else if (ref_shift_i) begin
        sr[0] <= ref_i[i-1];
        for (int p = 1; p < L; p++) sr[p] <= sr[p-1];
      end
    end

    for (genvar j = JMIN; j <= JMAX; j++) begin : g_tap
      assign addr_o[j-1][i-j+B] = sr[i+j-2];
    end
  end

  for (genvar j = 1; j <= int'(N); j++) begin : g_edge
    for (genvar s = 0; s < int'(NSLOT); s++) begin : g_s
      if (j + s - B < 1 || j + s - B > int'(N)) begin : g_off
        assign addr_o[j-1][s] = '0;
      end
    end
  end
endmodule
