// systolic_array: the truncated 2-D computation array.
//
// Processor P(i,j) (row i = reference character, column j = character of the
// erroneous word, both 1..N) computes D(i,j) of one comparison per systolic
// step. A comparison that enters P(1,1) at step t reaches P(i,j) at step
// t+i+j-2, so all processors on one anti-diagonal work on the same comparison
// and a new comparison can start every step. Only the processors with
// |i-j| <= BAND are built: with N = 15 and BAND = 2 that is the chip's five
// diagonals, 15 + 2*14 + 2*13 = 69 processors. Values from outside the band
// read as infinity.
//
// Column j has up to 2*BAND+1 processors, numbered by slot s = i-j+BAND. All
// of a column share the column broadcast bus bus_i[j-1]; drv_o/acc_o give
// each processor's request to drive that bus and the value it would drive.
// All actions are the decoded micro-commands in ucmd_i, common to all
// processors. The diagonal geometry follows the chip; the wiring of the
// two-step-old diagonal values for the transposition term is this design's.
module systolic_array
  import spell_pkg::*;
#(
  parameter int unsigned N = N_DEF
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  ucmd_t            ucmd_i,
  input  logic [BUS_W-1:0] bus_i [N],
  output logic             drv_o [N][NSLOT],
  output dist_t            acc_o [N][NSLOT]
);
  localparam int B = int'(BAND_DEF);

  dist_t res   [1:N][1:N];
  dist_t resp  [1:N][1:N];
  dist_t diag  [1:N][1:N];
  logic  eq    [1:N][1:N];

  for (genvar i = 1; i <= int'(N); i++) begin : g_row
    for (genvar j = 1; j <= int'(N); j++) begin : g_col
      if ((i - j <= B) && (j - i <= B)) begin : g_pe
        localparam bit HU = (i > 1) && (j - (i - 1) <= B);
        localparam bit HL = (j > 1) && (i - (j - 1) <= B);
        localparam bit HD = (i > 1) && (j > 1);
        dist_t up_r, left_r, dp_r, dd_r;
        logic  up_e, left_e;
        if (HU) begin : g_up
          assign up_r = res[i-1][j];
          assign up_e = eq[i-1][j];
        end else begin : g_noup
          assign up_r = DIST_INF;
          assign up_e = 1'b0;
        end
        if (HL) begin : g_left
          assign left_r = res[i][j-1];
          assign left_e = eq[i][j-1];
        end else begin : g_noleft
          assign left_r = DIST_INF;
          assign left_e = 1'b0;
        end
        if (HD) begin : g_diag
          assign dp_r = resp[i-1][j-1];
          assign dd_r = diag[i-1][j-1];
        end else begin : g_nodiag
          assign dp_r = DIST_INF;
          assign dd_r = DIST_INF;
        end
        pe #(
          .SLOT    (i - j + B),
          .HAS_UP  (HU),
          .HAS_LEFT(HL),
          .HAS_DIAG(HD),
          .TOP_ROW (i == 1),
          .LEFT_COL(j == 1)
        ) u_pe (
          .clk_i, .rst_ni, .ucmd_i,
          .bus_i      (bus_i[j-1]),
          .up_res_i   (up_r),
          .up_eq_i    (up_e),
          .left_res_i (left_r),
          .left_eq_i  (left_e),
          .diag_prev_i(dp_r),
          .diag_diag_i(dd_r),
          .res_o      (res[i][j]),
          .res_prev_o (resp[i][j]),
          .diag_o     (diag[i][j]),
          .eq_o       (eq[i][j]),
          .drv_o      (drv_o[j-1][i-j+B]),
          .acc_o      (acc_o[j-1][i-j+B])
        );
      end else begin : g_none
        assign res[i][j]  = DIST_INF;
        assign resp[i][j] = DIST_INF;
        assign diag[i][j] = DIST_INF;
        assign eq[i][j]   = 1'b0;
      end
    end
  end
  // slots whose row would be below 1 or above N (corners of the band)
  for (genvar j = 1; j <= int'(N); j++) begin : g_edge
    for (genvar s = 0; s < int'(NSLOT); s++) begin : g_s
      if (j + s - B < 1 || j + s - B > int'(N)) begin : g_off
        assign drv_o[j-1][s] = 1'b0;
        assign acc_o[j-1][s] = '0;
      end
    end
  end
endmodule
