// pe: elementary processor P(i,j) of the truncated systolic array.
//
// Each systolic step the processor computes one value of the edit-distance
// recurrence for the comparison that is passing through it:
//   D(i,j) = min( D(i-1,j-1)+sub, D(i-1,j)+del, D(i,j-1)+ins,
//                 D(i-2,j-2)+trans  when a transposition is seen ).
// As in the chip it has an I/O register file that stores the neighbours'
// distances (IN), a constant register file written from the column broadcast
// bus (CTE), a pipelined adder, a minimizer and an accumulator whose content
// can be put on the bus. It does nothing by itself: every action is a
// micro-command from the common decoder, so the order of operations (and
// whether transpositions are used) is set by the instruction stream.
//
// Micro-commands used (see spell_pkg):
//   latch      I/O registers <= neighbour results, sub <= cost fetched last step
//   add_oh     adder <= one of DIAG+sub, UP+del, LEFT+ins, DIAG2+trans
//   acc_op     accumulator <= adder / min(acc, adder) / same if transposed
//   write_res  result <= accumulator (old result kept one more step)
//   lookup     if this slot is selected: next cost <= bus
//   cte_wr     if this slot is selected: constant register <= bus
//   drive_out / capture : accumulator onto the bus (drv_o)
// Neighbour wiring (made by systolic_array): UP = P(i-1,j) result,
// LEFT = P(i,j-1) result, DIAG = P(i-1,j-1) previous result, DIAG2 = two
// steps old copy of P(i-1,j-1)'s DIAG register. A missing neighbour reads as
// "infinity", or as a boundary constant on row 1 / column 1.
// The transposition test uses "cost 0 means equal characters": x_i = y_(j-1)
// is the zero-cost flag of P(i,j-1), x_(i-1) = y_j that of P(i-1,j), both
// from the previous step. That flag scheme, the register names and the
// boundary constants are this design's own; the chip gives the units only.
module pe
  import spell_pkg::*;
#(
  parameter int unsigned SLOT      = 2,     // row slot in the column (j-i = 2-SLOT)
  parameter bit          HAS_UP    = 1'b1,  // P(i-1,j) exists
  parameter bit          HAS_LEFT  = 1'b1,  // P(i,j-1) exists
  parameter bit          HAS_DIAG  = 1'b1,  // P(i-1,j-1) exists
  parameter bit          TOP_ROW   = 1'b0,  // i = 1
  parameter bit          LEFT_COL  = 1'b0   // j = 1
) (
  input  logic             clk_i,
  input  logic             rst_ni,
  input  ucmd_t            ucmd_i,
  input  logic [BUS_W-1:0] bus_i,
  input  dist_t            up_res_i,
  input  logic             up_eq_i,
  input  dist_t            left_res_i,
  input  logic             left_eq_i,
  input  dist_t            diag_prev_i,   // P(i-1,j-1) result of the step before last
  input  dist_t            diag_diag_i,   // P(i-1,j-1) DIAG register
  output dist_t            res_o,
  output dist_t            res_prev_o,
  output dist_t            diag_o,
  output logic             eq_o,
  output logic             drv_o,
  output dist_t            acc_o
);
  // I/O register file
  dist_t up_q, left_q, diag_q, d2s_q, diag2_q;
  logic  tu_q, tl_q;
  cost_t sub_q, subn_q;
  // constant register file
  dist_t c_ins, c_trans, c_bup, c_bleft, c_bdiag;
  logic  c_out_en;
  // results
  dist_t acc_q, res_q, resp_q;

  logic  sel;
  dist_t add_a, add_b, sum, mn;

  always_comb sel = |(ucmd_i.slot_oh & (NSLOT'(1) << SLOT));

  // ----------------------------------------------------------- I/O + const
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      up_q <= DIST_INF; left_q <= DIST_INF; diag_q <= DIST_INF;
      d2s_q <= DIST_INF; diag2_q <= DIST_INF;
      tu_q <= 1'b0; tl_q <= 1'b0;
      sub_q <= '0; subn_q <= '0;
      c_ins <= '0; c_trans <= DIST_INF; c_bup <= '0; c_bleft <= '0;
      c_bdiag <= '0; c_out_en <= 1'b0;
    end else begin
      if (ucmd_i.latch) begin
        up_q    <= HAS_UP   ? up_res_i   : (TOP_ROW  ? c_bup   : DIST_INF);
        left_q  <= HAS_LEFT ? left_res_i : (LEFT_COL ? c_bleft : DIST_INF);
        diag_q  <= HAS_DIAG ? diag_prev_i : c_bdiag;
        d2s_q   <= HAS_DIAG ? diag_diag_i : DIST_INF;
        diag2_q <= d2s_q;
        tu_q    <= HAS_UP   ? up_eq_i   : 1'b0;
        tl_q    <= HAS_LEFT ? left_eq_i : 1'b0;
        sub_q   <= subn_q;
      end
      if (ucmd_i.lookup && sel) subn_q <= cost_t'(bus_i);
      if (ucmd_i.cte_wr && sel) begin
        if (ucmd_i.creg_oh[CR_INS])   c_ins    <= bus_i;
        if (ucmd_i.creg_oh[CR_TRANS]) c_trans  <= bus_i;
        if (ucmd_i.creg_oh[CR_BUP])   c_bup    <= bus_i;
        if (ucmd_i.creg_oh[CR_BLEFT]) c_bleft  <= bus_i;
        if (ucmd_i.creg_oh[CR_BDIAG]) c_bdiag  <= bus_i;
        if (ucmd_i.creg_oh[CR_FLAGS]) c_out_en <= bus_i[0];
      end
    end
  end

  // ----------------------------------------------------------- adder
  always_comb begin
    add_a = '0;
    add_b = '0;
    case (1'b1)
      ucmd_i.add_oh[0]: begin add_a = diag_q;  add_b = dist_t'(sub_q.sub); end
      ucmd_i.add_oh[1]: begin add_a = up_q;    add_b = dist_t'(sub_q.del); end
      ucmd_i.add_oh[2]: begin add_a = left_q;  add_b = c_ins;              end
      ucmd_i.add_oh[3]: begin add_a = diag2_q; add_b = c_trans;            end
      default: ;
    endcase
  end

  sat_adder #(.W(DIST_W)) u_add (
    .clk_i, .rst_ni, .en_i(ucmd_i.add_en), .a_i(add_a), .b_i(add_b), .sum_q(sum)
  );

  minimizer #(.W(DIST_W)) u_min (.acc_i(acc_q), .cand_i(sum), .min_o(mn));

  // ----------------------------------------------------------- accumulator
  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      acc_q <= DIST_INF; res_q <= DIST_INF; resp_q <= DIST_INF;
    end else begin
      unique case (ucmd_i.acc_op)
        ACC_LOAD: acc_q <= sum;
        ACC_MIN:  acc_q <= mn;
        ACC_MINT: if (tu_q && tl_q) acc_q <= mn;
        default: ;
      endcase
      if (ucmd_i.write_res) begin
        res_q  <= acc_q;
        resp_q <= res_q;
      end
    end
  end

  assign res_o      = res_q;
  assign res_prev_o = resp_q;
  assign diag_o     = diag_q;
  assign eq_o       = (sub_q.sub == '0);
  assign acc_o      = acc_q;
  assign drv_o      = (ucmd_i.drive_out && c_out_en) || (ucmd_i.capture && sel);

  // the decoder never selects more than one adder input pair
  a_add_onehot: assert property (@(posedge clk_i) disable iff (!rst_ni)
                                 $onehot0(ucmd_i.add_oh));
endmodule
