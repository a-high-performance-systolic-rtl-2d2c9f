// minimizer: the minimizer of an elementary processor.
//
// Compares the accumulator with a candidate distance and returns the smaller
// of the two. It is
// combinational; the processor registers its output in the accumulator, so
// a minimisation takes one clock and can overlap the next add (the chip
// pipelines its adder and minimizer). Ties keep the accumulator.
//
// Ports: acc_i current accumulator, cand_i candidate; min_o the smaller one.
module minimizer #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] acc_i,
  input  logic [W-1:0] cand_i,
  output logic [W-1:0] min_o
);
  always_comb min_o = (cand_i < acc_i) ? cand_i : acc_i;
endmodule
