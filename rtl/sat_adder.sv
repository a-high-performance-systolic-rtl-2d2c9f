// sat_adder: the adder of an elementary processor.
//
// Adds a distance and a cost and saturates at the all-ones value, which the
// array uses as "infinity" for neighbours that lie outside the five computed
// diagonals. The adder is pipelined: the sum is registered and is available
// one clock after an enabled add. The chip states that the processor has an
// adder and that it is pipelined; saturation is this design's own choice so
// that infinite distances stay infinite.
//
// Ports: a, b operands; en starts an add; sum_q the registered result.
module sat_adder #(
  parameter int unsigned W = 8
) (
  input  logic         clk_i,
  input  logic         rst_ni,
  input  logic         en_i,
  input  logic [W-1:0] a_i,
  input  logic [W-1:0] b_i,
  output logic [W-1:0] sum_q
);
  logic [W:0] full;

  always_comb full = {1'b0, a_i} + {1'b0, b_i};

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni)   sum_q <= '0;
    else if (en_i) sum_q <= full[W] ? {W{1'b1}} : full[W-1:0];
  end
endmodule
