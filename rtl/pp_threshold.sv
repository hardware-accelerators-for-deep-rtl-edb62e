// pp_threshold: the threshold test of the iterative MAC.
//
// It takes the magnitude of a partial product and compares it with the
// programmed threshold. If the magnitude is below the threshold the
// product is too small to stand for the result on its own and more,
// less significant, partial products are needed (more = 1); if it is at
// or above the threshold the remaining partial products are negligible
// and the operation may stop (more = 0). The default threshold, 1639, is
// 5% of the largest signed 16-bit magnitude.
//
// Interface: pp (17-bit signed partial product), thresh (17-bit unsigned),
// more. Purely combinational.
//
// Comparing the partial product, not the operand, and stopping when it
// reaches the threshold follow the design; treating "equal" as reaching
// it is this design's choice.
module pp_threshold
  import imac_pkg::*;
(
  input  logic signed [PP_W-1:0] pp,
  input  logic [THRESH_W-1:0]    thresh,
  output logic                   more
);

  logic [PP_W-1:0] mag;

  always_comb begin
    mag  = pp[PP_W-1] ? PP_W'(-pp) : PP_W'(pp);
    more = (mag < thresh);
  end

endmodule
