// shift_acc: the scaling adder and accumulator register of the iterative MAC.
//
// Each partial product of byte pair (ia, ib) is worth pp * 2^(8*(ia+ib)).
// This block sign-extends the 17-bit partial product to the accumulator
// width, shifts it left by 8 bits per significance level and adds it to
// the accumulator. When "load" is set with "en", the old contents are
// dropped first, so the first partial product of a new dot product starts
// the sum from zero. The accumulator wraps on overflow (two's complement);
// with the default 64 bits a full 40x16-bit product (57 bits) leaves 7
// guard bits, i.e. about 128 worst-case products before wrapping.
//
// Interface: en, load, pp, level in; acc out. One addition per clock, the
// new value is visible the cycle after en.
//
// Scaling by 2^8 per byte and adding into a register follow the design;
// the accumulator width and the wrap on overflow are this design's choice.
module shift_acc
  import imac_pkg::*;
#(
  parameter int unsigned ACC_W = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    load,
  input  logic signed [PP_W-1:0]  pp,
  input  logic [LVL_W-1:0]        level,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [ACC_W-1:0] aligned;
  logic signed [ACC_W-1:0] base;

  always_comb begin
    aligned = ACC_W'(pp) <<< (BYTE_W * level);
    base    = load ? '0 : acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + aligned;
  end

  // The widest shift must keep the whole partial product.
  initial assert (ACC_W >= PP_W) else $error("ACC_W too small");

endmodule
