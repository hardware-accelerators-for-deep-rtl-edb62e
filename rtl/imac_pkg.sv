// imac_pkg: types and constants shared by the iterative MAC unit.
//
// The iterative MAC multiplies multi-byte fixed-point operands with a
// single 8x8-bit multiplier, one byte pair per clock, most significant
// pair first. The constants below fix the byte width, the width of one
// partial product and of the threshold, and the default threshold of 1639
// (5% of 32768, the largest magnitude of a signed 16-bit upper-byte
// product), which is the value the design is characterised with. The
// mode and check-policy encodings are this design's own.
package imac_pkg;

  // Width of one operand slice handled by the multiplier.
  localparam int unsigned BYTE_W = 8;

  // One partial product: signed or unsigned byte times signed or unsigned
  // byte. Range -32640 .. 65025, held as 17-bit two's complement.
  localparam int unsigned PP_W = 2 * BYTE_W + 1;

  // Threshold compared with |partial product|; 17 bits so that a value
  // above every possible magnitude can be set.
  localparam int unsigned THRESH_W = PP_W;

  // 5% of 2^15, rounded up: 0.05 * 32768 = 1638.4 -> 1639.
  localparam logic [THRESH_W-1:0] THRESH_5PCT = THRESH_W'(1639);

  // Width of a byte index (operands of up to 8 bytes), of a significance
  // level (byte index sum, up to 14) and of an iteration count (up to 64).
  localparam int unsigned IDX_W  = 3;
  localparam int unsigned LVL_W  = 4;
  localparam int unsigned ITER_W = 7;

  // How many partial products an operation may use.
  //   MODE_SINGLE    : only the upper-byte product (one pass, inference)
  //   MODE_THRESHOLD : stop once a partial product reaches the threshold
  //   MODE_FULL      : every byte pair, the exact product
  typedef enum logic [1:0] {
    MODE_SINGLE    = 2'd0,
    MODE_THRESHOLD = 2'd1,
    MODE_FULL      = 2'd2
  } imac_mode_e;

  // Which partial products are tested against the threshold.
  //   CHECK_EACH  : every partial product, stop at the first that reaches it
  //   CHECK_FIRST : only the upper-byte product; if it is below the
  //                 threshold all remaining pairs are computed
  typedef enum logic {
    CHECK_EACH  = 1'b0,
    CHECK_FIRST = 1'b1
  } check_policy_e;

endpackage
