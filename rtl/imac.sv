// imac: iterative multiply-accumulate unit for DNN inference and training.
//
// One 8x8-bit multiplier is reused in time to multiply operands of up to
// A_BYTES x B_BYTES bytes (default 40 x 16 bits). The operands are cut
// into bytes, the partial product of the two upper bytes is formed first,
// and further, less significant, partial products follow one per clock.
// After each partial product the unit may stop: in MODE_THRESHOLD it
// stops as soon as a partial product's magnitude reaches the threshold
// (default 1639, 5% of 32768), because what is left is below the error a
// DNN tolerates. MODE_SINGLE always stops after the upper-byte product
// (8-bit inference in one pass, or the cheapest approximation of a wide
// product) and MODE_FULL computes every pair, giving the exact product.
// Each partial product is scaled by 2^(8*(ia+ib)) and added to the
// accumulator, so a stream of operations forms a dot product.
//
// Interface (valid/ready):
//   in_valid/in_ready  an operation is taken on a clock edge where both are 1
//   in_a, in_b         two's-complement operands; only the low in_a_bytes
//                      (in_b_bytes) bytes are used, the highest of them
//                      is the sign byte. 0 bytes counts as 1; more than
//                      A_BYTES (B_BYTES) counts as A_BYTES (B_BYTES).
//   in_mode, in_policy, in_threshold   stopping rule of this operation
//   in_acc_clear       start a new sum with this operation
//   acc                running sum, updated one partial product per clock
//   out_valid          one-cycle pulse: acc now includes the operation
//   out_iters          number of partial products the operation used
//   busy               an operation is in progress
// Timing: an operation taken at edge E0 that needs k partial products
// updates acc at edges E1..Ek; out_valid is high in the cycle after Ek.
// in_ready is high when idle and in the last iteration, so a new
// operation can follow with no gap: k cycles per operation.
//
// Following the design: one reused byte multiplier, upper bytes first,
// threshold test on the partial product, 1639 threshold, scaling by 2^8
// per byte. This design's own choices: operand sizes per operation, the
// 64-bit accumulator, the modes' encoding, the CHECK_FIRST option, the
// handshake and the reset.
module imac
  import imac_pkg::*;
#(
  parameter int unsigned A_BYTES = 5,
  parameter int unsigned B_BYTES = 2,
  parameter int unsigned ACC_W   = 64
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [BYTE_W*A_BYTES-1:0]  in_a,
  input  logic [BYTE_W*B_BYTES-1:0]  in_b,
  input  logic [IDX_W:0]             in_a_bytes,
  input  logic [IDX_W:0]             in_b_bytes,
  input  imac_mode_e                 in_mode,
  input  check_policy_e              in_policy,
  input  logic [THRESH_W-1:0]        in_threshold,
  input  logic                       in_acc_clear,
  output logic signed [ACC_W-1:0]    acc,
  output logic                       out_valid,
  output logic [ITER_W-1:0]          out_iters,
  output logic                       busy
);

  logic [BYTE_W*A_BYTES-1:0] a_q;
  logic [BYTE_W*B_BYTES-1:0] b_q;
  logic [THRESH_W-1:0]       thr_q;
  logic                      clear_q;

  logic [IDX_W-1:0]      a_top, b_top;
  logic                  take;
  logic                  active, first, last, more;
  logic                  a_is_top, b_is_top;
  logic [IDX_W-1:0]      ia, ib;
  logic [LVL_W-1:0]      level;
  logic [ITER_W-1:0]     iter;
  logic [BYTE_W-1:0]     a_byte, b_byte;
  logic signed [PP_W-1:0] pp;

  // Operand size in bytes -> index of the sign byte, clamped to the datapath.
  always_comb begin
    if (in_a_bytes == '0)                       a_top = '0;
    else if (in_a_bytes > (IDX_W + 1)'(A_BYTES)) a_top = IDX_W'(A_BYTES - 1);
    else                                        a_top = IDX_W'(in_a_bytes - 1'b1);
    if (in_b_bytes == '0)                       b_top = '0;
    else if (in_b_bytes > (IDX_W + 1)'(B_BYTES)) b_top = IDX_W'(B_BYTES - 1);
    else                                        b_top = IDX_W'(in_b_bytes - 1'b1);
  end

  assign in_ready = !active || last;
  assign take     = in_valid && in_ready;
  assign busy     = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q     <= '0;
      b_q     <= '0;
      thr_q   <= THRESH_5PCT;
      clear_q <= 1'b0;
    end else if (take) begin
      a_q     <= in_a;
      b_q     <= in_b;
      thr_q   <= in_threshold;
      clear_q <= in_acc_clear;
    end
  end

  pp_sequencer #(.A_BYTES(A_BYTES), .B_BYTES(B_BYTES)) u_seq (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (take),
    .a_top    (a_top),
    .b_top    (b_top),
    .mode     (in_mode),
    .policy   (in_policy),
    .more     (more),
    .active   (active),
    .ia       (ia),
    .ib       (ib),
    .level    (level),
    .a_is_top (a_is_top),
    .b_is_top (b_is_top),
    .first    (first),
    .last     (last),
    .iter     (iter)
  );

  // Byte select: the current byte of each held operand.
  always_comb begin
    a_byte = a_q[BYTE_W*ia +: BYTE_W];
    b_byte = b_q[BYTE_W*ib +: BYTE_W];
  end

  byte_mult u_mul (
    .a        (a_byte),
    .a_signed (a_is_top),
    .b        (b_byte),
    .b_signed (b_is_top),
    .p        (pp)
  );

  pp_threshold u_thr (
    .pp     (pp),
    .thresh (thr_q),
    .more   (more)
  );

  shift_acc #(.ACC_W(ACC_W)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (active),
    .load  (first && clear_q),
    .pp    (pp),
    .level (level),
    .acc   (acc)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_iters <= '0;
    end else begin
      out_valid <= last;
      if (last) out_iters <= iter;
    end
  end

  // The accumulator must hold the widest scaled partial product.
  initial assert (ACC_W >= PP_W + BYTE_W * (A_BYTES + B_BYTES - 2))
    else $error("ACC_W too small for A_BYTES x B_BYTES");

  // Valid/ready: an offered operation stays offered until it is taken.
  in_hold: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid && !in_ready |=> in_valid);

endmodule
