// imac_tb: end-to-end test of the iterative MAC at its default size
// (40-bit x 16-bit operands, 64-bit accumulator).
//
// A driver offers operations through the valid/ready handshake; a
// scoreboard predicts every result with the integer reference model in
// imac_ref_pkg and checks, at each out_valid pulse, the accumulator, the
// number of partial products used and the latency (exactly one clock per
// partial product after the operation is taken, and an operation waiting
// behind another is taken in that one's last cycle).
//
// Directed part: the worked 16x16 example 6244 x 3272 in all modes
// (upper bytes only 18,874,368; exact 20,430,368), 8-bit inference
// products, and the widest 40x16 products. Random part: every operand
// size, mode and policy, small and large operands (so that the threshold
// stops at every possible iteration), accumulation runs with and without
// clear, idle gaps and back-to-back operations, and out-of-range byte
// counts. Each mechanism is counted and must occur at least once.
module imac_tb;
  import imac_pkg::*;
  import imac_ref_pkg::*;

  localparam int A_BYTES = 5;
  localparam int B_BYTES = 2;

  logic                      clk = 0, rst_n = 0;
  logic                      in_valid, in_ready, in_acc_clear;
  logic [8*A_BYTES-1:0]      in_a;
  logic [8*B_BYTES-1:0]      in_b;
  logic [IDX_W:0]            in_a_bytes, in_b_bytes;
  imac_mode_e                in_mode;
  check_policy_e             in_policy;
  logic [THRESH_W-1:0]       in_threshold;
  logic signed [63:0]        acc;
  logic                      out_valid, busy;
  logic [ITER_W-1:0]         out_iters;

  imac dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
    .in_a(in_a), .in_b(in_b), .in_a_bytes(in_a_bytes), .in_b_bytes(in_b_bytes),
    .in_mode(in_mode), .in_policy(in_policy), .in_threshold(in_threshold),
    .in_acc_clear(in_acc_clear), .acc(acc), .out_valid(out_valid),
    .out_iters(out_iters), .busy(busy)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // Scoreboard entry per operation taken.
  typedef struct {
    longint acc;
    int     iters;
    longint take;
    longint direct;   // expected acc for directed cases, else unused
    bit     has_direct;
  } exp_t;
  exp_t   sb[$];
  longint model = 0;

  // Mechanism counters.
  int n_iter[11];
  int n_single = 0, n_full = 0, n_thr_stop = 0, n_thr_first_full = 0;
  int n_b2b = 0, n_stall = 0, n_clear = 0, n_accum = 0, n_clamp = 0, n_done = 0;
  longint prev_take = -100;
  int     prev_iters = 0;

  // Offer one operation and wait until it is taken.
  task automatic issue(longint a, longint b, int na, int nb, int mode, int pol,
                       int thr, bit clr, bit has_direct = 0, longint direct = 0);
    exp_t   e;
    longint prod;
    int     it, ena, enb;
    bit     waited;
    in_valid     = 1'b1;
    in_a         = (8*A_BYTES)'(a);
    in_b         = (8*B_BYTES)'(b);
    in_a_bytes   = (IDX_W + 1)'(na);
    in_b_bytes   = (IDX_W + 1)'(nb);
    in_mode      = imac_mode_e'(mode);
    in_policy    = check_policy_e'(pol);
    in_threshold = THRESH_W'(thr);
    in_acc_clear = clr;
    // Effective sizes after clamping, for the reference model.
    ena = (na == 0) ? 1 : (na > A_BYTES ? A_BYTES : na);
    enb = (nb == 0) ? 1 : (nb > B_BYTES ? B_BYTES : nb);
    if (ena != na || enb != nb) n_clamp++;
    #1;
    waited = 0;
    while (!in_ready) begin
      waited = 1;
      n_stall++;
      @(negedge clk);
      #1;
    end
    if (busy) n_b2b++;
    ref_mul(a, b, ena, enb, mode, pol, longint'(thr), prod, it);
    model = clr ? prod : model + prod;
    if (clr) n_clear++; else n_accum++;
    e.acc = model; e.iters = it; e.take = cycle + 1;
    e.has_direct = has_direct; e.direct = direct;
    sb.push_back(e);
    // An operation that had to wait is taken in the last iteration of the
    // one before it: no cycle is lost between operations.
    if (waited) expect_true(e.take == prev_take + longint'(prev_iters), "back-to-back without a gap");
    prev_take  = e.take;
    prev_iters = it;
    n_iter[it]++;
    if (mode == 0) n_single++;
    if (mode == 2) n_full++;
    if (mode == 1 && it < ena * enb) n_thr_stop++;
    if (mode == 1 && pol == 1 && it == ena * enb && it > 1) n_thr_first_full++;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  // Scoreboard: check each completed operation.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_done++;
      if (sb.size() == 0) begin
        expect_true(0, "unexpected out_valid");
      end else begin
        e = sb.pop_front();
        expect_true(acc == e.acc, "accumulator value");
        if (acc != e.acc && failures < 20) $display("   acc=%0d exp=%0d", acc, e.acc);
        expect_true(int'(out_iters) == e.iters, "iteration count");
        expect_true(cycle == e.take + longint'(e.iters), "latency = one clock per partial product");
        if (e.has_direct) expect_true(acc == e.direct, "worked example value");
      end
    end
  end

  // Random operand of nbytes bytes whose magnitude has a random number of
  // bits, so that upper bytes are often only sign.
  function automatic longint rnd_operand(int nbytes);
    longint v;
    int     bits;
    v    = {$urandom, $urandom};
    bits = 1 + $urandom_range(8 * nbytes - 1);
    v    = v >>> (64 - bits);        // signed, |v| < 2^(bits-1)
    // Garbage above the used bytes must be ignored by the unit.
    return (v & ((64'sd1 <<< (8 * nbytes)) - 1)) | ({$urandom, $urandom} << (8 * nbytes));
  endfunction

  initial begin
    in_valid = 0; in_a = '0; in_b = '0; in_a_bytes = 4'd1; in_b_bytes = 4'd1;
    in_mode = MODE_FULL; in_policy = CHECK_EACH; in_threshold = THRESH_5PCT; in_acc_clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_true(in_ready && !busy && acc == 0, "idle after reset");

    // Worked 16x16 example: C = 6244 (24, 100), D = 3272 (12, 200).
    issue(6244, 3272, 2, 2, 0, 0, 1639, 1, 1, 18874368);            // upper bytes only
    issue(6244, 3272, 2, 2, 2, 0, 1639, 1, 1, 20430368);            // exact
    issue(6244, 3272, 2, 2, 1, 1, 1639, 1, 1, 20430368);            // 288 < 1639: all four
    issue(6244, 3272, 2, 2, 1, 0, 1639, 1, 1, 18874368 + 4800*256); // stops at 24*200
    issue(6244, 3272, 2, 2, 1, 0, 200,  1, 1, 18874368);            // 288 >= 200: one
    repeat (6) @(negedge clk);

    // 8-bit inference: one pass, exact.
    issue(-128, -128, 1, 1, 0, 0, 1639, 1, 1, 16384);
    issue(127, -128, 1, 1, 0, 0, 1639, 0, 1, 16384 - 16256);
    // Widest products, exact.
    issue(64'h80_0000_0000, 64'h8000, 5, 2, 2, 0, 1639, 1, 1, 64'sd1 <<< 54);
    issue(64'h7f_ffff_ffff, 64'h8000, 5, 2, 2, 0, 1639, 1, 1,
          -((64'sd1 <<< 39) - 1) * 32768);
    repeat (3) @(negedge clk);

    // Random operations.
    for (int n = 0; n < 20000; n++) begin
      int na, nb, mode, pol, thr;
      na = 1 + $urandom_range(A_BYTES - 1);
      nb = 1 + $urandom_range(B_BYTES - 1);
      mode = $urandom_range(3) == 0 ? $urandom_range(2) : 1;
      pol  = $urandom_range(1);
      case ($urandom_range(3))
        0:       thr = $urandom_range(131071);
        1:       thr = $urandom_range(4000);
        default: thr = 1639;
      endcase
      if ($urandom_range(50) == 0) na = ($urandom_range(1) == 1) ? 0 : 6 + $urandom_range(1);
      if ($urandom_range(50) == 0) nb = ($urandom_range(1) == 1) ? 0 : 3 + $urandom_range(4);
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
      issue(rnd_operand(na == 0 ? 1 : na), rnd_operand(nb == 0 ? 1 : nb),
            na, nb, mode, pol, thr, $urandom_range(7) == 0);
    end
    repeat (20) @(negedge clk);
    expect_true(sb.size() == 0, "every operation completed");

    for (int i = 1; i <= 10; i++) begin
      $display("operations using %0d partial products: %0d", i, n_iter[i]);
      expect_true(n_iter[i] > 0, "every iteration count reached");
    end
    $display("single=%0d full=%0d threshold-stop=%0d first-check-full=%0d",
             n_single, n_full, n_thr_stop, n_thr_first_full);
    $display("back-to-back=%0d stalls=%0d clear=%0d accumulate=%0d clamped=%0d done=%0d",
             n_b2b, n_stall, n_clear, n_accum, n_clamp, n_done);
    expect_true(n_single > 0 && n_full > 0 && n_thr_stop > 0 && n_thr_first_full > 0,
                "every mode exercised");
    expect_true(n_b2b > 0 && n_stall > 0 && n_clear > 0 && n_accum > 0 && n_clamp > 0,
                "every handshake case exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
