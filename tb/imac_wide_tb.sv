// imac_wide_tb: the iterative MAC built for 32x32-bit operands.
//
// The same 8x8-bit multiplier and controller, instantiated with
// A_BYTES = B_BYTES = 4 and an 80-bit accumulator, must handle any
// operand sizes from 8x8 to 32x32 bits (up to 16 partial products) in
// every mode. Random back-to-back operations are checked against the
// integer reference model (low 64 bits of the accumulator) together with
// their partial-product count and latency.
module imac_wide_tb;
  import imac_pkg::*;
  import imac_ref_pkg::*;

  logic                clk = 0, rst_n = 0;
  logic                in_valid, in_ready, in_acc_clear;
  logic [31:0]         in_a, in_b;
  logic [IDX_W:0]      in_a_bytes, in_b_bytes;
  imac_mode_e          in_mode;
  check_policy_e       in_policy;
  logic [THRESH_W-1:0] in_threshold;
  logic signed [79:0]  acc;
  logic                out_valid, busy;
  logic [ITER_W-1:0]   out_iters;

  imac #(.A_BYTES(4), .B_BYTES(4), .ACC_W(80)) dut (
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
    repeat (300000) @(posedge clk);
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

  longint exp_acc[$], exp_take[$];
  int     exp_it[$];
  int     n_it[17];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      if (exp_acc.size() == 0) expect_true(0, "unexpected out_valid");
      else begin
        longint ea, et;
        int     ei;
        ea = exp_acc.pop_front();
        et = exp_take.pop_front();
        ei = exp_it.pop_front();
        expect_true(acc[63:0] == ea, "accumulator value");
        expect_true(int'(out_iters) == ei, "iteration count");
        expect_true(cycle == et + longint'(ei), "latency");
      end
    end
  end

  initial begin
    longint model, a, b, prod;
    int     na, nb, mode, pol, it;
    bit     clr;
    model = 0;
    in_valid = 0; in_a = '0; in_b = '0; in_a_bytes = 4'd1; in_b_bytes = 4'd1;
    in_mode = MODE_FULL; in_policy = CHECK_EACH; in_threshold = THRESH_5PCT; in_acc_clear = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 15000; n++) begin
      na   = 1 + $urandom_range(3);
      nb   = 1 + $urandom_range(3);
      mode = ($urandom_range(2) == 0) ? $urandom_range(2) : 1;
      pol  = $urandom_range(1);
      clr  = ($urandom_range(5) == 0);
      a    = longint'($urandom) >>> $urandom_range(31);
      b    = longint'($urandom) >>> $urandom_range(31);
      if ($urandom_range(1) == 1) a = -a;
      if ($urandom_range(1) == 1) b = -b;
      in_valid     = 1'b1;
      in_a         = 32'(a);
      in_b         = 32'(b);
      in_a_bytes   = (IDX_W + 1)'(na);
      in_b_bytes   = (IDX_W + 1)'(nb);
      in_mode      = imac_mode_e'(mode);
      in_policy    = check_policy_e'(pol);
      in_threshold = THRESH_5PCT;
      in_acc_clear = clr;
      #1;
      while (!in_ready) begin
        @(negedge clk);
        #1;
      end
      ref_mul(longint'(32'(a)), longint'(32'(b)), na, nb, mode, pol, 1639, prod, it);
      model = clr ? prod : model + prod;
      exp_acc.push_back(model);
      exp_take.push_back(cycle + 1);
      exp_it.push_back(it);
      n_it[it]++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (40) @(negedge clk);
    expect_true(exp_acc.size() == 0, "every operation completed");
    expect_true(n_it[16] > 0 && n_it[1] > 0, "1 and 16 partial products both seen");
    $display("operations using 16 partial products: %0d, using 1: %0d", n_it[16], n_it[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
