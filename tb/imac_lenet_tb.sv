// imac_lenet_tb: the iterative MAC on the LeNet-300-100 workloads.
//
// LeNet-300-100 is a fully connected network, 784 inputs -> 300 -> 100 ->
// 10 outputs. Three runs on one default-size imac:
//
//  1. Forward pass (inference) of one 28x28 input: 8-bit activations and
//     weights in (1,0,7) fixed point, one pass per product (MODE_SINGLE),
//     784*300 + 300*100 + 100*10 = 266,200 products. Each neuron's sum is
//     checked exactly; ReLU and requantisation to 8 bits (shift by 7,
//     clamp to 0..127) are done by the testbench between layers. The
//     whole pass must take one clock per product.
//  2. Local gradients of the two hidden layers (training): 40-bit local
//     gradients in (1,16,23) fixed point times 8-bit weights, threshold
//     mode with the 5% threshold, 100*10 + 300*100 = 31,000 products.
//     Gradients are drawn mostly near zero. Every sum is checked against
//     the reference model and the share of products that needed a 2nd,
//     3rd, 4th and 5th partial product is printed.
//  3. Square of every 16-bit value x (1,0,15) with the 5% threshold: when
//     the unit stops after the upper-byte product, the approximate x^2
//     must be within 5.1% of the exact square (the threshold bounds the
//     dropped lower-byte terms to about 5%: 4.9% above, 5.04% below zero).
// The data are generated here from a fixed seed; no files are read.
module imac_lenet_tb;
  import imac_pkg::*;
  import imac_ref_pkg::*;

  logic               clk = 0, rst_n = 0;
  logic               in_valid, in_ready, in_acc_clear;
  logic [39:0]        in_a;
  logic [15:0]        in_b;
  logic [IDX_W:0]     in_a_bytes, in_b_bytes;
  imac_mode_e         in_mode;
  check_policy_e      in_policy;
  logic [THRESH_W-1:0] in_threshold;
  logic signed [63:0] acc;
  logic               out_valid, busy;
  logic [ITER_W-1:0]  out_iters;

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
    repeat (2000000) @(posedge clk);
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

  // Results of completed operations, in order.
  longint res_acc[$];
  int     res_it[$];
  longint last_done = 0;
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      res_acc.push_back(acc);
      res_it.push_back(int'(out_iters));
      last_done = cycle;
    end
  end

  // Offer one operation and wait until it is taken (valid stays high
  // between operations of one stream).
  task automatic issue(longint a, longint b, int na, int nb, int mode, bit clr);
    in_valid     = 1'b1;
    in_a         = 40'(a);
    in_b         = 16'(b);
    in_a_bytes   = (IDX_W + 1)'(na);
    in_b_bytes   = (IDX_W + 1)'(nb);
    in_mode      = imac_mode_e'(mode);
    in_policy    = CHECK_EACH;
    in_threshold = THRESH_5PCT;
    in_acc_clear = clr;
    #1;
    while (!in_ready) begin
      @(negedge clk);
      #1;
    end
    @(negedge clk);
  endtask

  task automatic drain();
    in_valid = 1'b0;
    repeat (12) @(negedge clk);
  endtask

  // ---------------- data ----------------
  byte    x0[784];
  byte    w1[300][784];
  byte    w2[100][300];
  byte    w3[10][100];
  byte    h1[300];
  byte    h2[100];
  longint d3[10];
  longint d2[100];

  function automatic byte q8(longint s);   // ReLU, (1,0,14) sum -> (1,0,7)
    longint v;
    v = s >>> 7;
    if (v < 0) v = 0;
    if (v > 127) v = 127;
    return byte'(v);
  endfunction

  // A 40-bit local gradient concentrated near zero: random sign, a
  // magnitude of 2^k with k mostly between 8 and 30 bits.
  function automatic longint rnd_grad();
    longint m;
    int     k;
    k = 4 + $urandom_range(26);
    m = longint'({$urandom, $urandom} & 64'h7fff_ffff_ffff_ffff) >> (63 - k);
    return ($urandom_range(1) == 1) ? -m : m;
  endfunction

  initial begin
    longint sum, prod, t0, cyc, exact, approx, err1000, max_err;
    int     it, n_it[6], n_ops, n_one, n_sq;
    void'($urandom(7));
    in_valid = 0; in_a = '0; in_b = '0; in_a_bytes = 4'd1; in_b_bytes = 4'd1;
    in_mode = MODE_SINGLE; in_policy = CHECK_EACH; in_threshold = THRESH_5PCT; in_acc_clear = 0;
    foreach (x0[i]) x0[i] = byte'($urandom_range(127));
    foreach (w1[i, j]) w1[i][j] = byte'(int'($urandom_range(30)) - 15);
    foreach (w2[i, j]) w2[i][j] = byte'(int'($urandom_range(40)) - 20);
    foreach (w3[i, j]) w3[i][j] = byte'(int'($urandom_range(60)) - 30);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. forward pass, layer by layer ----
    t0 = cycle + 1;
    for (int j = 0; j < 300; j++)
      for (int i = 0; i < 784; i++) issue(longint'(x0[i]), longint'(w1[j][i]), 1, 1, 0, i == 0);
    drain();
    cyc = last_done - t0;
    expect_true(cyc == 784 * 300, "layer 1 at one clock per product");
    $display("forward layer 1: %0d products in %0d clocks", 784 * 300, cyc);
    for (int j = 0; j < 300; j++) begin
      sum = 0;
      for (int i = 0; i < 784; i++) sum += longint'(x0[i]) * longint'(w1[j][i]);
      for (int i = 0; i < 783; i++) void'(res_acc.pop_front());
      expect_true(res_acc.pop_front() == sum, "layer 1 neuron sum");
      h1[j] = q8(sum);
    end
    res_acc.delete();
    res_it.delete();

    t0 = cycle + 1;
    for (int j = 0; j < 100; j++)
      for (int i = 0; i < 300; i++) issue(longint'(h1[i]), longint'(w2[j][i]), 1, 1, 0, i == 0);
    drain();
    cyc = last_done - t0;
    expect_true(cyc == 300 * 100, "layer 2 at one clock per product");
    for (int j = 0; j < 100; j++) begin
      sum = 0;
      for (int i = 0; i < 300; i++) sum += longint'(h1[i]) * longint'(w2[j][i]);
      for (int i = 0; i < 299; i++) void'(res_acc.pop_front());
      expect_true(res_acc.pop_front() == sum, "layer 2 neuron sum");
      h2[j] = q8(sum);
    end
    res_acc.delete();
    res_it.delete();

    t0 = cycle + 1;
    for (int j = 0; j < 10; j++)
      for (int i = 0; i < 100; i++) issue(longint'(h2[i]), longint'(w3[j][i]), 1, 1, 0, i == 0);
    drain();
    cyc = last_done - t0;
    expect_true(cyc == 100 * 10, "layer 3 at one clock per product");
    for (int j = 0; j < 10; j++) begin
      sum = 0;
      for (int i = 0; i < 100; i++) sum += longint'(h2[i]) * longint'(w3[j][i]);
      for (int i = 0; i < 99; i++) void'(res_acc.pop_front());
      expect_true(res_acc.pop_front() == sum, "output neuron sum");
      $display("output %0d: %0d", j, sum);
    end
    res_acc.delete();
    res_it.delete();

    // ---- 2. local gradients with the iterative MAC ----
    foreach (d3[i]) d3[i] = rnd_grad();
    foreach (n_it[i]) n_it[i] = 0;
    n_ops = 0;
    // Hidden layer 2: delta2_j = sum_k w3[k][j] * delta3_k (ReLU' = 1).
    for (int j = 0; j < 100; j++)
      for (int k = 0; k < 10; k++) issue(d3[k], longint'(w3[k][j]), 5, 1, 1, k == 0);
    drain();
    for (int j = 0; j < 100; j++) begin
      sum = 0;
      for (int k = 0; k < 10; k++) begin
        ref_mul(d3[k], longint'(w3[k][j]), 5, 1, 1, 0, 1639, prod, it);
        sum += prod;
        expect_true(res_it.pop_front() == it, "gradient iteration count");
        n_it[it]++;
        n_ops++;
        if (k < 9) void'(res_acc.pop_front());
      end
      expect_true(res_acc.pop_front() == sum, "layer 2 local gradient");
      d2[j] = rnd_grad();   // fresh gradients for the next layer
    end
    // Hidden layer 1: delta1_j = sum_k w2[k][j] * delta2_k.
    for (int j = 0; j < 300; j++)
      for (int k = 0; k < 100; k++) issue(d2[k], longint'(w2[k][j]), 5, 1, 1, k == 0);
    drain();
    for (int j = 0; j < 300; j++) begin
      sum = 0;
      for (int k = 0; k < 100; k++) begin
        ref_mul(d2[k], longint'(w2[k][j]), 5, 1, 1, 0, 1639, prod, it);
        sum += prod;
        expect_true(res_it.pop_front() == it, "gradient iteration count");
        n_it[it]++;
        n_ops++;
        if (k < 99) void'(res_acc.pop_front());
      end
      expect_true(res_acc.pop_front() == sum, "layer 1 local gradient");
    end
    begin
      int ge;
      for (int i = 2; i <= 5; i++) begin
        ge = 0;
        for (int j = i; j <= 5; j++) ge += n_it[j];
        $display("local gradients: %0d of %0d products (%0d%%) needed iteration %0d",
                 ge, n_ops, ge * 100 / n_ops, i);
      end
      expect_true(n_it[2] + n_it[3] + n_it[4] > 0 && n_it[5] > 0,
                  "both early stops and all five iterations seen");
    end

    // ---- 3. x^2 over all 16-bit inputs ----
    res_acc.delete();
    res_it.delete();
    for (int x = -32768; x < 32768; x++) issue(longint'(x), longint'(x), 2, 2, 1, 1);
    drain();
    n_one = 0; n_sq = 0; max_err = 0;
    for (int x = -32768; x < 32768; x++) begin
      approx = res_acc.pop_front();
      it     = res_it.pop_front();
      exact  = longint'(x) * longint'(x);
      ref_mul(longint'(x), longint'(x), 2, 2, 1, 0, 1639, prod, n_sq);
      expect_true(approx == prod && it == n_sq, "x^2 matches the reference");
      if (it == 1) begin
        n_one++;
        err1000 = (approx > exact ? approx - exact : exact - approx) * 1000;
        if (err1000 / exact > max_err) max_err = err1000 / exact;
        expect_true(err1000 <= 51 * exact, "one-iteration x^2 within about 5%");
      end
    end
    $display("x^2: %0d of 65536 inputs (%0d%%) finished after the upper-byte product",
             n_one, n_one * 100 / 65536);
    $display("x^2: largest error of a one-iteration square: %0d.%0d%%", max_err / 10, max_err % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
