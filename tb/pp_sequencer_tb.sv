// pp_sequencer_tb: checks the byte-pair order and the stopping rule.
//
// Random operations (1..5 x 1..2 bytes, every mode and policy) are run
// with a random "more" answer in every iteration. The expected pair list
// is built independently (all pairs sorted by falling ia+ib, then falling
// ia) and each active cycle's pair, iteration count, first and last flags
// are compared with it. Operations follow each other either with idle
// cycles or back to back (start in the last cycle); stray start pulses in
// the middle of an operation must be ignored. A fixed 16x16 case checks
// the order A1B1, A1B0, A0B1, A0B0 and the one-cycle-per-pair rate.
module pp_sequencer_tb;
  import imac_pkg::*;

  logic             clk = 0, rst_n = 0;
  logic             start, more;
  logic [IDX_W-1:0] a_top, b_top;
  imac_mode_e       mode;
  check_policy_e    policy;
  logic             active, a_is_top, b_is_top, first, last;
  logic [IDX_W-1:0] ia, ib;
  logic [LVL_W-1:0] level;
  logic [ITER_W-1:0] iter;
  int checks = 0, failures = 0;
  int n_b2b = 0, n_stray = 0, n_early = 0, n_single = 0, n_full = 0;

  pp_sequencer #(.A_BYTES(5), .B_BYTES(2)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .a_top(a_top), .b_top(b_top),
    .mode(mode), .policy(policy), .more(more), .active(active), .ia(ia),
    .ib(ib), .level(level), .a_is_top(a_is_top), .b_is_top(b_is_top),
    .first(first), .last(last), .iter(iter)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Configuration of the next operation.
  int nx_na, nx_nb, nx_mode, nx_pol;
  task automatic new_cfg();
    nx_na   = 1 + $urandom_range(4);
    nx_nb   = 1 + $urandom_range(1);
    nx_mode = $urandom_range(2);
    nx_pol  = $urandom_range(1);
  endtask
  task automatic drive_start();
    start  = 1'b1;
    a_top  = IDX_W'(nx_na - 1);
    b_top  = IDX_W'(nx_nb - 1);
    mode   = imac_mode_e'(nx_mode);
    policy = check_policy_e'(nx_pol);
  endtask

  initial begin
    int pa[10], pb[10], np, k, na, nb, md, pl;
    bit m, exp_last, b2b;
    start = 0; more = 1; a_top = '0; b_top = '0; mode = MODE_FULL; policy = CHECK_EACH;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_true(!active, "idle after reset");

    // Fixed 16x16 full-precision case: order and rate.
    nx_na = 2; nx_nb = 2; nx_mode = 2; nx_pol = 0;
    drive_start();
    @(negedge clk);
    start = 0;
    for (int i = 0; i < 4; i++) begin
      automatic int ea[4] = '{1, 1, 0, 0};
      automatic int eb[4] = '{1, 0, 1, 0};
      #1;
      expect_true(active && ia == IDX_W'(ea[i]) && ib == IDX_W'(eb[i]) && iter == ITER_W'(i + 1),
                  "16x16 order");
      expect_true(last == (i == 3), "16x16 last");
      @(negedge clk);
    end
    expect_true(!active, "16x16 done in four cycles");

    new_cfg();
    drive_start();
    for (int op = 0; op < 3000; op++) begin
      na = nx_na; nb = nx_nb; md = nx_mode; pl = nx_pol;
      // Independent pair list: by falling level, then falling A index.
      np = 0;
      for (int l = na + nb - 2; l >= 0; l--)
        for (int x = na - 1; x >= 0; x--)
          if (l - x >= 0 && l - x < nb) begin
            pa[np] = x; pb[np] = l - x; np++;
          end
      k = 0;
      forever begin
        @(negedge clk);
        start = 1'b0;
        m = ($urandom_range(2) != 0);
        more = m;
        #1;
        exp_last = (k == np - 1) || (md == 0) || (md == 1 && !m && (pl == 0 || k == 0));
        expect_true(active, "active");
        expect_true(ia == IDX_W'(pa[k]) && ib == IDX_W'(pb[k]), "pair order");
        expect_true(level == LVL_W'(pa[k] + pb[k]), "level");
        expect_true(a_is_top == (pa[k] == na - 1) && b_is_top == (pb[k] == nb - 1), "sign byte flags");
        expect_true(iter == ITER_W'(k + 1) && first == (k == 0), "iteration count");
        expect_true(last == exp_last, "last");
        if (exp_last) break;
        // A stray start in the middle of an operation must be ignored.
        if ($urandom_range(7) == 0) begin
          n_stray++;
          new_cfg();
          drive_start();
        end
        k++;
      end
      if (md == 0) n_single++;
      if (md == 2) n_full++;
      if (md == 1 && k < np - 1) n_early++;
      new_cfg();
      b2b = ($urandom_range(1) == 1);
      if (b2b) begin
        n_b2b++;
        drive_start();
      end else begin
        repeat ($urandom_range(2)) begin
          @(negedge clk);
          #1;
          expect_true(!active, "idle between operations");
        end
        @(negedge clk);
        #1;
        expect_true(!active, "idle between operations");
        drive_start();
      end
    end
    expect_true(n_b2b > 0 && n_stray > 0 && n_early > 0 && n_single > 0 && n_full > 0,
                "every mechanism exercised");
    $display("back-to-back=%0d stray-start=%0d early-stop=%0d single=%0d full=%0d",
             n_b2b, n_stray, n_early, n_single, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
