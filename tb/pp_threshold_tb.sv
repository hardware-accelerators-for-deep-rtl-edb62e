// pp_threshold_tb: checks the partial-product threshold test.
//
// Every reachable partial product (-32640 .. 65025) is compared with the
// default threshold 1639, with the bounds 0 and 2^17-1, and with random
// thresholds; "more" must be 1 exactly when |pp| is below the threshold.
module pp_threshold_tb;
  import imac_pkg::*;

  logic signed [PP_W-1:0] pp;
  logic [THRESH_W-1:0]    thr;
  logic                   more;
  int checks = 0, failures = 0;

  pp_threshold dut (.pp(pp), .thresh(thr), .more(more));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int v, int t);
    int mag;
    pp  = PP_W'(v);
    thr = THRESH_W'(t);
    #1;
    mag = (v < 0) ? -v : v;
    checks++;
    if (more !== (mag < t)) begin
      failures++;
      if (failures < 10) $display("FAIL pp=%0d thr=%0d more=%0b", v, t, more);
    end
  endtask

  initial begin
    for (int v = -32640; v <= 65025; v++) check(v, 1639);
    for (int v = -1700; v <= 1700; v++) begin
      check(v, 0);
      check(v, 131071);
    end
    repeat (20000) check(int'($urandom_range(97665)) - 32640, int'($urandom_range(70000)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
