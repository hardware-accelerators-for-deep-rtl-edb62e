// shift_acc_tb: checks the scaling adder and accumulator.
//
// Random partial products at random significance levels are added, with
// random "load" (restart the sum) and idle cycles, and the accumulator is
// compared with a 64-bit integer model every cycle. Extreme partial
// products at the highest level are included.
module shift_acc_tb;
  import imac_pkg::*;

  logic                   clk = 0, rst_n = 0;
  logic                   en, load;
  logic signed [PP_W-1:0] pp;
  logic [LVL_W-1:0]       level;
  logic signed [63:0]     acc;
  longint                 model;
  int checks = 0, failures = 0;

  shift_acc #(.ACC_W(64)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .load(load), .pp(pp), .level(level), .acc(acc)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    en = 0; load = 0; pp = '0; level = '0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (acc != 0) failures++;
    for (int n = 0; n < 5000; n++) begin
      case ($urandom_range(9))
        0: v = -32640;
        1: v = 65025;
        default: v = int'($urandom_range(97665)) - 32640;
      endcase
      en    = ($urandom_range(4) != 0);
      load  = ($urandom_range(15) == 0);
      pp    = PP_W'(v);
      level = LVL_W'($urandom_range(5));
      @(posedge clk);
      if (en) model = (load ? 64'sd0 : model) + (longint'(v) <<< (8 * int'(level)));
      @(negedge clk);
      checks++;
      if (acc != model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d acc=%0d exp=%0d", n, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
