// byte_mult_tb: exhaustive check of the 8x8-bit partial-product multiplier.
//
// Every pair of bytes is multiplied under all four signedness
// combinations and compared with the product of the bytes read as
// integers (signed bytes as -128..127, unsigned as 0..255).
module byte_mult_tb;
  import imac_pkg::*;

  logic [7:0]             a, b;
  logic                   as, bs;
  logic signed [PP_W-1:0] p;
  int checks = 0, failures = 0;

  byte_mult dut (.a(a), .a_signed(as), .b(b), .b_signed(bs), .p(p));

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int av, bv, exp_p;
    for (int s = 0; s < 4; s++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a  = 8'(i);
          b  = 8'(j);
          as = s[0];
          bs = s[1];
          #1;
          av    = (as && i >= 128) ? i - 256 : i;
          bv    = (bs && j >= 128) ? j - 256 : j;
          exp_p = av * bv;
          checks++;
          if (int'(p) != exp_p) begin
            failures++;
            if (failures < 10)
              $display("FAIL a=%0d(%0b) b=%0d(%0b) p=%0d exp=%0d", i, as, j, bs, p, exp_p);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
