// tb_exponent_calc - checks the quotient exponent arithmetic.
//
// All leading-zero counts and random biased exponents, including both ends
// of the range, are applied. The intermediate exponent must equal
// Ex - Ey + LZy - LZx + 398 - 15. The zero-result exponent Ex - Ey + 398 is
// clamped to 0..767. The overflow and underflow flags and the underflow
// distance are checked against the same integer.
module tb_exponent_calc;
  logic [9:0] ex, ey, e_zero;
  logic [4:0] lzx, lzy;
  logic signed [12:0] e_int;
  logic ovf, unf;
  logic [12:0] unf_val;
  int ei, ez;
  int checks = 0, failures = 0;

  exponent_calc dut (.ex(ex), .ey(ey), .lzx(lzx), .lzy(lzy), .e_int(e_int), .e_zero(e_zero),
                     .ovf(ovf), .unf(unf), .unf_val(unf_val));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      ex = 10'($urandom % 768);
      ey = 10'($urandom % 768);
      if (n % 10 == 0) ex = (n % 20 == 0) ? 10'd767 : 10'd0;
      if (n % 10 == 5) ey = (n % 20 == 5) ? 10'd767 : 10'd0;
      lzx = 5'($urandom % 16);
      lzy = 5'($urandom % 16);
      #1;
      ei = int'(ex) - int'(ey) + int'(lzy) - int'(lzx) + 398 - 15;
      ez = int'(ex) - int'(ey) + 398;
      ez = ez < 0 ? 0 : (ez > 767 ? 767 : ez);
      checks++;
      if (int'(e_int) != ei || int'(e_zero) != ez || ovf !== (ei > 767) || unf !== (ei < 0) ||
          int'(unf_val) != (ei < 0 ? -ei : 0)) begin
        failures++;
        if (failures < 10) $display("ex=%0d ey=%0d lzx=%0d lzy=%0d e_int=%0d e_zero=%0d", ex, ey, lzx, lzy, e_int, e_zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
