// tb_dfp_unpack - checks decoding of decimal64 words into sign, biased
// exponent and 16 BCD digits.
//
// Finite words are built by the reference encoder from random sign, exponent
// and coefficient (both leading-digit forms occur), then decoded by the
// unit and compared field by field. Infinities, quiet and signalling NaNs are
// checked for their flags and sign.
module tb_dfp_unpack;
  import tb_dfp_ref_pkg::*;
  logic [63:0] f, coef;
  logic sign, is_inf, is_nan, is_snan;
  logic [9:0] exp_b;
  big_t vc;
  int e;
  bit s;
  int checks = 0, failures = 0;

  dfp_unpack dut (.f(f), .sign(sign), .exp_b(exp_b), .coef(coef), .is_inf(is_inf),
                  .is_nan(is_nan), .is_snan(is_snan));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      s  = 1'($urandom);
      e  = int'($urandom % 768) - 398;
      vc = rand_num(16);
      if (n % 4 == 0) vc = pow10(15) * big_t'(8 + $urandom % 2) + rand_num(15);
      f = encode(s, e, vc);
      #1;
      checks++;
      if (sign !== s || int'(exp_b) != e + 398 || from_bcd(256'(coef), 16) != vc || is_inf || is_nan || is_snan) begin
        failures++;
        if (failures < 10) $display("f=%h: %b %0d %h", f, sign, exp_b, coef);
      end
      case (n % 3)
        0: f = {s, 5'b11110, 58'($urandom)};
        1: f = {s, 6'b111110, 57'($urandom)};
        default: f = {s, 6'b111111, 57'($urandom)};
      endcase
      #1;
      checks++;
      if (sign !== s || is_inf !== (n % 3 == 0) || is_nan !== (n % 3 != 0) || is_snan !== (n % 3 == 2)) begin
        failures++;
        if (failures < 10) $display("special f=%h: inf %b nan %b snan %b", f, is_inf, is_nan, is_snan);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
