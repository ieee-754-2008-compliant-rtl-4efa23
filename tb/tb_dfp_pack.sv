// tb_dfp_pack - checks encoding of sign, biased exponent and 16 BCD digits
// into a decimal64 word.
//
// Random finite values (both leading-digit forms, full exponent range) are
// encoded by the unit and by the reference encoder, and the words must be
// identical. Infinity must give the canonical infinity, and a NaN the quiet
// NaN pattern with the given payload in the trailing 50 bits.
module tb_dfp_pack;
  import tb_dfp_ref_pkg::*;
  logic sign, inf, nan;
  logic [9:0] exp_b;
  logic [63:0] coef, f, expf;
  logic [49:0] pl;
  big_t vc;
  int checks = 0, failures = 0;

  dfp_pack dut (.sign(sign), .exp_b(exp_b), .coef(coef), .inf(inf), .nan(nan),
                .nan_payload(pl), .f(f));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      sign = 1'($urandom);
      exp_b = 10'($urandom % 768);
      vc = rand_num(16);
      if (n % 4 == 0) vc = pow10(15) * big_t'(8 + $urandom % 2) + rand_num(15);
      coef = 64'(to_bcd(vc, 16));
      pl = {18'($urandom), 32'($urandom)};
      inf = (n % 5 == 1);
      nan = (n % 5 == 2);
      #1;
      if (nan)      expf = {sign, 6'b111110, 7'b0, pl};
      else if (inf) expf = encode_inf(sign);
      else          expf = encode(sign, int'(exp_b) - 398, vc);
      checks++;
      if (f !== expf) begin
        failures++;
        if (failures < 10) $display("sign %b exp %0d coef %h inf %b nan %b: %h expected %h", sign, exp_b, coef, inf, nan, f, expf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
