// tb_shift_round - checks the final shift, rounding and exception logic
// against the reference rounding of the testbench package.
//
// A random 17-digit quotient T (leading digit non-zero, often with trailing
// zeros) is given with a random exact flag, biased exponent, tail-zero value,
// rounding mode and sign. The exponent is drawn near 0 (underflow and
// subnormals), near 767 (overflow and exponent clamping) or in between. The
// reference rounds T * 10^(eb - 399) towards the preferred exponent
// eb - 1 + tz(T) - tz_final when exact. When inexact the value lies just above
// T, so it rounds T * 10 + 1. Result word and the overflow, underflow and
// inexact flags are compared. Trailing-zero and underflow shifts are counted
// and must both occur.
module tb_shift_round;
  import tb_dfp_ref_pkg::*;
  import dfp_pkg::*;
  logic [67:0] t;
  logic exact, sign, is_inf, overflow, underflow, inexact, exact_shift, unf_shift;
  logic signed [12:0] eb;
  logic [3:0] tz_final;
  round_mode_e rm;
  logic [63:0] coef;
  logic [9:0] exp_b;
  logic [63:0] got, expq;
  logic [4:0] expf;
  big_t vt;
  int tzt, cov_exact = 0, cov_unf = 0;
  int checks = 0, failures = 0;

  shift_round dut (.t(t), .exact(exact), .eb(eb), .tz_final(tz_final), .rm(rm), .sign(sign),
    .coef(coef), .exp_b(exp_b), .is_inf(is_inf), .overflow(overflow), .underflow(underflow),
    .inexact(inexact), .exact_shift(exact_shift), .unf_shift(unf_shift));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      vt = pow10(16) * big_t'(1 + $urandom % 9) + rand_num(16);
      if ($urandom % 2) vt = vt / pow10($urandom % 17) * pow10(0);
      if (vt < pow10(16)) vt = vt * pow10(17 - ndigits(vt));
      if (n % 5 == 0) vt = vt - vt % pow10($urandom % 17) + (big_t'($urandom % 2) * 5 * pow10($urandom % 3));
      if (vt >= pow10(17)) vt = pow10(16) * 5;
      exact = 1'($urandom);
      sign  = 1'($urandom);
      rm    = round_mode_e'($urandom % 7);
      tz_final = ($urandom % 2) ? 4'd0 : 4'($urandom);
      case ($urandom % 3)
        0: eb = 13'(int'($urandom % 40) - 22);
        1: eb = 13'(750 + int'($urandom % 30));
        default: eb = 13'($urandom % 768);
      endcase
      t = 68'(to_bcd(vt, 17));
      #1;
      tzt = 0;
      while ((vt / pow10(tzt)) % 10 == 0) tzt++;
      if (exact) ref_round(sign, vt, int'(eb) - 399, int'(eb) - 399 + tzt - int'(tz_final), 1, int'(rm), expq, expf);
      else       ref_round(sign, vt * 10 + 1, int'(eb) - 400, 0, 0, int'(rm), expq, expf);
      got = is_inf ? encode_inf(sign) : encode(sign, int'(exp_b) - 398, from_bcd(256'(coef), 16));
      if (exact_shift) cov_exact++;
      if (unf_shift) cov_unf++;
      checks++;
      if (got !== expq || {overflow, underflow, inexact} !== expf[2:0]) begin
        failures++;
        if (failures < 10)
          $display("t=%h exact=%b eb=%0d tzf=%0d rm=%0d s=%b: got %h %b%b%b expected %h %b", t, exact, eb,
                   tz_final, rm, sign, got, overflow, underflow, inexact, expq, expf[2:0]);
      end
    end
    $display("trailing-zero shifts %0d, underflow shifts %0d", cov_exact, cov_unf);
    if (cov_exact == 0 || cov_unf == 0) begin failures++; $display("a shift kind never occurred"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
