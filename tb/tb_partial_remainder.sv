// tb_partial_remainder - checks one AQA remainder step, R - Rh * Y'.
//
// R is a random 25-digit BCD number and Y' a random 20-digit divisor prime
// no larger than 1 (10^19 in integer units), given as its ten multiples in
// random 4221 codings. Rh is the six leading digits of R, so in integer
// units the result must be R - Rh * Y', which is never negative. Corners:
// Y' = 1 exactly, R with all nines, R = 0. Runs at the default size.
module tb_partial_remainder;
  import tb_dfp_ref_pkg::*;
  localparam int RW = 25, YW = 20;
  logic [4*RW-1:0] r, r_new;
  logic [9:0][4*(YW+1)-1:0] ypm;
  big_t vr, vy, rh, expv;
  int checks = 0, failures = 0;

  partial_remainder dut (.r(r), .ypm(ypm), .r_new(r_new));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      vr = rand_num(RW);
      vy = pow10(19) - rand_num(19);
      if (n % 9 == 0) vy = pow10(19);
      if (n % 9 == 1) vr = pow10(RW) - 1;
      if (n == 2) vr = 0;
      r = (4*RW)'(to_bcd(vr, RW));
      for (int k = 0; k < 10; k++) ypm[k] = (4*(YW+1))'(to_4221(vy * k, YW + 1));
      rh = vr / pow10(RW - 6);
      #1;
      expv = vr - rh * vy;
      checks++;
      if (from_bcd(256'(r_new), RW) != expv) begin
        failures++;
        if (failures < 10) $display("r=%h y'=%0d r_new=%h", r, vy, r_new);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
