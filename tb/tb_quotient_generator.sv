// tb_quotient_generator - checks one AQA quotient step, Q * 1000 + Rh / Yh,
// with Q in carry-save form.
//
// Rh is a random 6-digit number and the reciprocal a random 4-digit one
// (given as its ten multiples in random 4221 codings). The incoming Q is a
// random value below 10^25 split into two random 4221 vectors. The two
// output vectors must add up, modulo 10^28, to Q * 1000 + Rh * S. Runs at
// the default size.
module tb_quotient_generator;
  import tb_dfp_ref_pkg::*;
  localparam int QW = 28;
  logic [23:0] rh;
  logic [9:0][19:0] sm;
  logic [4*QW-1:0] q_s, q_h2, q_s_new, q_h2_new;
  big_t vq, va, vrh, vs, expv;
  int checks = 0, failures = 0;

  quotient_generator dut (.rh(rh), .sm(sm), .q_s(q_s), .q_h2(q_h2), .q_s_new(q_s_new),
                          .q_h2_new(q_h2_new));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      vrh = rand_num(6);
      vs  = 1000 + big_t'($urandom % 9000);
      if (n % 11 == 0) begin vrh = 999999; vs = 9999; end
      vq = rand_num(25);
      va = rand_num(25) % (vq + 1);
      rh = 24'(to_bcd(vrh, 6));
      for (int k = 0; k < 10; k++) sm[k] = 20'(to_4221(vs * k, 5));
      q_s  = (4*QW)'(to_4221(va, QW));
      q_h2 = (4*QW)'(to_4221(vq - va, QW));
      #1;
      expv = (vq * 1000 + vrh * vs) % pow10(QW);
      checks++;
      if ((from_4221(256'(q_s_new), QW) + from_4221(256'(q_h2_new), QW)) % pow10(QW) != expv) begin
        failures++;
        if (failures < 10) $display("rh=%h s=%0d q=%0d wrong", rh, vs, vq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
