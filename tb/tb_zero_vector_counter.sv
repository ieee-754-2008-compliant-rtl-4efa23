// tb_zero_vector_counter - checks the trailing-zero count of S + 2H read
// from the two 4221 vectors without adding them.
//
// A target sum with a chosen number of trailing zeros (0 to 54, including
// all-zero) is split at random into two values, each coded in random 4221
// digits. The split makes carries run through the trailing zeros in every
// pattern the zero-vector rules cover. count must be the trailing zero digits
// of the sum modulo 10^54, and all_zero must be set exactly when the sum is
// 0 modulo 10^54. Runs at the default width.
module tb_zero_vector_counter;
  import tb_dfp_ref_pkg::*;
  localparam int W = 54;
  logic [4*W-1:0] s, h2;
  logic [5:0] count;
  logic all_zero;
  big_t tot, a;
  int z, expz;
  int checks = 0, failures = 0;

  zero_vector_counter dut (.s(s), .h2(h2), .count(count), .all_zero(all_zero));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 10000; n++) begin
      z = $urandom % (W + 1);
      tot = (rand_num(W) * pow10(z)) % pow10(W);
      a = rand_num(W);
      if (n % 4 == 0) a = a % pow10(z + 1);                  // carries through the zeros
      s  = (4*W)'(to_4221(a, W));
      h2 = (4*W)'(to_4221((tot + pow10(W) - a % pow10(W)) % pow10(W), W));
      #1;
      expz = 0;
      if (tot == 0) expz = W;
      else while ((tot / pow10(expz)) % 10 == 0) expz++;
      checks++;
      if (int'(count) != expz || all_zero !== (tot == 0)) begin
        failures++;
        if (failures < 10) $display("sum=%0d count=%0d expected %0d", tot, count, expz);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
