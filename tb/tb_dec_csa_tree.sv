// tb_dec_csa_tree - checks the 4221 carry-save reduction tree: the two
// output vectors must add up to the sum of the 16 input vectors.
//
// Every input is a random 52-digit value in a random 4221 coding, so the
// total stays below 10^54. Now and then inputs are all-nines or zero. The
// values of s and h2 are added and compared with the total. Runs at the
// default size (54 digits, 16 vectors).
module tb_dec_csa_tree;
  import tb_dfp_ref_pkg::*;
  localparam int W = 54, NV = 16;
  logic [NV-1:0][4*W-1:0] vin;
  logic [4*W-1:0] s, h2;
  big_t total;
  int checks = 0, failures = 0;

  dec_csa_tree dut (.vin(vin), .s(s), .h2(h2));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    big_t v;
    for (int n = 0; n < 3000; n++) begin
      total = 0;
      for (int k = 0; k < NV; k++) begin
        v = rand_num(W - 2);
        if ($urandom % 8 == 0) v = pow10(W - 2) - 1;
        if ($urandom % 8 == 0) v = 0;
        total += v;
        vin[k] = (4*W)'(to_4221(v, W));
      end
      #1;
      checks++;
      if ((from_4221(256'(s), W) + from_4221(256'(h2), W)) % pow10(W) != total) begin
        failures++;
        if (failures < 10) $display("sum mismatch s=%h h2=%h", s, h2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
