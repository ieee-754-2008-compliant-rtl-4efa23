// tb_dec_multiples - checks the ten multiples 0..9 X produced in 4221 code.
//
// X is a random BCD number of up to 38 digits, plus all-nines and zero. The
// value of each 39-digit 4221 multiple is compared with k * X. Runs at the
// default width.
module tb_dec_multiples;
  import tb_dfp_ref_pkg::*;
  localparam int M = 38;
  logic [4*M-1:0] x;
  logic [9:0][4*(M+1)-1:0] mult;
  big_t vx;
  int checks = 0, failures = 0;

  dec_multiples dut (.x(x), .mult(mult));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      vx = rand_num(M);
      if (n == 0) vx = pow10(M) - 1;
      if (n == 1) vx = 0;
      x = (4*M)'(to_bcd(vx, M));
      #1;
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (from_4221(256'(mult[k]), M + 1) != vx * k) begin
          failures++;
          if (failures < 10) $display("x=%h k=%0d got %h", x, k, mult[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
