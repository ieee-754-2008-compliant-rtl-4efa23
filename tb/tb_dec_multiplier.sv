// tb_dec_multiplier - checks the 38 x 16 digit radix-10 multiplier: the two
// 4221 output vectors must add up to X * Y.
//
// Operands are random BCD numbers of random length, plus the all-nines
// corners and the two constants the divider multiplies by (5^53 and 2^22).
// Runs at the default size.
module tb_dec_multiplier;
  import tb_dfp_ref_pkg::*;
  localparam int M = 38, N = 16;
  logic [4*M-1:0] x;
  logic [4*N-1:0] y;
  logic [4*(M+N)-1:0] m1, m2;
  big_t vx, vy;
  int checks = 0, failures = 0;

  dec_multiplier dut (.x(x), .y(y), .m1(m1), .m2(m2));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      vx = rand_num(M);
      vy = rand_num(N);
      if (n % 10 == 1) vx = big_t'(5) ** 53;
      if (n % 10 == 2) vx = big_t'(1) << 22;
      if (n == 3) begin vx = pow10(M) - 1; vy = pow10(N) - 1; end
      x = (4*M)'(to_bcd(vx, M));
      y = (4*N)'(to_bcd(vy, N));
      #1;
      checks++;
      if ((from_4221(256'(m1), M + N) + from_4221(256'(m2), M + N)) % pow10(M + N) != vx * vy) begin
        failures++;
        if (failures < 10) $display("x=%h y=%h wrong product", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
