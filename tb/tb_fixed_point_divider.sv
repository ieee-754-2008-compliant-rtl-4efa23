// tb_fixed_point_divider - runs the AQA fixed-point division on its own.
//
// A random normalized dividend Xn and divisor Yn (16 digits, leading digit
// non-zero) are applied. The stimulus follows the divider's schedule: a
// lookup cycle reads the reciprocal S of the divisor's 4-digit prefix, then
// the testbench supplies Yn * S as the multiplier result (split into two
// random 4221 vectors, low 20 digits) with yp_load, then seven step cycles.
// The stored reciprocal must be floor(10^7 / (prefix + 1)). The final
// quotient Q = q_s + q_h2 must satisfy 0 <= Xn * 10^26 - Q * Yn < 10^7 * Yn,
// i.e. Q / 10^26 is below Xn / Yn by less than 10^-19. Corner operands:
// equal operands, the largest ratio and prefixes 1000 and 9999.
module tb_fixed_point_divider;
  import tb_dfp_ref_pkg::*;
  localparam int QW = 28;
  logic clk = 0, rst = 1, lookup = 0, yp_load = 0, step = 0;
  logic [63:0] xn, yn;
  logic [79:0] m1, m2;
  logic [15:0] recip;
  logic [4*QW-1:0] q_s, q_h2;
  big_t vx, vy, vs, prod, split, vq, diff;
  int checks = 0, failures = 0;

  fixed_point_divider dut (.clk(clk), .rst(rst), .xn(xn), .yn(yn), .lookup(lookup),
    .yp_load(yp_load), .step(step), .m1(m1), .m2(m2), .recip(recip), .q_s(q_s),
    .q_h2(q_h2));
  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic big_t rand_norm();
    return pow10(15) * big_t'(1 + $urandom % 9) + rand_num(15);
  endfunction

  initial begin
    xn = '0; yn = '0; m1 = '0; m2 = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 2000; n++) begin
      vx = rand_norm();
      vy = rand_norm();
      case (n)
        0: vy = vx;
        1: begin vx = pow10(16) - 1; vy = pow10(15); end
        2: vy = pow10(15);
        3: vy = pow10(16) - 1;
        4: begin vx = pow10(15); vy = pow10(16) - 1; end
        default: ;
      endcase
      xn = 64'(to_bcd(vx, 16));
      yn = 64'(to_bcd(vy, 16));
      lookup = 1;
      @(negedge clk);
      lookup = 0;
      vs = from_bcd(256'(recip), 4);
      checks++;
      if (vs != 10000000 / (vy / pow10(12) + 1)) begin
        failures++;
        $display("prefix %0d: reciprocal %h", vy / pow10(12), recip);
      end
      prod  = (vy * vs) % pow10(20);
      split = rand_num(20) % (prod + 1);
      m1 = 80'(to_4221(split, 20));
      m2 = 80'(to_4221(prod - split, 20));
      yp_load = 1;
      @(negedge clk);
      yp_load = 0;
      step = 1;
      repeat (7) @(negedge clk);
      step = 0;
      vq = (from_4221(256'(q_s), QW) + from_4221(256'(q_h2), QW)) % pow10(QW);
      checks++;
      if (vx * pow10(26) < vq * vy || vx * pow10(26) - vq * vy >= pow10(7) * vy) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d Q=%0d", vx, vy, vq);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
