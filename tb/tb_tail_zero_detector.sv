// tb_tail_zero_detector - runs the tail-zero detection of an exact quotient
// with the shared multiplier in the loop.
//
// Random coefficients X and Y, built from factors 2, 5 and 10 and a random
// odd cofactor, are applied with their digit flags. The four products are
// selected in the divider's order (X*5^53, X*2^22, Y*5^53, Y*2^22) on a
// 38 x 16 dec_multiplier, and each count is captured one clock later. The
// trailing zeros of X and Y and the final value
// max(0, TZx - TZy - max(0, Y2 - X2) - max(0, Y5 - X5)), limited to 15, are
// compared with integer factor counts of the operands.
module tb_tail_zero_detector;
  import tb_dfp_ref_pkg::*;
  logic clk = 0, rst = 1;
  logic [63:0] x, y, mul_b;
  logic [15:0] wx, wy;
  logic [1:0] sel;
  logic [151:0] mul_a;
  logic [215:0] m1, m2;
  logic [3:0] cap, tz_x, tz_y, tz_final;
  big_t vx, vy;
  int checks = 0, failures = 0;

  tail_zero_detector dut (.clk(clk), .rst(rst), .x(x), .y(y), .wx(wx), .wy(wy), .sel(sel),
    .mul_a(mul_a), .mul_b(mul_b), .m1(m1), .m2(m2), .cap(cap), .tz_x(tz_x), .tz_y(tz_y),
    .tz_final(tz_final));
  dec_multiplier #(.M(38), .N(16)) u_mul (.x(mul_a), .y(mul_b), .m1(m1), .m2(m2));
  always #5 clk = ~clk;

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic big_t rand_coef();
    big_t v;
    do begin
      v = big_t'(1 + 2 * ($urandom % 500));
      if ($urandom % 3 == 0) v = v * rand_num(6);
      if (v % 2 == 0 || v % 5 == 0) v = v + 1;
      case ($urandom % 3)
        0: v = v << ($urandom % 30);
        1: v = v * (big_t'(5) ** ($urandom % 15));
        default: ;
      endcase
      v = v * pow10($urandom % 10);
    end while (v == 0 || v >= pow10(16));
    return v;
  endfunction

  function automatic int count_f(input big_t v, input int f);
    int n = 0;
    while (v % f == 0) begin v = v / f; n++; end
    return n;
  endfunction

  initial begin
    int tx, ty, x2, x5, y2, y5, fin;
    x = '0; y = '0; wx = '0; wy = '0; sel = '0; cap = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 1500; n++) begin
      vx = rand_coef();
      vy = rand_coef();
      x = 64'(to_bcd(vx, 16));
      y = 64'(to_bcd(vy, 16));
      for (int i = 0; i < 16; i++) begin
        wx[i] = x[4*i +: 4] != 0;
        wy[i] = y[4*i +: 4] != 0;
      end
      for (int k = 0; k < 4; k++) begin
        sel = 2'(k);
        cap = 4'b0001 << k;
        @(negedge clk);
      end
      cap = '0;
      tx = count_f(vx, 10);
      ty = count_f(vy, 10);
      x2 = count_f(vx / pow10(tx), 2);
      x5 = count_f(vx / pow10(tx), 5);
      y2 = count_f(vy / pow10(ty), 2);
      y5 = count_f(vy / pow10(ty), 5);
      fin = tx - ty - (y2 > x2 ? y2 - x2 : 0) - (y5 > x5 ? y5 - x5 : 0);
      fin = fin < 0 ? 0 : (fin > 15 ? 15 : fin);
      checks++;
      if (int'(tz_x) != tx || int'(tz_y) != ty || int'(tz_final) != fin) begin
        failures++;
        if (failures < 10) $display("x=%0d y=%0d tz %0d %0d final %0d expected %0d", vx, vy, tz_x, tz_y, tz_final, fin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
