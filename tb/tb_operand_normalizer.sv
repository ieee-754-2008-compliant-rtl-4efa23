// tb_operand_normalizer - checks the leading-zero count and left shift of a
// 16-digit coefficient.
//
// Coefficients of every length from 0 to 16 digits, with random digits and
// zero runs inside, are applied. The digit flags, the zero count, the
// normalized coefficient (value times 10^lz, MSD non-zero) and the zero flag
// are compared with values computed from the integer. Runs at P = 16.
module tb_operand_normalizer;
  import tb_dfp_ref_pkg::*;
  localparam int P = 16;
  logic [4*P-1:0] x, x_norm;
  logic [P-1:0] w, exp_w;
  logic [4:0] lzv;
  logic zf;
  big_t v;
  int nd;
  int checks = 0, failures = 0;

  operand_normalizer dut (.x(x), .w(w), .x_norm(x_norm), .lzv(lzv), .zf(zf));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      v = rand_num(P);
      if (n % 7 == 0) v = v * pow10($urandom % 8) % pow10(P);
      if (n == 0) v = 0;
      x = (4*P)'(to_bcd(v, P));
      #1;
      nd = ndigits(v);
      for (int i = 0; i < P; i++) exp_w[i] = x[4*i +: 4] != 0;
      checks++;
      if (w !== exp_w || zf !== (v == 0) ||
          (v != 0 && (int'(lzv) != P - nd || from_bcd(256'(x_norm), P) != v * pow10(P - nd)))) begin
        failures++;
        if (failures < 10) $display("x=%h w=%h lz=%0d xn=%h zf=%b", x, w, lzv, x_norm, zf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
