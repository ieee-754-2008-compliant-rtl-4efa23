// tb_bcd_adder - checks the carry-extractor BCD adder against integer
// addition.
//
// Random operands of random length, operands with long runs of nines (to
// make the carry travel through many digits) and the extreme values are
// added with random carry-in. Sum and carry-out are compared with the
// integer sum. Runs at the default width of 22 digits.
module tb_bcd_adder;
  import tb_dfp_ref_pkg::*;
  localparam int N = 22;
  logic [4*N-1:0] a, b, sum;
  logic cin, cout;
  big_t va, vb, vs;
  int checks = 0, failures = 0;

  bcd_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      va = rand_num(N);
      vb = rand_num(N);
      case (n % 4)
        1: vb = pow10(N) - 1 - va;                          // all-nine sum
        2: vb = (pow10(N) - 1 - va) - big_t'($urandom % 3); // nearly so
        default: ;
      endcase
      if (n == 0) begin va = pow10(N) - 1; vb = pow10(N) - 1; end
      cin = 1'($urandom);
      a = (4*N)'(to_bcd(va, N));
      b = (4*N)'(to_bcd(vb, N));
      #1;
      vs = va + vb + big_t'(cin);
      checks++;
      if (from_bcd(256'(sum), N) != vs % pow10(N) || cout !== (vs >= pow10(N))) begin
        failures++;
        if (failures < 10) $display("a=%h b=%h cin=%b sum=%h cout=%b", a, b, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
