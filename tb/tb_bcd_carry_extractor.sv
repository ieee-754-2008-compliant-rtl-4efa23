// tb_bcd_carry_extractor - checks the parallel decimal carry network against
// a ripple recurrence c[i+1] = g[i] | (p[i] & c[i]).
//
// The digit propagate and generate words are random, with g and p never set
// together (they cannot be for a real digit sum), and cin is random. Long
// propagate runs are made likely so carries travel far. Every carry bit is
// compared. Runs at the default width.
module tb_bcd_carry_extractor;
  localparam int N = 22;
  logic [N-1:0] p, g;
  logic cin;
  logic [N:0] c, exp_c;
  int checks = 0, failures = 0;

  bcd_carry_extractor dut (.p(p), .g(g), .cin(cin), .c(c));

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      g = N'($urandom);
      p = N'($urandom) | (n % 2 ? N'($urandom) : '0) | (n % 3 == 0 ? ~N'(0) : '0);
      p = p & ~g;
      if (n % 5 == 0) g = g & N'($urandom) & N'($urandom);
      cin = 1'($urandom);
      #1;
      exp_c[0] = cin;
      for (int i = 0; i < N; i++) exp_c[i+1] = g[i] | (p[i] & exp_c[i]);
      checks++;
      if (c !== exp_c) begin
        failures++;
        if (failures < 10) $display("p=%h g=%h cin=%b c=%h expected %h", p, g, cin, c, exp_c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
