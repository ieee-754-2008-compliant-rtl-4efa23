// tb_dfp_divider - end-to-end test of the decimal64 divider.
//
// Random and directed operands go through the divider one at a time, with
// every rounding mode. Each result (all 64 bits) and its five flags are
// compared with tb_dfp_ref_pkg::ref_div, a wide-integer model of IEEE 754-2008
// decimal64 division. The latency from start to done must be 15 cycles. The
// stimulus covers exact quotients with trailing zeros and preferred
// exponents, clamping at the largest exponent, overflow, underflow,
// subnormal results, ties, and NaN, infinity and zero operands. Coverage
// counters record how often each internal mechanism was exercised: the
// trailing-zero and underflow shifts, rounding increments,
// selection of Q' or Q'', and X below or above Y. A mechanism never seen
// counts as a failure. The divider runs at its default (full) size. NOPS sets
// the number of random operations.
module tb_dfp_divider;
  import tb_dfp_ref_pkg::*;

  localparam int NOPS = 3000;

  logic clk = 0, rst = 1, start = 0;
  logic [63:0] fx, fy, fq;
  logic [2:0]  rm;
  logic busy, done;
  dfp_pkg::dfp_flags_t flags;

  dfp_divider dut (.clk(clk), .rst(rst), .start(start), .fx(fx), .fy(fy), .rm(rm),
                   .busy(busy), .done(done), .fq(fq), .flags(flags));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (NOPS * 20 + 20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism coverage
  int cov_exact_shift = 0, cov_unf_shift = 0, cov_ovf = 0, cov_unf = 0;
  int cov_pick_qpp = 0, cov_pick_q = 0, cov_lt = 0, cov_ge = 0, cov_round_up = 0;
  int cov_nan = 0, cov_inv = 0, cov_dz = 0, cov_inf = 0, cov_zero = 0;
  int cov_rm [7];

  always @(posedge clk) begin
    if (dut.cyc == 4'd15 && dut.kind_q == 0) begin
      if (dut.exact_shift) cov_exact_shift++;
      if (dut.unf_shift) cov_unf_shift++;
      if (dut.rneg_q) cov_pick_q++; else cov_pick_qpp++;
      if (dut.lt_q) cov_lt++; else cov_ge++;
      if (dut.u_sr.inc) cov_round_up++;
    end
  end

  function automatic big_t rand_coef(input int maxlen);
    big_t c = 0;
    int len = 1 + $urandom % maxlen;
    for (int i = 0; i < len; i++) c = c * 10 + big_t'($urandom % 10);
    return c;
  endfunction

  function automatic int rand_exp(input int spread);
    return int'($urandom % (2 * spread + 1)) - spread;
  endfunction

  task automatic run(input logic [63:0] a, input logic [63:0] b, input int mode);
    logic [63:0] exp_q;
    logic [4:0]  exp_f;
    longint t0;
    @(negedge clk);
    fx = a; fy = b; rm = 3'(mode); start = 1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    ref_div(a, b, mode, exp_q, exp_f);
    checks++;
    if (cycle - t0 != 15) begin
      failures++;
      $display("latency %0d, expected 15", cycle - t0);
    end
    if (fq !== exp_q || flags !== exp_f) begin
      failures++;
      if (failures < 20)
        $display("MISMATCH fx=%h fy=%h rm=%0d got %h/%b expected %h/%b", a, b, mode, fq, flags, exp_q, exp_f);
    end
    cov_rm[mode]++;
    if (exp_f[4]) cov_inv++;
    if (exp_f[3]) cov_dz++;
    if (exp_f[2]) cov_ovf++;
    if (exp_f[1]) cov_unf++;
    if (exp_q[62:58] == 5'b11111) cov_nan++;
    if (exp_q[62:58] == 5'b11110) cov_inf++;
  endtask

  initial begin
    big_t cx, cy;
    int ex, ey, mode, sel;
    fx = '0; fy = '0; rm = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // directed cases
    run(encode(0, 0, 6), encode(0, 0, 3), 0);                 // 6/3 = 2
    run(encode(0, 0, 60), encode(0, 0, 3), 0);                // 20, preferred exponent
    run(encode(0, 0, 1), encode(0, 0, 3), 0);                 // 0.333...
    run(encode(0, 0, 2), encode(0, 0, 3), 1);                 // 0.666...7
    run(encode(1, 0, 1), encode(0, 0, 8), 4);                 // -0.125
    run(encode(0, 0, 100), encode(0, 0, 8), 0);               // 12.5
    run(encode(0, 0, 1000), encode(0, 0, 4), 0);              // 250
    run(encode(0, 369, pow10(16) - 1), encode(0, -398, 1), 0); // overflow
    run(encode(0, 369, pow10(16) - 1), encode(0, -398, 1), 4); // overflow to max
    run(encode(0, -398, 1), encode(0, 369, 3), 2);            // underflow to min subnormal
    run(encode(0, -390, 5), encode(0, 0, 2), 0);              // subnormal result
    run(encode(0, 360, 1), encode(0, 0, 1), 0);               // clamp exponent, exact
    run(encode(0, 0, 0), encode(0, 5, 7), 0);                 // zero dividend
    run(encode(0, 0, 7), encode(0, 0, 0), 0);                 // division by zero
    run(encode(0, 0, 0), encode(0, 0, 0), 0);                 // 0/0 invalid
    run(encode_inf(0), encode_inf(1), 0);                     // inf/inf invalid
    run(encode_inf(1), encode(0, 0, 7), 0);                   // inf
    run(encode(0, 3, 7), encode_inf(0), 0);                   // zero
    run({1'b0, 6'b111110, 7'b0, 50'h123}, encode(0, 0, 1), 0); // qNaN
    run(encode(0, 0, 1), {1'b1, 6'b111111, 7'b0, 50'h77}, 0);  // sNaN
    run(encode(0, 0, 15), encode(0, 0, 10), 0);               // 1.5 tie cases
    run(encode(0, 0, 25), encode(0, 0, 1), 0);
    // random cases
    for (int n = 0; n < NOPS; n++) begin
      sel  = $urandom % 8;
      mode = $urandom % 7;
      cx = rand_coef(16);
      cy = rand_coef(16);
      if (cy == 0) cy = 7;
      if (cx == 0 && sel != 7) cx = 3;
      ex = rand_exp(20);
      ey = rand_exp(20);
      case (sel)
        0, 1: ;                                             // general
        2: begin                                            // exact quotient
             big_t k = rand_coef(4);
             cy = rand_coef(8);
             if (cy == 0) cy = 2;
             cx = cy * k * pow10($urandom % 4);
             if (cx >= pow10(16) || cx == 0) cx = cy;
           end
        3: begin                                            // products of 2 and 5
             cy = big_t'(1) << ($urandom % 20);
             if ($urandom % 2) cy = pow10($urandom % 8) / (big_t'(1) << ($urandom % 4));
             if (cy == 0) cy = 5;
             cx = rand_coef(10) * pow10($urandom % 6);
             if (cx == 0 || cx >= pow10(16)) cx = 1000;
           end
        4: begin ex = 300 + $urandom % 70; ey = -398 + int'($urandom % 60); end  // overflow zone
        5: begin ex = -398 + int'($urandom % 40); ey = rand_exp(30) + 10; end    // underflow zone
        6: begin cx = rand_coef(16) * pow10(0); cy = cx + 1; end                 // near 1
        default: cx = 0;                                                          // zero dividend
      endcase
      if (cx >= pow10(16)) cx = pow10(16) - 1;
      if (cy >= pow10(16)) cy = pow10(16) - 1;
      run(encode($urandom % 2, ex, cx), encode($urandom % 2, ey, cy), mode);
    end
    $display("coverage: exact_shift=%0d underflow_shift=%0d pick_Q''=%0d pick_Q'=%0d X<Y=%0d X>=Y=%0d round_up=%0d",
             cov_exact_shift, cov_unf_shift, cov_pick_qpp, cov_pick_q, cov_lt, cov_ge, cov_round_up);
    $display("coverage: overflow=%0d underflow=%0d invalid=%0d div_by_zero=%0d nan=%0d inf=%0d",
             cov_ovf, cov_unf, cov_inv, cov_dz, cov_nan, cov_inf);
    foreach (cov_rm[i]) if (cov_rm[i] == 0) begin failures++; $display("rounding mode %0d never used", i); end
    if (cov_exact_shift == 0) begin failures++; $display("trailing-zero shift never seen"); end
    if (cov_unf_shift == 0)   begin failures++; $display("underflow shift never seen"); end
    if (cov_pick_qpp == 0 || cov_pick_q == 0) begin failures++; $display("quotient selection not covered"); end
    if (cov_lt == 0 || cov_ge == 0) begin failures++; $display("X<Y / X>=Y not covered"); end
    if (cov_round_up == 0)    begin failures++; $display("rounding increment never seen"); end
    if (cov_ovf == 0 || cov_unf == 0 || cov_inv == 0 || cov_dz == 0 || cov_nan == 0 || cov_inf == 0)
      begin failures++; $display("exception not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
