// dfp_divider - IEEE 754-2008 decimal64 divider (DPD encoding) built around
// a very-high-radix Accurate Quotient Approximation (AQA) fixed-point
// divider. It retires three quotient digits per iteration.
//
// Interface: assert start for one cycle with fx (dividend), fy (divisor) and
// rm (rounding mode) while busy is low. Exactly 15 cycles later done pulses
// for one cycle with the result in fq and the exception flags in flags. fq and
// flags then hold until the next result. Synchronous active-high reset.
// start is ignored while busy.
//
// Cycle by cycle, after the document's operation sequence:
//   1  unpack DPD to BCD, normalize both coefficients (leading zeros out),
//      intermediate exponent, operand classes, result sign (Sx xor Sy)
//   2  reciprocal memory lookup from Y's four leading digits;
//      shared multiplier: X' * 5^53           (X' = X without trailing zeros)
//   3  shared multiplier: Y * (1/Yh) -> divisor prime Y'; count X's 2s
//   4  resolve Y', build the multiples of Y' and 1/Yh, load R = X, Q = 0;
//      shared multiplier: X' * 2^22
//   5  AQA iteration 1; count X's 5s; shared multiplier: Y' * 5^53 (Y' here =
//      Y without trailing zeros)
//   6  AQA iteration 2; count Y's 2s; shared multiplier: Y' * 2^22
//   7  AQA iteration 3; count Y's 5s
//   8-11 AQA iterations 4-7 (21 quotient digits)
//   12 resolve the quotient, keep 17 digits Q' (16 + guard), form Q'' = Q'+1
//   13 shared multiplier: Q'' * Y
//   14 remainder X - Q''*Y: zero test and sign
//   15 choose Q'' (remainder zero: exact) or Q' (remainder negative), shift,
//      round, flags, special values, pack to DPD
// One 38 x 16-digit radix-10 multiplier is shared by the divisor prime, the
// four factor counts and the remainder, as in the document. Special operands
// (NaN, infinity, zeros) take the same 15 cycles. Document choices: the
// algorithm, the digit counts and widths named in it, the cycle plan and the
// selection rule. This design's own choices: the rounding-mode encoding (see
// dfp_pkg), the NaN payload rule (the first NaN operand's payload, quieted),
// and x/inf = 0 with the smallest exponent.
module dfp_divider
  import dfp_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [63:0] fx,
  input  logic [63:0] fy,
  input  logic [2:0]  rm,
  output logic        busy,
  output logic        done,
  output logic [63:0] fq,
  output dfp_flags_t  flags
);
  localparam int unsigned QW = 28;

  // ---------------- cycle 1: unpack, normalize, exponent ----------------
  logic           sx_c, sy_c;
  logic [EW-1:0]  ex_c, ey_c;
  logic [4*P-1:0] x_c, y_c, xn_c, yn_c;
  logic           xinf_c, xnan_c, xsnan_c, yinf_c, ynan_c, ysnan_c;
  logic [P-1:0]   wx_c, wy_c;
  logic [4:0]     lzx_c, lzy_c;
  logic           xz_c, yz_c;
  logic signed [12:0] eint_c;
  logic [EW-1:0]  ezero_c;
  logic           unused_ovf, unused_unf;
  logic [12:0]    unused_unf_val;

  dfp_unpack u_ux (.f(fx), .sign(sx_c), .exp_b(ex_c), .coef(x_c),
                   .is_inf(xinf_c), .is_nan(xnan_c), .is_snan(xsnan_c));
  dfp_unpack u_uy (.f(fy), .sign(sy_c), .exp_b(ey_c), .coef(y_c),
                   .is_inf(yinf_c), .is_nan(ynan_c), .is_snan(ysnan_c));
  operand_normalizer #(.P(P)) u_nx (.x(x_c), .w(wx_c), .x_norm(xn_c), .lzv(lzx_c), .zf(xz_c));
  operand_normalizer #(.P(P)) u_ny (.x(y_c), .w(wy_c), .x_norm(yn_c), .lzv(lzy_c), .zf(yz_c));
  exponent_calc u_exp (.ex(ex_c), .ey(ey_c), .lzx(lzx_c), .lzy(lzy_c), .e_int(eint_c),
                       .e_zero(ezero_c), .ovf(unused_ovf), .unf(unused_unf), .unf_val(unused_unf_val));

  typedef enum logic [2:0] {
    K_NORMAL, K_NAN, K_INVALID, K_INF, K_ZERO_MIN, K_DIVZERO, K_ZERO
  } kind_e;

  kind_e kind_c, kind_q;
  always_comb begin
    if (xnan_c | ynan_c)                                    kind_c = K_NAN;
    else if ((xinf_c & yinf_c) | (xz_c & yz_c & !xinf_c & !yinf_c)) kind_c = K_INVALID;
    else if (xinf_c)                                        kind_c = K_INF;
    else if (yinf_c)                                        kind_c = K_ZERO_MIN;
    else if (yz_c)                                          kind_c = K_DIVZERO;
    else if (xz_c)                                          kind_c = K_ZERO;
    else                                                    kind_c = K_NORMAL;
  end

  // registered operand state
  logic           sign_q, snan_q;
  logic [49:0]    payload_q;
  round_mode_e    rm_q;
  logic [4*P-1:0] x_q, y_q, xn_q, yn_q;
  logic [P-1:0]   wx_q, wy_q;
  logic signed [12:0] eint_q;
  logic [EW-1:0]  ezero_q;

  // ---------------- sequencing ----------------
  logic [3:0] cyc;                       // 0 idle, 2..15 cycle of the operation
  assign busy = (cyc != 4'd0);

  // ---------------- shared 38 x 16 multiplier ----------------
  logic [4*38-1:0] mul_a, tz_a;
  logic [4*P-1:0]  mul_b, tz_b;
  logic [4*54-1:0] m1, m2, m1_q, m2_q;
  logic [1:0]      tz_sel;
  logic [4*18-1:0] qpp_q;                 // Q'' = Q' + 1, 18 digits
  logic [15:0]     recip;

  always_comb begin
    unique case (cyc)
      4'd4:    tz_sel = 2'd1;
      4'd5:    tz_sel = 2'd2;
      4'd6:    tz_sel = 2'd3;
      default: tz_sel = 2'd0;
    endcase
    unique case (cyc)
      4'd3:    begin mul_a = (4*38)'(yn_q);  mul_b = (4*P)'(recip); end
      4'd13:   begin mul_a = (4*38)'(qpp_q); mul_b = yn_q;          end
      default: begin mul_a = tz_a;           mul_b = tz_b;          end
    endcase
  end

  dec_multiplier #(.M(38), .N(16)) u_mul (.x(mul_a), .y(mul_b), .m1(m1), .m2(m2));

  always_ff @(posedge clk) begin
    m1_q <= m1;
    m2_q <= m2;
  end

  // ---------------- tail zeroes detector ----------------
  logic [3:0] tzx, tzy, tz_final;
  logic [3:0] tz_cap;
  assign tz_cap = {cyc == 4'd7, cyc == 4'd6, cyc == 4'd5, cyc == 4'd3};

  tail_zero_detector u_tzd (
    .clk(clk), .rst(rst), .x(x_q), .y(y_q), .wx(wx_q), .wy(wy_q), .sel(tz_sel),
    .mul_a(tz_a), .mul_b(tz_b), .m1(m1_q), .m2(m2_q), .cap(tz_cap),
    .tz_x(tzx), .tz_y(tzy), .tz_final(tz_final));

  // ---------------- fixed-point divider ----------------
  logic [4*QW-1:0] q_s, q_h2;
  logic            fpd_step;
  assign fpd_step = (cyc >= 4'd5) && (cyc <= 4'd11);

  fixed_point_divider #(.QW(QW)) u_fpd (
    .clk(clk), .rst(rst), .xn(xn_q), .yn(yn_q),
    .lookup(cyc == 4'd2), .yp_load(cyc == 4'd4), .step(fpd_step),
    .m1(m1_q[4*20-1:0]), .m2(m2_q[4*20-1:0]),
    .recip(recip), .q_s(q_s), .q_h2(q_h2));

  // ---------------- cycle 12: resolve Q', form Q'' ----------------
  logic [4*QW-1:0] qs8, qh8, qsum;
  logic [4*17-1:0] t_c, t_q;
  logic [4*17-1:0] qpp_c;
  logic            qpp_cout, lt_c, lt_q, unused_qcout;

  always_comb
    for (int i = 0; i < QW; i++) begin
      qs8[4*i +: 4] = val4221(q_s[4*i +: 4]);
      qh8[4*i +: 4] = val4221(q_h2[4*i +: 4]);
    end
  bcd_adder #(.N(QW)) u_qres (.a(qs8), .b(qh8), .cin(1'b0), .sum(qsum), .cout(unused_qcout));
  assign lt_c = (qsum[4*26 +: 4] == 4'd0);        // quotient below 1: X < Y
  assign t_c  = lt_c ? qsum[4*9 +: 4*17] : qsum[4*10 +: 4*17];
  bcd_adder #(.N(17)) u_qinc (.a(t_c), .b('0), .cin(1'b1), .sum(qpp_c), .cout(qpp_cout));

  // ---------------- cycle 14: remainder X*10^k - Q''*Y ----------------
  localparam int unsigned RMW = 35;
  logic [3:0][4*RMW-1:0] rv;
  logic [4*RMW-1:0] rs, rh2, rs8, rh8, rsum;
  logic [$clog2(RMW+1)-1:0] unused_rcnt;
  logic rzero_c, rneg_c, rzero_q, rneg_q, unused_rcout;

  always_comb begin
    logic [4*RMW-1:0] xs;
    xs = lt_q ? ((4*RMW)'(xn_q) << (4*17)) : ((4*RMW)'(xn_q) << (4*16));
    for (int i = 0; i < RMW; i++) rv[0][4*i +: 4] = enc4221(xs[4*i +: 4]);
    rv[1] = ~m1_q[4*RMW-1:0];
    rv[2] = ~m2_q[4*RMW-1:0];
    rv[3] = (4*RMW)'(enc4221(4'd2));              // two nines complements -> tens complements
  end
  dec_csa_tree #(.W(RMW), .NV(4)) u_rtree (.vin(rv), .s(rs), .h2(rh2));
  zero_vector_counter #(.W(RMW)) u_rzero (.s(rs), .h2(rh2), .count(unused_rcnt), .all_zero(rzero_c));
  always_comb
    for (int i = 0; i < RMW; i++) begin
      rs8[4*i +: 4] = val4221(rs[4*i +: 4]);
      rh8[4*i +: 4] = val4221(rh2[4*i +: 4]);
    end
  bcd_adder #(.N(RMW)) u_radd (.a(rs8), .b(rh8), .cin(1'b0), .sum(rsum), .cout(unused_rcout));
  assign rneg_c = (rsum[4*RMW-1 -: 4] == 4'd9);

  // ---------------- cycle 15: choose, shift, round, pack ----------------
  logic [4*17-1:0] qc;
  logic signed [12:0] eb;
  logic [4*P-1:0] coef_r;
  logic [EW-1:0]  exp_r;
  logic inf_r, ovf_r, unf_r, inx_r, exact_shift, unf_shift;
  logic [63:0] fq_c;
  dfp_flags_t  flags_c;

  // Q'' = 10^17 happens only when X = Y scaled (T all nines, lt set): it is
  // then written as 10^16 at the exponent of X >= Y.
  logic qpp_wrap;
  assign qpp_wrap = !rneg_q && qpp_q[4*17];
  assign qc = rneg_q ? t_q : (qpp_wrap ? {4'd1, {16{4'd0}}} : qpp_q[4*17-1:0]);
  assign eb = eint_q - ((lt_q && !qpp_wrap) ? 13'sd1 : 13'sd0);

  shift_round u_sr (.t(qc), .exact(rzero_q), .eb(eb), .tz_final(tz_final), .rm(rm_q),
                    .sign(sign_q), .coef(coef_r), .exp_b(exp_r), .is_inf(inf_r),
                    .overflow(ovf_r), .underflow(unf_r), .inexact(inx_r),
                    .exact_shift(exact_shift), .unf_shift(unf_shift));

  logic           p_inf, p_nan;
  logic [EW-1:0]  p_exp;
  logic [4*P-1:0] p_coef;
  always_comb begin
    p_inf = 1'b0; p_nan = 1'b0; p_exp = '0; p_coef = '0;
    flags_c = '0;
    unique case (kind_q)
      K_NAN:      begin p_nan = 1'b1; flags_c.invalid = snan_q; end
      K_INVALID:  begin p_nan = 1'b1; flags_c.invalid = 1'b1; end
      K_INF:      p_inf = 1'b1;
      K_ZERO_MIN: p_exp = '0;
      K_DIVZERO:  begin p_inf = 1'b1; flags_c.div_by_zero = 1'b1; end
      K_ZERO:     p_exp = ezero_q;
      default: begin
        p_inf = inf_r; p_exp = exp_r; p_coef = coef_r;
        flags_c.overflow  = ovf_r;
        flags_c.underflow = unf_r;
        flags_c.inexact   = inx_r;
      end
    endcase
  end

  logic nan_sign;
  assign nan_sign = (kind_q == K_NAN) ? sign_q : 1'b0;
  dfp_pack u_pack (.sign(p_nan ? nan_sign : sign_q), .exp_b(p_exp), .coef(p_coef),
                   .inf(p_inf), .nan(p_nan), .nan_payload(payload_q), .f(fq_c));

  // ---------------- registers ----------------
  always_ff @(posedge clk) begin
    if (rst) begin
      cyc <= '0; done <= 1'b0; fq <= '0; flags <= '0;
      sign_q <= 1'b0; snan_q <= 1'b0; payload_q <= '0; rm_q <= RM_TIES_EVEN;
      x_q <= '0; y_q <= '0; xn_q <= '0; yn_q <= '0; wx_q <= '0; wy_q <= '0;
      eint_q <= '0; ezero_q <= '0; kind_q <= K_NORMAL;
      t_q <= '0; qpp_q <= '0; lt_q <= 1'b0; rzero_q <= 1'b0; rneg_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (cyc == 4'd0) begin
        if (start) begin
          cyc     <= 4'd2;
          kind_c_to_q();
        end
      end else if (cyc == 4'd15) begin
        cyc   <= 4'd0;
        done  <= 1'b1;
        fq    <= fq_c;
        flags <= flags_c;
      end else begin
        cyc <= cyc + 4'd1;
      end
      if (cyc == 4'd12) begin
        t_q   <= t_c;
        qpp_q <= {3'd0, qpp_cout, qpp_c};
        lt_q  <= lt_c;
      end
      if (cyc == 4'd14) begin
        rzero_q <= rzero_c;
        rneg_q  <= rneg_c;
      end
    end
  end

  // cycle-1 capture of the operands
  task automatic kind_c_to_q();
    kind_q    <= kind_c;
    sign_q    <= (xnan_c | ynan_c) ? (xnan_c ? sx_c : sy_c) : (sx_c ^ sy_c);
    snan_q    <= xsnan_c | ysnan_c;
    payload_q <= xnan_c ? fx[49:0] : fy[49:0];
    rm_q      <= round_mode_e'(rm);
    x_q <= x_c;  y_q <= y_c;  xn_q <= xn_c;  yn_q <= yn_c;
    wx_q <= wx_c; wy_q <= wy_c;
    eint_q  <= eint_c;
    ezero_q <= ezero_c;
  endtask

  // handshake rules
  always_ff @(posedge clk)
    if (!rst) begin
      assert (!(done && busy)) else $error("done raised while still busy");
    end
endmodule
