// fixed_point_divider - the decimal fixed-point divider at the core of the
// unit. It divides two normalized 16-digit coefficients with the Accurate
// Quotient Approximation (AQA) recurrence and retires three quotient digits
// per iteration.
//
//   Q_i = Q_{i-1} * 1000 + Rh * (1/Yh)        R_i = (R_{i-1} - Rh * Y') * 1000
//
// Sequence, one control strobe per cycle from the caller:
//   lookup  - the divisor's four leading digits address the reciprocal
//             memory (binary address from bcd2bin4); the entry S arrives in
//             the next cycle and its multiples are registered in the cycle
//             after.
//   yp_load - the shared radix-10 multiplier has just formed Y * S as two
//             4221 vectors (m1, m2); a 20-digit BCD adder resolves them into
//             the divisor prime Y', whose multiples are registered.
//             R is loaded with the dividend and Q is cleared.
//   step    - one iteration of the remainder and quotient modules.
// Seven iterations give 21 quotient digits. The quotient is q = Q / 10^26,
// with 0.1 < q < 10, and it is never above the true quotient, by less than
// 2 * 10^-20. (The document's bound is 10^-17.) The quotient is left in
// carry-save form; the caller resolves it. rst clears all state.
module fixed_point_divider
  import dfp_pkg::*;
#(
  parameter int unsigned QW = 28         // quotient register digits
) (
  input  logic            clk,
  input  logic            rst,
  input  logic [4*P-1:0]  xn,            // normalized dividend, 8421
  input  logic [4*P-1:0]  yn,            // normalized divisor, 8421
  input  logic            lookup,
  input  logic            yp_load,
  input  logic            step,
  input  logic [4*20-1:0] m1,            // low 20 digits of the multiplier output
  input  logic [4*20-1:0] m2,
  output logic [15:0]     recip,         // stored 1/Yh digits, 8421
  output logic [4*QW-1:0] q_s,           // quotient, two 4221 vectors
  output logic [4*QW-1:0] q_h2
);
  localparam int unsigned RW = 25;
  localparam int unsigned YW = 20;

  logic [13:0] addr;
  logic [9:0][4*5-1:0]      sm, sm_q;
  logic [9:0][4*(YW+1)-1:0] ypm, ypm_q;
  logic [4*YW-1:0] m1_8, m2_8, yp;
  logic [4*RW-1:0] r_q, r_new;
  logic [4*QW-1:0] q_s_new, q_h2_new;
  logic unused_cout;

  bcd2bin4  u_b2b (.bcd(yn[4*P-1 -: 16]), .bin(addr));
  recip_rom u_rom (.clk(clk), .en(lookup), .addr(addr), .data(recip));

  // multiples of the stored reciprocal and of the divisor prime
  dec_multiples #(.M(4))  u_sm  (.x(recip), .mult(sm));

  always_comb
    for (int i = 0; i < YW; i++) begin
      m1_8[4*i +: 4] = val4221(m1[4*i +: 4]);
      m2_8[4*i +: 4] = val4221(m2[4*i +: 4]);
    end
  bcd_adder #(.N(YW)) u_ypadd (.a(m1_8), .b(m2_8), .cin(1'b0), .sum(yp), .cout(unused_cout));
  dec_multiples #(.M(YW)) u_ypm (.x(yp), .mult(ypm));

  partial_remainder #(.RW(RW), .YW(YW), .RHW(6)) u_pr (.r(r_q), .ypm(ypm_q), .r_new(r_new));

  quotient_generator #(.QW(QW), .SW(4), .RHW(6)) u_qg (
    .rh(r_q[4*RW-1 -: 24]), .sm(sm_q), .q_s(q_s), .q_h2(q_h2),
    .q_s_new(q_s_new), .q_h2_new(q_h2_new));

  always_ff @(posedge clk) begin
    if (rst) begin
      sm_q  <= '0;
      ypm_q <= '0;
      r_q   <= '0;
      q_s   <= '0;
      q_h2  <= '0;
    end else begin
      if (yp_load) begin
        sm_q  <= sm;
        ypm_q <= ypm;
        r_q   <= {4'd0, xn, 32'd0};          // R0 = X: one integer digit, 24 fraction digits
        q_s   <= '0;
        q_h2  <= '0;
      end else if (step) begin
        r_q   <= {r_new[4*RW-13:0], 12'd0}; // times 1000; the top three digits are zero
        q_s   <= q_s_new;
        q_h2  <= q_h2_new;
      end
    end
  end
endmodule
