// tail_zero_detector - how many trailing zeros an exact quotient keeps at
// the preferred exponent Ex - Ey ("Final Result Tail Zeroes Value").
//
// Trailing zero digits of X and Y are read from the digit flag words W_X and
// W_Y. The same decode shifts each coefficient right past its trailing zeros
// ("normalized to right"). The factors 2 and 5 of each right-normalized
// coefficient are counted on the shared 38 x 16 radix-10 multiplier.
// Multiplying by 5^53 turns every factor 2 into a trailing zero, and
// multiplying by 2^22 does the same for every factor 5. (53 and 22 are the
// largest powers of 2 and 5 below 10^16.) zero_vector_counter reads the
// trailing zeros straight from the multiplier's two output vectors. The caller
// sequences four products (sel: X*5^53, X*2^22, Y*5^53, Y*2^22), each in the
// cycle before its count is captured with cap[3:0] = {Y5, Y2, X5, X2}. The
// final value follows the document's binary network:
// tz = max(0, TZx - TZy - max(0, Y2 - X2) - max(0, Y5 - X5)), limited to 15.
module tail_zero_detector
  import dfp_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [4*P-1:0]  x,             // dividend coefficient, 8421
  input  logic [4*P-1:0]  y,             // divisor coefficient, 8421
  input  logic [P-1:0]    wx,            // digit non-zero flags of x
  input  logic [P-1:0]    wy,
  input  logic [1:0]      sel,           // 0: X*5^53 1: X*2^22 2: Y*5^53 3: Y*2^22
  output logic [4*38-1:0] mul_a,         // multiplicand for the shared multiplier
  output logic [4*P-1:0]  mul_b,         // multiplier operand
  input  logic [4*54-1:0] m1,            // multiplier output vectors, 4221
  input  logic [4*54-1:0] m2,
  input  logic [3:0]      cap,           // capture {Y5, Y2, X5, X2}
  output logic [3:0]      tz_x,          // trailing zero digits of x
  output logic [3:0]      tz_y,
  output logic [3:0]      tz_final
);
  // 5^53 = 11102230246251565404236316680908203125, 2^22 = 4194304
  localparam logic [4*38-1:0] FIVE53 = 152'h11102230246251565404236316680908203125;
  localparam logic [4*38-1:0] TWO22  = 152'h4194304;

  logic [4*P-1:0] xr, yr;
  logic [5:0] cnt, x2, x5, y2, y5;
  logic [5:0] cnt_raw;
  logic unused_all_zero;

  function automatic logic [4:0] trailing(input logic [P-1:0] w);
    logic [4:0] n;
    n = 5'(P);
    for (int i = P - 1; i >= 0; i--) if (w[i]) n = 5'(i);
    return n;
  endfunction

  logic [4:0] tzx5, tzy5;
  always_comb begin
    tzx5 = trailing(wx);
    tzy5 = trailing(wy);
    xr   = x >> (4 * tzx5);
    yr   = y >> (4 * tzy5);
    tz_x = tzx5[3:0];
    tz_y = tzy5[3:0];
    mul_a = sel[0] ? TWO22 : FIVE53;
    mul_b = sel[1] ? yr : xr;
  end

  zero_vector_counter #(.W(54)) u_zv (.s(m1), .h2(m2), .count(cnt_raw), .all_zero(unused_all_zero));
  assign cnt = cnt_raw;

  always_ff @(posedge clk) begin
    if (rst) begin
      x2 <= '0; x5 <= '0; y2 <= '0; y5 <= '0;
    end else begin
      if (cap[0]) x2 <= cnt;
      if (cap[1]) x5 <= cnt;
      if (cap[2]) y2 <= cnt;
      if (cap[3]) y5 <= cnt;
    end
  end

  // Fig.-4.15-style combination
  logic signed [7:0] tzd, d2, d5, fin;
  always_comb begin
    tzd = $signed({4'b0, tz_x}) - $signed({4'b0, tz_y});
    d2  = $signed({2'b0, y2}) - $signed({2'b0, x2});
    d5  = $signed({2'b0, y5}) - $signed({2'b0, x5});
    if (d2 < 0) d2 = '0;
    if (d5 < 0) d5 = '0;
    fin = tzd - d2 - d5;
    if (fin < 0)                  tz_final = '0;
    else if (fin > 8'sd15)        tz_final = 4'd15;
    else                          tz_final = fin[3:0];
  end
endmodule
