// dec_multiples - all multiples 0X..9X of an M-digit 8421 BCD multiplicand,
// each delivered in 4221 code with M+1 digits.
//
// As in the document, 2X is built by recoding X to 5211 and shifting it one
// bit left. 4X and 8X repeat that doubling on 4221 vectors. 5X is formed
// digit by digit. Digit i of 5X is 5 when x_i is odd, plus the tens digit of
// 5*x_{i-1}, which is x_{i-1}/2. That sum never exceeds 9, so no carry arises.
// 3X, 6X, 7X and 9X come from the single-digit product table: an "individuals"
// vector (units of d*x_i) and a "tens" vector (tens of d*x_i, one digit up) are
// added by a bcd_adder and recoded to 4221. The document's printed bit
// equations for 2X and 5X do not reproduce its own rules, so the rules are
// implemented by value instead. Purely combinational.
module dec_multiples
  import dfp_pkg::*;
#(
  parameter int unsigned M = 38          // multiplicand digits
) (
  input  logic [4*M-1:0]           x,    // 8421 BCD
  output logic [9:0][4*(M+1)-1:0]  mult  // mult[k] = k*x, 4221
);
  localparam int unsigned MO = M + 1;

  function automatic logic [4*MO-1:0] dbl4221(input logic [4*MO-1:0] h);
    logic [4*MO-1:0] r;
    for (int i = 0; i < MO; i++) r[4*i +: 4] = enc5211(val4221(h[4*i +: 4]));
    return {r[4*MO-2:0], 1'b0};
  endfunction

  logic [4*MO-1:0] x4221, x2, x4, x8, x5;
  logic [3:0][4*MO-1:0] ind, ten, sum8421;
  localparam int unsigned DK [4] = '{3, 6, 7, 9};

  always_comb begin
    for (int i = 0; i < MO; i++) begin
      logic [3:0] xi, xl;
      xi = (i < M) ? x[4*i +: 4] : 4'd0;
      xl = (i > 0) ? x[4*(i-1) +: 4] : 4'd0;
      x4221[4*i +: 4] = enc4221(xi);
      x5[4*i +: 4]    = enc4221((xi[0] ? 4'd5 : 4'd0) + {1'b0, xl[3:1]});
      for (int k = 0; k < 4; k++) begin
        logic [7:0] pi, pl;
        pi = 8'(xi) * 8'(DK[k]);
        pl = 8'(xl) * 8'(DK[k]);
        ind[k][4*i +: 4] = 4'(pi % 8'd10);
        ten[k][4*i +: 4] = 4'(pl / 8'd10);
      end
    end
    x2 = dbl4221(x4221);
    x4 = dbl4221(x2);
    x8 = dbl4221(x4);
  end

  for (genvar k = 0; k < 4; k++) begin : g_add
    logic unused_cout;
    bcd_adder #(.N(MO)) u_add (.a(ind[k]), .b(ten[k]), .cin(1'b0),
                               .sum(sum8421[k]), .cout(unused_cout));
  end

  always_comb begin
    mult[0] = '0;
    mult[1] = x4221;
    mult[2] = x2;
    mult[4] = x4;
    mult[5] = x5;
    mult[8] = x8;
    for (int i = 0; i < MO; i++) begin
      mult[3][4*i +: 4] = enc4221(sum8421[0][4*i +: 4]);
      mult[6][4*i +: 4] = enc4221(sum8421[1][4*i +: 4]);
      mult[7][4*i +: 4] = enc4221(sum8421[2][4*i +: 4]);
      mult[9][4*i +: 4] = enc4221(sum8421[3][4*i +: 4]);
    end
  end
endmodule
