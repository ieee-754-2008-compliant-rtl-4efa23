// bcd2bin4 - converts the four leading digits of the normalized divisor
// (thousands, hundreds, tens, units) into a binary number, the address of the
// reciprocal memory.
//
// Each digit selects a stored binary multiple of its weight: Th = 1000*d3,
// Hu = 100*d2, Te = 10*d1. Th always ends in three zero bits and Hu in two.
// The units digit is therefore merged into them instead of forming a fourth
// operand. Units 0..7 fill the low three bits of Th. Units 8 and 9 set those
// bits to 7 and put 1 or 2 into the low two bits of Hu. The three numbers
// {Th,Ind}, {Hu,Ind} and Te go through a 3:2 carry-save adder and then a
// carry-propagate adder. The document calls the result 13 bits wide, but a
// thousands digit of 9 already needs 14 bits, so the address here is 14 bits
// wide. Combinational.
module bcd2bin4 (
  input  logic [15:0] bcd,               // d3 d2 d1 d0, 8421
  output logic [13:0] bin
);
  logic [13:0] th, hu, te, s, c;
  logic [3:0]  d0;

  always_comb begin
    d0 = bcd[3:0];
    th = 14'(bcd[15:12]) * 14'd1000;
    hu = 14'(bcd[11:8]) * 14'd100;
    te = 14'(bcd[7:4]) * 14'd10;
    if (d0 < 4'd8) begin
      th[2:0] = d0[2:0];
    end else begin
      th[2:0] = 3'b111;
      hu[1:0] = (d0 == 4'd8) ? 2'b01 : 2'b10;
    end
    s   = th ^ hu ^ te;
    c   = ((th & hu) | (th & te) | (hu & te)) << 1;
    bin = s + c;
  end
endmodule
