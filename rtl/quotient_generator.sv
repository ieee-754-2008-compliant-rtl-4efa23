// quotient_generator - one AQA quotient step, Q_new = Q * 1000 + Rh * (1/Yh),
// with Q held in carry-save form (two 4221 vectors) so no carry ever
// propagates through it.
//
// The six digits of Rh select multiples of the 4-digit stored reciprocal (the
// 4 x 6 partial-product generation). A reduction tree turns the partial
// products into the intermediate quotient IQ, as two 10-digit vectors IQs and
// IQ2h. A second reduction tree then adds four vectors: the two quotient
// vectors shifted three digits up, IQs and IQ2h. Its outputs are the new
// quotient vectors. QW = 28 digits hold the whole 7-iteration quotient.
//
// The document also corrects a "hidden carry" out of the tenth digit of
// IQs + IQ2h. Here IQs and IQ2h are both non-negative and, modulo 10^10,
// add up to IQ, which is below 10^10. Their plain sum is therefore IQ itself
// and never carries out of the tenth digit, so no correction is built.
// Combinational.
module quotient_generator
  import dfp_pkg::*;
#(
  parameter int unsigned QW  = 28,       // quotient digits
  parameter int unsigned SW  = 4,        // reciprocal digits
  parameter int unsigned RHW = 6         // digits of Rh
) (
  input  logic [4*RHW-1:0]         rh,      // 8421
  input  logic [9:0][4*(SW+1)-1:0] sm,      // k * (1/Yh), 4221
  input  logic [4*QW-1:0]          q_s,     // quotient, 4221
  input  logic [4*QW-1:0]          q_h2,
  output logic [4*QW-1:0]          q_s_new,
  output logic [4*QW-1:0]          q_h2_new
);
  localparam int unsigned IW = SW + RHW;
  logic [RHW-1:0][4*IW-1:0] pp;
  logic [4*IW-1:0] iq_s, iq_h2;
  logic [3:0][4*QW-1:0] v4;

  always_comb
    for (int j = 0; j < RHW; j++) begin
      logic [3:0] d;
      d = rh[4*j +: 4];
      pp[j] = (4*IW)'(sm[(d <= 4'd9) ? d : 4'd0]) << (4 * j);
    end

  dec_csa_tree #(.W(IW), .NV(RHW)) u_iq (.vin(pp), .s(iq_s), .h2(iq_h2));

  always_comb begin
    v4[0] = q_s << 12;
    v4[1] = q_h2 << 12;
    v4[2] = (4*QW)'(iq_s);
    v4[3] = (4*QW)'(iq_h2);
  end

  dec_csa_tree #(.W(QW), .NV(4)) u_q (.vin(v4), .s(q_s_new), .h2(q_h2_new));
endmodule
