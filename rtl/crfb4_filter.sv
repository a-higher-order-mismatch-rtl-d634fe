// Fourth-order SDM-like IIR filter of one unit element (CRFB loop without a
// quantizer and with zero input), one per element of the digital encoder.
//
// Structure, as drawn for the method's fourth-order encoder:
//   stage 1: non-delaying integrator z/(z-1) fed by -g1*s2 - a1*x_i[n]
//   stage 2: delaying integrator 1/(z-1) fed by c1*s1 - a2*x_i
//   stage 3: non-delaying integrator z/(z-1) fed by c2*s2 - g2*s4 - a3*x_i
//   stage 4: delaying integrator 1/(z-1) fed by c3*s3 - a4*x_i
//   output : w_i[n] = c4*s4, read from the stage-4 register
// Two resonators (through -g1 and -g2) place two pairs of NTF zeros inside
// the signal band.
//
// Timing: w depends only on registers; when en is high the states advance by
// one sample using this cycle's x_i. Synchronous active-low reset clears all
// states. Coefficient values and number format are this design's own (see
// vfms_pkg); structure and signs follow the method.
module crfb4_filter
  import vfms_pkg::*;
#(
  parameter coef_t A1 = A4_1,
  parameter coef_t A2 = A4_2,
  parameter coef_t A3 = A4_3,
  parameter coef_t A4 = A4_4,
  parameter coef_t G1 = G4_1,
  parameter coef_t G2 = G4_2,
  parameter coef_t C1 = ONE,
  parameter coef_t C2 = ONE,
  parameter coef_t C3 = ONE,
  parameter coef_t C4 = ONE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  logic   x_i,   // this element's selection x_i[n]
  output state_t w      // w_i[n], to the vector quantizer
);

  state_t s1_q, s2_q, s3_q, s4_q;
  state_t s1_d, s2_d, s3_d, s4_d;

  assign w = cmul(C4, s4_q);

  always_comb begin
    s1_d = s1_q - cmul(G1, s2_q) - fb(A1, x_i);
    s2_d = s2_q + cmul(C1, s1_d) - fb(A2, x_i);
    s3_d = s3_q + cmul(C2, s2_q) - cmul(G2, s4_q) - fb(A3, x_i);
    s4_d = s4_q + cmul(C3, s3_d) - fb(A4, x_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
      s4_q <= '0;
    end else if (en) begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      s3_q <= s3_d;
      s4_q <= s4_d;
    end
  end

endmodule
