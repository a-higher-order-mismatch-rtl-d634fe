// Third-order SDM-like IIR filter of one unit element (CRFB loop without a
// quantizer), one per element of the digital encoder.
//
// Structure, as drawn for the method's third-order encoder:
//   stage 1: delaying integrator 1/(z-1) fed by b1*f[n] - a1*x_i[n];
//            its state is t_i[n], brought out for the smallest element selector
//   stage 2: non-delaying integrator z/(z-1) fed by c1*t_i - g1*s3 - a2*x_i
//   stage 3: delaying integrator 1/(z-1) fed by c2*s2 - a3*x_i
//   output : w_i[n] = c3*s3, read from the stage-3 register
// Stages 2 and 3 form a resonator through -g1, which places a pair of NTF
// zeros inside the signal band; stage 1 places one at DC.
//
// Timing: w and t depend only on registers, so the vector quantizer can use
// them in the same cycle; when en is high the states advance by one sample
// using this cycle's f and x_i. Synchronous active-low reset clears all states.
// The coefficient values and the fixed-point format are this design's own
// (see vfms_pkg); structure and signs follow the method.
module crfb3_filter
  import vfms_pkg::*;
#(
  parameter coef_t A1 = A3_1,
  parameter coef_t A2 = A3_2,
  parameter coef_t A3 = A3_3,
  parameter coef_t G1 = G3_1,
  parameter coef_t B1 = ONE,
  parameter coef_t C1 = ONE,
  parameter coef_t C2 = ONE,
  parameter coef_t C3 = ONE
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  state_t f,     // common input f[n]
  input  logic   x_i,   // this element's selection x_i[n]
  output state_t w,     // w_i[n], to the vector quantizer
  output state_t t      // t_i[n], first-integrator output
);

  state_t s1_q, s2_q, s3_q;
  state_t s1_d, s2_d, s3_d;

  assign w = cmul(C3, s3_q);
  assign t = s1_q;

  always_comb begin
    s1_d = s1_q + cmul(B1, f) - fb(A1, x_i);
    s2_d = s2_q + cmul(C1, s1_q) - cmul(G1, s3_q) - fb(A2, x_i);
    s3_d = s3_q + cmul(C2, s2_d) - fb(A3, x_i);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      s3_q <= '0;
    end else if (en) begin
      s1_q <= s1_d;
      s2_q <= s2_d;
      s3_q <= s3_d;
    end
  end

endmodule
