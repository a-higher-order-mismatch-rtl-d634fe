// Shared types and constants of the vector-feedback mismatch-shaping encoder.
//
// The encoder runs every filter in signed two's-complement fixed point:
// states carry STATE_W bits of which FRAC are fraction bits, and coefficients
// are COEF_W-bit signed numbers with the same FRAC fraction bits, so a product
// of a coefficient and a state is brought back to state scale by an arithmetic
// right shift of FRAC bits (truncation toward minus infinity).
//
// The coefficient values below are this design's own. The filter structures
// (integrator types, coefficient names, signs) follow the third- and
// fourth-order cascade-of-resonators-with-distributed-feedback (CRFB) loops of
// the method; their noise transfer functions have out-of-band gain 1.5
// (third order) and 1.4 (fourth order), as the method prescribes, and were
// designed here for an oversampling ratio of 64: NTF zeros at the optimum
// in-band positions, Butterworth-type poles scaled to that peak gain, all
// c coefficients 1, each g = 2 - 2cos(zero frequency), and the a coefficients
// chosen so that the loop filter from x_i to w_i equals 1 - 1/NTF.
package vfms_pkg;

  localparam int FRAC    = 20;
  localparam int STATE_W = 40;
  localparam int COEF_W  = 24;

  typedef logic signed [STATE_W-1:0] state_t;
  typedef logic signed [COEF_W-1:0]  coef_t;

  localparam coef_t ONE = coef_t'(1 << FRAC);

  // Third-order filter (NTF peak gain 1.5): zeros at z=1 and at
  // +/- sqrt(3/5)*pi/64 rad.
  localparam coef_t A3_1 = 24'sd47655;   // 0.045448
  localparam coef_t A3_2 = 24'sd255598;  // 0.243757
  localparam coef_t A3_3 = 24'sd582913;  // 0.555909
  localparam coef_t G3_1 = 24'sd1516;    // 0.00144557

  // Fourth-order filter (NTF peak gain 1.4): zero pairs at 0.861*pi/64
  // (first resonator) and 0.340*pi/64 rad (second resonator).
  localparam coef_t A4_1 = 24'sd3008;    // 0.002869
  localparam coef_t A4_2 = 24'sd32876;   // 0.031353
  localparam coef_t A4_3 = 24'sd187206;  // 0.178533
  localparam coef_t A4_4 = 24'sd514140;  // 0.490323
  localparam coef_t G4_1 = 24'sd1873;    // 0.00178657
  localparam coef_t G4_2 = 24'sd292;     // 0.00027851

  // Coefficient times state, rescaled to state format.
  function automatic state_t cmul(coef_t c, state_t s);
    logic signed [STATE_W+COEF_W-1:0] p;
    p = (STATE_W+COEF_W)'(c) * (STATE_W+COEF_W)'(s);
    return state_t'(p >>> FRAC);
  endfunction

  // Feedback term a*x_i for a one-bit selection: a in state format or zero.
  function automatic state_t fb(coef_t a, logic xi);
    return xi ? state_t'(a) : '0;
  endfunction

  // Unit-element weight in units of 2^-16 of a nominal element, with a fixed
  // pseudo-random relative error uniform in +/- mis_ppm parts per million.
  function automatic int unsigned elem_weight(int idx, int mis_ppm);
    int unsigned h;
    int          e;
    h = 32'h9E37_79B9 * (idx + 1);
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    e = int'(h % (2 * mis_ppm + 1)) - mis_ppm;
    return int'(65536 + (longint'(65536) * e) / 1000000);
  endfunction

endpackage
