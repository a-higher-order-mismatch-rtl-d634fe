// Reference models for the mismatch-shaping encoder testbenches.
//
// ref_encoder recomputes the whole encoder sample by sample in 64-bit
// integers, written directly from the filter difference equations, with the
// vector quantizer done as repeated "pick the largest unselected element"
// instead of the rank comparison used in the RTL. ef_source is a small
// first-order error-feedback modulator with M output levels that stands in
// for the sigma-delta modulator producing x[n] from a sine wave, and
// sdm_source a third- or fourth-order one. The helpers at the end measure
// signal-to-noise ratio and mismatch-error power inside the signal band with
// a Hann-windowed DFT.
package vfms_ref_pkg;
  import vfms_pkg::*;

  function automatic longint rmul(longint c, longint s);
    return (c * s) >>> FRAC;
  endfunction

  function automatic longint rfb(longint a, bit x);
    return x ? a : 64'sd0;
  endfunction

  class ref_encoder;
    int     order;
    int     n_el;
    longint s1[], s2[], s3[], s4[];
    longint w[];
    longint f;

    function new(int order_, int n_el_);
      order = order_;
      n_el  = n_el_;
      s1 = new[n_el]; s2 = new[n_el]; s3 = new[n_el]; s4 = new[n_el];
      w  = new[n_el];
      reset();
    endfunction

    function void reset();
      foreach (s1[i]) begin
        s1[i] = 0; s2[i] = 0; s3[i] = 0; s4[i] = 0;
      end
      f = 0;
    endfunction

    // Filter outputs seen by the quantizer in the current sample.
    function void outputs();
      foreach (w[i]) w[i] = (order == 3) ? s3[i] : s4[i];
    endfunction

    // Select k largest, ties to lower index.
    static function bit [63:0] pick(longint v[], int k);
      bit [63:0] sel = '0;
      for (int r = 0; r < k && r < v.size(); r++) begin
        int best = -1;
        foreach (v[i])
          if (!sel[i] && (best < 0 || v[i] > v[best])) best = i;
        sel[best] = 1'b1;
      end
      return sel;
    endfunction

    // One sample: returns the selection and advances the states.
    function bit [63:0] step(int x);
      bit [63:0] sel;
      outputs();
      sel = pick(w, x);
      if (order == 3) begin
        longint m = s1[0];
        foreach (s1[i]) if (s1[i] < m) m = s1[i];
        f = -m;
        foreach (s1[i]) begin
          longint n2;
          n2    = s2[i] + s1[i] - rmul(longint'(G3_1), s3[i]) - rfb(longint'(A3_2), sel[i]);
          s3[i] = s3[i] + n2 - rfb(longint'(A3_3), sel[i]);
          s2[i] = n2;
          s1[i] = s1[i] + f - rfb(longint'(A3_1), sel[i]);
        end
      end else begin
        foreach (s1[i]) begin
          longint n1, n3;
          n1    = s1[i] - rmul(longint'(G4_1), s2[i]) - rfb(longint'(A4_1), sel[i]);
          n3    = s3[i] + s2[i] - rmul(longint'(G4_2), s4[i]) - rfb(longint'(A4_3), sel[i]);
          s2[i] = s2[i] + n1 - rfb(longint'(A4_2), sel[i]);
          s4[i] = s4[i] + n3 - rfb(longint'(A4_4), sel[i]);
          s1[i] = n1;
          s3[i] = n3;
        end
      end
      return sel;
    endfunction
  endclass

  // First-order error-feedback modulator: x[n] = round(u[n] + e[n-1]),
  // u[n] = (M-1)/2 * (1 + amp*sin(2*pi*fin/fs*n)), clipped to 0..M-1.
  class ef_source;
    int  m;
    real amp, fnorm, e;
    int  n;

    function new(int m_, real amp_, real fnorm_);
      m = m_; amp = amp_; fnorm = fnorm_; e = 0.0; n = 0;
    endfunction

    function int next();
      real u, v;
      int  q;
      u = (m - 1) / 2.0 * (1.0 + amp * $sin(2.0 * 3.14159265358979 * fnorm * n));
      v = u + e;
      q = int'($floor(v + 0.5));
      if (q < 0) q = 0;
      if (q > m - 1) q = m - 1;
      e = v - q;
      n++;
      return q;
    endfunction
  endclass

  // Stand-in for the sigma-delta modulator whose feedback DAC this is: an
  // error-feedback modulator with M output levels and the same noise transfer
  // function NTF(z) = B(z)/A(z) as the encoder loops of the given order
  // (third order: peak gain 1.5, fourth order: 1.4, zeros optimised for an
  // oversampling ratio of 64). x[n] = round(u[n] + h[n]) clipped to 0..M-1,
  // where h is e = x - (u + h) filtered by (B-A)/A, so X = U + NTF*E.
  class sdm_source;
    int  m, order;
    real amp, fnorm;
    real b[5], a[5];
    real eh[5], hh[5];
    int  n;

    function new(int m_, int order_, real amp_, real fnorm_);
      m = m_; order = order_; amp = amp_; fnorm = fnorm_; n = 0;
      if (order == 3) begin
        b = '{1.0, -2.9985544313404437, 2.9985544313404437, -1.0, 0.0};
        a = '{1.0, -2.1988880689189423, 1.6884268479833018, -0.44409099155168175, 0.0};
      end else begin
        b = '{1.0, -3.9979349256091026, 5.995870348792638, -3.9979349256091026, 1.0};
        a = '{1.0, -3.3290790081281907, 4.203252453540648, -2.380662625415199, 0.5096774843522816};
      end
      foreach (eh[i]) begin
        eh[i] = 0.0; hh[i] = 0.0;
      end
    endfunction

    function int next();
      real u, h, v;
      int  q;
      h = 0.0;
      for (int j = 1; j <= order; j++) h += (b[j] - a[j]) * eh[j] - a[j] * hh[j];
      u = (m - 1) / 2.0 * (1.0 + amp * $sin(2.0 * 3.14159265358979 * fnorm * n));
      v = u + h;
      q = int'($floor(v + 0.5));
      if (q < 0) q = 0;
      if (q > m - 1) q = m - 1;
      for (int j = 4; j > 1; j--) begin
        eh[j] = eh[j-1]; hh[j] = hh[j-1];
      end
      eh[1] = q - v;
      hh[1] = h;
      n++;
      return q;
    endfunction
  endclass

  // Hann-windowed DFT power of bin k.
  function automatic real bin_power(real ew[], int k);
    real re = 0.0, im = 0.0;
    int  n = ew.size();
    foreach (ew[i]) begin
      re += ew[i] * $cos(2.0 * 3.14159265358979 * k * i / n);
      im -= ew[i] * $sin(2.0 * 3.14159265358979 * k * i / n);
    end
    return re * re + im * im;
  endfunction

  // Signal-to-noise ratio in dB of a sequence holding a sine in DFT bin sig:
  // signal power in bins sig-2..sig+2, noise in the other bins 1..nb.
  function automatic real snr_db(real v[], int sig, int nb);
    int  n = v.size();
    real mean = 0.0, ps = 0.0, pn = 0.0;
    real ew[];
    ew = new[n];
    foreach (v[i]) mean += v[i];
    mean /= n;
    foreach (v[i]) ew[i] = (v[i] - mean) * 0.5 * (1.0 - $cos(2.0 * 3.14159265358979 * i / n));
    for (int k = 1; k <= nb; k++)
      if (k >= sig - 2 && k <= sig + 2) ps += bin_power(ew, k);
      else pn += bin_power(ew, k);
    return 10.0 * $log10(ps / (pn + 1.0e-30));
  endfunction

  // Ratio in dB of the error power in DFT bins 1..nb to the total error
  // power, with a Hann window and the mean removed.
  function automatic real inband_db(real e[], int nb);
    int    n = e.size();
    real   mean = 0.0, tot = 0.0, inb = 0.0;
    real   ew[];
    ew = new[n];
    foreach (e[i]) mean += e[i];
    mean /= n;
    foreach (e[i]) begin
      ew[i] = (e[i] - mean) * 0.5 * (1.0 - $cos(2.0 * 3.14159265358979 * i / n));
      tot  += ew[i] * ew[i];
    end
    tot = tot * n / 2.0;
    for (int k = 1; k <= nb; k++) inb += bin_power(ew, k);
    return 10.0 * $log10((inb + 1.0e-30) / (tot + 1.0e-30));
  endfunction

endpackage
