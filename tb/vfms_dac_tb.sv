// End-to-end testbench of vfms_dac at its default configuration (three-bit
// codes, seven elements, third-order mismatch shaping, 1 % element mismatch).
//
// A -6 dBFS, 1250 Hz sine sampled at 2.56 MHz is turned into 8-level codes by
// a third-order modulator model standing in for the sigma-delta modulator. Every code is applied for one sample, with random idle cycles
// (en low) in between; a short burst of codes 0 and 7 follows at the end. Checked against independent models:
//   - the selection vector, one clock after its code, against the reference
//     encoder (bit exact), and its bit count against the code;
//   - the modelled output y against the sum of the selected element weights;
//   - the mismatch error y - x*mean(weight): its power in the signal band
//     (DFT bins up to fs/(2*64)) must lie at least 40 dB below its total
//     power, while the same measure for plain thermometer selection of the
//     same elements is computed to show what the encoder removes;
//   - the SNR in the 20 kHz band of the output must stay within 3 dB of the
//     SNR of the ideal codes and 20 dB above thermometer selection.
// Mechanisms counted, each of which must occur: the smallest element
// selector feeding back a non-zero f, ties between filter outputs at the
// vector quantizer, the all-off and all-on codes, and idle cycles.
module vfms_dac_tb;
  import vfms_pkg::*;
  import vfms_ref_pkg::*;

  localparam int N_EL   = 7;
  localparam int WARM   = 1000;
  localparam int NFFT   = 8192;
  localparam int NSAMP  = WARM + NFFT;
  localparam int NBAND  = NFFT / 128;

  logic            clk = 0, rst_n = 0, en = 0;
  logic [2:0]      x = '0;
  logic [N_EL-1:0] sel;
  logic            sel_valid;
  logic [31:0]     y;
  int              checks = 0, failures = 0;

  vfms_dac dut (.clk, .rst_n, .en, .x, .sel, .sel_valid, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * NSAMP) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters, sampled on every enabled cycle
  int n_fnz = 0, n_tie = 0, n_zero = 0, n_full = 0, n_idle = 0;

  always @(posedge clk) if (rst_n) begin
    if (en) begin
      if (dut.u_enc.g_order3.f != 0) n_fnz++;
      for (int i = 0; i < N_EL; i++)
        for (int j = i + 1; j < N_EL; j++)
          if (dut.u_enc.w[i] == dut.u_enc.w[j]) n_tie++;
      if (x == 0) n_zero++;
      if (x == 3'(N_EL)) n_full++;
    end else n_idle++;
  end

  initial begin
    ref_encoder   r;
    sdm_source    s;
    bit [63:0]    e;
    int unsigned  wt[N_EL];
    real          wmean;
    real          ed[], et[], vi[], vd[], vt[];
    real          snr_i, snr_d, snr_t;
    real          db_dem, db_th;
    int           burst[6];
    burst = '{0, 0, 7, 7, 3, 4};
    r = new(3, N_EL);
    s = new(N_EL + 1, 3, 0.5, 1250.0 / 2.56e6);
    ed = new[NFFT]; et = new[NFFT];
    vi = new[NFFT]; vd = new[NFFT]; vt = new[NFFT];
    wmean = 0.0;
    foreach (wt[i]) begin
      wt[i] = elem_weight(i, 10000);
      wmean += real'(wt[i]) / N_EL;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      int      c;
      longint  yexp, yth;
      if ($urandom_range(15) == 0) begin
        en <= 0;
        @(posedge clk); #1;
        check(!sel_valid, "no sel_valid after idle cycle");
      end
      c = s.next();
      x <= 3'(c); en <= 1;
      e = r.step(c);
      @(posedge clk); #1;
      check(sel_valid, "sel_valid one clock after the code");
      check(sel == e[N_EL-1:0], $sformatf("n=%0d x=%0d sel=%b exp=%b", n, c, sel, e[N_EL-1:0]));
      check($countones(sel) == c, "selection count equals code");
      yexp = 0; yth = 0;
      for (int i = 0; i < N_EL; i++) begin
        if (e[i]) yexp += longint'(wt[i]);
        if (i < c) yth += longint'(wt[i]);
      end
      check(longint'(y) == yexp, $sformatf("y=%0d exp %0d", y, yexp));
      if (n >= WARM) begin
        ed[n - WARM] = (real'(y) - c * wmean) / 65536.0;
        et[n - WARM] = (real'(yth) - c * wmean) / 65536.0;
        vi[n - WARM] = real'(c);
        vd[n - WARM] = real'(y) / 65536.0;
        vt[n - WARM] = real'(yth) / 65536.0;
      end
    end
    // a short burst of extreme codes: all elements off, then all on
    foreach (burst[k]) begin
      x <= 3'(burst[k]); en <= 1;
      e = r.step(burst[k]);
      @(posedge clk); #1;
      check(sel == e[N_EL-1:0] && $countones(sel) == burst[k], "extreme code selection");
    end
    en <= 0;
    db_dem = inband_db(ed, NBAND);
    db_th  = inband_db(et, NBAND);
    $display("in-band share of mismatch error: encoder %0.1f dB, thermometer %0.1f dB", db_dem, db_th);
    check(db_dem < -40.0, "mismatch error shaped out of the band");
    check(db_th > db_dem + 30.0, "encoder beats thermometer selection");
    snr_i = snr_db(vi, NFFT * 1250 / 2560000, NBAND);
    snr_d = snr_db(vd, NFFT * 1250 / 2560000, NBAND);
    snr_t = snr_db(vt, NFFT * 1250 / 2560000, NBAND);
    $display("SNR in the signal band: ideal codes %0.1f dB, with encoder %0.1f dB, thermometer %0.1f dB",
             snr_i, snr_d, snr_t);
    check(snr_d > snr_i - 3.0, "SNR within 3 dB of the ideal DAC");
    check(snr_d > snr_t + 20.0, "SNR 20 dB above thermometer selection");
    $display("mechanisms: f!=0 %0d, ties %0d, code 0 %0d, code %0d %0d, idle %0d",
             n_fnz, n_tie, n_zero, N_EL, n_full, n_idle);
    check(n_fnz > 0, "smallest element selector active");
    check(n_tie > 0, "quantizer ties");
    check(n_zero > 0, "all-off code");
    check(n_full > 0, "all-on code");
    check(n_idle > 0, "idle cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
