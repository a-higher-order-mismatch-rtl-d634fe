// One configuration of the mismatch-shaping DAC under a sine workload, used
// by vfms_workloads_tb. It drives a vfms_dac of the given ORDER and NBITS with
// a 1250 Hz sine at fs = 2.56 MHz (amplitude AMP of full scale) turned into
// codes by a modulator model of the same order, checks every selection
// against the reference encoder and every output against the element
// weights (1 % mismatch), and measures with a DFT over the band up to
// fs/(2*64) = 20 kHz:
//   - the SNR of the ideal codes, of the DAC output with the encoder and of
//     the DAC output with plain thermometer selection of the same elements;
//   - the in-band share of the mismatch error.
// The encoder must keep the SNR within 3 dB of the ideal codes and beat
// thermometer selection by 20 dB. When finished it raises done and reports
// its counts on the ports.
module vfms_workload
  import vfms_pkg::*;
  import vfms_ref_pkg::*;
#(
  parameter int  ORDER = 3,
  parameter int  NBITS = 3,
  parameter real AMP   = 0.5,
  parameter int  NFFT  = 8192
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output real  db_dem,
  output real  snr_ideal,
  output real  snr_dem,
  output real  snr_th
);
  localparam int N_EL = (1 << NBITS) - 1;
  localparam int WARM = 1000;

  logic            rst_n = 0, en = 0;
  logic [NBITS-1:0] x = '0;
  logic [N_EL-1:0] sel;
  logic            sel_valid;
  logic [31:0]     y;

  vfms_dac #(.ORDER(ORDER), .NBITS(NBITS)) dut (.clk, .rst_n, .en, .x, .sel, .sel_valid, .y);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("FAIL order%0d %0d-bit: %s", ORDER, NBITS, what);
    end
  endtask

  initial begin
    ref_encoder  r;
    sdm_source   s;
    bit [63:0]   e;
    int unsigned wt[N_EL];
    real         wmean;
    real         ed[], et[], vi[], vd[], vt[];
    real         db_th;
    done = 0; checks = 0; failures = 0; db_dem = 0.0;
    snr_ideal = 0.0; snr_dem = 0.0; snr_th = 0.0;
    r = new(ORDER, N_EL);
    s = new(N_EL + 1, ORDER, AMP, 1250.0 / 2.56e6);
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
    for (int n = 0; n < WARM + NFFT; n++) begin
      int     c;
      longint yexp, yth;
      c = s.next();
      x <= NBITS'(c); en <= 1;
      e = r.step(c);
      @(posedge clk); #1;
      check(sel_valid && sel == e[N_EL-1:0], $sformatf("n=%0d sel=%b exp=%b", n, sel, e[N_EL-1:0]));
      yexp = 0; yth = 0;
      for (int i = 0; i < N_EL; i++) begin
        if (e[i]) yexp += longint'(wt[i]);
        if (i < c) yth += longint'(wt[i]);
      end
      check(longint'(y) == yexp, "output equals selected weights");
      if (n >= WARM) begin
        ed[n - WARM] = (real'(y) - c * wmean) / 65536.0;
        et[n - WARM] = (real'(yth) - c * wmean) / 65536.0;
        vi[n - WARM] = real'(c);
        vd[n - WARM] = real'(y) / 65536.0;
        vt[n - WARM] = real'(yth) / 65536.0;
      end
    end
    en <= 0;
    db_dem = inband_db(ed, NFFT / 128);
    db_th  = inband_db(et, NFFT / 128);
    snr_ideal = snr_db(vi, NFFT * 1250 / 2560000, NFFT / 128);
    snr_dem   = snr_db(vd, NFFT * 1250 / 2560000, NFFT / 128);
    snr_th    = snr_db(vt, NFFT * 1250 / 2560000, NFFT / 128);
    $display("order %0d, %0d-bit: SNR ideal %0.1f dB, with encoder %0.1f dB, thermometer %0.1f dB; in-band share of mismatch error %0.1f dB (thermometer %0.1f dB)",
             ORDER, NBITS, snr_ideal, snr_dem, snr_th, db_dem, db_th);
    check(db_dem < -40.0, "mismatch error shaped out of the band");
    check(snr_dem > snr_ideal - 3.0, "SNR kept within 3 dB of the ideal DAC");
    check(snr_dem > snr_th + 20.0, "SNR 20 dB above thermometer selection");
    done = 1;
  end
endmodule
