// Runs the four configurations of the SNR comparison, third- and
// fourth-order mismatch shaping with two- and three-bit codes (3 and 7 unit
// elements, 1 % element mismatch), side by side under a -6 dBFS 1250 Hz sine
// at fs = 2.56 MHz and an oversampling ratio of 64, each fed by a modulator
// model of its own order, and sums their checks. Each configuration is
// checked bit-exactly against the reference encoder, must keep the in-band
// share of its mismatch error below -40 dB and its SNR within 3 dB of the
// ideal codes, and is reported with the SNR of thermometer selection.
module vfms_workloads_tb;
  logic clk = 0;
  logic done [4];
  int   c [4], f [4];
  real  dd [4], si [4], sd [4], st [4];
  int   checks, failures;

  always #5 clk = ~clk;

  vfms_workload #(.ORDER(3), .NBITS(2)) w32 (.clk, .done(done[0]), .checks(c[0]), .failures(f[0]), .db_dem(dd[0]), .snr_ideal(si[0]), .snr_dem(sd[0]), .snr_th(st[0]));
  vfms_workload #(.ORDER(3), .NBITS(3)) w33 (.clk, .done(done[1]), .checks(c[1]), .failures(f[1]), .db_dem(dd[1]), .snr_ideal(si[1]), .snr_dem(sd[1]), .snr_th(st[1]));
  vfms_workload #(.ORDER(4), .NBITS(2)) w42 (.clk, .done(done[2]), .checks(c[2]), .failures(f[2]), .db_dem(dd[2]), .snr_ideal(si[2]), .snr_dem(sd[2]), .snr_th(st[2]));
  vfms_workload #(.ORDER(4), .NBITS(3)) w43 (.clk, .done(done[3]), .checks(c[3]), .failures(f[3]), .db_dem(dd[3]), .snr_ideal(si[3]), .snr_dem(sd[3]), .snr_th(st[3]));

  initial begin
    checks = 0; failures = 0;
    fork
      begin
        wait (done[0] && done[1] && done[2] && done[3]);
        for (int i = 0; i < 4; i++) begin
          checks += c[i];
          failures += f[i];
          $display("configuration %0d: SNR ideal %0.1f, encoder %0.1f, thermometer %0.1f dB; in-band mismatch share %0.1f dB",
                   i, si[i], sd[i], st[i], dd[i]);
        end
      end
      begin
        repeat (40000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
