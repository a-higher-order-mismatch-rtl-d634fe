// Self-checking testbench of dem_encoder in both orders: a third-order
// encoder with 7 elements and a fourth-order encoder with 3 elements are fed
// the same kind of stimulus, a -6 dBFS sine turned into M-level codes by a
// first-order error-feedback modulator, with occasional cycles of en low.
// Every selection vector is compared with the reference encoder model one
// clock after its code (the encoder's latency), its bit count with the code,
// and the running sum of every element's usage error (x_i - x/N_EL) must
// stay small, the first-order consequence of mismatch shaping.
module dem_encoder_tb;
  import vfms_pkg::*;
  import vfms_ref_pkg::*;

  localparam int NA = 7, NB = 3;
  localparam int NSAMP = 3000;

  logic          clk = 0, rst_n = 0, en = 0;
  logic [2:0]    xa = '0;
  logic [1:0]    xb = '0;
  logic [NA-1:0] sela;
  logic [NB-1:0] selb;
  logic          va, vb;
  int            checks = 0, failures = 0;

  dem_encoder #(.ORDER(3), .N_EL(NA)) dut_a (.clk, .rst_n, .en, .x(xa), .sel(sela), .sel_valid(va));
  dem_encoder #(.ORDER(4), .N_EL(NB)) dut_b (.clk, .rst_n, .en, .x(xb), .sel(selb), .sel_valid(vb));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NSAMP) @(posedge clk);
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

  initial begin
    ref_encoder ra, rb;
    ef_source   sa, sb;
    bit [63:0]  ea, eb;
    real        cuma[NA], cumb[NB];
    real        maxa, maxb;
    int         gaps;
    maxa = 0.0; maxb = 0.0; gaps = 0;
    ra = new(3, NA); rb = new(4, NB);
    sa = new(NA + 1, 0.5, 1250.0 / 2.56e6 * 8.0);
    sb = new(NB + 1, 0.5, 1250.0 / 2.56e6 * 8.0);
    foreach (cuma[i]) cuma[i] = 0.0;
    foreach (cumb[i]) cumb[i] = 0.0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < NSAMP; n++) begin
      int ca, cb;
      if ($urandom_range(9) == 0) begin
        // a cycle without a sample: nothing may change
        en <= 0;
        @(posedge clk); #1;
        check(!va && !vb, "sel_valid low after en low");
        gaps++;
      end
      ca = sa.next(); cb = sb.next();
      xa <= 3'(ca); xb <= 2'(cb); en <= 1;
      ea = ra.step(ca); eb = rb.step(cb);
      @(posedge clk); #1;
      check(va && vb, "sel_valid one clock after en");
      check(sela == ea[NA-1:0], $sformatf("order3 n=%0d x=%0d sel=%b exp=%b", n, ca, sela, ea[NA-1:0]));
      check(selb == eb[NB-1:0], $sformatf("order4 n=%0d x=%0d sel=%b exp=%b", n, cb, selb, eb[NB-1:0]));
      check($countones(sela) == ca && $countones(selb) == cb, "selection count equals code");
      foreach (cuma[i]) begin
        cuma[i] += real'(sela[i]) - real'(ca) / NA;
        if ((cuma[i] > maxa) || (-cuma[i] > maxa)) maxa = (cuma[i] > 0) ? cuma[i] : -cuma[i];
      end
      foreach (cumb[i]) begin
        cumb[i] += real'(selb[i]) - real'(cb) / NB;
        if ((cumb[i] > maxb) || (-cumb[i] > maxb)) maxb = (cumb[i] > 0) ? cumb[i] : -cumb[i];
      end
    end
    $display("largest running usage error: order3 %0.2f, order4 %0.2f; %0d idle cycles", maxa, maxb, gaps);
    check(maxa < 4.0, "order3 usage error bounded");
    check(maxb < 4.0, "order4 usage error bounded");
    check(gaps > 0, "idle cycles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
