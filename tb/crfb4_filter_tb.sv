// Self-checking testbench of crfb4_filter. It drives random selection bits,
// recomputes the four integrators from the difference equations in 64-bit
// integers and compares w after every sample; it also checks the first
// samples of the impulse response against hand-worked values, that en low
// holds the states and that reset clears them.
module crfb4_filter_tb;
  import vfms_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0, x_i = 0;
  state_t w;
  int     checks = 0, failures = 0;
  longint s1, s2, s3, s4;

  crfb4_filter dut (.clk, .rst_n, .en, .x_i, .w);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic sample(bit xv);
    longint n1, n3;
    x_i <= xv; en <= 1;
    @(posedge clk); #1;
    n1 = s1 - ((longint'(G4_1) * s2) >>> FRAC) - (xv ? longint'(A4_1) : 0);
    n3 = s3 + s2 - ((longint'(G4_2) * s4) >>> FRAC) - (xv ? longint'(A4_3) : 0);
    s2 = s2 + n1 - (xv ? longint'(A4_2) : 0);
    s4 = s4 + n3 - (xv ? longint'(A4_4) : 0);
    s1 = n1;
    s3 = n3;
    check(longint'(w) == s4, $sformatf("w=%0d exp %0d", w, s4));
  endtask

  initial begin
    s1 = 0; s2 = 0; s3 = 0; s4 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(w == 0, "reset");
    // impulse: s3 = -a3, s4 = -a3 - a4 after the first sample
    sample(1);
    check(longint'(w) == -(longint'(A4_3) + longint'(A4_4)), "impulse w[1]");
    // second sample: s2 = -a1 - a2 enters stage 3 only now
    sample(0);
    check(longint'(w) == -(longint'(A4_1) + longint'(A4_2) + 2*longint'(A4_3) + longint'(A4_4))
                         - ((longint'(G4_2) * -(longint'(A4_3) + longint'(A4_4))) >>> FRAC)
          , "impulse w[2]");
    for (int n = 0; n < 3000; n++) sample(1'($urandom_range(1)));
    begin
      state_t w0;
      w0 = w;
      en <= 0; x_i <= 1;
      repeat (5) @(posedge clk);
      #1 check(w == w0, "hold when en low");
    end
    rst_n <= 0; @(posedge clk); #1;
    check(w == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
