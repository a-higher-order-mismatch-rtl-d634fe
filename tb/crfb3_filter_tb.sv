// Self-checking testbench of crfb3_filter. It drives random selection bits and
// a random common input, recomputes the three integrators from the difference
// equations in 64-bit integers, and compares w and t after every sample. It
// also checks the first samples of the impulse response against hand-worked
// values, that en low holds the states, and that reset clears them.
module crfb3_filter_tb;
  import vfms_pkg::*;

  logic   clk = 0, rst_n = 0, en = 0, x_i = 0;
  state_t f = '0, w, t;
  int     checks = 0, failures = 0;
  longint s1, s2, s3;

  crfb3_filter dut (.clk, .rst_n, .en, .f, .x_i, .w, .t);

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

  task automatic sample(bit xv, longint fv);
    longint n2;
    x_i <= xv; f <= state_t'(fv); en <= 1;
    @(posedge clk); #1;
    n2 = s2 + s1 - ((longint'(G3_1) * s3) >>> FRAC) - (xv ? longint'(A3_2) : 0);
    s3 = s3 + n2 - (xv ? longint'(A3_3) : 0);
    s2 = n2;
    s1 = s1 + fv - (xv ? longint'(A3_1) : 0);
    check(longint'(w) == s3, $sformatf("w=%0d exp %0d", w, s3));
    check(longint'(t) == s1, $sformatf("t=%0d exp %0d", t, s1));
  endtask

  initial begin
    s1 = 0; s2 = 0; s3 = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    check(w == 0 && t == 0, "reset");
    // impulse: worked out by hand from the structure
    sample(1, 0);
    check(longint'(w) == -(longint'(A3_2) + longint'(A3_3)), "impulse w[1]");
    check(longint'(t) == -longint'(A3_1), "impulse t[1]");
    sample(0, 0);
    check(longint'(w) == -(2*longint'(A3_2) + longint'(A3_3) + longint'(A3_1))
                         - ((longint'(G3_1) * -(longint'(A3_2) + longint'(A3_3))) >>> FRAC)
          , "impulse w[2]");
    // random drive
    for (int n = 0; n < 3000; n++)
      sample(1'($urandom_range(1)), longint'($urandom_range(2*A3_1)) - longint'(A3_1) / 2);
    // hold with en low
    begin
      state_t w0, t0;
      w0 = w; t0 = t;
      en <= 0; x_i <= 1; f <= state_t'(12345);
      repeat (5) @(posedge clk);
      #1 check(w == w0 && t == t0, "hold when en low");
    end
    rst_n <= 0; @(posedge clk); #1;
    check(w == 0 && t == 0, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
