// Self-checking testbench of min_selector: random first-integrator values,
// including negative values, equal values and extremes, are applied and f
// is compared with the negated minimum found by a separate scan.
module min_selector_tb;
  import vfms_pkg::*;

  localparam int N_EL = 7;

  state_t t [N_EL];
  state_t f;
  int     checks = 0, failures = 0;

  min_selector #(.N_EL(N_EL)) dut (.t, .f);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint m;
      for (int i = 0; i < N_EL; i++) begin
        longint v;
        v = (n % 3 == 0) ? longint'($urandom_range(4)) - 2
                                 : (longint'($signed($urandom())) <<< ($urandom_range(7)));
        t[i] = state_t'(v);
      end
      m = longint'(t[N_EL-1]);
      for (int i = N_EL - 2; i >= 0; i--) if (longint'(t[i]) <= m) m = longint'(t[i]);
      #1;
      checks++;
      if (longint'(f) != -m) begin
        failures++;
        if (failures < 10) $display("FAIL f=%0d exp %0d", f, -m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
