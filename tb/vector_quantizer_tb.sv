// Self-checking testbench of vector_quantizer. Random filter outputs, drawn
// from a small range so that ties are frequent, and every count x from 0 to
// one above the number of elements are applied; the selection is compared
// with a reference that repeatedly picks the largest unselected element
// (lower index first on ties) and its bit count with min(x, N_EL).
module vector_quantizer_tb;
  import vfms_pkg::*;
  import vfms_ref_pkg::*;

  localparam int N_EL = 7;
  localparam int XW   = $clog2(N_EL + 1);

  logic [XW-1:0]   x;
  state_t          w [N_EL];
  logic [N_EL-1:0] sel;
  int              checks = 0, failures = 0, ties = 0;
  longint          v[];

  vector_quantizer #(.N_EL(N_EL)) dut (.x, .w, .sel);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    v = new[N_EL];
    for (int n = 0; n < 4000; n++) begin
      bit [63:0] exp_sel;
      int        k;
      for (int i = 0; i < N_EL; i++) begin
        v[i] = (n % 2 != 0) ? longint'($urandom_range(6)) - 3
                       : longint'($signed($urandom())) * 64;
        w[i] = state_t'(v[i]);
      end
      k = n % (N_EL + 2);
      if (k > N_EL) begin
        x = XW'(N_EL);   // all elements
      end else x = XW'(k);
      #1;
      exp_sel = ref_encoder::pick(v, int'(x));
      checks++;
      if (sel != exp_sel[N_EL-1:0]) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d sel=%b exp=%b", x, sel, exp_sel[N_EL-1:0]);
      end
      checks++;
      if ($countones(sel) != int'(x)) failures++;
      for (int i = 0; i < N_EL; i++)
        for (int j = i + 1; j < N_EL; j++) if (v[i] == v[j]) ties++;
    end
    checks++;
    if (ties == 0) begin
      failures++;
      $display("FAIL no ties exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
