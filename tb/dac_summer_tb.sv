// Self-checking testbench of the dac_summer model: random element outputs are
// applied and the sum is compared with one computed in 64-bit arithmetic.
module dac_summer_tb;
  localparam int N_EL = 7;

  logic [31:0] yi [N_EL];
  logic [31:0] y;
  int          checks = 0, failures = 0;

  dac_summer #(.N_EL(N_EL)) dut (.yi, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      longint s;
      s = 0;
      for (int i = 0; i < N_EL; i++) begin
        yi[i] = $urandom_range(70000);
        s += longint'(yi[i]);
      end
      #1;
      checks++;
      if (longint'(y) != s) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
