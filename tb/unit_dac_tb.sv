// Self-checking testbench of the unit_dac model: an element with a
// non-nominal weight must deliver exactly that weight when on and zero when
// off.
module unit_dac_tb;
  localparam int unsigned WT = 65536 + 517;

  logic        d;
  logic [31:0] y;
  int          checks = 0, failures = 0;

  unit_dac #(.WEIGHT(WT)) dut (.d, .y);

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      d = n[0];
      #1;
      checks++;
      if (y != (d ? WT : 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
