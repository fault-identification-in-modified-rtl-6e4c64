// Testbench for zero_detector: exhaustive over all 5-bit values.
module tb_zero_detector;
  localparam int NC = 5;
  logic [NC-1:0] value;
  logic zero;
  int checks = 0, failures = 0;

  zero_detector #(.NC(NC)) dut (.value(value), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << NC); i++) begin
      value = NC'(i);
      #1;
      checks++;
      if (zero !== (i == 0)) begin
        failures++;
        $display("FAIL value=%0d zero=%0b", i, zero);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
