// Testbench for nbit_comparator: exhaustive over all pairs of 5-bit values.
module tb_nbit_comparator;
  localparam int NC = 5;
  logic [NC-1:0] a, b;
  logic eq;
  int checks = 0, failures = 0;

  nbit_comparator #(.NC(NC)) dut (.a(a), .b(b), .eq(eq));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << NC); i++)
      for (int j = 0; j < (1 << NC); j++) begin
        a = NC'(i); b = NC'(j);
        #1;
        checks++;
        if (eq !== (i == j)) begin
          failures++;
          $display("FAIL a=%0d b=%0d eq=%0b", i, j, eq);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
