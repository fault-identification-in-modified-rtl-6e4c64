// Testbench for majority_voter: exhaustive over the eight input patterns;
// expected values come from counting ones.
module tb_majority_voter;
  logic a, b, c, valid, err;
  int checks = 0, failures = 0;

  majority_voter dut (.a(a), .b(b), .c(c), .valid(valid), .err(err));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int ones;
      {a, b, c} = 3'(i);
      ones = a + b + c;
      #1;
      checks += 2;
      if (valid !== (ones >= 2)) begin
        failures++;
        $display("FAIL abc=%b valid=%0b", {a, b, c}, valid);
      end
      if (err !== (ones == 1 || ones == 2)) begin
        failures++;
        $display("FAIL abc=%b err=%0b", {a, b, c}, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
