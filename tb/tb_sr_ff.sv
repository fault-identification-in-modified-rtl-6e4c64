// Testbench for sr_ff: all four S/R combinations from both output states,
// plus random stimulus, against the rule reset > set > hold.
module tb_sr_ff;
  logic clk = 0, rst = 1, s = 0, r = 0, q, q_n;
  int checks = 0, failures = 0, both = 0;

  sr_ff dut (.clk(clk), .rst(rst), .s(s), .r(r), .q(q), .q_n(q_n));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit m_q;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    m_q = 0;
    checks++; if (q !== 0 || q_n !== 1) failures++;
    for (int i = 0; i < 600; i++) begin
      // first 16 steps walk all combinations twice, then random
      if (i < 16) {s, r} = 2'(i % 4 == 0 ? 2'b10 : i % 4);
      else        {s, r} = 2'($urandom);
      if (s && r) both++;
      @(posedge clk);
      if (r)      m_q = 0;
      else if (s) m_q = 1;
      @(negedge clk);
      checks++;
      if (q !== m_q || q_n !== !m_q) begin
        failures++;
        $display("FAIL step %0d s=%0b r=%0b q=%0b expected %0b", i, s, r, q, m_q);
      end
    end
    checks++; if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
