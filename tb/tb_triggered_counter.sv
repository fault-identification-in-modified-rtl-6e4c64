// Testbench for triggered_counter: random start/done stimulus compared with
// a behavioural model (start restarts at 0 and has priority; done while
// active stops the count after that cycle).
module tb_triggered_counter;
  localparam int NC = 5;
  logic clk = 0, rst = 1, start = 0, done = 0;
  logic [NC-1:0] count;
  logic active;
  int checks = 0, failures = 0, stops = 0, wraps = 0;

  triggered_counter #(.NC(NC)) dut (
    .clk(clk), .rst(rst), .start(start), .done(done),
    .count(count), .active(active)
  );

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m_cnt;
    bit m_act;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    m_cnt = 0; m_act = 0;
    for (int i = 0; i < 3000; i++) begin
      start = ($urandom_range(40) == 0);
      done  = ($urandom_range(60) == 0);
      @(posedge clk);
      if (start) begin
        m_cnt = 0; m_act = 1;
      end else if (m_act) begin
        if (m_cnt == (1 << NC) - 1) wraps++;
        m_cnt = (m_cnt + 1) % (1 << NC);
        if (done) begin m_act = 0; stops++; end
      end
      @(negedge clk);
      checks++;
      if (count !== NC'(m_cnt) || active !== m_act) begin
        failures++;
        $display("FAIL cycle %0d count=%0d/%0d active=%0b/%0b", i, count, m_cnt, active, m_act);
      end
    end
    checks++; if (stops == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
