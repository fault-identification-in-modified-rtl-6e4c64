// Testbench for delay_line_mux: one-hot and random tap patterns against every
// select value.
module tb_delay_line_mux;
  localparam int ND = 5;
  localparam int W  = 1 << ND;
  logic [W-1:0]  taps;
  logic [ND-1:0] sel;
  logic y;
  int checks = 0, failures = 0;

  delay_line_mux #(.ND(ND)) dut (.taps(taps), .sel(sel), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < W; k++)
      for (int s = 0; s < W; s++) begin
        taps = W'(1) << k; sel = ND'(s);
        #1;
        checks++;
        if (y !== (k == s)) begin
          failures++;
          $display("FAIL one-hot %0d sel %0d y=%0b", k, s, y);
        end
      end
    for (int n = 0; n < 200; n++) begin
      taps = $urandom; sel = ND'($urandom);
      #1;
      checks++;
      if (y !== taps[sel]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
