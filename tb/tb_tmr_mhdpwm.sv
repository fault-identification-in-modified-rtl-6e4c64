// End-to-end testbench for tmr_mhdpwm at its default sizes (10-bit duty).
//
// Each scenario resets the design, applies duty words to the three
// generators and runs several PWM periods. Three reference models give the
// expected generator outputs; the voted output must equal the model of the
// word held by at least two generators, and `error` must be high exactly
// when the three expected outputs differ.
//   - all three generators given the same word: no error at all
//   - one generator given a different word (the way a fault is induced in
//     the published waveform, e.g. 0101011111 against 0101010101), in each of
//     the three positions: error raised, fault masked in the voted output
//   - a sweep of random words and random faulty positions
//   - duty words changed without reset
// It counts how often each mechanism of the design happened: SET_C, RESET1_C
// (zero detect), RESET2_C (second counter), SET1_D, RESET_D, simultaneous
// SET and RESET at the SR flip-flop, an error flag, and a fault masked by the
// voter. One that never happened counts as a failure.
module tb_tmr_mhdpwm;
  import mhdpwm_ref_pkg::*;
  localparam int NC = mhdpwm_pkg::NC_DEFAULT;
  localparam int ND = mhdpwm_pkg::ND_DEFAULT;
  localparam int M  = 1 << NC;
  localparam int DW = NC + ND;

  logic clk = 0, rst = 1;
  logic [DW-1:0] duty1 = 0, duty2 = 0, duty3 = 0;
  logic mhdpwm, error;
  logic [2:0] channel_pwm;
  int checks = 0, failures = 0;
  int n_set_c = 0, n_reset1 = 0, n_reset2 = 0, n_set_d = 0, n_reset_d = 0;
  int n_both = 0, n_error = 0, n_masked = 0;
  mhdpwm_ref ref_m [3];

  tmr_mhdpwm dut (
    .clk(clk), .rst(rst), .duty1(duty1), .duty2(duty2), .duty3(duty3),
    .mhdpwm(mhdpwm), .error(error), .channel_pwm(channel_pwm)
  );

  always #5 clk = ~clk;

  // mechanism counters, sampled from generator 0 just before each edge
  always @(negedge clk) if (!rst) begin
    n_set_c   += int'(dut.g_gen[0].u_gen.set_c);
    n_reset1  += int'(dut.g_gen[0].u_gen.u_mcdpwm.reset1_c);
    n_reset2  += int'(dut.g_gen[0].u_gen.u_mcdpwm.reset2_c);
    n_set_d   += int'(dut.g_gen[0].u_gen.set_d);
    n_reset_d += int'(dut.g_gen[0].u_gen.reset_d);
    n_both    += int'(1'((dut.g_gen[0].u_gen.set_c | dut.g_gen[0].u_gen.set_d) &
                         (dut.g_gen[0].u_gen.reset_c | dut.g_gen[0].u_gen.reset_d)));
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int w1, input int w2, input int w3, input bit do_reset,
                     input int periods);
    int good, bad_pos;
    if (do_reset) begin
      @(negedge clk);
      rst = 1;
      @(negedge clk);
      rst = 0;
      foreach (ref_m[i]) ref_m[i].reset();
    end
    duty1 = DW'(w1); duty2 = DW'(w2); duty3 = DW'(w3);
    // the word shared by at least two generators
    good = (w1 == w2 || w1 == w3) ? w1 : w2;
    bad_pos = (w1 != good) ? 0 : (w2 != good) ? 1 : (w3 != good) ? 2 : -1;
    for (int t = 0; t < periods * M; t++) begin
      bit e0, e1, e2, e_vote, e_err, e_good;
      @(posedge clk);
      ref_m[0].step(w1);
      ref_m[1].step(w2);
      ref_m[2].step(w3);
      @(negedge clk);
      e0 = ref_m[0].q; e1 = ref_m[1].q; e2 = ref_m[2].q;
      // a generator whose word just changed without reset may still carry
      // state from its previous word, so the vote is taken over the models
      e_vote = (int'(e0) + int'(e1) + int'(e2)) >= 2;
      e_good = (bad_pos == 0) ? e1 : e0;
      e_err  = (e0 != e1) || (e0 != e2);
      checks += 3;
      if (channel_pwm !== {e2, e1, e0}) begin
        failures++;
        $display("FAIL t=%0d channels=%b expected %b", t, channel_pwm, {e2, e1, e0});
      end
      if (mhdpwm !== e_vote) begin
        failures++;
        $display("FAIL t=%0d voted=%0b expected %0b", t, mhdpwm, e_vote);
      end
      if (error !== e_err) begin
        failures++;
        $display("FAIL t=%0d error=%0b expected %0b", t, error, e_err);
      end
      if (error) n_error++;
      // fault masked: the faulty generator disagrees while the two healthy
      // ones agree, and the voted output follows the healthy pair
      if (bad_pos >= 0 && error && mhdpwm === e_good &&
          ({e2, e1, e0}[bad_pos] != e_good))
        n_masked++;
    end
  endtask

  initial begin
    int base, bad, pos;
    foreach (ref_m[i]) ref_m[i] = new(NC, ND);

    // fault-free: no error may ever be flagged
    run(32'h155, 32'h155, 32'h155, 1, 4);
    checks++;
    if (n_error != 0) begin
      failures++;
      $display("FAIL error flagged with identical duty words");
    end

    // the published fault case, then the same fault in each position
    run(32'h155, 32'h155, 32'h15f, 1, 4);
    run(32'h155, 32'h15f, 32'h155, 1, 4);
    run(32'h15f, 32'h155, 32'h155, 1, 4);

    // extremes of the duty word
    run(0, 0, 0, 1, 2);
    run(1023, 1023, 1023, 1, 2);

    // random sweep, with and without reset between words
    for (int n = 0; n < 60; n++) begin
      base = int'($urandom_range(1023));
      bad  = int'($urandom_range(1023));
      pos  = int'($urandom_range(2));
      case (pos)
        0:       run(bad, base, base, n % 2 == 0, 3);
        1:       run(base, bad, base, n % 2 == 0, 3);
        default: run(base, base, bad, n % 2 == 0, 3);
      endcase
    end

    $display("mechanisms: set_c=%0d reset1_c=%0d reset2_c=%0d set_d=%0d reset_d=%0d set&reset=%0d error=%0d masked=%0d",
             n_set_c, n_reset1, n_reset2, n_set_d, n_reset_d, n_both, n_error, n_masked);
    checks += 8;
    if (n_set_c == 0)   failures++;
    if (n_reset1 == 0)  failures++;
    if (n_reset2 == 0)  failures++;
    if (n_set_d == 0)   failures++;
    if (n_reset_d == 0) failures++;
    if (n_both == 0)    failures++;
    if (n_error == 0)   failures++;
    if (n_masked == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
