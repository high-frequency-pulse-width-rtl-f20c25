// tb_pwm_generator: end-to-end, self-checking testbench of the PWM generator
// at its default width (N = 8, period 256 clocks).
//
// The duty word on data_in is changed once per period, always at a random
// point inside the period, so the testbench also proves that a word only
// takes effect at the next overflow. The sequence first sweeps every word
// 0..2^N-1 in order, then holds 0 and 2^N-1, then applies random words with
// zeros mixed in. For every period the testbench measures:
//   - the number of clocks between overflow pulses (must be 2^N),
//   - the number of clocks the output is high, against the expected width
//     worked out from the word loaded for this period W and the one before P:
//       P = 0          -> 0     (reset wins over set at count 0)
//       P > 0, W = 0   -> 2^N   (nothing resets the output in this period)
//       otherwise      -> W
//   - that the output rises only when the count is 1 and falls only when the
//     count is W+1 (mod 2^N) or 1.
// Mechanisms counted, each of which must occur: overflow/register loads,
// latch set, comparator reset, reset-over-set collision (zero word), a word
// changed mid-period, the largest word, the all-high zero-transition period.
module tb_pwm_generator;

  localparam int unsigned N = 8;
  localparam int unsigned P = 1 << N;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic [N-1:0] data_in = '0;
  logic         pwm_out;
  logic         overflow;
  logic [N-1:0] count;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  pwm_generator dut (
      .clk      (clk),
      .rst      (rst),
      .data_in  (data_in),
      .pwm_out  (pwm_out),
      .overflow (overflow),
      .count    (count)
  );

  // Words to apply, one per period.
  int unsigned words[$];
  int          word_idx = 0;

  // Measurement state.
  int unsigned prev_word = 0;     // word of the previous period (reset value)
  int unsigned cur_word = 0;      // word loaded for the current period
  bit          in_period = 0;
  int          high_cycles = 0;
  int          period_cycles = 0;
  int          change_at = 0;     // cycle within the period where data_in changes
  int          cyc_in_period = 0;
  logic        last_pwm = 1'b0;
  int          periods_done = 0;

  // Mechanism counters.
  int n_load = 0, n_set = 0, n_reset = 0, n_collide = 0, n_midchange = 0;
  int n_max = 0, n_fullhigh = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL period %0d: %s", periods_done, what);
    end
  endtask

  function automatic int expected_width(int unsigned p, int unsigned w);
    if (p == 0) return 0;
    if (w == 0) return P;
    return w;
  endfunction

  // Everything is sampled and driven on the falling edge.
  always @(negedge clk) begin
    if (!rst) begin
      // Edge position checks.
      if (pwm_out && !last_pwm) begin
        n_set++;
        check(count == N'(1), $sformatf("rise at count %0d", count));
      end
      if (!pwm_out && last_pwm) begin
        n_reset++;
        check(count == N'(cur_word + 1) || count == N'(1),
              $sformatf("fall at count %0d, word %0d", count, cur_word));
      end
      last_pwm = pwm_out;

      // A period runs from count 1 to the next count 0 (the overflow clock).
      if (in_period) begin
        period_cycles++;
        if (pwm_out) high_cycles++;
      end

      if (overflow) begin
        // Close the period that ends with this clock.
        if (in_period) begin
          check(period_cycles == P, $sformatf("period %0d clocks", period_cycles));
          check(high_cycles == expected_width(prev_word, cur_word),
                $sformatf("high %0d clocks, expected %0d (prev %0d, word %0d)", high_cycles,
                          expected_width(prev_word, cur_word), prev_word, cur_word));
          if (prev_word != 0 && cur_word == 0 && high_cycles == P) n_fullhigh++;
          periods_done++;
        end
        // The word on data_in now is what the register loads on this edge.
        if (cur_word == 0 && data_in == 0 && in_period) n_collide++;
        prev_word = cur_word;
        cur_word = int'(data_in);
        n_load++;
        if (data_in == N'(P - 1)) n_max++;
        in_period = 1;
        high_cycles = 0;
        period_cycles = 0;
        cyc_in_period = 0;
        change_at = 1 + int'($urandom % (P - 2));
      end else begin
        cyc_in_period++;
        // Mid-period change of the input word.
        if (cyc_in_period == change_at && word_idx < words.size()) begin
          data_in = N'(words[word_idx]);
          word_idx++;
          n_midchange++;
        end
      end
    end
  end

  initial begin
    for (int w = 0; w < P; w++) words.push_back(w);
    repeat (3) words.push_back(0);
    repeat (3) words.push_back(P - 1);
    for (int k = 0; k < 60; k++) words.push_back(($urandom % 5 == 0) ? 0 : $urandom % P);
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    wait (word_idx == words.size());
    // Let the last word's periods complete.
    repeat (3 * P) @(posedge clk);
    @(negedge clk);
    check(periods_done >= words.size(), $sformatf("only %0d periods", periods_done));
    check(n_load > 0, "no register load");
    check(n_set > 0, "no latch set");
    check(n_reset > 0, "no comparator reset");
    check(n_collide > 0, "no reset/set collision at a zero word");
    check(n_midchange > 0, "no mid-period word change");
    check(n_max > 0, "largest word never applied");
    check(n_fullhigh > 0, "no all-high period on a change to zero");
    $display("mechanisms: loads=%0d sets=%0d resets=%0d zero_collisions=%0d midchanges=%0d max=%0d fullhigh=%0d",
             n_load, n_set, n_reset, n_collide, n_midchange, n_max, n_fullhigh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400 * P) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
