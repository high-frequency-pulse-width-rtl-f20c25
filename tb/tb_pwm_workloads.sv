// tb_pwm_workloads: runs the operating points the PWM generator was
// characterised and demonstrated at, and measures the output in simulated
// time.
//
// Three generators (N = 8, 7 and 6 bits) share one clock whose period is
// changed between experiments. For each experiment the selected generator is
// reset, given a fixed duty word, allowed two periods to settle, and then its
// output is timed: the PWM frequency from the spacing of rising edges and the
// duty cycle from the high time. Each result is checked twice: exactly
// against f_clock / 2^N (with f_clock as realised at 1 ps resolution) and
// word / 2^N, and against the rounded figure quoted
// for that operating point (within 0.5 % for frequency, within 0.05
// percentage points for duty cycle).
//   - Demonstration points: 12 MHz and 50 MHz clocks, 8/7/6-bit words.
//     Where only a duty percentage is quoted the nearest word is used
//     (86.71 % -> 222/256, 36.71 % -> 94/256, 24.25 % -> 31/128,
//     40.6 % -> 26/64); the 50 MHz points give the words themselves
//     (10101000, 0101000, 101000).
//   - Characterisation points: the maximum clock rates reported for five
//     devices at 8, 7 and 6 bits, each with a half-scale word; only the
//     frequency figure is checked there.
module tb_pwm_workloads;
  timeunit 1ns; timeprecision 1ps;

  logic       clk = 1'b0;
  logic       rst = 1'b1;
  realtime    half_period = 10.0;
  logic [7:0] d8 = '0;
  logic [6:0] d7 = '0;
  logic [5:0] d6 = '0;
  logic       pwm8, pwm7, pwm6;
  logic       ovf8, ovf7, ovf6;
  logic [7:0] c8;
  logic [6:0] c7;
  logic [5:0] c6;

  int checks = 0;
  int failures = 0;
  int experiments = 0;

  always #(half_period) clk = ~clk;

  pwm_generator #(.N(8)) u8 (.clk(clk), .rst(rst), .data_in(d8), .pwm_out(pwm8), .overflow(ovf8), .count(c8));
  pwm_generator #(.N(7)) u7 (.clk(clk), .rst(rst), .data_in(d7), .pwm_out(pwm7), .overflow(ovf7), .count(c7));
  pwm_generator #(.N(6)) u6 (.clk(clk), .rst(rst), .data_in(d6), .pwm_out(pwm6), .overflow(ovf6), .count(c6));

  function automatic logic pwm_of(int n);
    case (n)
      8:       return pwm8;
      7:       return pwm7;
      default: return pwm6;
    endcase
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Run one operating point. quoted_khz and quoted_duty are the rounded
  // published figures; quoted_duty < 0 skips the duty comparison.
  task automatic run(input real clk_mhz, input int n, input int word, input real quoted_khz,
                     input real quoted_duty);
    realtime t_rise0, t_fall, t_rise1;
    real     f_khz, duty_pct, exact_khz, exact_duty;
    experiments++;
    half_period = 1000.0 / clk_mhz / 2.0;
    d8 = 8'(word);
    d7 = 7'(word);
    d6 = 6'(word);
    rst = 1'b1;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    // Two periods to load the word and settle.
    repeat (2 << n) @(posedge clk);
    @(posedge pwm_of(n));
    t_rise0 = $realtime;
    @(negedge pwm_of(n));
    t_fall = $realtime;
    @(posedge pwm_of(n));
    t_rise1 = $realtime;
    f_khz      = 1.0e6 / (t_rise1 - t_rise0);
    duty_pct   = 100.0 * (t_fall - t_rise0) / (t_rise1 - t_rise0);
    // The clock half period is rounded to the 1 ps time precision.
    exact_khz  = 1.0e6 / (2.0 * real'($rtoi(half_period * 1000.0 + 0.5)) / 1000.0 * real'(1 << n));
    exact_duty = 100.0 * real'(word) / real'(1 << n);
    $display("f_clock %8.3f MHz  N=%0d  word %3d : f_PWM %9.3f kHz (quoted %8.3f)  duty %6.2f %% (quoted %6.2f)",
             clk_mhz, n, word, f_khz, quoted_khz, duty_pct, quoted_duty);
    check(f_khz > exact_khz * 0.9999 && f_khz < exact_khz * 1.0001,
          $sformatf("N=%0d f_PWM %f kHz, f_clock/2^N = %f", n, f_khz, exact_khz));
    check(f_khz > quoted_khz * 0.995 && f_khz < quoted_khz * 1.005,
          $sformatf("N=%0d f_PWM %f kHz, quoted %f", n, f_khz, quoted_khz));
    check(duty_pct > exact_duty - 0.01 && duty_pct < exact_duty + 0.01,
          $sformatf("N=%0d duty %f %%, word/2^N = %f", n, duty_pct, exact_duty));
    if (quoted_duty >= 0.0)
      check(duty_pct > quoted_duty - 0.05 && duty_pct < quoted_duty + 0.05,
            $sformatf("N=%0d duty %f %%, quoted %f", n, duty_pct, quoted_duty));
  endtask

  initial begin
    // Demonstration board, 12 MHz clock.
    run(12.0, 8, 222, 46.875, 86.71);
    run(12.0, 8, 94, 46.875, 36.71);
    run(12.0, 7, 31, 93.75, 24.25);
    run(12.0, 6, 26, 187.5, 40.6);
    // Demonstration board, 50 MHz clock, words given in binary.
    run(50.0, 8, 'b10101000, 195.31, 65.62);
    run(50.0, 7, 'b0101000, 390.62, 31.25);
    run(50.0, 6, 'b101000, 781.25, 62.5);
    // Maximum clock rates per device and resolution (frequency only).
    run(205.044, 8, 128, 800.0, -1.0);
    run(226.706, 7, 64, 1771.0, -1.0);
    run(244.978, 6, 32, 3827.0, -1.0);
    run(202.224, 8, 128, 790.0, -1.0);
    run(233.318, 7, 64, 1822.0, -1.0);
    run(239.981, 6, 32, 3749.0, -1.0);
    run(184.877, 8, 128, 722.0, -1.0);
    run(203.666, 7, 64, 1590.0, -1.0);
    run(255.102, 6, 32, 3985.0, -1.0);
    run(94.127, 8, 128, 367.0, -1.0);
    run(127.665, 7, 64, 997.0, -1.0);
    run(135.355, 6, 32, 2110.0, -1.0);
    run(90.9, 8, 128, 355.0, -1.0);
    run(100.0, 7, 64, 781.0, -1.0);
    run(100.0, 6, 32, 1560.0, -1.0);
    check(experiments == 22, "not every operating point ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
