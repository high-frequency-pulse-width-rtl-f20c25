// pwm_generator: counter-based high-frequency PWM generator.
//
// A free-running N-bit counter (pwm_counter) defines a PWM period of 2^N
// clocks, so f_PWM = f_clock / 2^N. Once per period its overflow pulse
// loads the N-bit duty word from data_in into an input register
// (duty_register) and sets an R/S storage element (rs_latch) whose output is
// the PWM signal. An equality comparator (eq_comparator) resets the output
// when the counter reaches the registered duty word. The duty cycle is
// therefore D = data / 2^N, from 0 to (2^N-1)/2^N, in steps of 1/2^N.
// The block structure (register, comparator, counter, R/S latch, overflow
// driving both the register load and the set input) follows the source
// design; the clocked latch, its reset priority and the reset are this
// design's choices.
//
// Timing, with period k starting at the clock where count = 0 and overflow
// is high, and D(k) the data_in value sampled on that clock edge:
//   - pwm_out is high for counts 1..D(k) of period k: exactly D(k) clocks,
//     then low until count 0 of the next period.
//   - During count 0 the comparator still sees the previous word D(k-1). If
//     that word is 0 the reset wins over the set and period k stays low; if
//     the new word D(k) is 0 (after a non-zero one) nothing resets the output
//     within period k and it stays high for 2^N clocks. In steady state and
//     for any change between non-zero words, every period is exact.
//   - data_in only needs to be stable on the overflow clock edge.
// rst is synchronous and active high: counter at 0, duty word 0, output low.
// The counter's carry-prediction taps (q) are test outputs and are left
// unconnected here on purpose.
module pwm_generator #(
    parameter int unsigned N = 8
) (
    input  logic         clk,
    input  logic         rst,
    input  logic [N-1:0] data_in,
    output logic         pwm_out,
    output logic         overflow,
    output logic [N-1:0] count
);

  logic [N-1:0] duty;
  logic         match;

  pwm_counter #(.N(N)) u_counter (
      .clk      (clk),
      .rst      (rst),
      .count    (count),
      .q        (),
      .overflow (overflow)
  );

  duty_register #(.N(N)) u_register (
      .clk  (clk),
      .rst  (rst),
      .load (overflow),
      .d    (data_in),
      .q    (duty)
  );

  eq_comparator #(.N(N)) u_comparator (
      .a  (duty),
      .b  (count),
      .eq (match)
  );

  rs_latch u_latch (
      .clk (clk),
      .rst (rst),
      .s   (overflow),
      .r   (match),
      .q   (pwm_out)
  );

endmodule
