// duty_register: the N-bit input register of the PWM generator.
//
// It holds the duty cycle word that the comparator checks against the
// counter. A new word from the data input pins (typically a microcontroller
// port) is taken only on a clock edge where load is high; load is driven by
// the counter's overflow pulse, so the duty cycle changes only at the start of
// a PWM period and a period is never cut short or stretched by an update.
// Loading on overflow follows the source design; the synchronous active-high
// reset to zero (0 % duty) is this design's choice.
//
// Timing: q takes d one clock after an edge with load = 1 and holds it
// otherwise.
module duty_register #(
    parameter int unsigned N = 8
) (
    input  logic         clk,
    input  logic         rst,
    input  logic         load,
    input  logic [N-1:0] d,
    output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (load) q <= d;
  end

endmodule
