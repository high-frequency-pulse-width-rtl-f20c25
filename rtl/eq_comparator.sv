// eq_comparator: N-bit equality comparator (output A=B of the PWM generator).
//
// eq is high while input a (the duty register) equals input b (the counter).
// Only equality is needed, not a magnitude comparison: the counter passes
// every value once per period, so equality marks the single clock at which
// the PWM output must be reset. Purely combinational, no latency.
module eq_comparator #(
    parameter int unsigned N = 8
) (
    input  logic [N-1:0] a,
    input  logic [N-1:0] b,
    output logic         eq
);

  // Equal when no bit position differs.
  always_comb eq = ~|(a ^ b);

endmodule
