// pwm_counter: free-running N-bit synchronous binary counter with a
// pipelined (look-ahead) carry chain, the timing base of the PWM generator.
//
// How it works
//   Each counter bit C(i) is a toggle flip-flop T(i). T(0) toggles on every
//   clock and T(1) toggles when C(0) is 1, as in any binary counter. For the
//   higher bits the carry is not decoded from the current count, which would
//   put an N-input AND gate in the critical path. Instead a chain of 2-input
//   AND gates G(i) recognises, one cycle early, that the low bits are about to
//   become all ones, and a D flip-flop D(i) registers that prediction:
//     G(1)   = C(1) & ~C(0)            (low bits are ...10, next count ...11)
//     G(i)   = C(i) & G(i-1)           for 2 <= i <= N-2
//     Q(i)   = G(i) delayed one clock  (Q(i)=1 exactly when C(i:0) is all ones)
//     T(i+1) toggles when Q(i) = 1     for 1 <= i <= N-2
//     G(N-1) = C(N-1) & Q(N-2)         (the count is all ones)
//     overflow = G(N-1) delayed one clock
//   The enable of every counter bit thus comes straight from a flip-flop; the
//   decode of the lower bits runs one clock ahead as a chain of 2-input gates
//   in front of the D(i) flip-flops, the longest path being G(1)..G(N-2).
//   This structure, the gate chain, the inverted C(0) input of G(1) and the
//   Q(N-2) input of G(N-1), follows the counter diagram of the design.
//
// Interface and timing
//   count    : C(N-1..0), counts 0,1,...,2^N-1,0,... one step per clock.
//   q        : Q(N-2..1), the registered carry predictions (observable for test).
//   overflow : high for exactly one clock in every 2^N, during the cycle in
//              which count is 0, i.e. the clock right after the counter wrapped.
//              It marks the end of one PWM period and the start of the next.
//   rst      : synchronous, active high (this design's choice; the source
//              design has no reset). It puts the counter at 0 with overflow
//              high, which is the state a running counter has at count 0,
//              so no special first period exists.
//   N must be at least 3 for the chain to exist.
module pwm_counter #(
    parameter int unsigned N = 8
) (
    input  logic         clk,
    input  logic         rst,
    output logic [N-1:0] count,
    output logic [N-2:1] q,
    output logic         overflow
);

  logic [N-1:0] c;        // toggle flip-flop outputs C(i)
  logic [N-1:0] en;       // toggle enables EN of T(i)
  logic [N-1:1] g;        // AND gate outputs G(i)
  logic [N-1:1] d;        // D flip-flop outputs; d[N-1] is the overflow flop

  // Toggle enables.
  always_comb begin
    en[0] = 1'b1;
    en[1] = c[0];
    for (int i = 2; i < N; i++) en[i] = d[i-1];
  end

  // Look-ahead decode gates.
  assign g[1] = c[1] & ~c[0];
  for (genvar i = 2; i <= N - 2; i++) begin : g_chain
    assign g[i] = c[i] & g[i-1];
  end
  assign g[N-1] = c[N-1] & d[N-2];

  always_ff @(posedge clk) begin
    if (rst) begin
      c <= '0;
      d <= '0;
      d[N-1] <= 1'b1;
    end else begin
      c <= c ^ en;
      d <= g;
    end
  end

  assign count    = c;
  assign q        = d[N-2:1];
  assign overflow = d[N-1];

  // The predictions must always agree with a directly decoded count.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (overflow == (c == '0))
        else $error("pwm_counter: overflow out of step with count");
      for (int i = 1; i <= N - 2; i++) begin
        // mask of bits i..0
        automatic logic [N-1:0] low = (N'(1) << (i + 1)) - N'(1);
        assert (d[i] == ((c & low) == low))
          else $error("pwm_counter: carry prediction Q(%0d) wrong", i);
      end
    end
  end

endmodule
