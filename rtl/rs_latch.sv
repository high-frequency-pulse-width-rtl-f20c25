// rs_latch: set/reset storage element that drives the PWM output.
//
// The source design names an R/S latch, set by the counter overflow and
// reset by the comparator. Here it is built as a clocked SR flip-flop, so the
// output is glitch-free and changes only on the clock edge:
//   s = 1, r = 0 : q becomes 1
//   r = 1        : q becomes 0 (reset wins when both are high)
//   s = r = 0    : q holds
// Reset priority is this design's choice; it makes a duty word of zero give
// a constantly low output, since the comparator then fires in the same cycle
// as the set pulse. The synchronous active-high rst clears q.
//
// Timing: q changes one clock after s or r is sampled high.
module rs_latch (
    input  logic clk,
    input  logic rst,
    input  logic s,
    input  logic r,
    output logic q
);

  always_ff @(posedge clk) begin
    if (rst)    q <= 1'b0;
    else if (r) q <= 1'b0;
    else if (s) q <= 1'b1;
  end

endmodule
