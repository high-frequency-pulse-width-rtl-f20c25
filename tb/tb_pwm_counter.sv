// tb_pwm_counter: self-checking testbench for the look-ahead PWM counter.
//
// Three counters of different widths (8, 5 and the minimum 3 bits) run side
// by side from reset. A plain integer reference counter, incremented every
// clock, predicts the count; from it the testbench derives the expected
// overflow pulse (count = 0) and every registered carry prediction
// Q(i) (count bits i..0 all ones). It also checks that overflow pulses are
// exactly 2^N clocks apart. Outputs are compared on the falling clock edge.
module tb_pwm_counter;

  localparam int unsigned NA = 8;
  localparam int unsigned NB = 5;
  localparam int unsigned NC = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  always #5 clk = ~clk;

  logic [NA-1:0] count_a;
  logic [NA-2:1] q_a;
  logic          ovf_a;
  logic [NB-1:0] count_b;
  logic [NB-2:1] q_b;
  logic          ovf_b;
  logic [NC-1:0] count_c;
  logic [NC-2:1] q_c;
  logic          ovf_c;

  pwm_counter #(.N(NA)) dut_a (.clk(clk), .rst(rst), .count(count_a), .q(q_a), .overflow(ovf_a));
  pwm_counter #(.N(NB)) dut_b (.clk(clk), .rst(rst), .count(count_b), .q(q_b), .overflow(ovf_b));
  pwm_counter #(.N(NC)) dut_c (.clk(clk), .rst(rst), .count(count_c), .q(q_c), .overflow(ovf_c));

  // Check one counter against the reference value ref (already reduced mod 2^n).
  task automatic check_counter(input int n, input longint ref_val, input longint cnt,
                               input longint qv, input logic ovf);
    checks++;
    if (cnt != ref_val) begin
      failures++;
      $display("FAIL N=%0d count=%0d expected %0d", n, cnt, ref_val);
    end
    checks++;
    if (ovf != (ref_val == 0)) begin
      failures++;
      $display("FAIL N=%0d overflow=%0b at count %0d", n, ovf, ref_val);
    end
    for (int i = 1; i <= n - 2; i++) begin
      longint low = (64'd1 << (i + 1)) - 1;
      logic   exp_q = ((ref_val & low) == low);
      checks++;
      if (qv[i-1] != exp_q) begin
        failures++;
        $display("FAIL N=%0d Q(%0d)=%0b at count %0d", n, i, qv[i-1], ref_val);
      end
    end
  endtask

  longint ticks = 0;
  longint last_ovf_a = -1;
  int     periods_a = 0;

  always @(negedge clk) begin
    if (!rst) begin
      check_counter(NA, ticks % (1 << NA), longint'(count_a), longint'(q_a), ovf_a);
      check_counter(NB, ticks % (1 << NB), longint'(count_b), longint'(q_b), ovf_b);
      check_counter(NC, ticks % (1 << NC), longint'(count_c), longint'(q_c), ovf_c);
      if (ovf_a) begin
        if (last_ovf_a >= 0) begin
          checks++;
          periods_a++;
          if (ticks - last_ovf_a != (1 << NA)) begin
            failures++;
            $display("FAIL overflow spacing %0d", ticks - last_ovf_a);
          end
        end
        last_ovf_a = ticks;
      end
      ticks++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5 * (1 << NA) + 17) @(posedge clk);
    // Reset in mid-count must bring every counter back to 0.
    rst <= 1'b1;
    @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    ticks = 0;
    last_ovf_a = -1;
    repeat (2 * (1 << NA) + 3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (periods_a < 6) begin
      failures++;
      $display("FAIL only %0d full periods seen", periods_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
