// tb_rs_latch: self-checking testbench for the clocked set/reset element.
//
// Drives every combination of s and r, then random sequences, against a
// reference: set makes the output 1, reset makes it 0 and wins when both are
// high, neither holds the value. Each case is counted so that all four occur.
module tb_rs_latch;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic s = 1'b0;
  logic r = 1'b0;
  logic q;
  logic model = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   seen[4] = '{0, 0, 0, 0};

  always #5 clk = ~clk;

  rs_latch dut (.clk(clk), .rst(rst), .s(s), .r(r), .q(q));

  task automatic step(input logic sv, input logic rv);
    s = sv;
    r = rv;
    @(posedge clk);
    seen[{sv, rv}]++;
    if (rv) model = 1'b0;
    else if (sv) model = 1'b1;
    @(negedge clk);
    checks++;
    if (q != model) begin
      failures++;
      $display("FAIL s=%0b r=%0b q=%0b expected %0b", sv, rv, q, model);
    end
  endtask

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (q != 1'b0) begin
      failures++;
      $display("FAIL reset value");
    end
    // Directed: set, hold, both (reset wins), set, reset, hold.
    step(1, 0); step(0, 0); step(1, 1); step(0, 0); step(1, 0); step(0, 1); step(0, 0);
    for (int k = 0; k < 1000; k++) step(1'($urandom), 1'($urandom));
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL input case %0d never applied", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
