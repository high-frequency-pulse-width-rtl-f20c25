// tb_duty_register: self-checking testbench for the load-enabled duty register.
//
// Random data is presented every clock and load is pulsed at random. A
// reference copy, updated only when load was high at the clock edge, must
// match the register output one clock later; reset must clear it to zero.
module tb_duty_register;

  localparam int unsigned N = 8;

  logic         clk = 1'b0;
  logic         rst = 1'b1;
  logic         load = 1'b0;
  logic [N-1:0] d = '0;
  logic [N-1:0] q;
  logic [N-1:0] model = '0;
  int           checks = 0;
  int           failures = 0;
  int           loads = 0;

  always #5 clk = ~clk;

  duty_register #(.N(N)) dut (.clk(clk), .rst(rst), .load(load), .d(d), .q(q));

  initial begin
    @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL reset value %0h", q);
    end
    for (int cyc = 0; cyc < 2000; cyc++) begin
      d    = N'($urandom);
      load = ($urandom % 4) == 0;
      @(posedge clk);
      if (load) begin
        model = d;
        loads++;
      end
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL cycle %0d q=%0h expected %0h", cyc, q, model);
      end
    end
    // Reset clears the stored word.
    rst = 1'b1;
    load = 1'b1;
    d = '1;
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL reset did not clear q=%0h", q);
    end
    checks++;
    if (loads < 100) begin
      failures++;
      $display("FAIL too few loads %0d", loads);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
