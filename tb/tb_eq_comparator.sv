// tb_eq_comparator: self-checking testbench for the equality comparator.
//
// A 4-bit comparator is checked exhaustively (all 256 input pairs) and an
// 8-bit one on every equal pair, every single-bit difference and random pairs.
module tb_eq_comparator;

  logic [3:0] a4, b4;
  logic       eq4;
  logic [7:0] a8, b8;
  logic       eq8;
  int         checks = 0;
  int         failures = 0;

  eq_comparator #(.N(4)) dut4 (.a(a4), .b(b4), .eq(eq4));
  eq_comparator #(.N(8)) dut8 (.a(a8), .b(b8), .eq(eq8));

  task automatic check8(input logic [7:0] x, input logic [7:0] y);
    a8 = x;
    b8 = y;
    #1;
    checks++;
    if (eq8 != (int'(x) == int'(y))) begin
      failures++;
      $display("FAIL N=8 a=%0d b=%0d eq=%0b", x, y, eq8);
    end
  endtask

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if (eq4 != (x == y)) begin
          failures++;
          $display("FAIL N=4 a=%0d b=%0d eq=%0b", x, y, eq4);
        end
      end
    for (int x = 0; x < 256; x++) begin
      check8(8'(x), 8'(x));
      for (int bit_i = 0; bit_i < 8; bit_i++) check8(8'(x), 8'(x) ^ (8'd1 << bit_i));
    end
    for (int k = 0; k < 1000; k++) check8(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
