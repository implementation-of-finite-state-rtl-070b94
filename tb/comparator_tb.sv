// comparator_tb: self-checking test of the read-data comparator.
//
// Drives random, equal and single-bit-different word pairs with the compare
// enable on and off, and checks that faultdetect in the next cycle is high
// exactly for an enabled mismatch. Also checks that reset clears it.
module comparator_tb;
  logic       clk = 1'b0;
  logic       reset, cmp_en;
  logic [7:0] actual, expected;
  logic       faultdetect;
  logic       exp_fd;
  int         checks = 0, failures = 0, mismatches = 0;

  comparator dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; cmp_en = 1'b1; actual = 8'h12; expected = 8'h34;
    @(posedge clk); #1;
    checks++;
    if (faultdetect !== 1'b0) begin failures++; $display("FAIL reset"); end
    reset = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      cmp_en   = ($urandom_range(3) != 0);
      expected = ($urandom_range(1) != 0) ? 8'hFF : 8'h00;
      case ($urandom_range(2))
        0: actual = expected;
        1: actual = expected ^ (8'h01 << $urandom_range(7));
        default: actual = 8'($urandom);
      endcase
      exp_fd = cmp_en && (actual != expected);
      if (exp_fd) mismatches++;
      @(posedge clk); #1;
      checks++;
      if (faultdetect !== exp_fd) begin
        failures++;
        $display("FAIL i=%0d en=%0b act=%h exp=%h fd=%0b", i, cmp_en, actual, expected, faultdetect);
      end
    end
    checks++;
    if (mismatches == 0) begin failures++; $display("FAIL no mismatch exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
