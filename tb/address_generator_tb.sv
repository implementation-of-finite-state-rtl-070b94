// address_generator_tb: self-checking test of the up/down address counter.
//
// Runs a full ascending and a full descending sweep of a 16-word address
// space, checking the address and the `last` flag on every cycle against a
// counter kept by the testbench, then checks that load wins over step, that
// the order latched at load is kept while `up` changes, and that the address
// holds without step.
module address_generator_tb;
  localparam int unsigned AW = 4;
  localparam int unsigned N  = 1 << AW;

  logic          clk = 1'b0;
  logic          reset, load, step, up;
  logic [AW-1:0] addr;
  logic          last;
  int            checks = 0, failures = 0;

  address_generator #(.ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(int exp_addr, bit exp_last, string what);
    checks++;
    if (addr !== AW'(exp_addr) || last !== exp_last) begin
      failures++;
      $display("FAIL %s: addr=%0d last=%0b, expected addr=%0d last=%0b",
               what, addr, last, exp_addr, exp_last);
    end
  endtask

  task automatic cycle(bit l, bit s, bit u);
    load = l; step = s; up = u;
    @(posedge clk); #1;
  endtask

  initial begin
    reset = 1'b1; load = 1'b0; step = 1'b0; up = 1'b1;
    @(posedge clk); #1;
    reset = 1'b0;
    expect_state(0, 1'b0, "after reset");

    // Ascending sweep.
    cycle(1, 0, 1);
    for (int a = 0; a < N; a++) begin
      expect_state(a, a == N - 1, "ascending");
      cycle(0, 1, 0);  // `up` ignored while stepping
    end
    // Descending sweep.
    cycle(1, 0, 0);
    for (int a = N - 1; a >= 0; a--) begin
      expect_state(a, a == 0, "descending");
      cycle(0, 1, 1);
    end
    // Load has priority over step.
    cycle(1, 1, 1);
    expect_state(0, 1'b0, "load over step, up");
    cycle(1, 1, 0);
    expect_state(N - 1, 1'b0, "load over step, down");
    // Hold without step.
    cycle(0, 0, 1);
    cycle(0, 0, 1);
    expect_state(N - 1, 1'b0, "hold");
    cycle(0, 1, 1);
    expect_state(N - 2, 1'b0, "step keeps latched order");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
