// march_ss_fsm_tb: self-checking test of the March SS controller.
//
// The testbench plays the address generator for a 16-word memory (a counter
// driven by the controller's load/step/up outputs) and checks, on every
// cycle of a complete run, the controller's state, operation (write or
// compared read), data value and the address order against a March SS
// operation list written out here independently of the design. It checks
// that the run takes exactly 22n operation cycles, that bist_end rises in
// the following cycle and holds while bist_en stays high, that dropping
// bist_en in the middle of a run returns the controller to idle, and that a
// second run after that is again complete and correct.
module march_ss_fsm_tb;
  import march_ss_pkg::*;

  localparam int unsigned AW = 4;
  localparam int unsigned N  = 1 << AW;

  logic          clk = 1'b0;
  logic          reset, bist_en, addr_last;
  logic          addr_load, addr_step, addr_up, bist_end;
  bist_ctrl_t    ctrl;
  state_e        state;
  logic [AW-1:0] addr;
  logic          dir_up;
  int            checks = 0, failures = 0;

  // The six March SS elements, as text: order and operation list.
  string elem_ops [6] = '{"w0", "r0r0w0r0w1", "r1r1w1r1w0",
                          "r0r0w0r0w1", "r1r1w1r1w0", "r0"};
  bit    elem_up  [6] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1};
  state_e elem_state [6] = '{ST_S0, ST_S1, ST_S2, ST_S3, ST_S4, ST_S5};

  march_ss_fsm dut (.*);

  // Address counter driven by the controller.
  always_ff @(posedge clk) begin
    if (reset) begin
      addr <= '0; dir_up <= 1'b1;
    end else if (addr_load) begin
      addr <= addr_up ? '0 : '1; dir_up <= addr_up;
    end else if (addr_step) begin
      addr <= dir_up ? addr + 1'b1 : addr - 1'b1;
    end
  end
  assign addr_last = dir_up ? (addr == '1) : (addr == '0);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t state=%s addr=%0d)", what, $time, state.name(), addr);
    end
  endtask

  // Run the whole algorithm, checking every operation cycle. Returns the
  // number of operation cycles seen.
  task automatic full_run();
    int ops = 0;
    bist_en = 1'b1;
    @(posedge clk); #1;  // leaves IDLE
    for (int e = 0; e < 6; e++) begin
      for (int i = 0; i < int'(N); i++) begin
        int a = elem_up[e] ? i : int'(N) - 1 - i;
        for (int k = 0; k < elem_ops[e].len() / 2; k++) begin
          bit is_w = (elem_ops[e][2*k] == "w");
          bit v    = (elem_ops[e][2*k+1] == "1");
          check(state == elem_state[e], $sformatf("state of element %0d", e));
          check(addr == AW'(a), $sformatf("address of element %0d op %0d", e, k));
          check(ctrl.active && ctrl.we == is_w && ctrl.rd == !is_w,
                $sformatf("operation kind, element %0d op %0d", e, k));
          check(ctrl.data == v, $sformatf("data value, element %0d op %0d", e, k));
          check(!bist_end, "bist_end early");
          ops++;
          @(posedge clk); #1;
        end
      end
    end
    check(ops == OPS_PER_ADDRESS * N, $sformatf("operation count %0d, expected 22n", ops));
    check(state == ST_S6 && bist_end && !ctrl.active, "end state after 22n operations");
    repeat (3) @(posedge clk);
    #1 check(bist_end && !ctrl.active, "bist_end held while bist_en is high");
    bist_en = 1'b0;
    @(posedge clk); #1;
    check(state == ST_IDLE && !bist_end, "back to idle when bist_en falls");
  endtask

  initial begin
    reset = 1'b1; bist_en = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    check(state == ST_IDLE && !ctrl.active && !bist_end, "idle after reset");
    repeat (2) @(posedge clk);
    #1 check(state == ST_IDLE, "stays idle without bist_en");

    full_run();

    // Abort in the middle of element S3.
    bist_en = 1'b1;
    wait (state == ST_S3);
    repeat (7) @(posedge clk);
    #1 bist_en = 1'b0;
    @(posedge clk); #1;
    check(state == ST_IDLE && !ctrl.active, "abort returns to idle");

    full_run();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
