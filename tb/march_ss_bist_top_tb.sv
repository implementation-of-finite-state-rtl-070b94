// march_ss_bist_top_tb: end-to-end test of the March SS memory BIST.
//
// Runs the BIST at its default size (256 bytes) several times: once on a
// fault-free memory and once for each of a set of injected memory faults
// (stuck-at 0 and 1, up and down transition faults, inversion and
// idempotent coupling faults, an address decoder fault in which a write to
// one address also reaches a second cell, and the faults that March SS's
// repeated reads and non-transition writes are there for: a read-destructive
// fault, a deceptive read-destructive fault and a write-disturb fault). A
// fault is injected by correcting the RAM contents through a hierarchical
// reference at every falling clock edge, so it acts on what every later read
// returns. Faults sensitised by an operation look at the operation on the
// memory port at that edge: a read-destructive fault flips the cell before
// the read is sampled, the deceptive one and the write-disturb fault flip it
// at the next falling edge, after the read or write has completed.
//
// For each run the testbench works out, from its own copy of the March SS
// operation list and its own copy of the memory with the same fault, which
// reads must mismatch, and checks faultdetect on every cycle against that:
// the result of operation k is expected in cycle k+2 after bist_en rises.
// It checks that bist_end rises exactly 22n+1 cycles after bist_en, and it
// aborts one run by dropping bist_en. It counts how often each mechanism
// happened (ascending and descending elements, writes, compared reads,
// detected faults, end of test, abort) and fails on any that never did.
module march_ss_bist_top_tb;
  import march_ss_pkg::*;

  localparam int unsigned AW = 8;   // the top's default address width
  localparam int unsigned N  = 1 << AW;
  localparam int unsigned NOPS = OPS_PER_ADDRESS * N;

  typedef enum int {F_NONE, F_SA0, F_SA1, F_TF_UP, F_TF_DOWN, F_CFIN, F_CFID, F_ADF,
                    F_RDF, F_DRDF, F_WDF} fault_kind_e;
  typedef struct {
    fault_kind_e kind;
    int          victim;     // cell whose content goes wrong
    int          aggressor;  // coupling / decoder faults: the cell that triggers it
    int          bitpos;
    bit          val;        // operation faults: cell value that sensitises it
  } fault_t;

  logic clk = 1'b0;
  logic reset, bist_en;
  logic faultdetect, bist_end;
  int   checks = 0, failures = 0;

  // Mechanism counters.
  int n_up_elem = 0, n_down_elem = 0, n_writes = 0, n_reads = 0;
  int n_detect = 0, n_end = 0, n_abort = 0;

  march_ss_bist_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // March SS as text, written out independently of the design.
  string elem_ops [6] = '{"w0", "r0r0w0r0w1", "r1r1w1r1w0",
                          "r0r0w0r0w1", "r1r1w1r1w0", "r0"};
  bit    elem_up  [6] = '{1'b1, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1};

  fault_t cur_fault;
  bit     inject = 1'b0;
  logic [7:0] prev_v, prev_a;   // contents at the previous falling edge
  bit     pending_flip = 1'b0;  // deceptive read / write disturb: flip next edge
  bit     expect_mis [NOPS];
  logic [7:0] gold [N];

  // New content of the victim cell, given the victim and aggressor before
  // and after the last clock edge.
  function automatic logic [7:0] faulty(fault_t f, logic [7:0] pv, logic [7:0] cv,
                                        logic [7:0] pa, logic [7:0] ca);
    logic [7:0] r = cv;
    int b = f.bitpos;
    case (f.kind)
      F_SA0:     r[b] = 1'b0;
      F_SA1:     r[b] = 1'b1;
      F_TF_UP:   if (!pv[b] && cv[b]) r[b] = 1'b0;
      F_TF_DOWN: if (pv[b] && !cv[b]) r[b] = 1'b1;
      F_CFIN:    if (!pa[b] && ca[b]) r[b] = ~cv[b];
      F_CFID:    if (pa[b] && !ca[b]) r[b] = 1'b1;
      F_ADF:     if (pa != ca) r = ca;
      default:   ;
    endcase
    return r;
  endfunction

  // Fault injection into the RAM of the design.
  always @(negedge clk) begin
    if (inject) begin
      automatic logic [7:0] cv, ca, nv;
      automatic int b = cur_fault.bitpos;
      automatic logic victim_op;
      if (pending_flip) dut.u_mut.mem[cur_fault.victim][b] = ~dut.u_mut.mem[cur_fault.victim][b];
      pending_flip = 1'b0;
      cv = dut.u_mut.mem[cur_fault.victim];
      ca = dut.u_mut.mem[cur_fault.aggressor];
      nv = faulty(cur_fault, prev_v, cv, prev_a, ca);
      // Operation on the victim cell during this cycle.
      victim_op = dut.u_fsm.ctrl.active && (int'(dut.u_addr_gen.addr) == cur_fault.victim)
                  && (nv[b] == cur_fault.val);
      if (victim_op) begin
        case (cur_fault.kind)
          F_RDF:  if (dut.u_fsm.ctrl.rd) nv[b] = ~nv[b];
          F_DRDF: if (dut.u_fsm.ctrl.rd) pending_flip = 1'b1;
          F_WDF:  if (dut.u_fsm.ctrl.we && dut.u_fsm.ctrl.data == cur_fault.val) pending_flip = 1'b1;
          default: ;
        endcase
      end
      dut.u_mut.mem[cur_fault.victim] = nv;
      prev_v = nv;
      prev_a = (cur_fault.aggressor == cur_fault.victim) ? nv : ca;
    end
  end

  // Expected mismatch of every operation, from the testbench's own memory.
  task automatic build_expectation(fault_t f);
    int k = 0;
    logic [7:0] pv, pa, cv;
    foreach (gold[i]) gold[i] = 8'h00;
    pv = 8'h00; pa = 8'h00;
    for (int e = 0; e < 6; e++)
      for (int i = 0; i < int'(N); i++) begin
        int a = elem_up[e] ? i : int'(N) - 1 - i;
        for (int j = 0; j < elem_ops[e].len() / 2; j++) begin
          bit is_w = (elem_ops[e][2*j] == "w");
          logic [7:0] v = (elem_ops[e][2*j+1] == "1") ? 8'hFF : 8'h00;
          bit sens = (a == f.victim) && (gold[a][f.bitpos] == f.val);
          if (!is_w && sens && f.kind == F_RDF) gold[a][f.bitpos] = ~gold[a][f.bitpos];
          expect_mis[k] = !is_w && (gold[a] != v);
          if (!is_w && sens && f.kind == F_DRDF) gold[a][f.bitpos] = ~gold[a][f.bitpos];
          if (is_w) gold[a] = v;
          if (is_w && sens && f.kind == F_WDF && v[f.bitpos] == f.val)
            gold[a][f.bitpos] = ~gold[a][f.bitpos];
          cv = faulty(f, pv, gold[f.victim], pa, gold[f.aggressor]);
          gold[f.victim] = cv;
          pv = cv;
          pa = gold[f.aggressor];
          k++;
        end
      end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // One complete BIST run with fault f; checks every cycle.
  task automatic run(fault_t f, string name);
    int detected = 0, expected_det = 0;
    build_expectation(f);
    for (int k = 0; k < int'(NOPS); k++) expected_det += expect_mis[k];
    // Known starting contents, matching the testbench's copy.
    @(negedge clk);
    for (int i = 0; i < int'(N); i++) dut.u_mut.mem[i] = 8'h00;
    cur_fault = f; prev_v = 8'h00; prev_a = 8'h00; pending_flip = 1'b0;
    inject = (f.kind != F_NONE);
    bist_en = 1'b1;
    for (int c = 1; c <= int'(NOPS) + 1; c++) begin
      @(negedge clk);
      if (dut.u_fsm.ctrl.active) begin
        if (dut.u_fsm.ctrl.we) n_writes++; else n_reads++;
      end
      if (c >= 2) begin
        if (faultdetect !== expect_mis[c-2])
          check(1'b0, $sformatf("%s: faultdetect=%0b for operation %0d", name, faultdetect, c - 2));
        else checks++;
      end else
        check(!faultdetect, $sformatf("%s: faultdetect before first operation", name));
      if (faultdetect) detected++;
      if (c <= int'(NOPS)) begin
        if (bist_end) check(1'b0, $sformatf("%s: bist_end early in cycle %0d", name, c));
      end else
        check(bist_end, $sformatf("%s: bist_end in cycle 22n+1", name));
    end
    if (bist_end) n_end++;
    n_detect += detected;
    if (f.kind == F_NONE)
      check(detected == 0, $sformatf("%s: no detection on a good memory", name));
    else
      check(expected_det > 0 && detected == expected_det,
            $sformatf("%s: detected %0d of %0d expected mismatches", name, detected, expected_det));
    $display("%-10s mismatching reads: %0d", name, detected);
    inject = 1'b0;
    bist_en = 1'b0;
    @(negedge clk);
    check(!bist_end && !faultdetect, $sformatf("%s: idle after bist_en falls", name));
  endtask

  // Count ascending and descending elements as they start.
  state_e last_state = ST_IDLE;
  always @(posedge clk) begin
    if (dut.u_fsm.state != last_state && dut.u_fsm.state inside {[ST_S0:ST_S5]}) begin
      if (dut.u_addr_gen.dir_up) n_up_elem++; else n_down_elem++;
    end
    last_state <= dut.u_fsm.state;
  end

  initial begin
    reset = 1'b1; bist_en = 1'b0;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;

    run('{kind: F_NONE,    victim: 0,   aggressor: 0,   bitpos: 0, val: 1'b0}, "fault-free");
    run('{kind: F_SA0,     victim: 17,  aggressor: 17,  bitpos: 3, val: 1'b0}, "SA0");
    run('{kind: F_SA1,     victim: 200, aggressor: 200, bitpos: 7, val: 1'b0}, "SA1");

    // Abort a run half-way, then check the next run is clean.
    @(negedge clk);
    bist_en = 1'b1;
    repeat (NOPS / 2) @(negedge clk);
    bist_en = 1'b0;
    @(negedge clk);
    check(dut.u_fsm.state == ST_IDLE && !bist_end, "abort returns to idle");
    n_abort++;

    run('{kind: F_TF_UP,   victim: 5,   aggressor: 5,   bitpos: 0, val: 1'b0}, "TF-up");
    run('{kind: F_TF_DOWN, victim: 255, aggressor: 255, bitpos: 4, val: 1'b0}, "TF-down");
    run('{kind: F_CFIN,    victim: 40,  aggressor: 90,  bitpos: 2, val: 1'b0}, "CFin");
    run('{kind: F_CFID,    victim: 150, aggressor: 20,  bitpos: 6, val: 1'b0}, "CFid");
    run('{kind: F_RDF,     victim: 77,  aggressor: 77,  bitpos: 1, val: 1'b1}, "RDF1");
    run('{kind: F_DRDF,    victim: 33,  aggressor: 33,  bitpos: 5, val: 1'b0}, "DRDF0");
    run('{kind: F_WDF,     victim: 99,  aggressor: 99,  bitpos: 2, val: 1'b1}, "WDF1");
    run('{kind: F_ADF,     victim: 0,   aggressor: 128, bitpos: 0, val: 1'b0}, "ADF");

    $display("mechanisms: up elements=%0d down elements=%0d writes=%0d reads=%0d detections=%0d ends=%0d aborts=%0d",
             n_up_elem, n_down_elem, n_writes, n_reads, n_detect, n_end, n_abort);
    check(n_up_elem > 0,   "ascending element never run");
    check(n_down_elem > 0, "descending element never run");
    check(n_writes > 0,    "no write issued");
    check(n_reads > 0,     "no compared read issued");
    check(n_detect > 0,    "no fault detected");
    check(n_end > 0,       "bist_end never raised");
    check(n_abort > 0,     "no abort");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
