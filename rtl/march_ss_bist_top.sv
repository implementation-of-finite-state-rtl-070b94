// march_ss_bist_top: FSM-based memory BIST running March SS on an embedded RAM.
//
// The controller (march_ss_fsm) steps through the six March SS elements. For
// each cycle it names an operation: the address generator supplies the
// address in the element's order, the data generator widens the controller's
// data value into the all-0 or all-1 word that is written or expected, the
// memory under test performs the write or returns the word, and the
// comparator raises faultdetect when a compared read differs from the
// expected word. bist_end rises when all 22n operations are done.
//
// Ports are those of the BIST itself: clk, reset (synchronous, active high),
// bist_en (start, hold high while testing), faultdetect (per-read mismatch,
// one cycle after the read) and bist_end. A fault-free run with bist_en held
// high from cycle 0 issues its operations in cycles 1..22n and shows
// bist_end from cycle 22n+1. The memory size (ADDR_W, DATA_W) is this
// design's choice; the byte width follows the 0x00/0xFF data words.
module march_ss_bist_top
  import march_ss_pkg::*;
#(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic clk,
  input  logic reset,
  input  logic bist_en,
  output logic faultdetect,
  output logic bist_end
);

  logic              addr_load, addr_step, addr_up, addr_last;
  logic [ADDR_W-1:0] addr;
  logic [DATA_W-1:0] pattern;
  logic [DATA_W-1:0] rdata;
  bist_ctrl_t        ctrl;
  state_e            state;

  march_ss_fsm u_fsm (
    .clk       (clk),
    .reset     (reset),
    .bist_en   (bist_en),
    .addr_last (addr_last),
    .addr_load (addr_load),
    .addr_step (addr_step),
    .addr_up   (addr_up),
    .ctrl      (ctrl),
    .bist_end  (bist_end),
    .state     (state)
  );

  address_generator #(.ADDR_W(ADDR_W)) u_addr_gen (
    .clk   (clk),
    .reset (reset),
    .load  (addr_load),
    .step  (addr_step),
    .up    (addr_up),
    .addr  (addr),
    .last  (addr_last)
  );

  data_generator #(.DATA_W(DATA_W)) u_data_gen (
    .data_bit (ctrl.data),
    .data     (pattern)
  );

  memory_under_test #(.ADDR_W(ADDR_W), .DATA_W(DATA_W)) u_mut (
    .clk   (clk),
    .we    (ctrl.we),
    .addr  (addr),
    .wdata (pattern),
    .rdata (rdata)
  );

  comparator #(.DATA_W(DATA_W)) u_cmp (
    .clk         (clk),
    .reset       (reset),
    .cmp_en      (ctrl.rd),
    .actual      (rdata),
    .expected    (pattern),
    .faultdetect (faultdetect)
  );

endmodule
