// march_ss_fsm: the BIST controller, a finite state machine running March SS.
//
// States: IDLE, then S0..S5, one per March element, then S6, the end state.
//   S0 any(w0)  S1 up(r0,r0,w0,r0,w1)  S2 up(r1,r1,w1,r1,w0)
//   S3 down(r0,r0,w0,r0,w1)  S4 down(r1,r1,w1,r1,w0)  S5 any(r0)
// In an element state the machine issues one memory operation per clock: an
// operation counter walks the element's operations at the current address,
// and after the last one the address generator steps to the next address.
// When the last operation has been applied at the final address, the machine
// moves to the next element and reloads the address generator with that
// element's first address, so elements follow each other without a gap. The
// whole test takes 22n clocks for n words, plus one clock to leave IDLE.
// The state list, the element order and the operations follow the March SS
// definition; the operation counter, the address handshake and the exact
// handling of bist_en are this design's choices.
//
// Interface:
//   bist_en  high starts the test from IDLE and must stay high while it runs;
//            dropping it in any state returns the machine to IDLE.
//   bist_end high in S6, from the cycle after the last operation, until
//            bist_en falls.
//   ctrl     the current cycle's operation: active, we (write), rd (compared
//            read) and data (value written or expected).
//   addr_load/addr_step/addr_up drive the address generator (addr_up is the
//            order of the element a load starts); addr_last is its
//            "final address" flag. reset is synchronous and active high.
module march_ss_fsm
  import march_ss_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       bist_en,
  input  logic       addr_last,
  output logic       addr_load,
  output logic       addr_step,
  output logic       addr_up,
  output bist_ctrl_t ctrl,
  output logic       bist_end,
  output state_e     state
);

  logic [$clog2(MAX_OPS)-1:0] op_idx;  // operation within the element
  march_op_t  cur_op;
  logic       in_element;  // state is one of S0..S5
  logic       last_op;     // op_idx is the element's last operation
  logic       elem_done;   // last operation at the final address

  always_comb begin
    in_element = (state != ST_IDLE) && (state != ST_S6);
    cur_op     = element_op(state, 32'(op_idx));
    last_op    = (32'(op_idx) == element_len(state) - 1);
    elem_done  = in_element && last_op && addr_last;

    ctrl.active = in_element;
    ctrl.we     = in_element && cur_op.we;
    ctrl.rd     = in_element && !cur_op.we;
    ctrl.data   = cur_op.data;

    addr_load = bist_en && ((state == ST_IDLE) || elem_done);
    addr_step = bist_en && in_element && last_op && !addr_last;
    // Order of the element that a load starts; the generator keeps it.
    addr_up   = (state == ST_IDLE) ? element_up(ST_S0)
                                   : element_up(next_element(state));

    bist_end = (state == ST_S6);
  end

  always_ff @(posedge clk) begin
    if (reset || !bist_en) begin
      state  <= ST_IDLE;
      op_idx <= '0;
    end else begin
      case (state)
        ST_IDLE: state <= ST_S0;
        ST_S6:   state <= ST_S6;
        default: begin
          if (last_op) begin
            op_idx <= '0;
            if (addr_last)
              state <= next_element(state);
          end else begin
            op_idx <= op_idx + 1'b1;
          end
        end
      endcase
    end
  end

  // Operation counter never leaves the element's operation list.
  a_op_idx_in_range: assert property (@(posedge clk) disable iff (reset)
    in_element |-> 32'(op_idx) < element_len(state));
  // A write and a compared read are never issued together.
  a_we_rd_exclusive: assert property (@(posedge clk) !(ctrl.we && ctrl.rd));

endmodule
