// march_ss_pkg: types and constants shared by the March SS memory BIST.
//
// March SS is a March test of 22n operations for an n-word memory, made of
// six March elements that are applied to every address in turn:
//
//   M0 any(w0)  M1 up(r0,r0,w0,r0,w1)  M2 up(r1,r1,w1,r1,w0)
//   M3 down(r0,r0,w0,r0,w1)  M4 down(r1,r1,w1,r1,w0)  M5 any(r0)
//
// The controller gives each element a state of its own (S0..S5), with an
// idle state before them and an end state (S6) after them. This package holds
// that state encoding and the element table as functions of the state, so the
// controller and the testbenches read the algorithm from one place. The
// up/down order of M1..M4 is the usual March SS definition; the "any order"
// elements M0 and M5 are run in ascending order, a choice of this design.
package march_ss_pkg;

  // Controller states: idle, one state per March element, end state.
  typedef enum logic [2:0] {
    ST_IDLE = 3'd0,
    ST_S0   = 3'd1,
    ST_S1   = 3'd2,
    ST_S2   = 3'd3,
    ST_S3   = 3'd4,
    ST_S4   = 3'd5,
    ST_S5   = 3'd6,
    ST_S6   = 3'd7
  } state_e;

  // One memory operation of a March element.
  typedef struct packed {
    logic we;    // 1: write, 0: read-and-compare
    logic data;  // value written, or value expected on a read
  } march_op_t;

  localparam int unsigned MAX_OPS = 5;  // longest element (M1..M4)
  localparam int unsigned NUM_ELEMENTS = 6;
  localparam int unsigned OPS_PER_ADDRESS = 22;  // 1 + 5 + 5 + 5 + 5 + 1

  // Control word the controller sends to the address generator, data
  // generator, memory and comparator for the current cycle.
  typedef struct packed {
    logic active;  // an operation is issued this cycle
    logic we;      // memory write enable
    logic rd;      // read whose data is compared
    logic data;    // data value for the data generator
  } bist_ctrl_t;

  // Ascending (1) or descending (0) address order of the element of a state.
  function automatic logic element_up(state_e s);
    case (s)
      ST_S3, ST_S4: return 1'b0;
      default:      return 1'b1;
    endcase
  endfunction

  // Number of operations per address in the element of a state.
  function automatic int unsigned element_len(state_e s);
    case (s)
      ST_S0, ST_S5: return 1;
      ST_S1, ST_S2, ST_S3, ST_S4: return 5;
      default: return 0;
    endcase
  endfunction

  // Operation number i (0-based) of the element of a state.
  // M1/M3 are (r0,r0,w0,r0,w1), M2/M4 the same with 0 and 1 swapped.
  function automatic march_op_t element_op(state_e s, int unsigned i);
    march_op_t op;
    logic      v;  // the value the element starts from
    v = (s == ST_S2 || s == ST_S4);
    case (s)
      ST_S0: op = '{we: 1'b1, data: 1'b0};
      ST_S5: op = '{we: 1'b0, data: 1'b0};
      ST_S1, ST_S2, ST_S3, ST_S4: begin
        case (i)
          2:       op = '{we: 1'b1, data: v};
          4:       op = '{we: 1'b1, data: ~v};
          default: op = '{we: 1'b0, data: v};
        endcase
      end
      default: op = '{we: 1'b0, data: 1'b0};
    endcase
    return op;
  endfunction

  // State that follows a March element state.
  function automatic state_e next_element(state_e s);
    case (s)
      ST_S0:   return ST_S1;
      ST_S1:   return ST_S2;
      ST_S2:   return ST_S3;
      ST_S3:   return ST_S4;
      ST_S4:   return ST_S5;
      ST_S5:   return ST_S6;
      default: return ST_IDLE;
    endcase
  endfunction

endpackage
