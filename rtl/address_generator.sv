// address_generator: up/down address counter of the March SS BIST.
//
// Produces the memory address for the March element being run, in
// ascending or descending order as the controller selects. A load sets the
// first address of an element (0 when counting up, 2**ADDR_W-1 when counting
// down) and latches the order; a step moves one address in the latched
// order. `last` flags the final address of that order, which the controller
// uses to close an element. Because the order is latched, `last` depends only
// on registers, not on the controller's outputs. Loading, stepping and the `last` flag are this design's own
// reading of a block that is specified only by what it does.
//
// Interface: load has priority over step; both act on the rising clock edge.
// `up` is sampled only with load. reset (synchronous, active high) sets the
// address to 0 and the order to ascending. `addr` and `last`
// are valid throughout the cycle that follows the edge.
module address_generator #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              load,   // set addr to the first address of order `up`
  input  logic              step,   // advance addr one place in the latched order
  input  logic              up,     // order taken at load: 1 ascending, 0 descending
  output logic [ADDR_W-1:0] addr,
  output logic              last    // addr is the final address of the latched order
);

  localparam logic [ADDR_W-1:0] ADDR_MAX = '1;

  logic dir_up;  // order of the element being run

  always_ff @(posedge clk) begin
    if (reset) begin
      addr   <= '0;
      dir_up <= 1'b1;
    end else if (load) begin
      addr   <= up ? '0 : ADDR_MAX;
      dir_up <= up;
    end else if (step) begin
      addr   <= dir_up ? addr + 1'b1 : addr - 1'b1;
    end
  end

  assign last = dir_up ? (addr == ADDR_MAX) : (addr == '0);

endmodule
