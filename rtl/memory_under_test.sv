// memory_under_test: the embedded RAM the BIST tests.
//
// A single-port RAM of 2**ADDR_W words of DATA_W bits, byte wide by default.
// The word at `addr` is written from `wdata` on the rising clock edge when
// `we` is high; `rdata` shows the word at `addr` combinationally, so the
// BIST can read and compare a word within one cycle. The RAM stands in for
// whatever memory the BIST is attached to; its size, port style and
// read timing are choices of this design. Contents are not reset.
module memory_under_test #(
  parameter int unsigned ADDR_W = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we)
      mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
