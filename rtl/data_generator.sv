// data_generator: data background of the March SS BIST.
//
// March SS writes and expects only all-0 or all-1 words. The controller
// gives a single data value per operation; this block widens it to a full
// word (0x00 or 0xFF for the byte-wide memory), which is both the write data
// of the memory and the expected data of the comparator.
//
// Interface: purely combinational; `data` follows `data_bit` in the same
// cycle. The word width follows the byte the memory stores. The block is
// only wiring (one bit fanned out to every data bit); it is kept as a module
// of its own because the BIST is organised around it as a separate unit, and
// a richer data background (checkerboards, for instance) would go here.
module data_generator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              data_bit,  // 0: all-zero word, 1: all-one word
  output logic [DATA_W-1:0] data
);

  always_comb data = {DATA_W{data_bit}};

endmodule
