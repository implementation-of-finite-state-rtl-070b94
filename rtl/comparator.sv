// comparator: checks each word read during the March SS test.
//
// On a cycle in which the controller marks a read for comparison, the word
// the memory returns is compared with the expected word from the data
// generator. faultdetect goes high for a mismatch and low for a match; it is
// a per-read result, not a sticky flag, and stays low on cycles without a
// compared read.
//
// Timing: the comparison is registered, so faultdetect reports the read of
// cycle t during cycle t+1. reset (synchronous, active high) clears it.
// The one-cycle register is this design's choice.
module comparator #(
  parameter int unsigned DATA_W = 8
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              cmp_en,    // a read to be checked this cycle
  input  logic [DATA_W-1:0] actual,    // memory output
  input  logic [DATA_W-1:0] expected,  // data generator output
  output logic              faultdetect
);

  always_ff @(posedge clk) begin
    if (reset)
      faultdetect <= 1'b0;
    else
      faultdetect <= cmp_en && (actual != expected);
  end

endmodule
