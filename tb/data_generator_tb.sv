// data_generator_tb: self-checking test of the data background generator.
//
// Checks that a data value of 0 gives the all-zero word and 1 the all-one
// word, for the default byte width and for a 13-bit instance.
module data_generator_tb;
  logic        data_bit;
  logic [7:0]  data8;
  logic [12:0] data13;
  int          checks = 0, failures = 0;

  data_generator                dut8  (.data_bit(data_bit), .data(data8));
  data_generator #(.DATA_W(13)) dut13 (.data_bit(data_bit), .data(data13));

  initial begin : watchdog
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      data_bit = i[0];
      #1;
      checks++;
      if (data8 !== (data_bit ? 8'hFF : 8'h00)) begin
        failures++;
        $display("FAIL 8-bit: bit=%0b data=%h", data_bit, data8);
      end
      checks++;
      if (data13 !== (data_bit ? 13'h1FFF : 13'h0000)) begin
        failures++;
        $display("FAIL 13-bit: bit=%0b data=%h", data_bit, data13);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
