// memory_under_test_tb: self-checking test of the single-port RAM.
//
// Fills a 32-word instance with random words, then reads every word back
// with the combinational read port, checks that writes with `we` low change
// nothing, and overwrites a random subset, checking against a copy kept by
// the testbench.
module memory_under_test_tb;
  localparam int unsigned AW = 5;
  localparam int unsigned N  = 1 << AW;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] addr;
  logic [7:0]    wdata, rdata;
  logic [7:0]    model [N];
  int            checks = 0, failures = 0;

  memory_under_test #(.ADDR_W(AW), .DATA_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(string what);
    we = 1'b0;
    for (int a = 0; a < N; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (rdata !== model[a]) begin
        failures++;
        $display("FAIL %s addr=%0d rdata=%h expected=%h", what, a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    @(negedge clk);
    for (int a = 0; a < N; a++) begin
      we = 1'b1; addr = AW'(a); wdata = 8'($urandom); model[a] = wdata;
      @(negedge clk);
    end
    read_all("fill");
    for (int a = 0; a < N; a++) begin
      we = 1'b0; addr = AW'(a); wdata = ~model[a];
      @(negedge clk);
    end
    read_all("we low");
    for (int i = 0; i < 100; i++) begin
      we = 1'b1; addr = AW'($urandom_range(N - 1)); wdata = 8'($urandom);
      model[addr] = wdata;
      @(negedge clk);
    end
    read_all("overwrite");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
