// tb_reg8: self-check of the 8-bit register with synchronous reset and load.
//
// Applies random reset, load and data values on the falling clock edge and
// compares q after every rising edge with a reference value kept here:
// cleared when reset is low, loaded when ld is high, held otherwise. It also
// checks that reset does not act between clock edges (it is synchronous).
module tb_reg8;
  logic       clk = 0, rst_n, ld;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  reg8 dut (.clk, .rst_n, .ld, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; ld = 0; d = 8'h5A;
    @(posedge clk); #1;
    model = 8'h00;
    checks++; if (q !== model) failures++;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      rst_n = ($urandom % 8) != 0;
      ld    = $urandom % 2;
      d     = 8'($urandom);
      // Synchronous reset: q must not change before the clock edge.
      #1;
      checks++;
      if (q !== model) begin failures++; $display("q changed without a clock edge"); end
      @(posedge clk);
      if (!rst_n)  model = 8'h00;
      else if (ld) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("reg mismatch q=%h want %h", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
