// tb_mybusmux: self-check of the bus multiplexer.
//
// Drives random values on all four data inputs for every select code and
// checks that select 0 passes the 8-bit input unchanged and selects 1..3 pass
// the matching 4-bit input with a zero upper nibble. Combinational; results
// are checked 1 ns after each change.
module tb_mybusmux;
  logic [7:0] d0, y, want;
  logic [3:0] d1, d2, d3;
  logic [1:0] s;
  int checks = 0, failures = 0;

  mybusmux dut (.d0, .d1, .d2, .d3, .s, .y);

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      d0 = 8'($urandom); d1 = 4'($urandom); d2 = 4'($urandom); d3 = 4'($urandom);
      s  = 2'(i % 4);
      #1;
      case (i % 4)
        0: want = d0;
        1: want = 8'(int'(d1));
        2: want = 8'(int'(d2));
        default: want = 8'(int'(d3));
      endcase
      checks++;
      if (y !== want) begin
        failures++;
        if (failures < 10) $display("mux mismatch s=%0d y=%h want %h", s, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
