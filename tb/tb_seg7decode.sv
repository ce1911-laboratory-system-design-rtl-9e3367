// tb_seg7decode: self-check of the six-digit display decoder.
//
// Expected patterns are built here from the lit segments of each character
// (a..g, active high) and then inverted, since the outputs are active low with
// the decimal point dark. Checks numeric mode for all 256 data values (two hex
// digits on the two right-hand displays, the rest dark), the "SPc on" and
// "rEAdY" messages for several data values, and that select codes 3..7
// darken every display.
module tb_seg7decode;
  logic [7:0] data;
  logic [2:0] dispsel;
  logic [7:0] s5, s4, s3, s2, s1, s0;
  int checks = 0, failures = 0;

  seg7decode dut (.data, .dispsel, .seg75(s5), .seg74(s4), .seg73(s3), .seg72(s2), .seg71(s1), .seg70(s0));

  // Lit segments as a string over "abcdefg"; returns the active-low byte.
  function automatic logic [7:0] lit(string segs);
    logic [7:0] on = 8'h00;
    for (int i = 0; i < segs.len(); i++) on[segs[i] - "a"] = 1'b1;
    return ~on;
  endfunction

  function automatic logic [7:0] hexchar(int n);
    case (n)
      0: return lit("abcdef");   1: return lit("bc");
      2: return lit("abdeg");    3: return lit("abcdg");
      4: return lit("bcfg");     5: return lit("acdfg");
      6: return lit("acdefg");   7: return lit("abc");
      8: return lit("abcdefg");  9: return lit("abcdfg");
      10: return lit("abcefg");  11: return lit("cdefg");
      12: return lit("adef");    13: return lit("bcdeg");
      14: return lit("adefg");   default: return lit("aefg");
    endcase
  endfunction

  task automatic expect6(logic [7:0] e5, e4, e3, e2, e1, e0, string what);
    #1;
    checks++;
    if ({s5, s4, s3, s2, s1, s0} !== {e5, e4, e3, e2, e1, e0}) begin
      failures++;
      if (failures < 10)
        $display("%s: got %h %h %h %h %h %h want %h %h %h %h %h %h", what,
                 s5, s4, s3, s2, s1, s0, e5, e4, e3, e2, e1, e0);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] dark;
    dark = 8'hFF;
    dispsel = 3'd0;
    for (int v = 0; v < 256; v++) begin
      data = 8'(v);
      expect6(dark, dark, dark, dark, hexchar(v / 16), hexchar(v % 16), "numeric");
    end
    for (int k = 0; k < 8; k++) begin
      data = 8'($urandom);
      dispsel = 3'd1;
      expect6(lit("acdfg"), lit("abefg"), lit("deg"), dark, lit("cdeg"), lit("ceg"), "SPc on");
      dispsel = 3'd2;
      expect6(lit("eg"), lit("adefg"), lit("abcefg"), lit("bcdeg"), lit("bcdfg"), dark, "rEAdY");
      for (int c = 3; c < 8; c++) begin
        dispsel = 3'(c);
        expect6(dark, dark, dark, dark, dark, dark, "blank");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
