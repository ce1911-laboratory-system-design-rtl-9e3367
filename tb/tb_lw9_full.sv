// tb_lw9_full: the processor at its default parameters (50 MHz clock, so
// each power-on message lasts 50,000,000 cycles), taken through one complete
// use: reset, both one-second messages with their exact start and end cycles,
// then one calculation of each of the four functions, each checked on the
// displays at its exact completion cycle (6, 6, 7, 9 cycles after GO), with
// the timeline's last intermediate value of register B one cycle before.
// Only the ports are observed; display patterns are decoded here.
module tb_lw9_full;
  localparam int unsigned HZ = 50_000_000;   // the design's default clock rate

  logic       clk = 0, rst_n, go_n;
  logic [9:0] sliders;
  logic [7:0] s5, s4, s3, s2, s1, s0;
  int checks = 0, failures = 0;

  lw9 dut (.clk, .rst_n, .go_n, .sliders,
           .seg75(s5), .seg74(s4), .seg73(s3), .seg72(s2), .seg71(s1), .seg70(s0));

  always #10 clk = ~clk;

  function automatic logic [7:0] lit(string segs);
    logic [7:0] on = 8'h00;
    for (int i = 0; i < segs.len(); i++) on[segs[i] - "a"] = 1'b1;
    return ~on;
  endfunction

  localparam string HEXSEGS[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                                    "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic int digit(logic [7:0] seg);
    for (int i = 0; i < 16; i++) if (seg == lit(HEXSEGS[i])) return i;
    return -1;
  endfunction
  function automatic logic is_msg1();
    return {s5, s4, s3, s2, s1, s0} ==
           {lit("acdfg"), lit("abefg"), lit("deg"), 8'hFF, lit("cdeg"), lit("ceg")};
  endfunction
  function automatic logic is_msg2();
    return {s5, s4, s3, s2, s1, s0} ==
           {lit("eg"), lit("adefg"), lit("abcefg"), lit("bcdeg"), lit("bcdfg"), 8'hFF};
  endfunction
  function automatic int shown();
    if ({s5, s4, s3, s2} != {4{8'hFF}}) return -1;
    if (digit(s1) < 0 || digit(s0) < 0) return -1;
    return 16 * digit(s1) + digit(s0);
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at cycle-time %0t: %s", $time, what);
    end
  endtask

  task automatic calc(int fs, int xi, int yi, int lat, int mid, int w);
    @(negedge clk) sliders = {2'(fs), 4'(xi), 4'(yi)};
    go_n = 0;
    @(negedge clk) go_n = 1;
    repeat (lat - 1) @(posedge clk);
    #1 check(shown() == mid, $sformatf("fs=%0d one cycle early shows %0d want %0d", fs, shown(), mid));
    @(posedge clk);
    #1 check(shown() == w, $sformatf("fs=%0d x=%0d y=%0d shows %0d want %0d", fs, xi, yi, shown(), w));
  endtask

  initial begin
    repeat (2 * HZ + 10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; go_n = 1; sliders = '0;
    repeat (3) @(posedge clk);
    #1 check(is_msg1(), "first message during reset");
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1 check(is_msg1(), "first message starts");
    repeat (HZ / 2) @(posedge clk);
    #1 check(is_msg1(), "first message half a second in");
    repeat (HZ - 1 - HZ / 2) @(posedge clk);
    #1 check(is_msg1(), "first message last cycle");
    @(posedge clk); #1 check(is_msg2(), "ready message starts after one second");
    repeat (HZ - 1) @(posedge clk);
    #1 check(is_msg2(), "ready message last cycle");
    @(posedge clk); #1 check(shown() == 0, "hold shows 00 after two seconds");
    calc(0, 11, 6, 6, 6, (8 * 11 + 4 * 6) % 256);
    calc(1, 2, 13, 6, 13, (5 * 2 - 13 + 256) % 256);
    calc(2, 14, 9, 7, 4 * 9 + 2, (12 * 9 + 6) % 256);
    calc(3, 7, 12, 9, 1, (2 * 7 + 3 * 12 - 2) % 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
