// tb_lw9: end-to-end self-check of the special-purpose processor.
//
// Runs the whole design with a 20-cycle "second" and watches only its ports,
// as a user at the board would: the power-on messages "SPc on" and "rEAdY"
// must each stay on the displays for exactly one second after the reset
// button is released; then, for every function select and many random switch
// settings, a one-cycle press of GO must put the function's 8-bit value on the
// two right-hand displays exactly 6, 6, 7 or 9 cycles later (FS = 0..3), with
// the other four displays dark. Display patterns are decoded back to hex here
// from the lit segments of each character.
//
// Each mechanism is counted and must occur at least once: both messages, GO
// ignored during the messages, the hold state waiting for GO, each of the
// four functions, a result that wraps below zero, and a reset pressed in the
// middle of a calculation.
module tb_lw9;
  localparam int unsigned HZ = 20;

  logic       clk = 0, rst_n, go_n;
  logic [9:0] sliders;
  logic [7:0] s5, s4, s3, s2, s1, s0;
  int checks = 0, failures = 0;
  int n_msg1 = 0, n_msg2 = 0, n_go_ignored = 0, n_hold = 0, n_wrap = 0, n_reset_mid = 0;
  int n_fs[4] = '{0, 0, 0, 0};

  lw9 #(.CLK_HZ(HZ)) dut (.clk, .rst_n, .go_n, .sliders,
                          .seg75(s5), .seg74(s4), .seg73(s3), .seg72(s2), .seg71(s1), .seg70(s0));

  always #5 clk = ~clk;

  function automatic logic [7:0] lit(string segs);
    logic [7:0] on = 8'h00;
    for (int i = 0; i < segs.len(); i++) on[segs[i] - "a"] = 1'b1;
    return ~on;
  endfunction

  localparam string HEXSEGS[16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                                    "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  // Decoded hex digit of a display, or -1 if it shows no hex digit.
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
  // Value shown in numeric mode, or -1.
  function automatic int shown();
    if ({s5, s4, s3, s2} != {4{8'hFF}}) return -1;
    if (digit(s1) < 0 || digit(s0) < 0) return -1;
    return 16 * digit(s1) + digit(s0);
  endfunction

  function automatic int want(int fs, int xi, int yi);
    case (fs)
      0: return (8 * xi + 4 * yi) % 256;
      1: return (5 * xi - yi + 256) % 256;
      2: return (12 * yi + 6) % 256;
      default: return (2 * xi + 3 * yi - 2 + 256) % 256;
    endcase
  endfunction
  function automatic int latency(int fs);
    case (fs) 0: return 6; 1: return 6; 2: return 7; default: return 9; endcase
  endfunction

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic power_on();
    @(negedge clk) rst_n = 0;
    repeat (2) @(posedge clk);
    #1 check(is_msg1(), "first message while reset is held");
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < HZ; i++) begin
      if (i == 5) begin go_n = 0; n_go_ignored++; end
      if (i == 6) go_n = 1;
      @(posedge clk); #1;
      check(is_msg1(), "SPc on for one second");
    end
    n_msg1++;
    for (int i = 0; i < HZ; i++) begin
      @(posedge clk); #1;
      check(is_msg2(), "rEAdY for one second");
    end
    n_msg2++;
    @(posedge clk); #1;
    check(shown() == 0, "hold shows 00 after power-on");
  endtask

  task automatic calc(int fs, int xi, int yi);
    int prev, w, mid;
    @(negedge clk);
    sliders = {2'(fs), 4'(xi), 4'(yi)};
    prev = shown();
    repeat (2) begin
      @(posedge clk); #1;
      check(shown() == prev, "hold keeps the result until GO");
    end
    n_hold++;
    @(negedge clk) go_n = 0;
    @(negedge clk) go_n = 1;       // first timeline edge has passed
    repeat (latency(fs) - 1) @(posedge clk);
    #1;
    w = want(fs, xi, yi);
    check(shown() >= 0, "numeric display during calculation");
    // One cycle before the end, B still holds the timeline's last
    // intermediate value: Y for FS=0 and FS=1, 4Y+2 for FS=2, 1 for FS=3.
    case (fs)
      0: mid = yi;
      1: mid = yi;
      2: mid = 4 * yi + 2;
      default: mid = 1;
    endcase
    check(shown() == mid, $sformatf("fs=%0d one cycle early shows %0d want %0d", fs, shown(), mid));
    @(posedge clk); #1;
    check(shown() == w, $sformatf("fs=%0d x=%0d y=%0d shows %0d want %0d", fs, xi, yi, shown(), w));
    n_fs[fs]++;
    if ((fs == 1 && 5 * xi < yi) || (fs == 3 && 2 * xi + 3 * yi < 2)) n_wrap++;
    // Stays put afterwards.
    repeat (3) @(posedge clk);
    #1 check(shown() == w, "result held in hold state");
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; go_n = 1; sliders = '0;
    power_on();
    for (int fs = 0; fs < 4; fs++) begin
      calc(fs, 15, 15);
      calc(fs, 0, 15);
      calc(fs, 0, 0);
      calc(fs, 9, 4);
    end
    for (int i = 0; i < 300; i++) calc($urandom % 4, $urandom % 16, $urandom % 16);
    // Reset pressed in the middle of a calculation.
    @(negedge clk) sliders = {2'd2, 4'd3, 4'd5};
    go_n = 0;
    @(negedge clk) go_n = 1;
    repeat (3) @(posedge clk);
    power_on();
    n_reset_mid++;
    calc(2, 3, 5);

    check(n_msg1 > 0, "mechanism: first message");
    check(n_msg2 > 0, "mechanism: ready message");
    check(n_go_ignored > 0, "mechanism: GO ignored during messages");
    check(n_hold > 0, "mechanism: hold waits for GO");
    for (int fs = 0; fs < 4; fs++) check(n_fs[fs] > 0, $sformatf("mechanism: function %0d", fs));
    check(n_wrap > 0, "mechanism: result wraps below zero");
    check(n_reset_mid > 0, "mechanism: reset during calculation");
    $display("mechanisms: msg1=%0d msg2=%0d go_ignored=%0d hold=%0d fs0=%0d fs1=%0d fs2=%0d fs3=%0d wrap=%0d reset_mid=%0d",
             n_msg1, n_msg2, n_go_ignored, n_hold, n_fs[0], n_fs[1], n_fs[2], n_fs[3], n_wrap, n_reset_mid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
