// tb_controller: self-check of the processor's control state machine.
//
// The controller runs here with a 10-cycle "second". The bench checks the
// power-on sequence cycle by cycle (first message for exactly CLK_HZ cycles
// after reset is released, then the ready message for CLK_HZ cycles, then the
// numeric display), that nothing is loaded while idle, and, for many random X,
// Y and every function select, that a one-cycle GO pulse starts a timeline of
// the expected length (6, 6, 7, 9 cycles). A small register/ALU/mux model
// written here follows the controller's outputs; register B of that model
// must hold the function's value modulo 256 when the timeline ends. It also
// checks that GO is ignored during the power-on messages and that a reset in
// the middle of a timeline returns to the first message.
module tb_controller;
  localparam int unsigned HZ = 10;

  logic       clk = 0, rst_n, go_n;
  logic [1:0] funcsel, muxs;
  logic       lda, ldb;
  logic [2:0] alus, dispsel;
  logic [3:0] x, y;
  logic [7:0] ma, mb, mbus, mf;
  int checks = 0, failures = 0;

  controller #(.CLK_HZ(HZ)) dut (.clk, .rst_n, .go_n, .funcsel, .muxs, .lda, .ldb, .alus, .dispsel);

  always #5 clk = ~clk;

  // Reference datapath driven by the controller outputs.
  always_comb begin
    case (alus)
      3'd0: mf = 8'd0;
      3'd1: mf = 8'd1;
      3'd2: mf = mb - 8'd1;
      3'd3: mf = ma + mb;
      3'd4: mf = ma - mb;
      3'd5: mf = ma + ma;
      3'd6: mf = ma & mb;
      default: mf = ma | mb;
    endcase
    case (muxs)
      2'd0: mbus = mf;
      2'd1: mbus = 8'd0;
      2'd2: mbus = {4'd0, y};
      default: mbus = {4'd0, x};
    endcase
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin ma <= 0; mb <= 0; end
    else begin
      if (lda) ma <= mbus;
      if (ldb) mb <= mbus;
    end
  end

  function automatic logic [7:0] want(int fs, int xi, int yi);
    case (fs)
      0: return 8'(8 * xi + 4 * yi);
      1: return 8'(5 * xi - yi + 256);
      2: return 8'(12 * yi + 6);
      default: return 8'(2 * xi + 3 * yi - 2 + 256);
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
    repeat (3) begin
      @(posedge clk); #1;
      check(dispsel == 3'd1 && !lda && !ldb, "reset state shows first message");
    end
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < HZ; i++) begin
      if (i == 3) go_n = 0;          // GO pressed during the messages is ignored
      if (i == 4) go_n = 1;
      @(posedge clk); #1;
      check(dispsel == 3'd1 && !lda && !ldb, "first message for one second");
    end
    for (int i = 0; i < HZ; i++) begin
      @(posedge clk); #1;
      check(dispsel == 3'd2 && !lda && !ldb, "ready message for one second");
    end
    @(posedge clk); #1;
    check(dispsel == 3'd0, "hold state after messages");
  endtask

  task automatic calc(int fs, int xi, int yi);
    int n;
    @(negedge clk);
    funcsel = 2'(fs); x = 4'(xi); y = 4'(yi);
    // Idle for a few cycles: no loads without GO.
    repeat (3) begin
      @(posedge clk); #1;
      check(!lda && !ldb && dispsel == 3'd0, "hold waits for GO");
    end
    @(negedge clk) go_n = 0;
    @(negedge clk) go_n = 1;
    // The first timeline state is now active; count load cycles.
    n = 0;
    while ((lda || ldb) && n < 20) begin
      check(dispsel == 3'd0, "numeric display during calculation");
      n++;
      @(posedge clk); #1;
    end
    check(n == latency(fs), $sformatf("fs=%0d latency %0d want %0d", fs, n, latency(fs)));
    check(mb == want(fs, xi, yi),
          $sformatf("fs=%0d x=%0d y=%0d B=%0d want %0d", fs, xi, yi, mb, want(fs, xi, yi)));
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; go_n = 1; funcsel = 0; x = 0; y = 0;
    power_on();
    // Corner values, then random ones, for each function.
    for (int fs = 0; fs < 4; fs++) begin
      calc(fs, 0, 0);
      calc(fs, 15, 15);
      calc(fs, 0, 15);
      calc(fs, 15, 0);
    end
    for (int i = 0; i < 200; i++) calc($urandom % 4, $urandom % 16, $urandom % 16);
    // Reset in the middle of a timeline.
    @(negedge clk);
    funcsel = 2'd3; go_n = 0;
    @(negedge clk) go_n = 1;
    repeat (2) @(posedge clk);
    power_on();
    calc(3, 7, 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
