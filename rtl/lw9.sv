// lw9: top level of the special-purpose processor.
//
// The processor reads two 4-bit operands X and Y and a 2-bit function select
// FS from ten toggle switches, and on a press of the GO button computes one
// of 8X+4Y, 5X-Y, 12Y+6 or 2X+3Y-2 as an 8-bit (modulo 256) result, shown in
// hexadecimal on six 7-segment displays. After reset it shows "SPc on" and
// then "rEAdY" for one second each.
//
// Datapath, as in the reference schematic: the bus multiplexer output feeds
// the D inputs of both registers A and B; A and B feed the ALU; the ALU result
// feeds multiplexer input D0; D3 and D2 take the switch nibbles; B also feeds
// the display decoder. The controller drives every select and load enable.
//
// Ports: sliders[9:8] = FS, sliders[7:4] = X, sliders[3:0] = Y (the X/Y split
// is this design's reading of the schematic); rst_n and go_n are the
// active-low pushbuttons, used synchronously without debouncing; seg75..seg70
// are the displays from left to right, {dp,g,f,e,d,c,b,a} active low.
// Timing: a result appears in B 6, 6, 7 or 9 clock cycles (FS = 0..3) after
// the edge that sees go_n low in the hold state. The unused multiplexer input
// D1 is tied to zero. CLK_HZ is the clock frequency in Hz that sets the
// one-second message time; 50 MHz is an assumed default.
module lw9 #(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go_n,
  input  logic [9:0] sliders,
  output logic [7:0] seg75,
  output logic [7:0] seg74,
  output logic [7:0] seg73,
  output logic [7:0] seg72,
  output logic [7:0] seg71,
  output logic [7:0] seg70
);

  logic [1:0] muxs;
  logic       lda, ldb;
  logic [2:0] alus;
  logic [2:0] dispsel;
  logic [7:0] bus_y, reg_a, reg_b, alu_f;

  controller #(.CLK_HZ(CLK_HZ)) inst8 (
    .clk, .rst_n, .go_n,
    .funcsel (sliders[9:8]),
    .muxs, .lda, .ldb, .alus, .dispsel
  );

  reg8 #(.W(8)) inst  (.clk, .rst_n, .ld(lda), .d(bus_y), .q(reg_a));
  reg8 #(.W(8)) inst1 (.clk, .rst_n, .ld(ldb), .d(bus_y), .q(reg_b));

  alu #(.W(8)) inst2 (.a(reg_a), .b(reg_b), .s(alus), .f(alu_f));

  mybusmux inst5 (
    .d0 (alu_f),
    .d1 (4'h0),
    .d2 (sliders[3:0]),
    .d3 (sliders[7:4]),
    .s  (muxs),
    .y  (bus_y)
  );

  seg7decode inst4 (
    .data (reg_b), .dispsel,
    .seg75, .seg74, .seg73, .seg72, .seg71, .seg70
  );

endmodule
