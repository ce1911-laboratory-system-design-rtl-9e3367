// spp_pkg: shared types and constants of the special-purpose processor.
//
// The ALU operation codes follow the specification's ALUS table (0: F=0,
// 1: F=1, 2: F=B-1, 3: F=A+B, 4: F=A-B, 5: F=A+A, 6: F=A AND B, 7: F=A OR B).
// The bus multiplexer select codes follow its input numbering (D0..D3).
// The display-select codes and the 7-segment coding are this design's own
// choice: 8 bits {dp,g,f,e,d,c,b,a}, active low, so a 0 lights a segment and
// the decimal point (bit 7) is always dark.
package spp_pkg;

  typedef enum logic [2:0] {
    ALU_ZERO = 3'd0,  // F = 0
    ALU_ONE  = 3'd1,  // F = 1
    ALU_DECB = 3'd2,  // F = B - 1
    ALU_ADD  = 3'd3,  // F = A + B
    ALU_SUB  = 3'd4,  // F = A - B
    ALU_DBLA = 3'd5,  // F = A + A
    ALU_AND  = 3'd6,  // F = A AND B
    ALU_OR   = 3'd7   // F = A OR B
  } alus_t;

  typedef enum logic [1:0] {
    MUX_ALU = 2'd0,   // D0: 8-bit ALU result
    MUX_D1  = 2'd1,   // D1: 4-bit input, unused in this system
    MUX_Y   = 2'd2,   // D2: Y nibble from SLIDERS[3:0]
    MUX_X   = 2'd3    // D3: X nibble from SLIDERS[7:4]
  } muxs_t;

  typedef enum logic [2:0] {
    DISP_NUM   = 3'd0,  // DATA as two hex digits on the two rightmost displays
    DISP_SPCON = 3'd1,  // "SPc on"
    DISP_READY = 3'd2,  // "rEAdY"
    DISP_BLANK = 3'd3   // all dark (codes 3..7)
  } dispsel_t;

  // Active-low segment patterns, {dp,g,f,e,d,c,b,a}.
  localparam logic [7:0] SEG_BLANK = 8'hFF;
  localparam logic [7:0] SEG_S     = 8'h92;  // a f g c d
  localparam logic [7:0] SEG_P     = 8'h8C;  // a b e f g
  localparam logic [7:0] SEG_LC_C  = 8'hA7;  // d e g
  localparam logic [7:0] SEG_LC_O  = 8'hA3;  // c d e g
  localparam logic [7:0] SEG_LC_N  = 8'hAB;  // c e g
  localparam logic [7:0] SEG_LC_R  = 8'hAF;  // e g
  localparam logic [7:0] SEG_E     = 8'h86;  // a d e f g
  localparam logic [7:0] SEG_A     = 8'h88;  // a b c e f g
  localparam logic [7:0] SEG_LC_D  = 8'hA1;  // b c d e g
  localparam logic [7:0] SEG_Y     = 8'h91;  // b c d f g

  // Hexadecimal digit to active-low segments: 0-9, A, b, C, d, E, F.
  function automatic logic [7:0] hex_to_seg(input logic [3:0] nib);
    logic [7:0] s;
    case (nib)
      4'h0: s = 8'hC0;
      4'h1: s = 8'hF9;
      4'h2: s = 8'hA4;
      4'h3: s = 8'hB0;
      4'h4: s = 8'h99;
      4'h5: s = 8'h92;
      4'h6: s = 8'h82;
      4'h7: s = 8'hF8;
      4'h8: s = 8'h80;
      4'h9: s = 8'h90;
      4'hA: s = 8'h88;
      4'hB: s = 8'h83;
      4'hC: s = 8'hC6;
      4'hD: s = 8'hA1;
      4'hE: s = 8'h86;
      default: s = 8'h8E;  // F
    endcase
    return s;
  endfunction

endpackage
