// seg7decode: drives the six 7-segment displays from the display select and
// the result register.
//
// Combinational. dispsel chooses what is on screen:
//   0  numeric: data as two hex digits, high nibble on seg71, low on seg70,
//      the four digits to the left dark;
//   1  power-on message "SPc on" across all six digits (seg75 leftmost);
//   2  ready message "rEAdY" on seg75..seg71, seg70 dark;
//   3..7  all digits dark.
// The two messages and numeric decoding are the specification's; the select
// codes, which digits carry the number and the placement of the five-letter
// message are this design's own. Each output is {dp,g,f,e,d,c,b,a}, active
// low, decimal point off.
module seg7decode
  import spp_pkg::*;
(
  input  logic [7:0] data,
  input  logic [2:0] dispsel,
  output logic [7:0] seg75,
  output logic [7:0] seg74,
  output logic [7:0] seg73,
  output logic [7:0] seg72,
  output logic [7:0] seg71,
  output logic [7:0] seg70
);

  always_comb begin
    {seg75, seg74, seg73, seg72, seg71, seg70} = {6{SEG_BLANK}};
    case (dispsel)
      DISP_NUM: begin
        seg71 = hex_to_seg(data[7:4]);
        seg70 = hex_to_seg(data[3:0]);
      end
      DISP_SPCON:
        {seg75, seg74, seg73, seg72, seg71, seg70} =
          {SEG_S, SEG_P, SEG_LC_C, SEG_BLANK, SEG_LC_O, SEG_LC_N};
      DISP_READY:
        {seg75, seg74, seg73, seg72, seg71, seg70} =
          {SEG_LC_R, SEG_E, SEG_A, SEG_LC_D, SEG_Y, SEG_BLANK};
      default: ;
    endcase
  end

endmodule
