// mybusmux: the bus multiplexer that feeds both data registers.
//
// Combinational 4-to-1 selector. s = 0 passes the full 8-bit ALU result d0;
// s = 1, 2 and 3 pass the 4-bit inputs d1, d2 and d3 in the low nibble with a
// zero upper nibble. That zero extension is how the 4-bit switch operands X and
// Y enter the 8-bit datapath. (The module is called mybusmux rather than
// busmux to avoid a name clash in schematic tools.)
module mybusmux
  import spp_pkg::*;
(
  input  logic [7:0] d0,
  input  logic [3:0] d1,
  input  logic [3:0] d2,
  input  logic [3:0] d3,
  input  logic [1:0] s,
  output logic [7:0] y
);

  always_comb begin
    unique case (muxs_t'(s))
      MUX_ALU: y = d0;
      MUX_D1:  y = {4'h0, d1};
      MUX_Y:   y = {4'h0, d2};
      MUX_X:   y = {4'h0, d3};
      default: y = d0;
    endcase
  end

endmodule
