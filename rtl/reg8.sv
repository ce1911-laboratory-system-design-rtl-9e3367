// reg8: the processor's 8-bit data register (instances A and B of the
// schematic).
//
// On a rising clock edge the register clears to zero while rst_n is low,
// otherwise takes d when ld is high, otherwise holds. Both reset and load are
// synchronous, as the specification asks; reset wins over load. The reset is
// active low because the schematic wires the active-low reset pushbutton
// straight to it. The output q is the register itself, so it changes one
// clock edge after a load.
module reg8 #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         ld,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
