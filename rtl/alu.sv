// alu: the processor's 8-bit arithmetic-logic unit.
//
// Purely combinational. The 3-bit select s picks one of the eight operations
// of the specification's table: 0 gives 0, 1 gives 1, 2 gives B-1, 3 gives
// A+B, 4 gives A-B, 5 gives A+A, 6 gives A AND B, 7 gives A OR B. Arithmetic is
// unsigned and wraps modulo 2**W; there is no carry or status output.
module alu
  import spp_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [2:0]   s,
  output logic [W-1:0] f
);

  always_comb begin
    unique case (alus_t'(s))
      ALU_ZERO: f = '0;
      ALU_ONE:  f = W'(1);
      ALU_DECB: f = b - W'(1);
      ALU_ADD:  f = a + b;
      ALU_SUB:  f = a - b;
      ALU_DBLA: f = a + a;
      ALU_AND:  f = a & b;
      ALU_OR:   f = a | b;
      default:  f = '0;
    endcase
  end

endmodule
