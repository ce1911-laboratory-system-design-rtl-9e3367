// tb_alu: exhaustive self-check of the 8-bit ALU.
//
// Applies every combination of A, B and the eight operation codes and
// compares F with a reference computed here in integer arithmetic, reduced
// modulo 256. The ALU is combinational, so results are checked 1 ns after the
// inputs change. A watchdog ends the run if it stalls.
module tb_alu;
  logic [7:0] a, b, f;
  logic [2:0] s;
  int checks = 0, failures = 0;

  alu dut (.a, .b, .s, .f);

  function automatic int ref_f(int ai, int bi, int si);
    case (si)
      0: return 0;
      1: return 1;
      2: return (bi + 255) % 256;
      3: return (ai + bi) % 256;
      4: return (ai - bi + 256) % 256;
      5: return (2 * ai) % 256;
      6: return ai & bi;
      default: return ai | bi;
    endcase
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int si = 0; si < 8; si++)
      for (int ai = 0; ai < 256; ai++)
        for (int bi = 0; bi < 256; bi++) begin
          a = 8'(ai); b = 8'(bi); s = 3'(si);
          #1;
          checks++;
          if (int'(f) != ref_f(ai, bi, si)) begin
            failures++;
            if (failures < 10)
              $display("ALU mismatch s=%0d a=%0d b=%0d f=%0d want %0d", si, ai, bi, f, ref_f(ai, bi, si));
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
