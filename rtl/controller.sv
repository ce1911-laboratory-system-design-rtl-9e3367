// controller: Moore state machine that runs the special-purpose processor.
//
// After the active-low reset button is released the machine shows the
// power-on message "SPc on" for one second, then "rEAdY" for one second, and
// then waits in HOLD. When the active-low GO button is seen low in HOLD it
// follows the calculation timeline chosen by funcsel (FS), one state per clock:
//   FS=0  8X+4Y     6 cycles   FS=1  5X-Y       6 cycles
//   FS=2  12Y+6     7 cycles   FS=3  2X+3Y-2    9 cycles
// and returns to HOLD with the 8-bit result in register B, which HOLD shows as
// two hex digits. Each timeline state sets the bus multiplexer select (muxs),
// the ALU operation (alus) and the load enables of registers A (lda) and B
// (ldb); all outputs depend on the state alone. The one-second waits count
// CLK_HZ clock cycles. Reset is synchronous and puts the machine in RESET,
// which shows the first message.
//
// The states, the messages and the four functions are the specification's.
// The step-by-step timelines, built from the ALU's eight operations, the
// display-select codes and the 50 MHz default clock are this design's own.
module controller
  import spp_pkg::*;
#(
  parameter int unsigned CLK_HZ = 50_000_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       go_n,
  input  logic [1:0] funcsel,
  output logic [1:0] muxs,
  output logic       lda,
  output logic       ldb,
  output logic [2:0] alus,
  output logic [2:0] dispsel
);

  typedef enum logic [5:0] {
    S_RESET, S_MSG1, S_MSG2, S_HOLD,
    F0_1, F0_2, F0_3, F0_4, F0_5, F0_6,
    F1_1, F1_2, F1_3, F1_4, F1_5, F1_6,
    F2_1, F2_2, F2_3, F2_4, F2_5, F2_6, F2_7,
    F3_1, F3_2, F3_3, F3_4, F3_5, F3_6, F3_7, F3_8, F3_9
  } state_t;

  typedef struct packed {
    muxs_t    muxs;
    logic     lda;
    logic     ldb;
    alus_t    alus;
    dispsel_t dispsel;
  } ctl_t;

  localparam int unsigned CW = (CLK_HZ > 1) ? $clog2(CLK_HZ) : 1;
  localparam logic [CW-1:0] SEC_LAST = CW'(CLK_HZ - 1);

  state_t        state, state_nx;
  logic [CW-1:0] tick;
  logic          sec_done;
  ctl_t          ctl;

  assign sec_done = (tick == SEC_LAST);

  // State register and one-second counter.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_RESET;
      tick  <= '0;
    end else begin
      state <= state_nx;
      if ((state == S_MSG1 || state == S_MSG2) && !sec_done) tick <= tick + 1'b1;
      else                                                   tick <= '0;
    end
  end

  // Next state.
  always_comb begin
    state_nx = state;
    unique case (state)
      S_RESET: state_nx = S_MSG1;
      S_MSG1:  if (sec_done) state_nx = S_MSG2;
      S_MSG2:  if (sec_done) state_nx = S_HOLD;
      S_HOLD:
        if (!go_n) begin
          unique case (funcsel)
            2'd0: state_nx = F0_1;
            2'd1: state_nx = F1_1;
            2'd2: state_nx = F2_1;
            default: state_nx = F3_1;
          endcase
        end
      F0_6, F1_6, F2_7, F3_9: state_nx = S_HOLD;
      default: state_nx = state_t'(state + 1'b1);
    endcase
  end

  // Moore outputs. Comments give register contents after the state's edge.
  always_comb begin
    ctl = '{muxs: MUX_ALU, lda: 1'b0, ldb: 1'b0, alus: ALU_ZERO, dispsel: DISP_NUM};
    unique case (state)
      S_RESET, S_MSG1: ctl.dispsel = DISP_SPCON;
      S_MSG2:          ctl.dispsel = DISP_READY;
      S_HOLD:          ;
      // 8X+4Y
      F0_1: begin ctl.muxs = MUX_X; ctl.lda = 1'b1; end        // A = X
      F0_2: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 2X
      F0_3: begin ctl.muxs = MUX_Y; ctl.ldb = 1'b1; end        // B = Y
      F0_4: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 2X+Y
      F0_5: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 4X+2Y
      F0_6: begin ctl.alus = ALU_DBLA; ctl.ldb = 1'b1; end     // B = 8X+4Y
      // 5X-Y
      F1_1: begin ctl.muxs = MUX_X; ctl.lda = 1'b1; ctl.ldb = 1'b1; end  // A = B = X
      F1_2: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 2X
      F1_3: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 4X
      F1_4: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 5X
      F1_5: begin ctl.muxs = MUX_Y; ctl.ldb = 1'b1; end        // B = Y
      F1_6: begin ctl.alus = ALU_SUB;  ctl.ldb = 1'b1; end     // B = 5X-Y
      // 12Y+6
      F2_1: begin ctl.muxs = MUX_Y; ctl.lda = 1'b1; end        // A = Y
      F2_2: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 2Y
      F2_3: begin ctl.alus = ALU_ONE;  ctl.ldb = 1'b1; end     // B = 1
      F2_4: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 2Y+1
      F2_5: begin ctl.alus = ALU_DBLA; ctl.ldb = 1'b1; end     // B = 4Y+2
      F2_6: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 6Y+3
      F2_7: begin ctl.alus = ALU_DBLA; ctl.ldb = 1'b1; end     // B = 12Y+6
      // 2X+3Y-2
      F3_1: begin ctl.muxs = MUX_X; ctl.lda = 1'b1; end        // A = X
      F3_2: begin ctl.alus = ALU_DBLA; ctl.lda = 1'b1; end     // A = 2X
      F3_3: begin ctl.muxs = MUX_Y; ctl.ldb = 1'b1; end        // B = Y
      F3_4: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 2X+Y
      F3_5: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 2X+2Y
      F3_6: begin ctl.alus = ALU_ADD;  ctl.lda = 1'b1; end     // A = 2X+3Y
      F3_7: begin ctl.alus = ALU_ONE;  ctl.ldb = 1'b1; end     // B = 1
      F3_8: begin ctl.alus = ALU_SUB;  ctl.lda = 1'b1; end     // A = 2X+3Y-1
      F3_9: begin ctl.alus = ALU_SUB;  ctl.ldb = 1'b1; end     // B = 2X+3Y-2
      default: ctl.dispsel = DISP_BLANK;
    endcase
  end

  assign muxs    = ctl.muxs;
  assign lda     = ctl.lda;
  assign ldb     = ctl.ldb;
  assign alus    = ctl.alus;
  assign dispsel = ctl.dispsel;

  // Nothing is loaded outside the calculation timeline.
  a_no_load_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_RESET, S_MSG1, S_MSG2, S_HOLD}) |-> !(lda || ldb));

endmodule
