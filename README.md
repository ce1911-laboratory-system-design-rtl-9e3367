# A four-function special-purpose processor

This is a very small processor with one fixed job. It reads two 4-bit
operands, X and Y, and a 2-bit function select, FS, from ten toggle switches.
When the GO button is pressed it computes one of four expressions as an 8-bit
value. The result is shown in hexadecimal on six 7-segment displays.

| FS | result     | range for X, Y in 0..15 | clock cycles |
|----|------------|-------------------------|--------------|
| 0  | 8X + 4Y    | 0 .. 180                | 6            |
| 1  | 5X − Y     | −15 .. 75               | 6            |
| 2  | 12Y + 6    | 6 .. 186                | 7            |
| 3  | 2X + 3Y − 2| −2 .. 73                | 9            |

Arithmetic is modulo 256. A negative result shows as its 8-bit two's-complement
pattern, so 5·0 − 15 shows as `F1`.

The design has no multiplier and no hardware for any one formula. It has a
general datapath: two registers, an 8-operation ALU and a multiplexer. A
state machine steps that datapath through a short fixed program for each
formula. It is built for a board with a 50 MHz clock, ten slide switches, two
active-low push buttons and six active-low 7-segment digits (an Intel
MAX 10 DE10-Lite class board).

## Datapath

```
             sliders[7:4] (X) ──► D3 ┐
             sliders[3:0] (Y) ──► D2 │ mybusmux ──► Y[7:0] ─┬─► reg A (LDA) ──► ALU.A
                        4'h0  ──► D1 │   (MUXS)             └─► reg B (LDB) ──► ALU.B
                  ALU.F[7:0]  ──► D0 ┘                                 │
                                                                      └──► seg7decode.DATA
```

- **Registers A and B** (`reg8`) are 8 bits wide. Both take their input
  from the multiplexer output. Both have a synchronous, active-low clear and a
  synchronous load enable.
- **ALU** (`alu`) is combinational. ALUS selects the operation:

  | ALUS | F      | ALUS | F       |
  |------|--------|------|---------|
  | 0    | 0      | 4    | A − B   |
  | 1    | 1      | 5    | A + A   |
  | 2    | B − 1  | 6    | A AND B |
  | 3    | A + B  | 7    | A OR B  |

- **Bus multiplexer** (`mybusmux`). Select 0 passes the ALU result. Selects 1,
  2 and 3 pass a 4-bit input with the upper nibble forced to zero. This zero
  extension is how the 4-bit operands enter the 8-bit datapath. D1 is not
  used and is tied to zero.
- **Display decoder** (`seg7decode`) always shows register B (or a message).
  The result must therefore end up in B.

## How a formula becomes a timeline

This is the part of the design that takes the most thought. The ALU can only
double A, add, subtract, make 0 or 1, and decrement B. Every constant and
multiplication has to be built from those steps. Also, no operation passes A
through unchanged, so the last step must write the result into B with an
arithmetic operation. Each line below is one controller state and one clock
edge. Its effect is shown as register contents after the edge:

```
FS=0  8X+4Y              FS=1  5X-Y               FS=2  12Y+6              FS=3  2X+3Y-2
A = X        (mux X)     A = B = X   (mux X)      A = Y       (mux Y)      A = X       (mux X)
A = A+A   = 2X           A = A+A  = 2X            A = A+A  = 2Y            A = A+A  = 2X
B = Y        (mux Y)     A = A+A  = 4X            B = 1                    B = Y       (mux Y)
A = A+B   = 2X+Y         A = A+B  = 5X            A = A+B  = 2Y+1          A = A+B  = 2X+Y
A = A+A   = 4X+2Y        B = Y       (mux Y)      B = A+A  = 4Y+2          A = A+B  = 2X+2Y
B = A+A   = 8X+4Y        B = A-B  = 5X-Y          A = A+B  = 6Y+3          A = A+B  = 2X+3Y
                                                  B = A+A  = 12Y+6         B = 1
                                                                           A = A-B  = 2X+3Y-1
                                                                           B = A-B  = 2X+3Y-2
```

FS=2 factors 12Y+6 as 2·3·(2Y+1). The state that writes B = 4Y+2 serves two
purposes: it is half of the final doubling, and it gives the addend that turns
2Y+1 into 6Y+3. FS=3 subtracts 1 twice because no constant 2 is available
without a spare register.

These timelines are this design's own. Other sequences built from the same
ALU operations would compute the same results in a different number of cycles.
To change one, edit the `F<fs>_<step>` states and their output rows in
`rtl/controller.sv`.

## Controller states and the power-on messages

`controller` is a Moore machine: every output depends on the state alone.

1. **RESET.** Entered on any clock edge while `rst_n` is low. The displays
   show `SPc on`.
2. **MSG1.** Entered on the first edge after `rst_n` goes high. It shows
   `SPc on` for exactly `CLK_HZ` cycles (one second).
3. **MSG2.** Shows `rEAdY` for exactly `CLK_HZ` cycles.
4. **HOLD.** Shows register B as two hex digits on the two right-hand
   displays. The other four are dark. Right after power-on this shows `00`.
   If `go_n` is low on a clock edge, the next state is the first step of the
   timeline chosen by FS at that edge.
5. **Timeline states.** These run for 6, 6, 7 or 9 cycles and then return to
   HOLD.

Timing seen at the ports: if the edge that sees `go_n` low is edge 0, the
result is on the displays after edge 6, 6, 7 or 9. GO is looked at only in
HOLD. Pressing it during the messages or during a calculation does nothing.
Holding it down simply repeats the calculation, which gives the same result.
A reset at any time abandons the calculation and restarts the messages.

An assertion in `controller` checks that no register is loaded outside the
timeline states.

## Displays

The six outputs `seg75` (leftmost) … `seg70` (rightmost) are 8 bits each,
ordered `{dp, g, f, e, d, c, b, a}`. They are active low, and the decimal point
is always dark. This matches common-anode digits driven straight from FPGA
pins. The display select from the controller has these codes:

| DISPSEL | shown                                            |
|---------|--------------------------------------------------|
| 0       | B as two hex digits on `seg71`, `seg70`          |
| 1       | `S P c _ o n` across all six digits              |
| 2       | `r E A d Y _` (five letters, rightmost dark)     |
| 3..7    | all dark                                         |

Hex digits are drawn as 0–9, A, b, C, d, E, F. The segment patterns and the
hex decoding function are in `rtl/spp_pkg.sv`.

## What is specified and what was chosen here

The following come from the system's specification:

- the four formulas;
- the ALU operation table;
- the zero-extending multiplexer;
- the register type (8 bits, synchronous reset and load);
- the block structure and wiring;
- the port list and widths;
- active-low buttons;
- the two message texts and their one-second duration;
- a hold state between calculations.

The following are choices made in this design:

- **Timelines.** The step sequences above.
- **Clock.** A 50 MHz clock (`CLK_HZ`), used only for the one-second message
  time.
- **Switch assignment.** X on `sliders[7:4]`, Y on `sliders[3:0]` and FS on
  `sliders[9:8]`. The wiring only fixes which switches go to which multiplexer
  input.
- **Display.** The display-select codes, the active-low segment coding, which
  digits carry the number, and the position of the 5-letter ready message
  (it cannot be exactly centred on six digits).
- **Reset and hold display.** The RESET state already shows the first
  message. HOLD shows the number, so `rEAdY` disappears after its second.
- **Buttons.** No synchronizer or debouncer on the buttons. Add a
  two-flip-flop synchronizer on `go_n` and `rst_n` for a real board.
- **Negative results.** They are shown modulo 256.

## Modules

| file                | module                                     |
|---------------------|--------------------------------------------|
| `rtl/spp_pkg.sv`    | shared enums (ALU ops, mux selects, display selects), segment patterns, `hex_to_seg` |
| `rtl/reg8.sv`       | register A / B, parameter `W` = 8          |
| `rtl/alu.sv`        | ALU, parameter `W` = 8                     |
| `rtl/mybusmux.sv`   | bus multiplexer with zero extension        |
| `rtl/seg7decode.sv` | six-digit display decoder                  |
| `rtl/controller.sv` | state machine, parameter `CLK_HZ` = 50 000 000 |
| `rtl/lw9.sv`        | top level, parameter `CLK_HZ` = 50 000 000 |

Top-level ports of `lw9`: `clk`, `rst_n`, `go_n`, `sliders[9:0]`,
`seg75[7:0]` … `seg70[7:0]`.

## Simulating

Every testbench checks its own results. Each one ends by printing
`TB_RESULT checks=N failures=M`, and has a watchdog that stops a hung run.

| testbench          | what it checks |
|--------------------|----------------|
| `tb_alu`           | all 8 × 256 × 256 input combinations |
| `tb_mybusmux`      | random data on every select code |
| `tb_reg8`          | random reset/load/data; reset only acts on a clock edge |
| `tb_seg7decode`    | all 256 numeric values, both messages, blank codes |
| `tb_controller`    | with a 10-cycle second: message timing, GO ignored during messages, exact timeline lengths, results through a reference datapath for 217 calculations, reset mid-calculation |
| `tb_lw9`           | whole design through its ports with a 20-cycle second: messages, 317 calculations checked at their exact completion cycle and one cycle before, wrap-around results, reset mid-calculation; counts each of these and fails if one never happened |
| `tb_lw9_full`      | whole design at default parameters: two full one-second messages (100 M cycles), then one calculation per function (about a minute of simulation) |

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_lw9 \
          -y rtl -y tb rtl/spp_pkg.sv tb/tb_lw9.sv -o sim
./obj_dir/sim
```

Replace `tb_lw9` with any testbench name above. The package is named first
because the modules import it. `-y rtl` lets Verilator find the other modules
by name.

To build for a board, synthesize `rtl/*.sv` with `lw9` as the top. Then map
`sliders` to the ten slide switches, `go_n` and `rst_n` to two push buttons,
and `seg75`…`seg70` to the digits from left to right. If the board clock is
not 50 MHz, set `CLK_HZ`.
