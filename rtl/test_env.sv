// test_env -- board test environment of the 16-bit MIPS Instruction Fetch
// unit.
//
// Puts the Instruction Fetch unit on a development board so that it can be
// stepped by hand. Two push buttons go through the mono pulse generator:
// btn[0] gives the enable that writes the next address into the PC, btn[1]
// the enable that clears the PC. Switch sw[0] is the Jump control and sw[1]
// the PCSrc control; the jump and branch target addresses are the constants
// JUMP_ADDR and BRANCH_ADDR. Switch sw[7] picks what the seven-segment
// display shows: the fetched instruction (sw[7] = 0) or the next sequential
// address PC + 1 (sw[7] = 1).
//
// Each button press is one step: the PC changes one clock cycle after the
// enable pulse, and the display shows the new value from its next digit
// period on. Switches sw[6:2] are not used.
//
// Follows the description: the switch and button roles of the IF inputs,
// the jump address 0x0000 (a second way back to the first instruction) and
// a branch target inside the program, the sw[7] display multiplexer. This
// design's choices: which button does what, BRANCH_ADDR = 0x0004 (the fifth
// instruction of the demonstration program), and the MPG and display scan
// counter widths.
module test_env
  import mips16_pkg::*;
#(
  parameter word_t       BRANCH_ADDR = 16'h0004,
  parameter word_t       JUMP_ADDR   = 16'h0000,
  parameter rom_t        PROGRAM     = DEMO_PROGRAM,
  parameter int unsigned MPG_CNT_W   = 16,
  parameter int unsigned SSD_CNT_W   = 16
) (
  input  logic       clk,
  input  logic [1:0] btn,   // btn[0]: step (write PC), btn[1]: reset PC
  input  logic [7:0] sw,    // sw[0]: Jump, sw[1]: PCSrc, sw[7]: display select
  output logic [3:0] an,    // display digit enables, active low
  output logic [6:0] cat    // display segments a..g, active low
);

  logic [1:0] en;
  word_t      instruction;
  word_t      pc_plus1;
  word_t      shown;

  mpg #(.N(2), .CNT_W(MPG_CNT_W)) u_mpg (
    .clk (clk),
    .btn (btn),
    .en  (en)
  );

  instr_fetch #(.PROGRAM(PROGRAM)) u_if (
    .clk         (clk),
    .pc_en       (en[0]),
    .pc_rst      (en[1]),
    .branch_addr (BRANCH_ADDR),
    .jump_addr   (JUMP_ADDR),
    .jump        (sw[0]),
    .pc_src      (sw[1]),
    .instruction (instruction),
    .pc_plus1    (pc_plus1)
  );

  assign shown = sw[7] ? pc_plus1 : instruction;

  ssd #(.CNT_W(SSD_CNT_W)) u_ssd (
    .clk   (clk),
    .value (shown),
    .an    (an),
    .cat   (cat)
  );

endmodule
