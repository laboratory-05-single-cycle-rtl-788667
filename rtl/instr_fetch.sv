// instr_fetch -- Instruction Fetch (IF) unit of the 16-bit single-cycle MIPS.
//
// The unit holds the program counter (PC), an incrementer that forms PC + 1,
// two 2:1 multiplexers that choose the next PC, and the instruction ROM:
//   pc_src = 0 : candidate = PC + 1        pc_src = 1 : candidate = branch_addr
//   jump   = 0 : next PC   = candidate     jump   = 1 : next PC   = jump_addr
// so a jump has priority over a branch. Addresses count 16-bit words, which
// is why the incrementer adds 1 (a byte-addressed 32-bit MIPS adds 4).
//
// The PC is a rising-edge register that loads the next PC only in a cycle
// where `pc_en` is 1; `pc_rst` (also a one-cycle enable) clears it to 0 and
// wins over `pc_en`. The ROM is addressed by PC[7:0] and read
// combinationally, so `instruction` and `pc_plus1` follow the PC within the
// same cycle.
//
// Follows the description: the structure (PC, adder, two multiplexers, ROM),
// the multiplexer order, the +1 adder, the 8-bit ROM address, the write
// enable and the reset input. This design's own choices: the reset is
// synchronous, clears the PC to 0 and has priority over the write enable.
module instr_fetch
  import mips16_pkg::*;
#(
  parameter rom_t PROGRAM = DEMO_PROGRAM
) (
  input  logic  clk,
  input  logic  pc_en,        // write enable of the PC register
  input  logic  pc_rst,       // synchronous clear of the PC register
  input  word_t branch_addr,  // branch target address
  input  word_t jump_addr,    // jump address
  input  logic  jump,         // 1: next PC is jump_addr
  input  logic  pc_src,       // 1 (and jump = 0): next PC is branch_addr
  output word_t instruction,  // instruction at the current PC
  output word_t pc_plus1      // next sequential instruction address
);

  word_t pc;
  word_t seq_or_branch;
  word_t next_pc;

  // Incrementer and the two next-address multiplexers.
  always_comb begin
    pc_plus1      = pc + word_t'(1);
    seq_or_branch = pc_src ? branch_addr : pc_plus1;
    next_pc       = jump ? jump_addr : seq_or_branch;
  end

  // Program counter.
  always_ff @(posedge clk) begin
    if (pc_rst)     pc <= '0;
    else if (pc_en) pc <= next_pc;
  end

  // Instruction memory, addressed by the low PC bits.
  instr_rom #(.CONTENTS(PROGRAM)) u_rom (
    .addr (pc[ROM_ADDR_W-1:0]),
    .data (instruction)
  );

endmodule
