// mips16_pkg -- shared types and constants of the 16-bit single-cycle MIPS
// instruction-fetch design.
//
// Every data field of the 16-bit MIPS is 16 bits wide. Instructions come in
// three formats, all 16 bits long:
//   R-type: opcode[15:13] rs[12:10] rt[9:7] rd[6:4] sa[3] function[2:0]
//   I-type: opcode[15:13] rs[12:10] rt[9:7] immediate[6:0]
//   J-type: opcode[15:13] target address[12:0]
// The instruction memory is a 256-word ROM addressed by the eight least
// significant bits of the program counter.
//
// The field widths and the ROM size follow the 16-bit MIPS description. The
// opcode and function values of the demonstration program below are this
// design's own illustrative choice: the instruction set itself (which
// fifteen instructions, and how they are coded) is left to the implementer,
// and nothing in the fetch unit depends on it.
package mips16_pkg;

  localparam int unsigned WORD_W     = 16;
  localparam int unsigned ROM_ADDR_W = 8;
  localparam int unsigned ROM_DEPTH  = 1 << ROM_ADDR_W;

  typedef logic [WORD_W-1:0] word_t;
  typedef word_t rom_t [ROM_DEPTH];

  // Opcodes used by the demonstration program (illustrative coding).
  typedef enum logic [2:0] {
    OP_RTYPE = 3'b000,
    OP_ADDI  = 3'b001,
    OP_LW    = 3'b010,
    OP_SW    = 3'b011,
    OP_BEQ   = 3'b100,
    OP_J     = 3'b111
  } opcode_e;

  // Function field values of the R-type instructions (illustrative coding).
  typedef enum logic [2:0] {
    FN_ADD = 3'b000,
    FN_SUB = 3'b001,
    FN_SLL = 3'b010
  } funct_e;

  function automatic word_t enc_r(logic [2:0] rs, logic [2:0] rt, logic [2:0] rd,
                                  logic sa, funct_e fn);
    return {OP_RTYPE, rs, rt, rd, sa, fn};
  endfunction

  function automatic word_t enc_i(opcode_e op, logic [2:0] rs, logic [2:0] rt,
                                  logic [6:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic word_t enc_j(opcode_e op, logic [12:0] target);
    return {op, target};
  endfunction

  // Demonstration program. Unused locations hold 0.
  //   0: addi $1, $0, 5
  //   1: addi $2, $0, 1
  //   2: add  $3, $1, $2
  //   3: sub  $4, $1, $2
  //   4: sw   $3, 0($0)
  //   5: lw   $5, 0($0)
  //   6: beq  $3, $5, +2
  //   7: addi $1, $1, -1
  //   8: sll  $6, $1, 1
  //   9: j    2
  function automatic rom_t demo_program();
    rom_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = '0;
    p[0] = enc_i(OP_ADDI, 3'd0, 3'd1, 7'd5);
    p[1] = enc_i(OP_ADDI, 3'd0, 3'd2, 7'd1);
    p[2] = enc_r(3'd1, 3'd2, 3'd3, 1'b0, FN_ADD);
    p[3] = enc_r(3'd1, 3'd2, 3'd4, 1'b0, FN_SUB);
    p[4] = enc_i(OP_SW,   3'd0, 3'd3, 7'd0);
    p[5] = enc_i(OP_LW,   3'd0, 3'd5, 7'd0);
    p[6] = enc_i(OP_BEQ,  3'd3, 3'd5, 7'd2);
    p[7] = enc_i(OP_ADDI, 3'd1, 3'd1, 7'h7F);
    p[8] = enc_r(3'd1, 3'd0, 3'd6, 1'b1, FN_SLL);
    p[9] = enc_j(OP_J, 13'd2);
    return p;
  endfunction

  localparam rom_t DEMO_PROGRAM = demo_program();

endpackage
