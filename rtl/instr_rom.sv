// instr_rom -- instruction memory of the 16-bit single-cycle MIPS.
//
// A read-only memory of ROM_DEPTH (256) words of 16 bits. The address is the
// eight least significant bits of the program counter, so the memory is not
// grown to 2^16 locations; higher PC bits are ignored by the caller. The read
// is combinational (asynchronous): the word at `addr` appears on `data` in
// the same cycle, which is what a single-cycle processor needs, since the
// instruction must be decoded and executed in the cycle the PC points at it.
//
// The contents come from the CONTENTS parameter, by default the
// demonstration program of mips16_pkg. The size and the PC-bit addressing
// follow the 16-bit MIPS description; the asynchronous read and the
// parameter-based initialisation are this design's choices.
module instr_rom
  import mips16_pkg::*;
#(
  parameter rom_t CONTENTS = DEMO_PROGRAM
) (
  input  logic [ROM_ADDR_W-1:0] addr,
  output word_t                 data
);

  assign data = CONTENTS[addr];

endmodule
