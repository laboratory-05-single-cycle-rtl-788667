// tb_instr_rom -- self-checking testbench of the instruction ROM.
//
// Instance u_demo keeps the default contents and is checked, word by word,
// against the demonstration program's machine code written out by hand
// (addresses 0..9) and against 0 for every other address. Instance u_pat is
// given a pattern in which every word differs ({~a, a} for address a), so
// that any address bit that is dropped or swapped changes the word read.
// The read is combinational: each word is checked 1 ns after its address.
module tb_instr_rom;
  import mips16_pkg::*;

  function automatic rom_t pattern();
    rom_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = {~8'(i), 8'(i)};
    return p;
  endfunction

  localparam rom_t PAT = pattern();

  logic [7:0] addr;
  word_t      data_demo, data_pat;
  int         checks = 0, failures = 0;

  instr_rom u_demo (.addr(addr), .data(data_demo));
  instr_rom #(.CONTENTS(PAT)) u_pat (.addr(addr), .data(data_pat));

  // Machine code of the demonstration program, assembled by hand.
  word_t expected_demo [10] = '{16'h2085, 16'h2101, 16'h0530, 16'h0541, 16'h6180,
                                16'h4280, 16'h8E82, 16'h24FF, 16'h046A, 16'hE002};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 255; a >= 0; a--) begin
      word_t exp_demo, exp_pat;
      addr = 8'(a);
      #1;
      exp_demo = (a < 10) ? expected_demo[a] : 16'h0000;
      exp_pat  = {~8'(a), 8'(a)};
      checks += 2;
      if (data_demo !== exp_demo) begin
        failures++;
        $display("demo ROM addr %0d: got %h expected %h", a, data_demo, exp_demo);
      end
      if (data_pat !== exp_pat) begin
        failures++;
        $display("pattern ROM addr %0d: got %h expected %h", a, data_pat, exp_pat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
