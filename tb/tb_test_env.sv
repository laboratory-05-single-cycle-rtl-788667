// tb_test_env -- end-to-end testbench of the board test environment, at the
// default parameters (16-bit MPG sampling counter, 16-bit display scan
// counter, the demonstration program, branch target 0x0004, jump 0x0000).
//
// It works the design the way a person at the board would: it sets the
// switches, presses a button long enough for the pulse generator to see it
// (just over two sampling periods held, the same released) and then reads
// the four-digit display over a full refresh, once with sw[7] = 0 (the
// instruction) and once with sw[7] = 1 (PC + 1). The display is decoded
// with a table of lit segments per hex digit, and each digit is compared with
// a reference: a PC model that applies reset, jump, branch or PC + 1, and the
// demonstration program's machine code assembled by hand.
//
// The sequence steps forward, takes the branch, jumps back to 0, sets Jump
// and PCSrc together (the jump must win), holds the switches with no press
// (the PC must not move) and resets. Each of these, and both display
// modes, is counted; one that never happened counts as a failure.
module tb_test_env;
  import mips16_pkg::*;

  localparam int PERIOD  = 1 << 16;     // MPG sampling period at the default
  localparam int REFRESH = 1 << 16;     // display refresh at the default

  logic       clk = 0;
  logic [1:0] btn = '0;
  logic [7:0] sw  = '0;
  logic [3:0] an;
  logic [6:0] cat;

  int    checks = 0, failures = 0;
  word_t model_pc;
  int    n_seq = 0, n_branch = 0, n_jump = 0, n_both = 0, n_reset = 0, n_hold = 0;
  int    n_show_instr = 0, n_show_pc1 = 0;

  test_env dut (.clk, .btn, .sw, .an, .cat);

  always #5 clk = ~clk;

  // Demonstration program, assembled by hand; other words are 0.
  word_t program_code [10] = '{16'h2085, 16'h2101, 16'h0530, 16'h0541, 16'h6180,
                               16'h4280, 16'h8E82, 16'h24FF, 16'h046A, 16'hE002};

  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segments(logic [3:0] hex);
    logic [6:0] s;
    string      l;
    s = '1;
    l = lit[hex];
    for (int i = 0; i < l.len(); i++) s[3'(l[i] - "a")] = 1'b0;
    return s;
  endfunction

  function automatic word_t expected_instr(word_t pc);
    return (pc[7:0] < 8'd10) ? program_code[pc[3:0]] : 16'h0000;
  endfunction

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Read the display over one full refresh and compare with `exp`.
  task automatic read_display(bit sel, word_t exp);
    automatic bit [3:0] seen = '0;
    automatic int       bad = 0;
    sw[7] = sel;
    repeat (2) @(posedge clk);
    repeat (REFRESH + 8) begin
      @(posedge clk);
      #1;
      if ($onehot(4'(~an))) begin
        automatic int d = $clog2(4'(~an));
        seen[d] = 1'b1;
        if (cat !== segments(exp[4*d +: 4])) bad++;
      end else begin
        bad++;
      end
    end
    checks++;
    if (bad != 0 || seen != 4'hF) begin
      failures++;
      $display("%0t: sw7=%0d PC %h: display wrong in %0d cycles (digits seen %b), expected %h",
               $time, sel, model_pc, bad, seen, exp);
    end
    if (sel) n_show_pc1++;
    else     n_show_instr++;
  endtask

  task automatic check_both();
    read_display(1'b0, expected_instr(model_pc));
    read_display(1'b1, model_pc + 16'd1);
  endtask

  // One press of button b, long enough to be sampled once.
  task automatic press(int b);
    btn[b] = 1'b1;
    repeat (2 * PERIOD + 8) @(posedge clk);
    btn[b] = 1'b0;
    repeat (2 * PERIOD + 8) @(posedge clk);
  endtask

  // Set Jump / PCSrc, press the step button and update the model.
  task automatic step(bit jump, bit pc_src);
    sw[0] = jump;
    sw[1] = pc_src;
    press(0);
    if (jump) begin
      model_pc = 16'h0000;
      n_jump++;
      if (pc_src) n_both++;
    end else if (pc_src) begin
      model_pc = 16'h0004;
      n_branch++;
    end else begin
      model_pc = model_pc + 16'd1;
      n_seq++;
    end
    check_both();
  endtask

  task automatic do_reset();
    press(1);
    model_pc = '0;
    n_reset++;
    check_both();
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    model_pc = '0;
    repeat (PERIOD) @(posedge clk);
    do_reset();
    repeat (6) step(1'b0, 1'b0);          // PC 1..6
    step(1'b0, 1'b1);                     // branch to 4
    repeat (2) step(1'b0, 1'b0);          // 5, 6
    step(1'b1, 1'b0);                     // jump to 0
    repeat (3) step(1'b0, 1'b0);          // 1, 2, 3
    step(1'b1, 1'b1);                     // jump wins over branch: 0
    repeat (2) step(1'b0, 1'b0);          // 1, 2
    // Switches change, no press: the PC must hold.
    sw[1] = 1'b1;
    repeat (3 * PERIOD) @(posedge clk);
    n_hold++;
    check_both();
    step(1'b0, 1'b1);                     // branch to 4
    repeat (7) step(1'b0, 1'b0);          // 5..11: past the end of the program
    do_reset();
    $display("sequential=%0d branch=%0d jump=%0d jump+branch=%0d reset=%0d hold=%0d",
             n_seq, n_branch, n_jump, n_both, n_reset, n_hold);
    check_seen("sequential step", n_seq);
    check_seen("branch", n_branch);
    check_seen("jump", n_jump);
    check_seen("jump over branch", n_both);
    check_seen("reset", n_reset);
    check_seen("hold without press", n_hold);
    check_seen("display instruction", n_show_instr);
    check_seen("display PC + 1", n_show_pc1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
