// tb_instr_fetch -- self-checking testbench of the Instruction Fetch unit.
//
// The unit is loaded with a program whose every word differs ({~a, a} at
// address a) so the fetched word identifies the ROM address. A reference
// model of the PC follows the rules of the unit: clear on pc_rst; otherwise,
// on pc_en, load jump_addr if jump, else branch_addr if pc_src, else PC + 1.
// Each of 4000 cycles drives random controls and random 16-bit target
// addresses (so PCs above 255 show that only PC[7:0] addresses the ROM) and,
// between clock edges, compares instruction and pc_plus1 with the model.
// The testbench counts how often each next-PC choice, the hold (pc_en = 0),
// the reset and a PC above 255 occur, and fails if one never did.
module tb_instr_fetch;
  import mips16_pkg::*;

  function automatic rom_t pattern();
    rom_t p;
    for (int i = 0; i < int'(ROM_DEPTH); i++) p[i] = {~8'(i), 8'(i)};
    return p;
  endfunction

  logic  clk = 0;
  logic  pc_en, pc_rst, jump, pc_src;
  word_t branch_addr, jump_addr, instruction, pc_plus1;
  word_t model_pc;
  int    checks = 0, failures = 0;
  int    n_seq = 0, n_branch = 0, n_jump = 0, n_hold = 0, n_rst = 0, n_high = 0;

  instr_fetch #(.PROGRAM(pattern())) dut (
    .clk, .pc_en, .pc_rst, .branch_addr, .jump_addr, .jump, .pc_src,
    .instruction, .pc_plus1
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    word_t exp_instr;
    exp_instr = {~model_pc[7:0], model_pc[7:0]};
    checks += 2;
    if (instruction !== exp_instr) begin
      failures++;
      $display("%0t: PC %h instruction %h expected %h", $time, model_pc, instruction, exp_instr);
    end
    if (pc_plus1 !== model_pc + 16'd1) begin
      failures++;
      $display("%0t: PC %h pc_plus1 %h expected %h", $time, model_pc, pc_plus1, model_pc + 16'd1);
    end
  endtask

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    pc_en = 0; pc_rst = 1; jump = 0; pc_src = 0; branch_addr = '0; jump_addr = '0;
    @(posedge clk);
    model_pc = '0;
    #1 pc_rst = 0;
    #1 compare();
    for (int i = 0; i < 4000; i++) begin
      // Drive the controls for the next edge.
      pc_rst      = ($urandom_range(0, 49) == 0);
      pc_en       = ($urandom_range(0, 3) != 0);
      jump        = ($urandom_range(0, 5) == 0);
      pc_src      = ($urandom_range(0, 4) == 0);
      branch_addr = word_t'($urandom);
      jump_addr   = word_t'($urandom);
      #1 compare();   // outputs depend on the PC only
      @(posedge clk);
      if (pc_rst) begin
        model_pc = '0; n_rst++;
      end else if (!pc_en) begin
        n_hold++;
      end else if (jump) begin
        model_pc = jump_addr; n_jump++;
      end else if (pc_src) begin
        model_pc = branch_addr; n_branch++;
      end else begin
        model_pc = model_pc + 16'd1; n_seq++;
      end
      if (model_pc > 16'd255) n_high++;
      #1 compare();
    end
    $display("sequential=%0d branch=%0d jump=%0d hold=%0d reset=%0d pc>255=%0d",
             n_seq, n_branch, n_jump, n_hold, n_rst, n_high);
    check_seen("sequential", n_seq);
    check_seen("branch", n_branch);
    check_seen("jump", n_jump);
    check_seen("hold", n_hold);
    check_seen("reset", n_rst);
    check_seen("PC above ROM size", n_high);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
