// tb_mpg -- self-checking testbench of the mono pulse generator.
//
// Runs the generator with a 16-cycle sampling period (CNT_W = 4) and two
// buttons. Each button is pressed over and over, independently: a press
// bounces at random for fewer cycles than one sampling period, is held
// steady for three periods, bounces again on release and stays released
// for three periods. The expected behaviour, worked out from the sampling
// scheme, is exactly one enable per press, one cycle long, arriving no later
// than one sampling period plus three cycles after the button settles.
// Every enable is checked for its width and for falling inside a press.
module tb_mpg;

  localparam int unsigned CNT_W  = 4;
  localparam int          PERIOD = 1 << CNT_W;
  localparam int          PRESSES = 12;

  logic       clk = 0;
  logic [1:0] btn = '0;
  logic [1:0] en;
  int         checks = 0, failures = 0;
  int         pulses [2] = '{0, 0};
  int         in_press [2] = '{0, 0};   // pulses seen in the current press
  bit         pressing [2] = '{0, 0};   // press window open (bounce included)
  bit         settled [2] = '{0, 0};
  int         since_settle [2] = '{0, 0};

  mpg #(.N(2), .CNT_W(CNT_W)) dut (.clk, .btn, .en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: width and placement of every pulse.
  logic [1:0] en_d = '0;
  bit         armed = 0;            // set once the power-up values have flushed
  always @(posedge clk) begin
    #1;
    if (armed) begin
      for (int b = 0; b < 2; b++) begin : chk
        if (settled[b]) since_settle[b]++;
        if (en[b] && !en_d[b]) begin
          pulses[b]++;
          in_press[b]++;
          checks++;
          if (!pressing[b]) begin
            failures++;
            $display("%0t: button %0d enable outside a press", $time, b);
          end
        end
        if (en[b] && en_d[b]) begin
          failures++;
          $display("%0t: button %0d enable longer than one cycle", $time, b);
        end
      end : chk
    end
    en_d = en;
  end

  task automatic press(int b, int gap);
    repeat (gap) @(posedge clk);
    pressing[b] = 1;
    in_press[b] = 0;
    settled[b] = 0;
    since_settle[b] = 0;
    repeat ($urandom_range(2, PERIOD - 2)) begin
      @(posedge clk); btn[b] = 1'($urandom);
    end
    @(posedge clk); btn[b] = 1;
    settled[b] = 1;
    // The enable must arrive within one period plus the two-stage delay.
    repeat (PERIOD + 3) @(posedge clk);
    #2;
    checks++;
    if (in_press[b] != 1) begin
      failures++;
      $display("%0t: button %0d: %0d enables by %0d cycles after settling", $time, b,
               in_press[b], since_settle[b]);
    end
    repeat (2 * PERIOD) @(posedge clk);
    settled[b] = 0;
    repeat ($urandom_range(2, PERIOD - 2)) begin
      @(posedge clk); btn[b] = 1'($urandom);
    end
    @(posedge clk); btn[b] = 0;
    repeat (3 * PERIOD) @(posedge clk);
    checks++;
    if (in_press[b] != 1) begin
      failures++;
      $display("%0t: button %0d: %0d enables in one press", $time, b, in_press[b]);
    end
    pressing[b] = 0;
  endtask

  initial begin
    // Let the registers settle from their power-up values.
    repeat (PERIOD + 4) @(posedge clk);
    armed = 1;
    fork
      for (int i = 0; i < PRESSES; i++) press(0, $urandom_range(1, 10));
      for (int i = 0; i < PRESSES; i++) press(1, $urandom_range(1, 30));
    join
    for (int b = 0; b < 2; b++) begin
      checks++;
      if (pulses[b] != PRESSES) begin
        failures++;
        $display("button %0d: %0d enables for %0d presses", b, pulses[b], PRESSES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
