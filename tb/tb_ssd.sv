// tb_ssd -- self-checking testbench of the seven-segment display driver.
//
// Runs the driver with a 16-cycle refresh (CNT_W = 4), so each digit is lit
// for 4 cycles. For 200 random 16-bit values it watches one full refresh and
// checks, every cycle, that exactly one anode is low and that the segments
// show the nibble of that digit. The expected segments come from a table of
// lit segments per hexadecimal digit, written independently of the driver.
// It also checks that all four digits were lit during the refresh and that
// each stays lit for 2^(CNT_W-2) cycles in a row.
module tb_ssd;

  localparam int unsigned CNT_W = 4;
  localparam int          DWELL = 1 << (CNT_W - 2);

  logic        clk = 0;
  logic [15:0] value;
  logic [3:0]  an;
  logic [6:0]  cat;
  int          checks = 0, failures = 0;

  ssd #(.CNT_W(CNT_W)) dut (.clk, .value, .an, .cat);

  always #5 clk = ~clk;

  // Segments lit for each hexadecimal digit.
  string lit [16] = '{"abcdef", "bc", "abdeg", "abcdg", "bcfg", "acdfg", "acdefg", "abc",
                      "abcdefg", "abcdfg", "abcefg", "cdefg", "adef", "bcdeg", "adefg", "aefg"};

  function automatic logic [6:0] segments(logic [3:0] hex);
    logic [6:0] s;
    string      l;
    s = '1;                       // all off (active low)
    l = lit[hex];
    for (int i = 0; i < l.len(); i++) s[3'(l[i] - "a")] = 1'b0;
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    value = '0;
    repeat (4) @(posedge clk);
    for (int v = 0; v < 200; v++) begin
      automatic bit [3:0] seen = '0;
      automatic int       prev = -1, run = 0;
      automatic bit       bad_run = 0, first_run = 1;
      value = (v < 16) ? {4{4'(v)}} : 16'($urandom);
      for (int c = 0; c < (1 << CNT_W); c++) begin
        @(posedge clk);
        #1;
        checks++;
        if (!$onehot(~an)) begin
          failures++;
          $display("%0t: anodes %b not one-hot low", $time, an);
        end else begin
          automatic int d = $clog2(4'(~an));
          automatic logic [3:0] nib = value[4*d +: 4];
          seen[d] = 1;
          if (cat !== segments(nib)) begin
            failures++;
            $display("%0t: digit %0d value %h: segments %b expected %b", $time, d, value,
                     cat, segments(nib));
          end
          if (d == prev) run++;
          else begin
            // The first run of the window may be cut short; later ones not.
            if (prev != -1) begin
              if (!first_run && run != DWELL) bad_run = 1;
              first_run = 0;
            end
            prev = d;
            run = 1;
          end
        end
      end
      checks += 2;
      if (seen != 4'hF) begin
        failures++;
        $display("value %h: digits lit during one refresh %b", value, seen);
      end
      if (bad_run) begin
        failures++;
        $display("value %h: a digit was not lit for %0d cycles", value, DWELL);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
