// ssd -- driver of a four-digit multiplexed seven-segment display.
//
// Shows a 16-bit value as four hexadecimal digits, digit 3 (leftmost) being
// value[15:12] and digit 0 (rightmost) value[3:0]. The four digits share one
// set of segment lines, so only one digit is lit at a time: the two top bits
// of a free-running CNT_W-bit counter choose the digit, each digit is lit
// for 2^(CNT_W-2) cycles and the whole display is refreshed every 2^CNT_W
// cycles, fast enough that the eye sees all four at once.
//
// Interface: `an[i]` is 0 while digit i is lit (active-low anode), `cat` the
// active-low segment lines, cat[0] = segment a ... cat[6] = segment g (the
// decimal point is not driven). Outputs are combinational from the counter
// and `value`, so a new value shows on the next digit period.
//
// The source description only names this block and says it displays a 16-bit
// value; the active-low anode and cathode polarity match the four-digit display of the
// common Digilent boards, and the scan rate and counter width are this
// design's choice.
module ssd #(
  parameter int unsigned CNT_W = 16   // full refresh every 2^CNT_W cycles
) (
  input  logic        clk,
  input  logic [15:0] value,
  output logic [3:0]  an,
  output logic [6:0]  cat
);

  logic [CNT_W-1:0] cnt;
  logic [1:0]       sel;
  logic [3:0]       digit;

  always_ff @(posedge clk) cnt <= cnt + 1'b1;

  assign sel = cnt[CNT_W-1 -: 2];

  always_comb begin
    unique case (sel)
      2'd0: digit = value[3:0];
      2'd1: digit = value[7:4];
      2'd2: digit = value[11:8];
      2'd3: digit = value[15:12];
    endcase
    an = ~(4'b0001 << sel);
  end

  // Hexadecimal to active-low segments {g,f,e,d,c,b,a}.
  always_comb begin
    unique case (digit)
      4'h0: cat = 7'b1000000;
      4'h1: cat = 7'b1111001;
      4'h2: cat = 7'b0100100;
      4'h3: cat = 7'b0110000;
      4'h4: cat = 7'b0011001;
      4'h5: cat = 7'b0010010;
      4'h6: cat = 7'b0000010;
      4'h7: cat = 7'b1111000;
      4'h8: cat = 7'b0000000;
      4'h9: cat = 7'b0010000;
      4'hA: cat = 7'b0001000;
      4'hB: cat = 7'b0000011;
      4'hC: cat = 7'b1000110;
      4'hD: cat = 7'b0100001;
      4'hE: cat = 7'b0000110;
      4'hF: cat = 7'b0001110;
    endcase
  end

endmodule
