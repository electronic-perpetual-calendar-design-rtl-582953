// display_scan: eight-digit multiplexed seven-segment display driver.
//
// The calendar is shown in two groups on eight digits, chosen by
// `control`:
//   control = 0:  2 0 Y Y . M M . D D    (year 20YY, month, day)
//   control = 1:  W - H H . M M . S S    (week day, hours, minutes, seconds)
// where '-' is a blank digit and '.' the decimal point of the digit to its
// left, lit as a separator. Digit 7 is the leftmost.
//
// One digit is lit at a time. Each `scan_tick` (derived from the scan
// clock) moves to the next digit, 0 to 7 and round, so with a 1 kHz tick
// each digit is refreshed 125 times a second. `selout` enables the digit
// (active low, one bit per digit, bit 7 = leftmost); `show` carries its
// segments {dp,g,f,e,d,c,b,a}, active high (common-cathode digits).
//
// Timing: `selout` and `show` are registered and follow the digit index
// and the field inputs by one clock. Reset (asynchronous, active low)
// blanks the display.
//
// The port list (HOUR, MIN, SEC, YEAR, MON, DAY, WEEK, scan clock, control,
// SELOUT, show), the eight digits and the two groups follow the original
// design; the digit layout, polarities and separators are this design's.
module display_scan (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scan_tick,
  input  logic       control,    // 0 = date group, 1 = week/time group
  input  logic [7:0] hour,
  input  logic [7:0] minute,
  input  logic [7:0] second,
  input  logic [7:0] year,
  input  logic [7:0] month,
  input  logic [7:0] day,
  input  logic [2:0] week,
  output logic [7:0] selout,
  output logic [7:0] show
);
  import cal_pkg::*;

  localparam logic [3:0] BLANK = 4'hF;

  logic [2:0] idx;
  logic [3:0] digit;
  logic       dp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         idx <= '0;
    else if (scan_tick) idx <= idx + 3'd1;
  end

  always_comb begin
    dp = (idx == 3'd2) || (idx == 3'd4);
    if (!control) begin
      unique case (idx)
        3'd0: digit = day[3:0];
        3'd1: digit = day[7:4];
        3'd2: digit = month[3:0];
        3'd3: digit = month[7:4];
        3'd4: digit = year[3:0];
        3'd5: digit = year[7:4];
        3'd6: digit = 4'd0;
        default: digit = 4'd2;
      endcase
    end else begin
      unique case (idx)
        3'd0: digit = second[3:0];
        3'd1: digit = second[7:4];
        3'd2: digit = minute[3:0];
        3'd3: digit = minute[7:4];
        3'd4: digit = hour[3:0];
        3'd5: digit = hour[7:4];
        3'd6: digit = BLANK;
        default: digit = {1'b0, week};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      selout <= 8'hFF;
      show   <= 8'h00;
    end else begin
      selout <= ~(8'b1 << idx);
      show   <= {dp, seg7(digit)};
    end
  end

endmodule
