// day_counter: day-of-month counter, BCD 01..X.
//
// X, the number of days in the current month, comes in as the two-bit
// code `max_days` (00 = 28, 01 = 29, 10 = 30, 11 = 31), worked out by
// month_length from the month and the year. Each count enable (the day
// carry of the hour counter) adds one; when the count is at X it returns
// to 01 and raises `co` so the month counter advances. A day above X (left
// by a preset or by changing the month while adjusting) also returns to 01
// with a carry on the next count. `ld` presets the count to `din`.
//
// Timing: q changes on the clock edge after `en`/`ld`; `co` is
// combinational (en && q >= X). Reset is asynchronous, active low.
//
// The month-length code and the count-to-X-then-restart-at-1 behaviour
// follow the original design; the handling of a day above X is this
// design's choice.
module day_counter #(
  parameter logic [7:0] RESET_VAL = 8'h01
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic [7:0]          din,
  input  logic                en,
  input  cal_pkg::max_days_e  max_days,
  output logic [7:0]          q,
  output logic                co
);
  import cal_pkg::*;

  logic [7:0] last_day;
  logic       at_max;

  always_comb begin
    unique case (max_days)
      DAYS_28: last_day = 8'h28;
      DAYS_29: last_day = 8'h29;
      DAYS_30: last_day = 8'h30;
      default: last_day = 8'h31;
    endcase
  end

  assign at_max = (q >= last_day);
  assign co     = en && at_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (ld)   q <= din;
    else if (en)   q <= at_max ? 8'h01 : bcd_inc(q);
  end

endmodule
