// timekeeper: the integrated timing module - seven chained counters.
//
// Second (00-59) -> minute (00-59) -> hour (00-23) -> day (01-X) ->
// month (01-12) -> year (00-99), with the day-of-week counter (0-6)
// advanced by the same day carry as the day counter. X comes from
// month_length.
//
// In run mode (`run` = 1) the second counter counts `sec_tick` and each
// further counter counts the carry of the one before it; all carries of
// one second settle within that clock cycle. In adjust mode (`run` = 0)
// the second pulse is ignored, no carry is passed on, and each counter
// advances only on its own bit of `adj_inc`, so a field wraps without
// disturbing the others. `ld` presets every counter at once from `preset`.
//
// Timing: all fields update on the clock edge after the enabling pulse.
// Reset (asynchronous, active low) loads RESET_TIME.
//
// The counters, their ranges and their carry chain follow the original
// design; stopping the clock while adjusting is this design's choice.
module timekeeper #(
  parameter cal_pkg::cal_time_t RESET_TIME = cal_pkg::CAL_RESET
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sec_tick,   // one-cycle pulse once a second
  input  logic                run,        // 1 = timekeeping, 0 = adjust
  input  cal_pkg::field_sel_t adj_inc,    // one-cycle increment per field
  input  logic                ld,         // preset all counters
  input  cal_pkg::cal_time_t  preset,
  output cal_pkg::cal_time_t  now,
  output cal_pkg::max_days_e  max_days,
  output logic                day_carry   // pulses at midnight (run mode)
);
  import cal_pkg::*;

  logic sec_co, min_co, hour_co, day_co, mon_co, year_co;
  logic sec_en, min_en, hour_en, day_en, week_en, mon_en, year_en;
  logic leap;

  assign sec_en  = run ? sec_tick : adj_inc.second;
  assign min_en  = run ? sec_co   : adj_inc.minute;
  assign hour_en = run ? min_co   : adj_inc.hour;
  assign day_en  = run ? hour_co  : adj_inc.day;
  assign week_en = run ? hour_co  : adj_inc.week;
  assign mon_en  = run ? day_co   : adj_inc.month;
  assign year_en = run ? mon_co   : adj_inc.year;

  assign day_carry = run && hour_co;

  bcd_counter #(.MIN(8'h00), .MAX(8'h59), .RESET_VAL(RESET_TIME.second)) u_sec (
    .clk, .rst_n, .ld, .din(preset.second), .en(sec_en), .q(now.second), .co(sec_co));

  bcd_counter #(.MIN(8'h00), .MAX(8'h59), .RESET_VAL(RESET_TIME.minute)) u_min (
    .clk, .rst_n, .ld, .din(preset.minute), .en(min_en), .q(now.minute), .co(min_co));

  bcd_counter #(.MIN(8'h00), .MAX(8'h23), .RESET_VAL(RESET_TIME.hour)) u_hour (
    .clk, .rst_n, .ld, .din(preset.hour), .en(hour_en), .q(now.hour), .co(hour_co));

  week_counter #(.RESET_VAL(RESET_TIME.week)) u_week (
    .clk, .rst_n, .ld, .din(preset.week), .en(week_en), .q(now.week));

  month_length u_mlen (
    .month(now.month), .year(now.year), .leap, .max_days);

  day_counter #(.RESET_VAL(RESET_TIME.day)) u_day (
    .clk, .rst_n, .ld, .din(preset.day), .en(day_en), .max_days,
    .q(now.day), .co(day_co));

  bcd_counter #(.MIN(8'h01), .MAX(8'h12), .RESET_VAL(RESET_TIME.month)) u_mon (
    .clk, .rst_n, .ld, .din(preset.month), .en(mon_en), .q(now.month), .co(mon_co));

  bcd_counter #(.MIN(8'h00), .MAX(8'h99), .RESET_VAL(RESET_TIME.year)) u_year (
    .clk, .rst_n, .ld, .din(preset.year), .en(year_en), .q(now.year), .co(year_co));

  // The year carry (99 -> 00) has no further counter to drive, and the
  // leap-year flag is used only inside month_length.
  logic unused;
  assign unused = ^{year_co, leap};

endmodule
