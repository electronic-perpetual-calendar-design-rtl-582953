// perpetual_calendar: electronic perpetual calendar for a small CPLD.
//
// Keeps year (2000-2099), month, day, day of week, hours, minutes and
// seconds, with month lengths and leap years handled in hardware, and
// shows them on eight multiplexed seven-segment digits. Four parts:
//   - timing     (timekeeper): seven chained BCD counters, with preset;
//   - adjustment (adjust_fsm): mode key selects normal running or one of
//                 seven fields to adjust, adjust key increments that field;
//   - keyboard   (keyboard): debounces the mode, adjust and display-select
//                 keys, the last toggling the display group;
//   - display    (display_scan): shows date or week/time, one digit at a
//                 time.
// tick_gen derives the one-second pulse and the 1 kHz scan tick from the
// board clock, CLK_HZ.
//
// Interface: active-low key pins; `preset_ld` loads `preset_time` into all
// counters at once (one clock pulse); `selout`/`show` drive the digits
// (see display_scan); `now`, `mode` and `disp_group` expose the state.
// Everything runs on `clk`; reset is asynchronous, active low.
//
// The four-module split, the counters and their carries, the month-length
// code and the display ports follow the original design; the clock rate,
// debouncing, adjust order and display layout are this design's choices.
module perpetual_calendar #(
  parameter int unsigned        CLK_HZ         = 50_000_000,
  parameter int unsigned        SCAN_HZ        = 1_000,
  parameter int unsigned        DEBOUNCE_TICKS = 20,
  parameter cal_pkg::cal_time_t RESET_TIME     = cal_pkg::CAL_RESET
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               key_mode_n,
  input  logic               key_adj_n,
  input  logic               key_sel_n,
  input  logic               preset_ld,
  input  cal_pkg::cal_time_t preset_time,
  output logic [7:0]         selout,
  output logic [7:0]         show,
  output cal_pkg::cal_time_t now,
  output cal_pkg::mode_e     mode,
  output logic               disp_group
);
  import cal_pkg::*;

  logic       sec_tick, scan_tick;
  logic       mode_press, adj_press;
  logic       run, day_carry;
  field_sel_t adj_inc;
  max_days_e  max_days;

  tick_gen #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ)) u_tick (
    .clk, .rst_n, .sec_tick, .scan_tick);

  keyboard #(.STABLE_SAMPLES(DEBOUNCE_TICKS)) u_keys (
    .clk, .rst_n, .sample_tick(scan_tick),
    .key_mode_n, .key_adj_n, .key_sel_n,
    .mode_press, .adj_press, .disp_group);

  adjust_fsm u_adj (
    .clk, .rst_n, .mode_key(mode_press), .adj_key(adj_press),
    .mode, .run, .adj_inc);

  timekeeper #(.RESET_TIME(RESET_TIME)) u_time (
    .clk, .rst_n, .sec_tick, .run, .adj_inc,
    .ld(preset_ld), .preset(preset_time),
    .now, .max_days, .day_carry);

  display_scan u_disp (
    .clk, .rst_n, .scan_tick, .control(disp_group),
    .hour(now.hour), .minute(now.minute), .second(now.second),
    .year(now.year), .month(now.month), .day(now.day), .week(now.week),
    .selout, .show);

  logic unused;
  assign unused = ^{max_days, day_carry};

endmodule
