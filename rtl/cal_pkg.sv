// cal_pkg: types and constants shared by the perpetual calendar.
//
// All calendar fields are kept as two-digit packed BCD (tens in [7:4],
// units in [3:0]) so the display can show them without conversion. The
// year is the two-digit year of the century 2000-2099. The day of week is
// a 3-bit count 0..6, 0 standing for Sunday.
//
// The two-bit month-length code follows the encoding used by the day
// counter of the original design: 00 = 28, 01 = 29, 10 = 30, 11 = 31 days.
// The adjust-mode order and the field-select vector are this design's own
// choices.
package cal_pkg;

  typedef logic [7:0] bcd8_t;

  // Number of days in the current month.
  typedef enum logic [1:0] {
    DAYS_28 = 2'b00,
    DAYS_29 = 2'b01,
    DAYS_30 = 2'b10,
    DAYS_31 = 2'b11
  } max_days_e;

  // Complete calendar state.
  typedef struct packed {
    bcd8_t      year;    // 00..99
    bcd8_t      month;   // 01..12
    bcd8_t      day;     // 01..28/29/30/31
    logic [2:0] week;    // 0..6, 0 = Sunday
    bcd8_t      hour;    // 00..23
    bcd8_t      minute;  // 00..59
    bcd8_t      second;  // 00..59
  } cal_time_t;

  // One bit per counter; used for the adjust increment strobes.
  typedef struct packed {
    logic year;
    logic month;
    logic day;
    logic week;
    logic hour;
    logic minute;
    logic second;
  } field_sel_t;

  // Operating mode. MODE_RUN is normal timekeeping; every other state is
  // the time-adjust mode for one field. The mode key steps through them
  // in the order listed and returns to MODE_RUN after MODE_SECOND.
  typedef enum logic [2:0] {
    MODE_RUN    = 3'd0,
    MODE_YEAR   = 3'd1,
    MODE_MONTH  = 3'd2,
    MODE_DAY    = 3'd3,
    MODE_WEEK   = 3'd4,
    MODE_HOUR   = 3'd5,
    MODE_MINUTE = 3'd6,
    MODE_SECOND = 3'd7
  } mode_e;

  // Power-on value: Saturday 1 January 2000, 00:00:00.
  localparam cal_time_t CAL_RESET = '{
    year: 8'h00, month: 8'h01, day: 8'h01, week: 3'd6,
    hour: 8'h00, minute: 8'h00, second: 8'h00
  };

  // Two-digit BCD increment without range limit (99 -> 00).
  function automatic bcd8_t bcd_inc(bcd8_t v);
    if (v[3:0] >= 4'd9) return {v[7:4] + 4'd1, 4'd0};
    else                return {v[7:4], v[3:0] + 4'd1};
  endfunction

  // Seven-segment pattern {g,f,e,d,c,b,a}, a segment lit when 1.
  // Codes 10..15 give a blank digit.
  function automatic logic [6:0] seg7(logic [3:0] d);
    case (d)
      4'd0: return 7'b0111111;
      4'd1: return 7'b0000110;
      4'd2: return 7'b1011011;
      4'd3: return 7'b1001111;
      4'd4: return 7'b1100110;
      4'd5: return 7'b1101101;
      4'd6: return 7'b1111101;
      4'd7: return 7'b0000111;
      4'd8: return 7'b1111111;
      4'd9: return 7'b1101111;
      default: return 7'b0000000;
    endcase
  endfunction

endpackage
