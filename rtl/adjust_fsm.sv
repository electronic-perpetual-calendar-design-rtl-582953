// adjust_fsm: the data adjustment state machine.
//
// The mode key switches between normal timekeeping and the time-adjust
// mode; inside adjust mode each further press selects the next field, in
// the order year, month, day, week, hour, minute, second, and the press
// after "second" returns to normal timekeeping. In an adjust state each
// press of the adjust key raises, for one cycle, the increment strobe of
// the selected field in `adj_inc`. In normal mode the adjust key does
// nothing.
//
// Interface: `mode_key` and `adj_key` are one-cycle press pulses from the
// keyboard; `mode` is the current state, `run` is 1 in normal timekeeping.
// Timing: `mode` changes on the clock edge after a mode-key pulse;
// `adj_inc` is registered and appears one cycle after an adjust-key pulse.
// Reset (asynchronous, active low) enters normal timekeeping.
//
// A mode key, an adjust key and a state machine follow the original design;
// the order of the fields is this design's choice.
module adjust_fsm (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mode_key,
  input  logic                adj_key,
  output cal_pkg::mode_e      mode,
  output logic                run,
  output cal_pkg::field_sel_t adj_inc
);
  import cal_pkg::*;

  mode_e next_mode;

  always_comb begin
    unique case (mode)
      MODE_RUN:    next_mode = MODE_YEAR;
      MODE_YEAR:   next_mode = MODE_MONTH;
      MODE_MONTH:  next_mode = MODE_DAY;
      MODE_DAY:    next_mode = MODE_WEEK;
      MODE_WEEK:   next_mode = MODE_HOUR;
      MODE_HOUR:   next_mode = MODE_MINUTE;
      MODE_MINUTE: next_mode = MODE_SECOND;
      default:     next_mode = MODE_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        mode <= MODE_RUN;
    else if (mode_key) mode <= next_mode;
  end

  assign run = (mode == MODE_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) adj_inc <= '0;
    else begin
      adj_inc        <= '0;
      if (adj_key && !mode_key) begin
        adj_inc.year   <= (mode == MODE_YEAR);
        adj_inc.month  <= (mode == MODE_MONTH);
        adj_inc.day    <= (mode == MODE_DAY);
        adj_inc.week   <= (mode == MODE_WEEK);
        adj_inc.hour   <= (mode == MODE_HOUR);
        adj_inc.minute <= (mode == MODE_MINUTE);
        adj_inc.second <= (mode == MODE_SECOND);
      end
    end
  end

  // At most one field is incremented at a time.
  a_onehot_inc: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(adj_inc));

endmodule
