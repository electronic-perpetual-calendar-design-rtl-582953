// tb_timekeeper: self-checking test of the integrated timing module.
// An integer calendar model (Gregorian month lengths, four-digit year)
// predicts every field after each clock.
//  - Run mode: the counters are preset to the last seconds of a mid-month
//    day and of the last day of every month of several years (leap and common years, and the end
//    of 2099) and to random dates, then second pulses arrive at random;
//    every minute, hour, day, month and year rollover must match.
//  - Adjust mode: random single-field increments with the second pulse
//    still toggling; only the selected field may move, with its own wrap
//    and no carry into the next field.
// Counts of each rollover kind are printed and each must be non-zero.
module tb_timekeeper;
  import cal_pkg::*;

  logic clk = 0, rst_n = 0;
  logic sec_tick = 0, run = 1, ld = 0;
  field_sel_t adj_inc = '0;
  cal_time_t preset = '0, now;
  max_days_e max_days;
  logic day_carry;
  int checks = 0, failures = 0;

  // model state
  int Y, MO, D, W, H, MI, S;
  // rollover counters: minute, hour, day, month(28,29,30,31), year, century
  int n_min = 0, n_hour = 0, n_day = 0, n_year = 0, n_cent = 0, n_adj = 0;
  int n_mon [4];

  always #5 clk = ~clk;

  timekeeper dut (.clk, .rst_n, .sec_tick, .run, .adj_inc, .ld, .preset,
                  .now, .max_days, .day_carry);

  function automatic int mdays(int y, int m);
    int len [12] = '{31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    bit lp = ((y % 4 == 0) && (y % 100 != 0)) || (y % 400 == 0);
    return len[m-1] + ((m == 2 && lp) ? 1 : 0);
  endfunction

  function automatic logic [7:0] b(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  task automatic model_tick();
    S++;
    if (S < 60) return;
    S = 0; MI++; n_min++;
    if (MI < 60) return;
    MI = 0; H++; n_hour++;
    if (H < 24) return;
    H = 0; W = (W + 1) % 7; n_day++;
    if (D < mdays(Y, MO)) begin D++; return; end
    n_mon[mdays(Y, MO) - 28]++;
    D = 1; MO++;
    if (MO <= 12) return;
    MO = 1; Y++; n_year++;
    if (Y == 2100) begin Y = 2000; n_cent++; end
  endtask

  task automatic check(string what);
    logic exp_dc;
    checks++;
    if (now.year !== b(Y - 2000) || now.month !== b(MO) || now.day !== b(D) ||
        now.week !== 3'(W) || now.hour !== b(H) || now.minute !== b(MI) ||
        now.second !== b(S) || 28 + int'(max_days) != mdays(Y, MO)) begin
      failures++;
      if (failures < 10)
        $display("ERROR %s: got 20%h-%h-%h w%0d %h:%h:%h, exp %0d-%0d-%0d w%0d %0d:%0d:%0d",
                 what, now.year, now.month, now.day, now.week, now.hour, now.minute,
                 now.second, Y, MO, D, W, H, MI, S);
    end
  endtask

  task automatic do_preset(int y, int mo, int d, int w, int h, int mi, int s);
    preset = '{year: b(y - 2000), month: b(mo), day: b(d), week: 3'(w),
               hour: b(h), minute: b(mi), second: b(s)};
    ld = 1;
    @(posedge clk);
    #1 ld = 0;
    Y = y; MO = mo; D = d; W = w; H = h; MI = mi; S = s;
    check("preset");
  endtask

  // Run `n` cycles in run mode with random second pulses.
  task automatic run_for(int n);
    logic exp_carry;
    run = 1;
    for (int i = 0; i < n; i++) begin
      sec_tick = $urandom_range(0, 1);
      #1;
      exp_carry = sec_tick && S == 59 && MI == 59 && H == 23;
      checks++;
      if (day_carry !== exp_carry) begin failures++; $display("ERROR day_carry %b", day_carry); end
      @(posedge clk);
      if (sec_tick) model_tick();
      #1 check("run");
    end
    sec_tick = 0;
  endtask

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int years [6] = '{2000, 2001, 2004, 2009, 2098, 2099};
    n_mon = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1;
    Y = 2000; MO = 1; D = 1; W = 6; H = 0; MI = 0; S = 0;
    check("reset");
    rst_n = 1;
    // month and year ends
    foreach (years[i])
      for (int m = 1; m <= 12; m++) begin
        do_preset(years[i], m, mdays(years[i], m), $urandom_range(0, 6), 23, 59, 57);
        run_for(12);
        do_preset(years[i], m, $urandom_range(1, 27), $urandom_range(0, 6), 23, 59, 57);
        run_for(12);
      end
    // random dates, long runs across minutes and hours
    for (int k = 0; k < 10; k++) begin
      do_preset(2000 + $urandom_range(0, 99), $urandom_range(1, 12), 1, $urandom_range(0, 6),
                $urandom_range(0, 23), $urandom_range(0, 59), $urandom_range(0, 59));
      D = $urandom_range(1, mdays(Y, MO));
      do_preset(Y, MO, D, W, H, MI, S);
      run_for(2000);
    end
    // adjust mode: one field at a time, no carries, second pulse ignored
    run = 0;
    for (int k = 0; k < 3000; k++) begin
      int f = $urandom_range(0, 7);
      sec_tick = $urandom_range(0, 1);
      adj_inc = (f < 7) ? field_sel_t'(7'b1 << f) : '0;
      @(posedge clk);
      case (f)
        0: S  = (S + 1) % 60;
        1: MI = (MI + 1) % 60;
        2: H  = (H + 1) % 24;
        3: W  = (W + 1) % 7;
        4: D  = (D >= mdays(Y, MO)) ? 1 : D + 1;
        5: MO = MO % 12 + 1;
        6: Y  = (Y == 2099) ? 2000 : Y + 1;
        default: ;
      endcase
      if (f < 7) n_adj++;
      #1 check("adjust");
    end
    adj_inc = '0;
    sec_tick = 0;
    checks++;
    if (n_min == 0 || n_hour == 0 || n_day == 0 || n_year == 0 || n_cent == 0 || n_adj == 0 ||
        n_mon[0] == 0 || n_mon[1] == 0 || n_mon[2] == 0 || n_mon[3] == 0) begin
      failures++;
      $display("ERROR rollover coverage");
    end
    $display("rollovers: min %0d hour %0d day %0d month 28:%0d 29:%0d 30:%0d 31:%0d year %0d century %0d, adjust steps %0d",
             n_min, n_hour, n_day, n_mon[0], n_mon[1], n_mon[2], n_mon[3], n_year, n_cent, n_adj);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
