// tb_perpetual_calendar: end-to-end test of the calendar through its pins.
//
// Runs at reduced rates (200 clocks per second, a scan tick every 2
// clocks, 3-sample debounce) so that many calendar days fit in one run.
// An integer calendar model follows every second the design counts. The
// test exercises and counts each mechanism:
//   - the second pulse rate (exactly CLK_HZ clocks between seconds),
//   - minute, hour, day, week, month (28/29/30/31-day) and year carries,
//     and the 2099 -> 2000 wrap, by presetting just before them,
//   - the preset load,
//   - every adjust mode, entered with the mode key, and one adjust-key
//     increment in each, with the clock frozen meanwhile,
//   - a key glitch shorter than the debounce, which must be ignored,
//   - both display groups, selected with the select key, read back from
//     the multiplexed selout/show pins and decoded.
// A mechanism that never happened counts as a failure.
module tb_perpetual_calendar;
  import cal_pkg::*;

  localparam int CLK_HZ = 200;
  localparam int SCAN_HZ = 100;
  localparam int DEB = 3;
  localparam int PRESS = (CLK_HZ / SCAN_HZ) * (DEB + 4);

  logic clk = 0, rst_n = 0;
  logic key_mode_n = 1, key_adj_n = 1, key_sel_n = 1;
  logic preset_ld = 0;
  cal_time_t preset_time = '0, now;
  logic [7:0] selout, show;
  mode_e mode;
  logic disp_group;

  int checks = 0, failures = 0;
  int Y, MO, D, W, H, MI, S;
  int cyc = 0, last_sec_cyc = -1;
  bit tracking = 0;
  cal_time_t prev;
  // mechanism counters
  int n_rate = 0, n_min = 0, n_hour = 0, n_day = 0, n_year = 0, n_cent = 0;
  int n_mon [4];
  int n_preset = 0, n_adj = 0, n_glitch = 0, n_grp [2];
  int n_mode [8];
  int digit [8];   // decoded display, 0..9, 10 = blank, -1 = unknown

  localparam logic [6:0] SEG [11] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F, 7'h00};

  always #5 clk = ~clk;

  perpetual_calendar #(.CLK_HZ(CLK_HZ), .SCAN_HZ(SCAN_HZ), .DEBOUNCE_TICKS(DEB)) dut (
    .clk, .rst_n, .key_mode_n, .key_adj_n, .key_sel_n, .preset_ld, .preset_time,
    .selout, .show, .now, .mode, .disp_group);

  function automatic int mdays(int y, int m);
    int len [12] = '{31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};
    bit lp = ((y % 4 == 0) && (y % 100 != 0)) || (y % 400 == 0);
    return len[m-1] + ((m == 2 && lp) ? 1 : 0);
  endfunction

  function automatic logic [7:0] b(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  function automatic bit model_matches();
    return now.year === b(Y - 2000) && now.month === b(MO) && now.day === b(D) &&
           now.week === 3'(W) && now.hour === b(H) && now.minute === b(MI) &&
           now.second === b(S);
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

  // Follow the clock: each change of the seconds while running must be one
  // model second, and come exactly CLK_HZ clocks after the previous one.
  always @(posedge clk) begin
    cyc++;
    #2;
    if (rst_n && tracking && now != prev) begin
      model_tick();
      checks++;
      if (!model_matches()) begin
        failures++;
        if (failures < 10)
          $display("ERROR tick: got 20%h-%h-%h w%0d %h:%h:%h, exp %0d-%0d-%0d w%0d %0d:%0d:%0d",
                   now.year, now.month, now.day, now.week, now.hour, now.minute, now.second,
                   Y, MO, D, W, H, MI, S);
      end
      if (last_sec_cyc >= 0) begin
        checks++;
        if (cyc - last_sec_cyc != CLK_HZ) begin
          failures++; $display("ERROR second after %0d clocks", cyc - last_sec_cyc);
        end else n_rate++;
      end
      last_sec_cyc = cyc;
    end
    prev = now;
  end

  // Decode the multiplexed display.
  always @(posedge clk) begin
    #3;
    for (int i = 0; i < 8; i++)
      if (selout == ~(8'b1 << i)) begin
        digit[i] = -1;
        for (int c = 0; c < 11; c++) if (show[6:0] == SEG[c]) digit[i] = c;
      end
  end

  task automatic press(ref logic pin);
    pin = 0;
    repeat (PRESS) @(posedge clk);
    pin = 1;
    repeat (PRESS) @(posedge clk);
  endtask

  task automatic do_preset(int y, int mo, int d, int w, int h, int mi, int s);
    tracking = 0;
    @(negedge clk);
    preset_time = '{year: b(y - 2000), month: b(mo), day: b(d), week: 3'(w),
                    hour: b(h), minute: b(mi), second: b(s)};
    preset_ld = 1;
    @(negedge clk);
    preset_ld = 0;
    Y = y; MO = mo; D = d; W = w; H = h; MI = mi; S = s;
    checks++;
    if (!model_matches()) begin failures++; $display("ERROR preset not loaded"); end
    else n_preset++;
    last_sec_cyc = -1;
    prev = now;
    tracking = 1;
  endtask

  task automatic check_display();
    int exp_d [8];
    repeat (8 * (CLK_HZ / SCAN_HZ) + 4) @(posedge clk);
    #4;
    if (!disp_group) begin
      exp_d = '{int'(now.day[3:0]), int'(now.day[7:4]), int'(now.month[3:0]), int'(now.month[7:4]),
                int'(now.year[3:0]), int'(now.year[7:4]), 0, 2};
    end else begin
      exp_d = '{int'(now.second[3:0]), int'(now.second[7:4]), int'(now.minute[3:0]),
                int'(now.minute[7:4]), int'(now.hour[3:0]), int'(now.hour[7:4]), 10, int'(now.week)};
    end
    checks++;
    if (digit != exp_d) begin
      failures++;
      $display("ERROR display group %0d: %0d%0d%0d%0d%0d%0d%0d%0d", disp_group,
               digit[7], digit[6], digit[5], digit[4], digit[3], digit[2], digit[1], digit[0]);
    end else n_grp[disp_group]++;
  endtask

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cal_time_t before_adj;
    mode_e m_before;
    n_mon = '{0, 0, 0, 0};
    n_grp = '{0, 0};
    n_mode = '{default: 0};
    digit = '{default: -1};
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (now != CAL_RESET || mode != MODE_RUN) begin failures++; $display("ERROR reset state"); end
    rst_n = 1;
    Y = 2000; MO = 1; D = 1; W = 6; H = 0; MI = 0; S = 0;
    prev = now;
    tracking = 1;
    repeat (3 * CLK_HZ) @(posedge clk);

    // carries at month ends, leap and common Februaries, year and century ends
    do_preset(2000, 1, 31, 1, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2000, 2, 28, 1, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2000, 2, 29, 2, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2001, 2, 28, 3, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2009, 4, 30, 4, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2009, 5, 31, 0, 23, 59, 58);  repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2012, 12, 31, 1, 23, 59, 58); repeat (3 * CLK_HZ) @(posedge clk);
    do_preset(2099, 12, 31, 4, 23, 59, 57); repeat (4 * CLK_HZ) @(posedge clk);
    do_preset(2024, 6, 15, 6, 22, 58, 30);  repeat (100 * CLK_HZ) @(posedge clk);

    // display, both groups
    check_display();
    press(key_sel_n);
    checks++;
    if (disp_group !== 1'b1) begin failures++; $display("ERROR select key"); end
    check_display();
    press(key_sel_n);
    check_display();

    // a glitch on the mode key must not change the mode
    key_mode_n = 0;
    repeat (CLK_HZ / SCAN_HZ) @(posedge clk);
    key_mode_n = 1;
    repeat (PRESS) @(posedge clk);
    checks++;
    if (mode != MODE_RUN) begin failures++; $display("ERROR glitch changed mode"); end
    else n_glitch++;

    // walk through every adjust mode, one increment in each
    do_preset(2009, 5, 31, 0, 23, 59, 59);
    for (int k = 1; k <= 8; k++) begin
      m_before = mode;
      press(key_mode_n);
      checks++;
      if (int'(mode) != k % 8) begin failures++; $display("ERROR mode %0d after %0d presses", mode, k); end
      n_mode[mode]++;
      tracking = 0;  // seconds are frozen from here on
      if (mode == MODE_RUN) break;
      before_adj = now;
      press(key_adj_n);
      repeat (2 * CLK_HZ) @(posedge clk);  // the clock must stay frozen
      case (mode)
        MODE_YEAR:   Y  = (Y == 2099) ? 2000 : Y + 1;
        MODE_MONTH:  MO = MO % 12 + 1;
        MODE_DAY:    D  = (D >= mdays(Y, MO)) ? 1 : D + 1;
        MODE_WEEK:   W  = (W + 1) % 7;
        MODE_HOUR:   H  = (H + 1) % 24;
        MODE_MINUTE: MI = (MI + 1) % 60;
        default:     S  = (S + 1) % 60;
      endcase
      checks++;
      if (!model_matches()) begin
        failures++;
        $display("ERROR adjust in mode %0d: got 20%h-%h-%h w%0d %h:%h:%h", mode,
                 now.year, now.month, now.day, now.week, now.hour, now.minute, now.second);
      end else n_adj++;
    end
    // back in run mode: the clock resumes
    prev = now;
    last_sec_cyc = -1;
    tracking = 1;
    repeat (5 * CLK_HZ) @(posedge clk);
    check_display();

    // coverage of every mechanism
    checks++;
    if (n_rate == 0 || n_min == 0 || n_hour == 0 || n_day == 0 || n_year == 0 || n_cent == 0 ||
        n_mon[0] == 0 || n_mon[1] == 0 || n_mon[2] == 0 || n_mon[3] == 0 ||
        n_preset == 0 || n_adj != 7 || n_glitch == 0 || n_grp[0] == 0 || n_grp[1] == 0 ||
        n_mode[0] == 0) begin
      failures++;
      $display("ERROR a mechanism never happened");
    end
    $display("seconds at rate %0d; carries min %0d hour %0d day %0d; months 28:%0d 29:%0d 30:%0d 31:%0d; years %0d century %0d",
             n_rate, n_min, n_hour, n_day, n_mon[0], n_mon[1], n_mon[2], n_mon[3], n_year, n_cent);
    $display("presets %0d adjusts %0d glitches ignored %0d display checks %0d/%0d",
             n_preset, n_adj, n_glitch, n_grp[0], n_grp[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
