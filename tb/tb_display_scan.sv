// tb_display_scan: self-checking test of the eight-digit display driver.
// Random calendar values are applied in both groups while the scan runs.
// After every clock the registered digit select must enable exactly one
// digit, the digits must be scanned in order, and the segments must match
// the expected character for that digit, from an independent table of
// seven-segment codes. Both groups and all eight digits must be seen.
module tb_display_scan;
  logic clk = 0, rst_n = 0, scan_tick = 0, control = 0;
  logic [7:0] hour, minute, second, year, month, day;
  logic [2:0] week;
  logic [7:0] selout, show;
  int checks = 0, failures = 0;
  int seen [2][8];

  // Segment codes {g..a} for 0..9, then blank.
  localparam logic [6:0] SEG [11] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F, 7'h00};

  always #5 clk = ~clk;

  display_scan dut (.clk, .rst_n, .scan_tick, .control, .hour, .minute, .second,
                    .year, .month, .day, .week, .selout, .show);

  function automatic logic [7:0] rand_bcd(int lo, int hi);
    int v = $urandom_range(lo, hi);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  // Expected character (0..9, 10 = blank) and decimal point at digit pos.
  function automatic int exp_char(int pos, logic grp);
    logic [7:0] f;
    if (pos == 7) return grp ? int'(week) : 2;
    if (pos == 6) return grp ? 10 : 0;
    case (pos / 2)
      0: f = grp ? second : day;
      1: f = grp ? minute : month;
      default: f = grp ? hour : year;
    endcase
    return (pos % 2) ? int'(f[7:4]) : int'(f[3:0]);
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pos, prev_pos;
    seen = '{default: 0};
    hour = 8'h12; minute = 8'h34; second = 8'h56;
    year = 8'h09; month = 8'h05; day = 8'h31; week = 3'd5;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (selout !== 8'hFF) begin failures++; $display("ERROR digits enabled in reset"); end
    rst_n = 1;
    prev_pos = -1;
    for (int cyc = 0; cyc < 20_000; cyc++) begin
      if ($urandom_range(0, 299) == 0) control = ~control;
      if ($urandom_range(0, 49) == 0) begin
        hour = rand_bcd(0, 23); minute = rand_bcd(0, 59); second = rand_bcd(0, 59);
        year = rand_bcd(0, 99); month = rand_bcd(1, 12); day = rand_bcd(1, 31);
        week = 3'($urandom_range(0, 6));
      end
      scan_tick = ($urandom_range(0, 2) == 0);
      @(posedge clk);
      #1;
      if (cyc == 0) continue;  // outputs lag the inputs by one clock
      pos = -1;
      for (int i = 0; i < 8; i++) if (selout == ~(8'b1 << i)) pos = i;
      checks++;
      if (pos < 0) begin
        failures++; $display("ERROR selout %b not one digit", selout);
        continue;
      end
      if (prev_pos >= 0 && pos != prev_pos && pos != (prev_pos + 1) % 8) begin
        failures++; $display("ERROR scan jumped from %0d to %0d", prev_pos, pos);
      end
      prev_pos = pos;
      checks++;
      if (show !== {(pos == 2 || pos == 4), SEG[exp_char(pos, control)]}) begin
        failures++;
        if (failures < 10) $display("ERROR digit %0d grp %0d: show %b", pos, control, show);
      end
      seen[control][pos]++;
      // hold inputs one more cycle so the registered output can be compared
      // with stable values
      scan_tick = 0;
      @(posedge clk);
      #1;
    end
    for (int g = 0; g < 2; g++)
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (seen[g][i] == 0) begin failures++; $display("ERROR group %0d digit %0d never shown", g, i); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
