// tb_perpetual_calendar_full: the calendar at its default parameters
// (50 MHz clock, 1 kHz scan, 20 ms debounce), taken through one complete
// operation: preset to 2099-12-31 23:59:59, wait for the second pulse and
// check that every field rolls over at once to 2000-01-01 00:00:00 with
// the day of week advanced; check that the next second comes exactly
// 50,000,000 clocks later; then press the select key (held 40 ms) and read
// the week/time group back from the display pins.
module tb_perpetual_calendar_full;
  import cal_pkg::*;

  localparam longint CLK_HZ = 50_000_000;

  logic clk = 0, rst_n = 0;
  logic key_mode_n = 1, key_adj_n = 1, key_sel_n = 1;
  logic preset_ld = 0;
  cal_time_t preset_time = '0, now;
  logic [7:0] selout, show;
  mode_e mode;
  logic disp_group;
  int checks = 0, failures = 0;
  longint cyc = 0, t1 = 0, t2 = 0;
  int digit [8];

  localparam logic [6:0] SEG [11] = '{7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66,
                                      7'h6D, 7'h7D, 7'h07, 7'h7F, 7'h6F, 7'h00};

  always #10 clk = ~clk;
  always @(posedge clk) cyc++;

  perpetual_calendar dut (
    .clk, .rst_n, .key_mode_n, .key_adj_n, .key_sel_n, .preset_ld, .preset_time,
    .selout, .show, .now, .mode, .disp_group);

  always @(posedge clk) begin
    #3;
    for (int i = 0; i < 8; i++)
      if (selout == ~(8'b1 << i)) begin
        digit[i] = -1;
        for (int c = 0; c < 11; c++) if (show[6:0] == SEG[c]) digit[i] = c;
      end
  end

  initial begin : watchdog
    repeat (4 * CLK_HZ) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cal_time_t exp_t;
    int exp_d [8];
    digit = '{default: -1};
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    preset_time = '{year: 8'h99, month: 8'h12, day: 8'h31, week: 3'd4,
                    hour: 8'h23, minute: 8'h59, second: 8'h59};
    preset_ld = 1;
    @(negedge clk);
    preset_ld = 0;
    checks++;
    if (now != preset_time) begin failures++; $display("ERROR preset"); end

    wait (now.second != 8'h59);
    t1 = cyc;
    #1;
    exp_t = '{year: 8'h00, month: 8'h01, day: 8'h01, week: 3'd5,
              hour: 8'h00, minute: 8'h00, second: 8'h00};
    checks++;
    if (now != exp_t) begin
      failures++;
      $display("ERROR rollover: 20%h-%h-%h w%0d %h:%h:%h", now.year, now.month, now.day,
               now.week, now.hour, now.minute, now.second);
    end
    wait (now.second == 8'h01);
    t2 = cyc;
    checks++;
    if (t2 - t1 != CLK_HZ) begin failures++; $display("ERROR second lasted %0d clocks", t2 - t1); end

    key_sel_n = 0;
    repeat (CLK_HZ / 25) @(posedge clk);
    key_sel_n = 1;
    repeat (CLK_HZ / 50) @(posedge clk);
    #4;
    checks++;
    exp_d = '{int'(now.second[3:0]), int'(now.second[7:4]), int'(now.minute[3:0]),
              int'(now.minute[7:4]), int'(now.hour[3:0]), int'(now.hour[7:4]), 10, int'(now.week)};
    if (disp_group !== 1'b1 || digit != exp_d) begin
      failures++;
      $display("ERROR display group %0d: %0d%0d%0d%0d%0d%0d%0d%0d", disp_group,
               digit[7], digit[6], digit[5], digit[4], digit[3], digit[2], digit[1], digit[0]);
    end
    $display("rollover at clock %0d, next second %0d clocks later", t1, t2 - t1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
