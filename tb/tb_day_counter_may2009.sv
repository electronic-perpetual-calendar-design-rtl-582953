// tb_day_counter_may2009: the day counter through one month of 31 days,
// May 2009, as a month-length decoder feeds it. The month_length block
// gives the code for month 05, year 09, which must be 11 (31 days). The day
// counter is preset to 01 and then counts one day per enable. It must show
// 02, 03 ... 31, then 01 with exactly one carry into the month, and that
// carry must come on the 31st count. A second preset to 15 checks that the
// load overrides counting.
module tb_day_counter_may2009;
  import cal_pkg::*;

  logic clk, rst_n = 0;
  logic ld = 0, en = 0;
  logic [7:0] din = 0, q;
  logic co, leap;
  max_days_e max_days;
  int checks = 0, failures = 0, carries = 0, carry_at = 0;

  initial clk = 0;
  always #5 clk = ~clk;

  month_length u_len (.month(8'h05), .year(8'h09), .leap, .max_days);
  day_counter dut (.clk, .rst_n, .ld, .din, .en, .max_days, .q, .co);

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_day;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (max_days != DAYS_31 || leap) begin failures++; $display("ERROR May 2009 code %b", max_days); end
    din = 8'h01; ld = 1;
    @(posedge clk);
    #1 ld = 0;
    exp_day = 1;
    for (int n = 1; n <= 31; n++) begin
      en = 1;
      #1;
      if (co) begin carries++; carry_at = n; end
      @(posedge clk);
      #1 en = 0;
      exp_day = (exp_day == 31) ? 1 : exp_day + 1;
      checks++;
      if (q !== {4'(exp_day / 10), 4'(exp_day % 10)}) begin
        failures++; $display("ERROR count %0d: day %h expected %0d", n, q, exp_day);
      end
      @(posedge clk);
      #1;
    end
    checks++;
    if (carries != 1 || carry_at != 31) begin
      failures++; $display("ERROR %0d carries, last at count %0d", carries, carry_at);
    end
    // load has priority over the count enable
    din = 8'h15; ld = 1; en = 1;
    @(posedge clk);
    #1 ld = 0; en = 0;
    checks++;
    if (q !== 8'h15) begin failures++; $display("ERROR preset gave %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
