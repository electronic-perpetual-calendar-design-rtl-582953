// tb_month_length: exhaustive test of the month-length decoder over every
// month 01..12 of every year 2000..2099. The expected length comes from the
// full Gregorian rule (divisible by 4 and not by 100, or by 400) applied to
// the four-digit year, and a fixed table of month lengths.
module tb_month_length;
  import cal_pkg::*;

  logic [7:0] month, year;
  logic leap;
  max_days_e max_days;
  int checks = 0, failures = 0;
  localparam int LEN [12] = '{31, 28, 31, 30, 31, 30, 31, 31, 30, 31, 30, 31};

  month_length dut (.month, .year, .leap, .max_days);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y4, exp_len;
    bit exp_leap;
    for (int y = 0; y < 100; y++) begin
      for (int m = 1; m <= 12; m++) begin
        year  = {4'(y / 10), 4'(y % 10)};
        month = {4'(m / 10), 4'(m % 10)};
        #1;
        y4 = 2000 + y;
        exp_leap = ((y4 % 4 == 0) && (y4 % 100 != 0)) || (y4 % 400 == 0);
        exp_len  = LEN[m-1] + ((m == 2 && exp_leap) ? 1 : 0);
        checks++;
        if (28 + int'(max_days) != exp_len || leap !== exp_leap) begin
          failures++;
          if (failures < 10) $display("ERROR %0d-%0d: got %0d days leap %b, exp %0d", y4, m, 28 + int'(max_days), leap, exp_len);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
