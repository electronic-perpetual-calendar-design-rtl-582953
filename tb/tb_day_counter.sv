// tb_day_counter: self-checking test of the day-of-month counter. The
// month-length code is held for stretches of random length and changed at
// random, enables and presets (days 01..31) are random, and an integer
// model predicts the BCD day and the carry every cycle: day d with month
// length X goes to d+1, or to 1 with a carry when d >= X. The test fails
// unless the counter wrapped at each of 28, 29, 30 and 31 days.
module tb_day_counter;
  import cal_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ld = 0, en = 0;
  logic [7:0] din = 0, q;
  logic co;
  max_days_e max_days = DAYS_31;
  int checks = 0, failures = 0, model, last;
  int wraps [4];

  always #5 clk = ~clk;

  day_counter dut (.clk, .rst_n, .ld, .din, .en, .max_days, .q, .co);

  function automatic logic [7:0] to_bcd(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    wraps = '{0, 0, 0, 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model = 1;
    for (int cyc = 0; cyc < 20_000; cyc++) begin
      if ($urandom_range(0, 199) == 0) max_days = max_days_e'($urandom_range(0, 3));
      en = ($urandom_range(0, 3) != 0);
      ld = ($urandom_range(0, 999) == 0);
      v  = $urandom_range(1, 31);
      din = to_bcd(v);
      last = 28 + int'(max_days);
      #1;
      checks++;
      if (q !== to_bcd(model) || co !== (en && model >= last)) begin
        failures++;
        if (failures < 10) $display("ERROR cyc %0d: q=%h exp %0d co=%b X=%0d", cyc, q, model, co, last);
      end
      @(posedge clk);
      if (ld) model = v;
      else if (en) begin
        if (model >= last) begin model = 1; wraps[int'(max_days)]++; end
        else model++;
      end
      #1;
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (wraps[i] == 0) begin failures++; $display("ERROR no wrap at %0d days", 28 + i); end
    end
    $display("wraps 28:%0d 29:%0d 30:%0d 31:%0d", wraps[0], wraps[1], wraps[2], wraps[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
