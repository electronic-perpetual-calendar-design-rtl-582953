// tb_week_counter: self-checking test of the day-of-week counter. Random
// count enables and presets (including the out-of-range value 7) are
// applied; an integer model predicts the count each cycle. The number of
// 6 -> 0 wraps is counted and must be non-zero.
module tb_week_counter;
  logic clk = 0, rst_n = 0;
  logic ld = 0, en = 0;
  logic [2:0] din = 0, q;
  int checks = 0, failures = 0, wraps = 0, model;

  always #5 clk = ~clk;

  week_counter #(.RESET_VAL(3'd3)) dut (.clk, .rst_n, .ld, .din, .en, .q);

  initial begin : watchdog
    repeat (50_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (q !== 3'd3) begin failures++; $display("ERROR reset value %0d", q); end
    rst_n = 1;
    model = 3;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      en  = $urandom_range(0, 1);
      ld  = ($urandom_range(0, 99) == 0);
      din = 3'($urandom_range(0, 7));
      @(posedge clk);
      if (ld) model = din;
      else if (en) begin
        if (model >= 6) begin model = 0; wraps++; end
        else model++;
      end
      #1;
      checks++;
      if (q !== 3'(model)) begin
        failures++;
        if (failures < 10) $display("ERROR cyc %0d: q=%0d exp %0d", cyc, q, model);
      end
    end
    checks++;
    if (wraps == 0) begin failures++; $display("ERROR never wrapped"); end
    $display("wraps %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
