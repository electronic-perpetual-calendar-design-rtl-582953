// tb_tick_gen: checks the periods of the second pulse and the scan tick.
// With CLK_HZ = 1000 and SCAN_HZ = 100 the second pulse must come every
// 1000 cycles, first at cycle 1000 after reset, and the scan tick every
// 10 cycles; each pulse must last one cycle.
module tb_tick_gen;
  logic clk = 0, rst_n = 0;
  logic sec_tick, scan_tick;
  int checks = 0, failures = 0;
  int cyc = 0, last_sec = 0, last_scan = 0, n_sec = 0, n_scan = 0;

  always #5 clk = ~clk;

  tick_gen #(.CLK_HZ(1000), .SCAN_HZ(100)) dut (.clk, .rst_n, .sec_tick, .scan_tick);

  initial begin : watchdog
    repeat (20_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (cyc = 1; cyc <= 5500; cyc++) begin
      @(posedge clk);
      #1;
      if (sec_tick) begin
        checks++;
        if (cyc - last_sec != 1000) begin
          failures++; $display("ERROR second pulse at %0d, previous %0d", cyc, last_sec);
        end
        last_sec = cyc; n_sec++;
      end
      if (scan_tick) begin
        checks++;
        if (cyc - last_scan != 10) begin
          failures++; $display("ERROR scan tick at %0d, previous %0d", cyc, last_scan);
        end
        last_scan = cyc; n_scan++;
      end
    end
    checks++;
    if (n_sec != 5 || n_scan != 550) begin
      failures++; $display("ERROR %0d second pulses, %0d scan ticks", n_sec, n_scan);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
