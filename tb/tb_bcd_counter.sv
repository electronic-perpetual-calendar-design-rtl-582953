// tb_bcd_counter: self-checking test of bcd_counter in the five ranges the
// calendar uses: seconds and minutes 00-59, hours 00-23, months 01-12 and
// years 00-99. Each instance gets random count enables and occasional
// presets; a binary-integer model of each counter predicts the BCD count
// and the carry every cycle. The test also counts how many wraps (carries)
// each instance made and fails if one never wrapped.
module tb_bcd_counter;
  localparam int N = 5;
  localparam logic [7:0] MINS [N] = '{8'h00, 8'h00, 8'h00, 8'h01, 8'h00};
  localparam logic [7:0] MAXS [N] = '{8'h59, 8'h59, 8'h23, 8'h12, 8'h99};
  localparam int         LO   [N] = '{0, 0, 0, 1, 0};
  localparam int         HI   [N] = '{59, 59, 23, 12, 99};

  logic clk = 0, rst_n = 0;
  logic       ld [N];
  logic [7:0] din [N];
  logic       en [N];
  logic [7:0] q [N];
  logic       co [N];

  int checks = 0, failures = 0;
  int model [N];
  int wraps [N];

  always #5 clk = ~clk;

  for (genvar i = 0; i < N; i++) begin : g_dut
    bcd_counter #(.MIN(MINS[i]), .MAX(MAXS[i]), .RESET_VAL(MINS[i])) dut (
      .clk, .rst_n, .ld(ld[i]), .din(din[i]), .en(en[i]), .q(q[i]), .co(co[i]));
  end

  function automatic logic [7:0] to_bcd(int v);
    return {4'(v / 10), 4'(v % 10)};
  endfunction

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    for (int i = 0; i < N; i++) begin
      ld[i] = 0; din[i] = 0; en[i] = 0; model[i] = LO[i]; wraps[i] = 0;
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 20_000; cyc++) begin
      // drive
      for (int i = 0; i < N; i++) begin
        en[i] = ($urandom_range(0, 3) != 0);
        ld[i] = ($urandom_range(0, 499) == 0);
        v = $urandom_range(LO[i], HI[i]);
        din[i] = to_bcd(v);
      end
      #1;
      // check combinational carry and current count
      for (int i = 0; i < N; i++) begin
        checks++;
        if (q[i] !== to_bcd(model[i]) || co[i] !== (en[i] && model[i] == HI[i])) begin
          failures++;
          if (failures < 10)
            $display("ERROR inst %0d cyc %0d: q=%h exp %h co=%b", i, cyc, q[i], to_bcd(model[i]), co[i]);
        end
      end
      @(posedge clk);
      for (int i = 0; i < N; i++) begin
        if (ld[i]) model[i] = int'(din[i][7:4]) * 10 + int'(din[i][3:0]);
        else if (en[i]) begin
          if (model[i] == HI[i]) begin model[i] = LO[i]; wraps[i]++; end
          else model[i]++;
        end
      end
      #1;
    end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (wraps[i] == 0) begin failures++; $display("ERROR inst %0d never wrapped", i); end
    end
    $display("wraps: sec %0d min %0d hour %0d month %0d year %0d",
             wraps[0], wraps[1], wraps[2], wraps[3], wraps[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
