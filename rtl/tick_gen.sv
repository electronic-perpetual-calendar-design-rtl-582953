// tick_gen: second pulse and display scan tick from the board clock.
//
// Two free-running dividers of the system clock `clk` (CLK_HZ) give
// one-cycle enable pulses: `sec_tick` once a second, the count clock of
// the second counter, and `scan_tick` SCAN_HZ times a second, which steps
// the display scan by one digit and samples the keys. Every flip-flop of
// the calendar runs on `clk`; these pulses are enables, not clocks.
//
// Timing: the first `sec_tick` comes CLK_HZ cycles after reset, then one
// every CLK_HZ cycles; likewise `scan_tick` every CLK_HZ/SCAN_HZ cycles.
// Reset is asynchronous, active low.
//
// The document names the second pulse and a scan clock; the clock rate and
// the dividers are this design's own.
module tick_gen #(
  parameter int unsigned CLK_HZ  = 50_000_000,
  parameter int unsigned SCAN_HZ = 1_000
) (
  input  logic clk,
  input  logic rst_n,
  output logic sec_tick,
  output logic scan_tick
);
  localparam int unsigned SCAN_DIV = CLK_HZ / SCAN_HZ;
  localparam int unsigned SW = $clog2(CLK_HZ);
  localparam int unsigned CW = (SCAN_DIV > 1) ? $clog2(SCAN_DIV) : 1;

  logic [SW-1:0] sec_cnt;
  logic [CW-1:0] scan_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sec_cnt  <= '0;
      sec_tick <= 1'b0;
    end else if (sec_cnt == SW'(CLK_HZ - 1)) begin
      sec_cnt  <= '0;
      sec_tick <= 1'b1;
    end else begin
      sec_cnt  <= sec_cnt + 1'b1;
      sec_tick <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_cnt  <= '0;
      scan_tick <= 1'b0;
    end else if (scan_cnt == CW'(SCAN_DIV - 1)) begin
      scan_cnt  <= '0;
      scan_tick <= 1'b1;
    end else begin
      scan_cnt  <= scan_cnt + 1'b1;
      scan_tick <= 1'b0;
    end
  end

endmodule
