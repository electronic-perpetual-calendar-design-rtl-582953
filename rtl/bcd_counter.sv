// bcd_counter: two-digit BCD counter with preset, count and carry.
//
// Used for the second (00-59), minute (00-59), hour (00-23), month (01-12)
// and year (00-99) counters of the calendar. Each step of `en` advances
// the count by one; at MAX it returns to MIN and raises the carry `co` in
// the same cycle, so the carry of one counter is the count enable of the
// next and a whole chain of carries settles within one clock. A value
// above MAX (only possible through the preset) also wraps to MIN with a
// carry. `ld` presets the counter to `din` and has priority over `en`.
//
// Timing: q changes on the clock edge after `en`/`ld`; `co` is
// combinational (en && q >= MAX). Reset is asynchronous, active low.
//
// Counting up to a limit, carrying and restarting follows the original
// design; using a synchronous enable rather than the carry as a clock is
// this design's choice.
module bcd_counter #(
  parameter logic [7:0] MIN       = 8'h00,
  parameter logic [7:0] MAX       = 8'h59,
  parameter logic [7:0] RESET_VAL = 8'h00
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld,     // preset
  input  logic [7:0] din,    // preset value, BCD
  input  logic       en,     // count enable (second pulse or carry)
  output logic [7:0] q,      // count, BCD
  output logic       co      // carry out, one cycle
);
  import cal_pkg::*;

  logic at_max;
  assign at_max = (q >= MAX);
  assign co     = en && at_max;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (ld)   q <= din;
    else if (en)   q <= at_max ? MIN : bcd_inc(q);
  end

endmodule
