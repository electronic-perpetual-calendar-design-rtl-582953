// week_counter: day-of-week counter 0..6.
//
// Advanced by the day carry of the hour counter (23:59:59 -> 00:00:00).
// After 6 it returns to 0 and starts again; 0 stands for Sunday. It has
// no carry out. `ld` presets it to `din` and has priority over `en`; a
// preset value of 7 wraps to 0 on the next count.
//
// Timing: q changes on the clock edge after `en`/`ld`. Reset is
// asynchronous, active low.
//
// The 0..6 range and clocking by the day carry follow the original design;
// the meaning of 0 is this design's choice.
module week_counter #(
  parameter logic [2:0] RESET_VAL = 3'd6
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ld,
  input  logic [2:0] din,
  input  logic       en,
  output logic [2:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= RESET_VAL;
    else if (ld)   q <= din;
    else if (en)   q <= (q >= 3'd6) ? 3'd0 : q + 3'd1;
  end

endmodule
