// keyboard: the keyboard acquisition module.
//
// Three push buttons drive the calendar: the mode key, the adjust key and
// the display-select key. Each goes through its own key_debounce, giving a
// one-cycle pulse per press (`mode_press`, `adj_press`). A press of the
// display-select key toggles `disp_group`, which picks the group shown on
// the eight digits: 0 = year, month, day; 1 = week, hours, minutes,
// seconds.
//
// Interface: key pins are active low. `sample_tick` is the debounce sample
// rate (the 1 kHz scan tick in the calendar). Timing: outputs change
// STABLE_SAMPLES sample ticks after a clean press. Reset (asynchronous,
// active low) selects group 0.
//
// The three keys and their roles follow the original design; debouncing
// and the toggling select key are this design's choices.
module keyboard #(
  parameter int unsigned STABLE_SAMPLES = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_tick,
  input  logic key_mode_n,
  input  logic key_adj_n,
  input  logic key_sel_n,
  output logic mode_press,
  output logic adj_press,
  output logic disp_group
);

  logic sel_press;
  logic [2:0] level;

  key_debounce #(.STABLE_SAMPLES(STABLE_SAMPLES)) u_mode (
    .clk, .rst_n, .sample_tick, .key_n(key_mode_n), .pressed(level[0]), .press(mode_press));
  key_debounce #(.STABLE_SAMPLES(STABLE_SAMPLES)) u_adj (
    .clk, .rst_n, .sample_tick, .key_n(key_adj_n), .pressed(level[1]), .press(adj_press));
  key_debounce #(.STABLE_SAMPLES(STABLE_SAMPLES)) u_sel (
    .clk, .rst_n, .sample_tick, .key_n(key_sel_n), .pressed(level[2]), .press(sel_press));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         disp_group <= 1'b0;
    else if (sel_press) disp_group <= ~disp_group;
  end

  // The debounced levels are not needed beyond the press pulses.
  logic unused_level;
  assign unused_level = ^level;

endmodule
