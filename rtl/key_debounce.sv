// key_debounce: synchroniser, debouncer and press detector for one key.
//
// The raw key level (active low: a pressed key pulls the pin to 0) is
// brought into the clock domain by two flip-flops, then sampled on each
// `sample_tick`. The debounced level changes only after the synchronised
// input has differed from it on STABLE_SAMPLES consecutive samples, so
// contact bounce shorter than that is ignored. When the debounced level
// goes from released to pressed, `press` is high for one clock cycle.
//
// Timing: a clean press is reported STABLE_SAMPLES sample ticks (plus two
// to three clocks) after the pin falls; with 1 kHz sample ticks and the
// default of 20 that is 20 ms. Reset (asynchronous, active low) starts
// with the key released.
//
// The document names the keyboard acquisition module only; all of this is
// this design's own.
module key_debounce #(
  parameter int unsigned STABLE_SAMPLES = 20
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_tick,
  input  logic key_n,      // raw pin, 0 = pressed
  output logic pressed,    // debounced level, 1 = pressed
  output logic press       // one-cycle pulse on each new press
);
  localparam int unsigned CW = $clog2(STABLE_SAMPLES + 1);

  logic [1:0]    sync;
  logic [CW-1:0] cnt;
  logic          key_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= 2'b11;
    else        sync <= {sync[0], key_n};
  end
  assign key_now = ~sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      pressed <= 1'b0;
      press   <= 1'b0;
    end else begin
      press <= 1'b0;
      if (sample_tick) begin
        if (key_now == pressed) begin
          cnt <= '0;
        end else if (cnt >= CW'(STABLE_SAMPLES - 1)) begin
          cnt     <= '0;
          pressed <= key_now;
          press   <= key_now;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule
