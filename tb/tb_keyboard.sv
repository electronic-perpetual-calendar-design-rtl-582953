// tb_keyboard: self-checking test of the keyboard acquisition module.
// Keys are pressed through a model of a bouncing contact: a burst of
// random level changes shorter than the debounce time, then a steady
// level. Glitches (short pulses with no steady press) are also applied.
// Expected: one mode_press / adj_press pulse per real press, none for a
// glitch, a press reported within the debounce window, and disp_group
// toggled once per press of the select key. STABLE_SAMPLES is 5 and a
// sample tick comes every 4 clocks to keep the run short.
module tb_keyboard;
  localparam int STABLE = 5;
  localparam int TICK   = 4;

  logic clk = 0, rst_n = 0, sample_tick = 0;
  logic key_mode_n = 1, key_adj_n = 1, key_sel_n = 1;
  logic mode_press, adj_press, disp_group;
  int checks = 0, failures = 0;
  int n_mode = 0, n_adj = 0, glitches = 0, bounces = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    sample_tick <= (cyc % TICK == 0);
    if (rst_n && mode_press) n_mode++;
    if (rst_n && adj_press) n_adj++;
  end

  keyboard #(.STABLE_SAMPLES(STABLE)) dut (
    .clk, .rst_n, .sample_tick, .key_mode_n, .key_adj_n, .key_sel_n,
    .mode_press, .adj_press, .disp_group);

  initial begin : watchdog
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Bounce for a few clocks, then hold the level for `hold` clocks.
  task automatic bounce_to(ref logic pin, input logic level, input int hold);
    int n = $urandom_range(0, 6);
    for (int i = 0; i < n; i++) begin
      pin = ~pin;
      repeat ($urandom_range(1, TICK * STABLE / 3)) @(posedge clk);
    end
    if (n > 0) bounces++;
    pin = level;
    repeat (hold) @(posedge clk);
  endtask

  initial begin
    int n_before;
    logic grp_before;
    int exp_mode = 0, exp_adj = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);
    for (int k = 0; k < 60; k++) begin
      case ($urandom_range(0, 3))
        0: begin  // real mode-key press, check latency
          n_before = n_mode;
          bounce_to(key_mode_n, 1'b0, TICK * (STABLE + 3));
          bounce_to(key_mode_n, 1'b1, TICK * (STABLE + 3));
          exp_mode++;
          checks++;
          if (n_mode != n_before + 1) begin failures++; $display("ERROR mode press count %0d", n_mode - n_before); end
        end
        1: begin  // real adjust-key press
          bounce_to(key_adj_n, 1'b0, TICK * (STABLE + 3));
          bounce_to(key_adj_n, 1'b1, TICK * (STABLE + 3));
          exp_adj++;
        end
        2: begin  // select key toggles the group
          grp_before = disp_group;
          bounce_to(key_sel_n, 1'b0, TICK * (STABLE + 3));
          bounce_to(key_sel_n, 1'b1, TICK * (STABLE + 3));
          checks++;
          if (disp_group == grp_before) begin failures++; $display("ERROR group not toggled"); end
        end
        default: begin  // glitch on the mode key, shorter than the debounce
          key_mode_n = 0;
          repeat ($urandom_range(1, TICK * (STABLE - 2))) @(posedge clk);
          key_mode_n = 1;
          repeat (TICK * (STABLE + 3)) @(posedge clk);
          glitches++;
        end
      endcase
      checks++;
      if (n_mode != exp_mode || n_adj != exp_adj) begin
        failures++;
        $display("ERROR presses mode %0d/%0d adj %0d/%0d", n_mode, exp_mode, n_adj, exp_adj);
        exp_mode = n_mode; exp_adj = n_adj;
      end
    end
    checks++;
    if (glitches == 0 || bounces == 0 || exp_mode == 0 || exp_adj == 0) begin
      failures++; $display("ERROR coverage glitches %0d bounces %0d", glitches, bounces);
    end
    $display("mode %0d adj %0d glitches %0d bounced presses %0d", n_mode, n_adj, glitches, bounces);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
