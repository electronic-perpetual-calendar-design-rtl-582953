// tb_adjust_fsm: self-checking test of the adjustment state machine.
// Random mode-key and adjust-key pulses are applied. A model holding the
// position in the mode cycle (run, year, month, day, week, hour, minute,
// second, run ...) predicts `mode` and `run`, and the field whose
// increment strobe must appear one cycle after each adjust pulse. Every
// mode must be visited and every field incremented at least once.
module tb_adjust_fsm;
  import cal_pkg::*;

  logic clk = 0, rst_n = 0;
  logic mode_key = 0, adj_key = 0;
  mode_e mode;
  logic run;
  field_sel_t adj_inc;
  int checks = 0, failures = 0;
  int model_mode, exp_field;
  int visits [8];
  int incs [8];

  always #5 clk = ~clk;

  adjust_fsm dut (.clk, .rst_n, .mode_key, .adj_key, .mode, .run, .adj_inc);

  // Field strobe expected for each adjust state, in field_sel_t bit order
  // {year, month, day, week, hour, minute, second}.
  function automatic logic [6:0] field_of(int m);
    case (m)
      1: return 7'b1000000;
      2: return 7'b0100000;
      3: return 7'b0010000;
      4: return 7'b0001000;
      5: return 7'b0000100;
      6: return 7'b0000010;
      7: return 7'b0000001;
      default: return 7'b0;
    endcase
  endfunction

  initial begin : watchdog
    repeat (100_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [6:0] exp_inc;
    visits = '{default: 0};
    incs = '{default: 0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    model_mode = 0;
    exp_inc = '0;
    for (int cyc = 0; cyc < 10_000; cyc++) begin
      mode_key = ($urandom_range(0, 9) == 0);
      adj_key  = ($urandom_range(0, 2) == 0);
      #1;
      checks++;
      if (int'(mode) != model_mode || run !== (model_mode == 0) || adj_inc !== exp_inc) begin
        failures++;
        if (failures < 10) $display("ERROR cyc %0d: mode %0d exp %0d inc %b exp %b", cyc, mode, model_mode, adj_inc, exp_inc);
      end
      visits[model_mode]++;
      @(posedge clk);
      exp_inc = (adj_key && !mode_key) ? field_of(model_mode) : 7'b0;
      if (exp_inc != 0) incs[model_mode]++;
      if (mode_key) model_mode = (model_mode + 1) % 8;
      #1;
    end
    for (int m = 0; m < 8; m++) begin
      checks++;
      if (visits[m] == 0 || (m != 0 && incs[m] == 0)) begin
        failures++; $display("ERROR mode %0d visited %0d incremented %0d", m, visits[m], incs[m]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
