// tb_stim_timing: checks the stimulation phase sequencer at its default
// sizes (10 ms period of a 1 MHz clock, 0.5 ms cathodic and anodic phases).
// A cycle counter in the testbench predicts every output on every cycle;
// the period (10000 cycles) and the sample instant (cycle 1000, right after
// the anodic phase) are also measured between events. The enable is dropped
// once mid-period to check the restart.
module tb_stim_timing;
  localparam int PERIOD = 10000, TC = 500, TA = 500;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic stim_tick, cath_en, anod_en, adc_start, rest;
  int checks = 0, failures = 0;

  stim_timing dut (.clk, .rst_n, .en, .stim_tick, .cath_en, .anod_en, .adc_start, .rest);

  always #500 clk = ~clk;  // 1 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  int ref_cnt;        // -1 = not running
  int last_tick, last_sample, cyc;
  int n_ticks;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    en <= 1'b1;
  end

  // reference model and per-cycle compare
  initial begin
    ref_cnt = -1; cyc = 0; last_tick = -1; last_sample = -1; n_ticks = 0;
    forever begin
      @(negedge clk);
      cyc++;
      if (rst_n) begin
        check(stim_tick == (ref_cnt == 0),                       "stim_tick");
        check(cath_en   == (ref_cnt >= 0 && ref_cnt < TC),       "cath_en");
        check(anod_en   == (ref_cnt >= TC && ref_cnt < TC + TA), "anod_en");
        check(adc_start == (ref_cnt == TC + TA),                 "adc_start");
        check(rest      == (ref_cnt >= TC + TA),                 "rest");
        check(!(cath_en && anod_en),                             "phases overlap");
        if (stim_tick) begin
          if (last_tick >= 0 && en) check(cyc - last_tick == PERIOD, "period length");
          last_tick = cyc; n_ticks++;
        end
        if (adc_start) begin
          check(cyc - last_tick == TC + TA, "sample after anodic phase");
          last_sample = cyc;
        end
      end
      // advance the reference to the state after the next edge
      if (!en)              ref_cnt = -1;
      else if (ref_cnt < 0) ref_cnt = 0;
      else                  ref_cnt = (ref_cnt + 1) % PERIOD;
    end
  end

  initial begin
    wait (n_ticks == 3);
    repeat (PERIOD / 2) @(posedge clk);
    en <= 1'b0;                     // stop mid-period
    repeat (20) @(posedge clk);
    check(!cath_en && !anod_en && !rest && !stim_tick, "idle when disabled");
    last_tick = -1;
    en <= 1'b1;
    wait (n_ticks == 6);
    repeat (10) @(posedge clk);
    check(n_ticks == 6, "tick count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
