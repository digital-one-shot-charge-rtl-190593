// tb_cb_top: end-to-end, closed-loop test of the charge balancer at its
// default sizes (1 MHz clock, 10 ms stimulation cycle, 0.5 ms phases,
// +-20 mV / +-10 mV thresholds, 1 ms maximum balance time) against the
// behavioural front-end model (DAC, driver, 100 nF || 10 MOhm electrode, ADC).
//
// Scenarios, one after the other with the stimulator restarted in between:
//   A  persistent +15 mV residual per stimulation phase for 100 cycles (1 s)
//      at a stimulation amplitude of 100 LSB;
//   B  persistent -30 mV residual per phase for 60 cycles;
//   C  no persistent residual, one -28 mV disturbance, 20 cycles.
// Checked every cycle: DAC code = stim_code in the cathodic phase and the
// modulated code in the anodic phase, no balance current during a pulse,
// period 10000 cycles, sample request 1000 cycles into the period.
// The anodic amplitude must go down in A, up in B and stay put in C.
// Checked every stimulation cycle: from the ADC word the DUT received, a
// reference model predicts the decision (idle / 1 ms balance / modulation
// plus computed balance), the new anodic code and the push or pull time,
// which is measured on the outputs. At the end of scenario A the residual
// must be bounded (|V_E| < 60 mV after balancing, against about 0.95 V for
// the same load without balancing) and the balance current on for less
// than 10 % of the time. Every mechanism (idle, non-persistent balance,
// modulation up and down, push, pull, modulation with no balance needed,
// count reaching 3) must occur at least once. Scenario B must stay below
// 100 mV.
module tb_cb_top;
  import cb_pkg::*;

  localparam int PERIOD = 10000;

  logic      clk = 1'b0, rst_n = 1'b0, stim_en = 1'b0;
  dac_code_t stim_code = 8'd100;
  logic      adc_start, adc_valid;
  ve_t       adc_data;
  dac_code_t dac_code, anod_code;
  logic      cath_en, anod_en, bal_push, bal_pull, stim_tick;
  region_e   region;
  logic [CNT_W-1:0] count;
  logic      ev_idle, ev_nonpersist, ev_modulate;
  logic [31:0] bal_total_cyc;
  int        offset_uv = 0, spike_uv = 0, ve_uv;
  logic      spike = 1'b0;

  cb_top dut (
    .clk, .rst_n, .stim_en, .stim_code,
    .adc_start, .adc_valid, .adc_data,
    .dac_code, .cath_en, .anod_en, .bal_push, .bal_pull,
    .stim_tick, .anod_code, .region, .count,
    .ev_idle, .ev_nonpersist, .ev_modulate, .bal_total_cyc
  );

  stim_frontend_model fe (
    .clk, .dac_code, .cath_en, .anod_en, .bal_push, .bal_pull, .adc_start,
    .offset_uv, .spike, .spike_uv, .adc_valid, .adc_data, .ve_uv
  );

  always #500 clk = ~clk;   // 1 MHz, 1 ns units

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // mechanism counters
  int n_idle, n_np, n_mod, n_mod_nobal, n_up, n_down, n_push, n_pull, n_cnt3;

  // ---------------- per-cycle protocol checks ----------------
  int cyc_in_period = -1;
  int run_cycles = 0, bal_cycles = 0;
  always @(negedge clk) if (rst_n && stim_en) begin
    if (stim_tick) begin
      if (cyc_in_period >= 0) check(cyc_in_period == PERIOD, "period is 10000 cycles");
      cyc_in_period = 0;
    end
    if (cyc_in_period >= 0) begin
      cyc_in_period++;
      if (adc_start) check(cyc_in_period == 1001, "sample right after the anodic phase");
      run_cycles++;
      if (bal_push || bal_pull) bal_cycles++;
    end
    if (cath_en) check(dac_code == stim_code, "cathodic DAC code");
    if (anod_en) check(dac_code == anod_code, "anodic DAC code");
    if (cath_en || anod_en) check(!bal_push && !bal_pull, "no balance during a pulse");
    check(!(bal_push && bal_pull), "push and pull exclusive");
  end

  // ---------------- per-sample reference model ----------------
  int r_cnt, r_code;
  int exp_cyc, exp_push;      // expected for the current resting interval
  int got_push, got_pull;
  bit have_exp;

  task automatic predict(input int code);
    int uv, mag, dn, rest_uv, nc;
    uv  = code * 100;
    mag = (uv < 0) ? -uv : uv;
    exp_push = (uv < 0);
    exp_cyc  = 0;
    if (mag <= 20000) begin
      r_cnt = 0; n_idle++;
    end else begin
      r_cnt = (r_cnt < 3) ? r_cnt + 1 : 3;
      if (r_cnt < 3) begin
        exp_cyc = 1000; n_np++;
      end else begin
        n_cnt3++;
        dn      = mag / 20000;
        rest_uv = mag - dn * 20000;
        nc      = (uv < 0) ? r_code + dn : r_code - dn;
        if (nc > 255) nc = 255;
        if (nc < 0)   nc = 0;
        if (nc > r_code) n_up++;
        if (nc < r_code) n_down++;
        r_code  = nc;
        exp_cyc = (rest_uv > 10000) ? (rest_uv - 10000) / 10 : 0;
        n_mod++;
        r_cnt = 0;
        if (exp_cyc == 0) n_mod_nobal++;
      end
    end
  endtask

  always @(negedge clk) if (rst_n && stim_en) begin
    if (adc_valid) begin
      predict(int'(adc_data));
      have_exp = 1; got_push = 0; got_pull = 0;
    end
    if (bal_push) got_push++;
    if (bal_pull) got_pull++;
    if (stim_tick && have_exp) begin
      // the resting interval just ended: compare the injected time
      if (exp_cyc == 0) check(got_push == 0 && got_pull == 0, "no balance expected");
      else if (exp_push != 0) check(got_push == exp_cyc && got_pull == 0,
                                    $sformatf("push %0d want %0d", got_push, exp_cyc));
      else check(got_pull == exp_cyc && got_push == 0,
                 $sformatf("pull %0d want %0d", got_pull, exp_cyc));
      if (got_push > 0) n_push++;
      if (got_pull > 0) n_pull++;
      check(int'(anod_code) == r_code, $sformatf("anodic code %0d want %0d", anod_code, r_code));
      check(int'(count) == r_cnt, "persistence count");
      have_exp = 0;
    end
  end

  // ---------------- scenarios ----------------
  int max_abs_ve, max_code, min_code;
  always @(negedge clk) if (stim_en) begin
    if (int'(anod_code) > max_code) max_code = int'(anod_code);
    if (int'(anod_code) < min_code) min_code = int'(anod_code);
  end
  always @(negedge clk) if (adc_valid) begin
    int a;
    a = (ve_uv < 0) ? -ve_uv : ve_uv;
    if (a > max_abs_ve) max_abs_ve = a;
  end

  task automatic restart(input int off);
    @(negedge clk);
    stim_en = 1'b0; offset_uv = off;
    fe.ve = 0.0;
    r_cnt = 0; r_code = int'(stim_code); have_exp = 0;
    cyc_in_period = -1; run_cycles = 0; bal_cycles = 0; max_abs_ve = 0;
    max_code = 0; min_code = 255;
    repeat (3) @(negedge clk);
    stim_en = 1'b1;
  endtask

  task automatic run_periods(input int n);
    repeat (n) begin
      @(posedge stim_tick);
    end
    @(negedge clk);
  endtask

  real unbal_mv;
  initial begin
    n_idle = 0; n_np = 0; n_mod = 0; n_mod_nobal = 0; n_up = 0; n_down = 0;
    n_push = 0; n_pull = 0; n_cnt3 = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // A: +15 mV per phase, 1 s
    restart(15000);
    run_periods(101);
    // same load without balancing: V_E grows by 15 mV per cycle and leaks
    // through R_F*C_dl = 1 s: 15 mV * (1 - e^-1) / (1 - e^-0.01)
    unbal_mv = 15.0 * (1.0 - $exp(-1.0)) / (1.0 - $exp(-0.01));
    $display("A: anodic code %0d..%0d, final %0d, max |V_E| at sampling %0.1f mV (unbalanced: %0.0f mV), balance on %0.2f %% (%0.1f ms of %0.1f ms)",
             min_code, max_code, anod_code, max_abs_ve / 1000.0, unbal_mv, 100.0 * bal_cycles / run_cycles,
             bal_cycles / 1000.0, run_cycles / 1000.0);
    check(max_abs_ve < 60000, "A: residual bounded");
    check(bal_cycles * 10 < run_cycles, "A: balance current on < 10 % of the time");
    check(min_code < int'(stim_code), "A: anodic amplitude reduced");

    // B: -30 mV per phase
    restart(-30000);
    run_periods(61);
    $display("B: anodic code %0d..%0d, final %0d, max |V_E| at sampling %0.1f mV, balance on %0.2f %%",
             min_code, max_code, anod_code, max_abs_ve / 1000.0, 100.0 * bal_cycles / run_cycles);
    check(max_abs_ve < 100000, "B: residual bounded");
    check(max_code > int'(stim_code), "B: anodic amplitude increased");

    // C: balanced stimulation, one -28 mV disturbance
    restart(0);
    run_periods(3);
    spike_uv = -28000; spike = 1'b1;
    run_periods(1);
    spike = 1'b0;
    run_periods(16);
    $display("C: final anodic code %0d, max |V_E| at sampling %0.1f mV", anod_code, max_abs_ve / 1000.0);
    check(min_code == int'(stim_code) && max_code == int'(stim_code), "C: single disturbance does not modulate");

    $display("mechanisms: idle=%0d non_persistent=%0d modulate=%0d (no balance needed %0d) code_up=%0d code_down=%0d push=%0d pull=%0d count3=%0d",
             n_idle, n_np, n_mod, n_mod_nobal, n_up, n_down, n_push, n_pull, n_cnt3);
    check(n_idle > 0, "idle seen");
    check(n_np > 0, "non-persistent balance seen");
    check(n_mod > 0, "modulation seen");
    check(n_mod_nobal > 0, "modulation without balance seen");
    check(n_up > 0, "code increase seen");
    check(n_down > 0, "code decrease seen");
    check(n_push > 0, "push seen");
    check(n_pull > 0, "pull seen");
    check(n_cnt3 > 0, "persistent count seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200 * PERIOD) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
