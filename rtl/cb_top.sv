// cb_top: digital one-shot charge balancer for a biphasic current-mode stimulator.
//
// Closes the loop around an analog stimulator front end (8-bit current-steering
// DAC, output current driver, electrode) and an ADC, all outside this module.
// Every 10 ms stimulation cycle: stim_timing drives a cathodic pulse at the
// fixed amplitude stim_code and an anodic pulse at the (modulated) amplitude
// anod_code, then requests one ADC sample of the residual electrode potential.
// input_mux holds that sample, region_detector places it in one of five
// regions against the dual thresholds (+-20 mV, +-10 mV), and cb_processor
// decides, once, what to do: nothing (safe), a 1 ms offset balance current
// (unsafe, not yet persistent), or anodic amplitude modulation plus a balance
// current of computed length (unsafe for 3 or more consecutive cycles).
// balance_ctrl drives the driver's push/pull switches in the resting interval.
//
// Interface:
//   stim_en     high = stimulate; low = idle, and anod_code is reloaded from stim_code
//   stim_code   cathodic amplitude (DAC code, LSB = 3.9 uA) and initial anodic amplitude
//   adc_start   one-cycle sample request after each anodic phase
//   adc_valid/adc_data  the ADC answer, a signed residual code (LSB = 100 uV), any latency
//               shorter than the resting interval
//   dac_code    DAC input: stim_code while cath_en, anod_code while anod_en, else 0
//   cath_en/anod_en     output-driver phase selects (to the level shifter)
//   bal_push/bal_pull   1 uA offset balance current source/sink enables
//   the remaining outputs are status for monitoring.
// The level shifter between these controls and the driver is analog and not
// part of this module. Clock: one 1 MHz clock; the 100 Hz stimulation rate is
// the stim_tick enable.
module cb_top
  import cb_pkg::*;
#(
  parameter int unsigned PERIOD_CYC    = 10000,
  parameter int unsigned T_CATH_CYC    = 500,
  parameter int unsigned T_ANOD_CYC    = 500,
  parameter int unsigned VTH1          = VTH1_CODES_DEF,
  parameter int unsigned VTH2          = VTH2_CODES_DEF,
  parameter int unsigned CYC_PER_CODE  = BAL_CYC_PER_CODE,
  parameter int unsigned T_BAL_MAX_CYC = T_BAL_MAX_CYC_DEF,
  parameter int unsigned PERSIST_N     = PERSIST_N_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             stim_en,
  input  dac_code_t        stim_code,
  // ADC
  output logic             adc_start,
  input  logic             adc_valid,
  input  ve_t              adc_data,
  // DAC and output driver controls
  output dac_code_t        dac_code,
  output logic             cath_en,
  output logic             anod_en,
  output logic             bal_push,
  output logic             bal_pull,
  // status
  output logic             stim_tick,
  output dac_code_t        anod_code,
  output region_e          region,
  output logic [CNT_W-1:0] count,
  output logic             ev_idle,
  output logic             ev_nonpersist,
  output logic             ev_modulate,
  output logic [31:0]      bal_total_cyc
);

  logic     rest;
  ve_t      ve_hold;
  logic     sample_valid;
  logic     region_valid, unsafe;
  logic     bal_req_valid;
  bal_req_t bal_req;
  logic     proc_busy, bal_active;

  stim_timing #(
    .PERIOD_CYC(PERIOD_CYC), .T_CATH_CYC(T_CATH_CYC), .T_ANOD_CYC(T_ANOD_CYC)
  ) u_timing (
    .clk, .rst_n, .en(stim_en),
    .stim_tick, .cath_en, .anod_en, .adc_start, .rest
  );

  input_mux u_in (
    .clk, .rst_n, .adc_valid, .adc_data, .ve_hold, .sample_valid
  );

  region_detector #(.VTH1(VTH1), .VTH2(VTH2)) u_region (
    .clk, .rst_n, .in_valid(sample_valid), .ve(ve_hold),
    .region, .unsafe, .region_valid
  );

  cb_processor #(
    .VTH1(VTH1), .VTH2(VTH2), .CYC_PER_CODE(CYC_PER_CODE),
    .T_BAL_MAX_CYC(T_BAL_MAX_CYC), .PERSIST_N(PERSIST_N)
  ) u_proc (
    .clk, .rst_n, .load(!stim_en), .init_code(stim_code),
    .region_valid, .region, .unsafe, .ve(ve_hold),
    .anod_code, .bal_req_valid, .bal_req, .count, .busy(proc_busy),
    .ev_idle, .ev_nonpersist, .ev_modulate
  );

  balance_ctrl #(.TOTAL_W(32)) u_bal (
    .clk, .rst_n, .rest, .bal_req_valid, .bal_req,
    .push(bal_push), .pull(bal_pull), .active(bal_active), .total_cyc(bal_total_cyc)
  );

  always_comb begin
    if      (cath_en) dac_code = stim_code;
    else if (anod_en) dac_code = anod_code;
    else              dac_code = '0;
  end

  // No balance current while a stimulation pulse is delivered.
  a_no_bal_in_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    (cath_en || anod_en) |-> !bal_active);
  // A new sample must not arrive while the processor is still working.
  a_proc_ready: assert property (@(posedge clk) disable iff (!rst_n)
    region_valid |-> !proc_busy);

endmodule
