// stim_frontend_model: behavioural, testbench-only model of the analog side
// of the stimulator: 8-bit current-steering DAC, output current driver,
// electrode-electrolyte interface and the residual-potential ADC. Not
// synthesizable.
//
// Once per clock (1 us) the electrode double-layer voltage V_E is advanced
// by I*T/C_dl - V_E*T/(R_F*C_dl), with I = -code*I_LSB in the cathodic
// phase, +code*I_LSB in the anodic phase, +I_BAL while push and -I_BAL while
// pull. The tissue resistance R_S carries no current at the sampling instant
// and is left out. A mismatch between the phases is modelled as a fixed
// residual offset_uv added at the end of every anodic phase, plus an optional
// one-off disturbance spike_uv added when spike is high at that instant.
// The ADC answers adc_start ADC_LAT cycles later with V_E in 100 uV codes,
// rounded and clipped to 12 bits. ve_uv exposes V_E for the testbench.
module stim_frontend_model #(
  parameter real C_DL    = 100e-9,       // double-layer capacitance
  parameter real R_F     = 10e6,         // Faradaic resistance
  parameter real I_LSB   = 1e-3 / 256.0, // 1 mA full scale, 8 bits
  parameter real I_BAL   = 1e-6,         // offset balance current
  parameter real T_CLK   = 1e-6,         // 1 MHz
  parameter real ADC_LSB = 100e-6,
  parameter int  ADC_LAT = 2
) (
  input  logic              clk,
  input  logic [7:0]        dac_code,
  input  logic              cath_en,
  input  logic              anod_en,
  input  logic              bal_push,
  input  logic              bal_pull,
  input  logic              adc_start,
  input  int                offset_uv,
  input  logic              spike,
  input  int                spike_uv,
  output logic              adc_valid,
  output logic signed [11:0] adc_data,
  output int                ve_uv
);

  real  ve = 0.0;
  real  i_el;
  logic anod_d = 1'b0;
  int   lat_cnt = -1;
  real  code_r;

  initial begin
    adc_valid = 1'b0;
    adc_data  = '0;
    ve_uv     = 0;
  end

  always @(posedge clk) begin
    i_el = 0.0;
    if (cath_en) i_el = -real'(dac_code) * I_LSB;
    if (anod_en) i_el =  real'(dac_code) * I_LSB;
    if (bal_push) i_el = i_el + I_BAL;
    if (bal_pull) i_el = i_el - I_BAL;
    ve = ve + i_el * T_CLK / C_DL - ve * T_CLK / (R_F * C_DL);
    anod_d <= anod_en;
    if (anod_d && !anod_en) begin
      ve = ve + real'(offset_uv) * 1e-6;
      if (spike) ve = ve + real'(spike_uv) * 1e-6;
    end
    ve_uv <= int'(ve * 1e6);
    // ADC
    adc_valid <= 1'b0;
    if (adc_start) lat_cnt = ADC_LAT;
    else if (lat_cnt > 0) lat_cnt = lat_cnt - 1;
    if (lat_cnt == 0) begin
      lat_cnt = -1;
      code_r = ve / ADC_LSB;
      if (code_r > 2047.0) code_r = 2047.0;
      if (code_r < -2048.0) code_r = -2048.0;
      adc_data  <= 12'(int'(code_r));
      adc_valid <= 1'b1;
    end
  end

endmodule
