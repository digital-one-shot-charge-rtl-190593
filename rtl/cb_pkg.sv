// cb_pkg: types and constants shared by the charge-balancer modules.
//
// The residual electrode potential V_E is carried as a signed ADC code.
// One code is VE_LSB_UV microvolts (100 uV here, a choice of this design:
// the ADC resolution is not specified). With that scale:
//   Vth1 = I_LSB * t_anod / C_dl = 3.9 uA * 0.5 ms / 100 nF ~= 20 mV -> 200 codes
//   Vth2 = I_bal * t_bal_max / C_dl = 1 uA * 1 ms / 100 nF   = 10 mV -> 100 codes
//   one code of residual is removed by the 1 uA balance current in
//   C_dl * 100 uV / 1 uA = 10 us = 10 cycles of the 1 MHz clock.
// The five operation regions split the V_E axis at +-Vth1 and +-Vth2:
//   REG1: V_E > +Vth1            (unsafe, positive)
//   REG2: +Vth2 < V_E <= +Vth1   (safe, idle)
//   REG3: |V_E| <= Vth2          (safe, idle)
//   REG4: -Vth1 <= V_E < -Vth2   (safe, idle)
//   REG5: V_E < -Vth1            (unsafe, negative)
package cb_pkg;

  localparam int unsigned VE_W      = 12;  // signed residual code width (+-204.8 mV)
  localparam int unsigned DAC_W     = 8;   // current-steering DAC resolution
  localparam int unsigned CNT_W     = 2;   // persistence counter width (saturates at 3)
  localparam int unsigned BALCYC_W  = 11;  // balance duration counter width (up to 2047 cycles)

  localparam int unsigned VTH1_CODES_DEF     = 200;   // 20 mV
  localparam int unsigned VTH2_CODES_DEF     = 100;   // 10 mV
  localparam int unsigned BAL_CYC_PER_CODE   = 10;    // 1 MHz cycles of 1 uA per 100 uV
  localparam int unsigned T_BAL_MAX_CYC_DEF  = 1000;  // 1 ms maximum balance duration
  localparam int unsigned PERSIST_N_DEF      = 3;     // consecutive unsafe phases = persistent

  typedef logic signed [VE_W-1:0] ve_t;
  typedef logic [DAC_W-1:0]       dac_code_t;
  typedef logic [BALCYC_W-1:0]    bal_cyc_t;

  typedef enum logic [2:0] {
    REG1 = 3'd1,
    REG2 = 3'd2,
    REG3 = 3'd3,
    REG4 = 3'd4,
    REG5 = 3'd5
  } region_e;

  // Direction of the offset balance current.
  // PUSH sources current into the electrode and raises V_E (used for V_E < 0);
  // PULL sinks current and lowers V_E (used for V_E > 0).
  typedef enum logic {
    BAL_PULL = 1'b0,
    BAL_PUSH = 1'b1
  } bal_dir_e;

  // A balance request from the processor to the driver control.
  typedef struct packed {
    bal_dir_e dir;
    bal_cyc_t cycles;
  } bal_req_t;

endpackage
