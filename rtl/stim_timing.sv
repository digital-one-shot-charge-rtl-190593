// stim_timing: biphasic stimulation phase sequencer.
//
// Runs on the 1 MHz processor clock (the ADC sampling clock) and divides it
// down to the stimulation rate: one stimulation cycle lasts PERIOD_CYC cycles
// (10 ms, i.e. the 100 Hz "clk2" of the design, produced here as a one-cycle
// tick rather than as a second clock). Each cycle starts with a cathodic
// phase of T_CATH_CYC cycles, followed directly by an anodic phase of
// T_ANOD_CYC cycles (0.5 ms + 0.5 ms = 10 % duty cycle at 100 Hz), then a
// resting interval for the rest of the period. adc_start pulses for one cycle
// on the first cycle after the anodic phase: the residual potential is
// sampled exactly once per stimulation cycle.
//
// The 100 Hz rate, 10 % duty cycle and the single post-anodic sample follow
// the source description. Equal cathodic/anodic widths, no inter-phase gap
// and deriving clk2 as an enable tick are choices of this design.
//
// Timing: with en high, phase_cnt runs 0..PERIOD_CYC-1; stim_tick is high at
// count 0, cath_en for counts [0, T_CATH_CYC), anod_en for
// [T_CATH_CYC, T_CATH_CYC+T_ANOD_CYC), adc_start at count T_CATH_CYC+T_ANOD_CYC,
// rest for every count after that. With en low everything is idle and the
// count restarts from 0.
module stim_timing #(
  parameter int unsigned PERIOD_CYC = 10000,
  parameter int unsigned T_CATH_CYC = 500,
  parameter int unsigned T_ANOD_CYC = 500
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic stim_tick,
  output logic cath_en,
  output logic anod_en,
  output logic adc_start,
  output logic rest
);

  localparam int unsigned CW = $clog2(PERIOD_CYC);
  localparam int unsigned ANOD_END = T_CATH_CYC + T_ANOD_CYC;

  logic [CW-1:0] phase_cnt;
  logic          running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= '0;
      running   <= 1'b0;
    end else if (!en) begin
      phase_cnt <= '0;
      running   <= 1'b0;
    end else begin
      running <= 1'b1;
      if (running) begin
        if (phase_cnt == CW'(PERIOD_CYC - 1)) phase_cnt <= '0;
        else                                  phase_cnt <= phase_cnt + 1'b1;
      end
    end
  end

  always_comb begin
    stim_tick = running && (phase_cnt == '0);
    cath_en   = running && (phase_cnt <  CW'(T_CATH_CYC));
    anod_en   = running && (phase_cnt >= CW'(T_CATH_CYC)) && (phase_cnt < CW'(ANOD_END));
    adc_start = running && (phase_cnt == CW'(ANOD_END));
    rest      = running && (phase_cnt >= CW'(ANOD_END));
  end

  initial begin
    assert (ANOD_END < PERIOD_CYC)
      else $error("stim_timing: pulse phases must be shorter than the period");
  end

endmodule
