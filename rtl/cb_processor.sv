// cb_processor: one-shot charge-balancing decision unit.
//
// Acts once per stimulation cycle, on the classified residual potential V_E
// sampled after the anodic pulse (region_valid):
//   * safe region (2, 3, 4): the persistence count is cleared, nothing else.
//   * unsafe region (1 or 5), fewer than PERSIST_N consecutive unsafe phases
//     (non-persistent imbalance): an offset balance current of the maximum
//     duration T_BAL_MAX_CYC (1 ms) is requested, pulling for V_E > 0 and
//     pushing for V_E < 0.
//   * unsafe region on the PERSIST_N-th (3rd) or later consecutive unsafe
//     phase (persistent imbalance): anodic pulse modulation. |V_E| is split
//     into dN whole steps of VTH1 (one DAC LSB of anodic current for one
//     anodic phase moves V_E by Vth1 = 20 mV) and a rest. The anodic DAC code
//     moves by dN (up for V_E < 0, down for V_E > 0, saturating at the code
//     range), which takes Vc1 = dN*Vth1 off the residual; then a balance
//     current is requested for the time that brings the rest down to Vth2:
//     (rest - VTH2) * BAL_CYC_PER_CODE cycles, none if the rest is already
//     within Vth2. The rest is below Vth1, so this never exceeds 1 ms.
//     The persistence count then starts again from zero: the next
//     modulation needs another PERSIST_N consecutive unsafe phases. The
//     modulated code is kept, so the anodic amplitude settles at the value
//     that matches a persistent mismatch.
//
// The regions, the count of three consecutive phases, the 1 ms maximum
// duration, the one-shot duration calculation and the increase of the anodic
// amplitude for a negative residual follow the source description. How dN is
// derived (whole multiples of Vth1 by a serial divider), that the modulated
// code is kept for later cycles, the count restart after a modulation
// (without it the kept code and the accumulated residual form a double
// integrator and the loop oscillates), the counter saturation, and the
// balance direction naming are this design's choices.
//
// Interface: anod_code is the anodic DAC code. It is loaded from init_code
// while load is high (stimulation off) and changes only through modulation.
// bal_req_valid pulses for one cycle with bal_req; ev_* pulse for one cycle
// per decision for monitoring.
// Timing: a non-persistent decision is made in the cycle after region_valid;
// a persistent one about VE_W+3 cycles after it (serial division).
module cb_processor
  import cb_pkg::*;
#(
  parameter int unsigned VTH1          = VTH1_CODES_DEF,
  parameter int unsigned VTH2          = VTH2_CODES_DEF,
  parameter int unsigned CYC_PER_CODE  = BAL_CYC_PER_CODE,
  parameter int unsigned T_BAL_MAX_CYC = T_BAL_MAX_CYC_DEF,
  parameter int unsigned PERSIST_N     = PERSIST_N_DEF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  dac_code_t         init_code,
  input  logic              region_valid,
  input  region_e           region,
  input  logic              unsafe,
  input  ve_t               ve,
  output dac_code_t         anod_code,
  output logic              bal_req_valid,
  output bal_req_t          bal_req,
  output logic [CNT_W-1:0]  count,
  output logic              busy,
  output logic              ev_idle,
  output logic              ev_nonpersist,
  output logic              ev_modulate
);

  typedef enum logic [1:0] {S_IDLE, S_DIV_START, S_DIV_WAIT} state_e;

  localparam int unsigned CNT_MAX = (1 << CNT_W) - 1;
  localparam int unsigned PW      = BALCYC_W + VE_W;  // product width

  state_e             state;
  logic               neg_q;        // sign of the sample being processed
  logic [VE_W-1:0]    mag_q;        // |V_E|
  logic               div_start, div_busy, div_done;
  logic [VE_W-1:0]    div_q, div_r;
  logic [CNT_W-1:0]   cnt_next;
  logic [VE_W-1:0]    mag_c;

  // Modulated code and rest-based balance duration, from the divider result.
  logic [DAC_W+VE_W:0] code_up, code_dn_lim;
  dac_code_t           code_mod;
  logic [PW-1:0]       rest_cyc;
  bal_cyc_t            rest_cyc_sat;

  always_comb begin
    cnt_next = (count == CNT_W'(CNT_MAX)) ? count : count + 1'b1;
    mag_c    = ve[VE_W-1] ? VE_W'(-ve) : VE_W'(ve);

    code_up     = (DAC_W+VE_W+1)'(anod_code) + (DAC_W+VE_W+1)'(div_q);
    code_dn_lim = (DAC_W+VE_W+1)'(div_q);
    if (neg_q)
      code_mod = (code_up > (DAC_W+VE_W+1)'({DAC_W{1'b1}})) ? '1 : code_up[DAC_W-1:0];
    else
      code_mod = (code_dn_lim > (DAC_W+VE_W+1)'(anod_code)) ? '0 : anod_code - div_q[DAC_W-1:0];

    if (div_r > VE_W'(VTH2)) rest_cyc = PW'(div_r - VE_W'(VTH2)) * PW'(CYC_PER_CODE);
    else                     rest_cyc = '0;
    rest_cyc_sat = (rest_cyc > PW'(T_BAL_MAX_CYC)) ? BALCYC_W'(T_BAL_MAX_CYC)
                                                   : rest_cyc[BALCYC_W-1:0];
  end

  assign div_start = (state == S_DIV_START);
  assign busy      = (state != S_IDLE);

  udiv_seq #(.W(VE_W)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (div_start),
    .dividend (mag_q),
    .divisor  (VE_W'(VTH1)),
    .busy     (div_busy),
    .done     (div_done),
    .quotient (div_q),
    .remainder(div_r)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      neg_q         <= 1'b0;
      mag_q         <= '0;
      count         <= '0;
      anod_code     <= '0;
      bal_req_valid <= 1'b0;
      bal_req       <= '{dir: BAL_PULL, cycles: '0};
      ev_idle       <= 1'b0;
      ev_nonpersist <= 1'b0;
      ev_modulate   <= 1'b0;
    end else begin
      bal_req_valid <= 1'b0;
      ev_idle       <= 1'b0;
      ev_nonpersist <= 1'b0;
      ev_modulate   <= 1'b0;
      if (load) begin
        state     <= S_IDLE;
        count     <= '0;
        anod_code <= init_code;
      end else begin
        unique case (state)
          S_IDLE: if (region_valid) begin
            neg_q <= ve[VE_W-1];
            mag_q <= mag_c;
            if (!unsafe) begin
              count   <= '0;
              ev_idle <= 1'b1;
            end else begin
              count <= cnt_next;
              if (int'(cnt_next) >= PERSIST_N) begin
                state <= S_DIV_START;
              end else begin
                bal_req_valid <= 1'b1;
                bal_req       <= '{dir: ve[VE_W-1] ? BAL_PUSH : BAL_PULL,
                                   cycles: BALCYC_W'(T_BAL_MAX_CYC)};
                ev_nonpersist <= 1'b1;
              end
            end
          end
          S_DIV_START: state <= S_DIV_WAIT;
          S_DIV_WAIT: if (div_done) begin
            state         <= S_IDLE;
            count         <= '0;
            anod_code     <= code_mod;
            ev_modulate   <= 1'b1;
            bal_req_valid <= (rest_cyc_sat != '0);
            bal_req       <= '{dir: neg_q ? BAL_PUSH : BAL_PULL, cycles: rest_cyc_sat};
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // The divider is started only when idle.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n)
    div_start |-> !div_busy);

  // Region and unsafe flag must agree.
  a_unsafe_regions: assert property (@(posedge clk) disable iff (!rst_n)
    region_valid |-> (unsafe == (region == REG1 || region == REG5)));

  initial begin
    assert (PERSIST_N >= 1 && PERSIST_N <= CNT_MAX)
      else $error("cb_processor: PERSIST_N must fit the counter");
    assert (T_BAL_MAX_CYC < (1 << BALCYC_W))
      else $error("cb_processor: T_BAL_MAX_CYC must fit the balance counter");
  end

endmodule
