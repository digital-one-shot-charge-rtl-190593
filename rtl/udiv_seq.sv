// udiv_seq: sequential unsigned restoring divider.
//
// Computes quotient = dividend / divisor and remainder = dividend % divisor
// for W-bit unsigned operands, one quotient bit per clock: start is sampled
// when the divider is idle, done pulses W+1 cycles later with the results
// held stable until the next start. The divisor must not be zero. Used by the charge-balancing
// processor to split a residual potential into whole DAC steps and a rest;
// a serial divider is enough because the processor has most of a 10 ms
// stimulation period for that one calculation.
module udiv_seq #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);

  localparam int unsigned SW = $clog2(W + 1);

  logic [W-1:0] dvd_q;   // dividend bits still to be shifted in
  logic [W-1:0] dvs_q;
  logic [W-1:0] rem_q;   // partial remainder (always below the divisor)
  logic [W-1:0] quo_q;
  logic [SW-1:0] step_q;

  logic [W:0] rem_shift;
  logic [W:0] rem_sub;

  always_comb begin
    rem_shift = {rem_q, dvd_q[W-1]};
    rem_sub   = rem_shift - {1'b0, dvs_q};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvd_q  <= '0;
      dvs_q  <= '0;
      rem_q  <= '0;
      quo_q  <= '0;
      step_q <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dvd_q  <= dividend;
          dvs_q  <= divisor;
          rem_q  <= '0;
          quo_q  <= '0;
          step_q <= SW'(W);
          busy   <= 1'b1;
        end
      end else if (step_q != '0) begin
        dvd_q <= {dvd_q[W-2:0], 1'b0};
        if (!rem_sub[W]) begin
          rem_q <= rem_sub[W-1:0];
          quo_q <= {quo_q[W-2:0], 1'b1};
        end else begin
          rem_q <= rem_shift[W-1:0];
          quo_q <= {quo_q[W-2:0], 1'b0};
        end
        step_q <= step_q - 1'b1;
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  assign quotient  = quo_q;
  assign remainder = rem_q;

  a_divisor_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (divisor != '0));

endmodule
