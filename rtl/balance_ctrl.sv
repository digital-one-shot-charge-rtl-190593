// balance_ctrl: push/pull control for the offset balance current.
//
// Turns a balance request from the processor into the switch controls of the
// output current driver: push (source the 1 uA offset current, raising the
// electrode potential) or pull (sink it, lowering the potential) is held high
// for exactly the requested number of clock cycles of the 1 MHz clock. Only
// one of push and pull is ever high. Injection is allowed only in the
// inter-pulse resting interval: a request made outside it is held until rest
// is high, and an injection still running when rest falls (next stimulation
// cycle starts) is cut short. total_cyc counts all injected cycles since
// reset, for monitoring the fraction of time the balance current is on.
//
// Push and pull signals, the 1 ms cap and injection in the resting interval
// follow the source description; the request/hold/abort behaviour and the
// monitor counter are this design's. Timing: push/pull rise in the cycle
// after bal_req_valid (if rest is high) and stay high for cycles clock edges.
module balance_ctrl
  import cb_pkg::*;
#(
  parameter int unsigned TOTAL_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rest,
  input  logic               bal_req_valid,
  input  bal_req_t           bal_req,
  output logic               push,
  output logic               pull,
  output logic               active,
  output logic [TOTAL_W-1:0] total_cyc
);

  bal_cyc_t remain;
  bal_dir_e dir;
  logic     started;   // injection has begun in the current resting interval

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remain    <= '0;
      dir       <= BAL_PULL;
      started   <= 1'b0;
      total_cyc <= '0;
    end else begin
      if (bal_req_valid) begin
        remain  <= bal_req.cycles;
        dir     <= bal_req.dir;
        started <= 1'b0;
      end else if (remain != '0) begin
        if (rest) begin
          remain  <= remain - 1'b1;
          started <= 1'b1;
        end else if (started) begin
          remain  <= '0;                            // next pulse started: stop
          started <= 1'b0;
        end
      end else begin
        started <= 1'b0;
      end
      if (active && rest) total_cyc <= total_cyc + 1'b1;
    end
  end

  always_comb begin
    active = (remain != '0) && rest;
    push   = active && (dir == BAL_PUSH);
    pull   = active && (dir == BAL_PULL);
  end

  a_push_pull_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(push && pull));

endmodule
