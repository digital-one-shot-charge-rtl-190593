// tb_balance_ctrl: issues balance requests and measures the push/pull
// pulses: the pulse must last exactly the requested number of cycles, on the
// requested line only, start in the cycle after the request when rest is
// high, wait for rest when it is low, and be cut when rest falls. The
// injected-cycle total is compared with the sum of measured pulse lengths.
module tb_balance_ctrl;
  import cb_pkg::*;

  logic     clk = 1'b0, rst_n = 1'b0, rest = 1'b0, bal_req_valid = 1'b0;
  bal_req_t bal_req = '0;
  logic     push, pull, active;
  logic [31:0] total_cyc;
  int checks = 0, failures = 0;
  int exp_total = 0;

  balance_ctrl dut (.clk, .rst_n, .rest, .bal_req_valid, .bal_req, .push, .pull, .active, .total_cyc);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic request(input int cyc, input bit dir_push);
    @(negedge clk);
    bal_req_valid = 1'b1;
    bal_req = '{dir: dir_push ? BAL_PUSH : BAL_PULL, cycles: bal_cyc_t'(cyc)};
    @(negedge clk);
    bal_req_valid = 1'b0;
  endtask

  // count the length of the pulse on the expected line, starting now
  task automatic measure(input bit dir_push, output int len);
    len = 0;
    while ((dir_push ? push : pull) && len < 5000) begin
      check(!(dir_push ? pull : push), "other line idle");
      len++;
      @(negedge clk);
    end
  endtask

  int len, n;
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    rest = 1'b1;
    // pulses of random length in the resting interval
    for (int i = 0; i < 40; i++) begin
      bit d;
      d = $urandom_range(0, 1);
      n = (i == 0) ? 1000 : (i == 1) ? 1 : $urandom_range(1, 1000);
      request(n, d);
      check(d ? push : pull, "pulse starts the cycle after the request");
      measure(d, len);
      check(len == n, $sformatf("pulse length %0d want %0d", len, n));
      exp_total += len;
      check(!push && !pull && !active, "quiet after pulse");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    // zero-length request: nothing happens
    request(0, 1'b1);
    repeat (3) begin check(!push && !pull, "zero request"); @(negedge clk); end
    // request during a pulse phase waits for rest
    rest = 1'b0;
    request(50, 1'b0);
    repeat (20) begin check(!push && !pull, "held outside rest"); @(negedge clk); end
    rest = 1'b1;
    @(negedge clk);
    measure(1'b0, len);
    check(len == 49, $sformatf("held pulse length %0d", len + 1));
    exp_total += len + 1;
    // rest falls during injection: cut short, does not resume
    request(300, 1'b1);
    repeat (100) @(negedge clk);
    rest = 1'b0;
    @(negedge clk);
    repeat (10) begin check(!push && !pull, "cut when rest falls"); @(negedge clk); end
    rest = 1'b1;
    repeat (10) begin check(!push && !pull, "does not resume"); @(negedge clk); end
    exp_total += 100;
    check(total_cyc == 32'(exp_total), $sformatf("total %0d want %0d", total_cyc, exp_total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
