// tb_region_detector: compares the registered region against a reference
// classification in millivolts (Vth1 = 20 mV, Vth2 = 10 mV, 100 uV per code)
// for every code on and around the four thresholds and for random codes over
// the full range, and checks the one-cycle latency of region_valid.
module tb_region_detector;
  import cb_pkg::*;

  logic    clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  ve_t     ve = '0;
  region_e region;
  logic    unsafe, region_valid;
  int checks = 0, failures = 0;

  region_detector dut (.clk, .rst_n, .in_valid, .ve, .region, .unsafe, .region_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference: the voltage in mV against 20 mV and 10 mV
  function automatic int ref_region(input int code);
    real mv;
    mv = code * 0.1;
    if (mv > 20.0)        return 1;
    else if (mv > 10.0)   return 2;
    else if (mv >= -10.0) return 3;
    else if (mv >= -20.0) return 4;
    else                  return 5;
  endfunction

  task automatic apply(input int code);
    int r;
    @(negedge clk);
    ve = ve_t'(code); in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    r = ref_region(code);
    check(region_valid, "region_valid one cycle after in_valid");
    check(int'(region) == r, $sformatf("region for code %0d (got %0d want %0d)", code, region, r));
    check(unsafe == (r == 1 || r == 5), "unsafe flag");
    @(negedge clk);
    check(!region_valid, "region_valid is a pulse");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = -3; t <= 3; t++) begin
      apply(200 + t); apply(-200 + t); apply(100 + t); apply(-100 + t);
    end
    apply(0); apply(2047); apply(-2048);
    for (int i = 0; i < 1000; i++) apply($signed(12'($urandom)));
    for (int i = 0; i < 300; i++) apply($urandom_range(0, 600) - 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
