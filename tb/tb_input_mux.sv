// tb_input_mux: the held residual word must equal the last ADC word taken
// with adc_valid, and sample_valid must follow adc_valid by one cycle.
// Random words are offered with and without adc_valid.
module tb_input_mux;
  import cb_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, adc_valid = 1'b0;
  ve_t  adc_data = '0;
  ve_t  ve_hold;
  logic sample_valid;
  int checks = 0, failures = 0;
  ve_t  exp_hold;
  logic exp_valid;

  input_mux dut (.clk, .rst_n, .adc_valid, .adc_data, .ve_hold, .sample_valid);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    exp_hold = '0; exp_valid = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check(ve_hold == exp_hold,       "held residual");
      check(sample_valid == exp_valid, "sample_valid");
      adc_valid = ($urandom_range(0, 3) == 0);
      adc_data  = ve_t'($urandom);
      exp_valid = adc_valid;
      if (adc_valid) exp_hold = adc_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
