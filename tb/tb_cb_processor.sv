// tb_cb_processor: drives classified residual samples into the charge
// balancing processor and compares every decision with a reference model
// written in microvolts and microseconds:
//   safe (|V_E| <= 20 mV)                  -> no balance current, count = 0
//   unsafe, 1st/2nd consecutive            -> 1 ms balance current, no code change
//   unsafe, 3rd consecutive                -> anodic code moves by floor(|V_E|/20 mV)
//                                            (up for V_E < 0), then a balance current
//                                            of (rest - 10 mV) * 100 us/mV if rest > 10 mV;
//                                            the count starts again from zero
// Direction (push for V_E < 0), the saturation of the code at 0 and 255, the
// reload from init_code, and the decision latency (1 cycle for a
// non-persistent decision, at most 16 cycles for a modulation) are checked.
module tb_cb_processor;
  import cb_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, load = 1'b1;
  dac_code_t init_code = 8'd100;
  logic      region_valid = 1'b0, unsafe = 1'b0;
  region_e   region = REG3;
  ve_t       ve = '0;
  dac_code_t anod_code;
  logic      bal_req_valid, busy, ev_idle, ev_nonpersist, ev_modulate;
  bal_req_t  bal_req;
  logic [CNT_W-1:0] count;
  int checks = 0, failures = 0;
  int n_idle = 0, n_np = 0, n_mod = 0, n_sat = 0;

  cb_processor dut (.clk, .rst_n, .load, .init_code, .region_valid, .region, .unsafe, .ve,
                    .anod_code, .bal_req_valid, .bal_req, .count, .busy,
                    .ev_idle, .ev_nonpersist, .ev_modulate);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference state
  int r_cnt, r_code;

  task automatic sample(input int code);
    int  uv, mag, rest_uv;
    int  reg_n, exp_cyc, exp_code, dn, lat;
    bit  exp_req, exp_push, got_req, got_push, got_idle, got_np, got_mod;
    int  got_cyc;
    uv  = code * 100;                // 100 uV per code
    mag = (uv < 0) ? -uv : uv;
    if (uv > 20000)        reg_n = 1;
    else if (uv > 10000)   reg_n = 2;
    else if (uv >= -10000) reg_n = 3;
    else if (uv >= -20000) reg_n = 4;
    else                   reg_n = 5;
    // reference decision
    exp_req = 0; exp_cyc = 0; exp_push = (code < 0); exp_code = r_code;
    if (reg_n == 1 || reg_n == 5) begin
      r_cnt = (r_cnt < 3) ? r_cnt + 1 : 3;
      if (r_cnt < 3) begin
        exp_req = 1; exp_cyc = 1000;
      end else begin
        dn = mag / 20000;            // whole 20 mV DAC steps
        rest_uv = mag - dn * 20000;
        exp_code = (code < 0) ? r_code + dn : r_code - dn;
        if (exp_code > 255) begin exp_code = 255; n_sat++; end
        if (exp_code < 0)   begin exp_code = 0;   n_sat++; end
        // 1 uA into 100 nF moves V_E by 10 uV per 1 us cycle
        exp_cyc = (rest_uv > 10000) ? (rest_uv - 10000) / 10 : 0;
        exp_req = (exp_cyc > 0);
      end
    end else begin
      r_cnt = 0;
    end
    // drive
    @(negedge clk);
    ve = ve_t'(code); region = region_e'(reg_n); unsafe = (reg_n == 1 || reg_n == 5);
    region_valid = 1'b1;
    @(negedge clk);
    region_valid = 1'b0;
    ve = ve_t'($urandom);          // the held sample is only needed on region_valid
    got_req = 0; got_idle = 0; got_np = 0; got_mod = 0; got_cyc = 0; got_push = 0; lat = -1;
    for (int c = 1; c <= 20; c++) begin
      if (bal_req_valid) begin got_req = 1; got_cyc = int'(bal_req.cycles); got_push = (bal_req.dir == BAL_PUSH); end
      if (ev_idle || ev_nonpersist || ev_modulate) lat = c;
      got_idle |= ev_idle; got_np |= ev_nonpersist; got_mod |= ev_modulate;
      @(negedge clk);
    end
    check(!busy, "processor idle again");
    check(int'(count) == ((r_cnt >= 3) ? 0 : r_cnt), $sformatf("count %0d want %0d", count, r_cnt));
    check(got_req == exp_req, $sformatf("request for %0d codes: got %0d want %0d", code, got_req, exp_req));
    if (exp_req) begin
      check(got_cyc == exp_cyc, $sformatf("duration for %0d codes: got %0d want %0d", code, got_cyc, exp_cyc));
      check(got_push == exp_push, "balance direction");
    end
    check(int'(anod_code) == exp_code, $sformatf("anod code for %0d: got %0d want %0d", code, anod_code, exp_code));
    if (!(reg_n == 1 || reg_n == 5)) begin
      check(got_idle && !got_np && !got_mod, "idle decision"); n_idle++;
      check(lat == 1, "idle decision latency");
    end else if (r_cnt < 3) begin
      check(got_np && !got_mod, "non-persistent decision"); n_np++;
      check(lat == 1, "non-persistent decision latency");
    end else begin
      check(got_mod && !got_np, "modulation decision"); n_mod++;
      check(lat >= 1 && lat <= 16, $sformatf("modulation latency %0d", lat));
      r_cnt = 0;                     // the count restarts after a modulation
    end
    r_code = exp_code;
  endtask

  int v;
  initial begin
    r_cnt = 0; r_code = 100;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk); load = 1'b1; @(negedge clk); load = 1'b0;
    check(anod_code == 8'd100, "code loaded");
    // directed: Fig. 5 style sequence, negative residual
    sample(-300); sample(-150); sample(-260); sample(-450); sample(-50);
    // positive persistent run with the rest above and below Vth2
    sample(250); sample(330); sample(390); sample(730); sample(410); sample(201);
    sample(0);
    // saturation at the top and bottom of the code range
    repeat (60) sample(-2048);
    sample(0);
    repeat (90) sample(2047);
    // reload
    @(negedge clk); init_code = 8'd77; load = 1'b1; @(negedge clk); load = 1'b0;
    r_code = 77; r_cnt = 0;
    check(anod_code == 8'd77 && count == 0, "reload");
    // random runs
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 2) == 0) v = $urandom_range(0, 400) - 200;
      else                           v = $urandom_range(0, 1600) - 800;
      sample(v);
    end
    check(n_idle > 0 && n_np > 0 && n_mod > 0 && n_sat > 0, "all decision kinds seen");
    $display("decisions: idle=%0d non-persistent=%0d modulate=%0d saturated=%0d", n_idle, n_np, n_mod, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
