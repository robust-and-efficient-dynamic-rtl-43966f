// tb_dvs_controller: drives dvs_controller with a regulator model and with
// the process identifier, LUT and frequency error as tb-controlled signals.
// It walks the controller through calibration, LUT mode, monitoring steps up
// and down, the lock band, both voltage limits, panic mode, a new target,
// a request during calibration and the done blanking, checking V_target,
// the state and the handshakes at each point.
`timescale 1ns/1ps
module tb_dvs_controller;
  import dvs_pkg::*;
  localparam int MARGIN = 8, DEADBAND = 32, BLANK = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mode_valid = 1'b0;
  mode_e mode = MODE_RUN;
  logic [7:0] lut_v = 8'd120, lut_v_peak = 8'd140;
  logic pid_start, pid_done = 1'b0, mon_en;
  logic signed [16:0] err = '0;
  logic err_valid = 1'b0;
  logic [7:0] v_target, vdd;
  logic reg_done, model_done, force_done = 1'b0;
  ctrl_state_e state;
  int checks = 0, failures = 0;
  int n_pid_start = 0;

  always #50 clk = ~clk;

  vreg_model #(.SLEW(1), .RESET_CODE(8'd150)) u_reg (
    .clk, .rst_n, .v_target, .vdd, .done(model_done));
  assign reg_done = model_done | force_done;

  dvs_controller #(.COUNT_W(16), .VCODE_W(8), .MARGIN(MARGIN),
                   .DEADBAND(DEADBAND), .DONE_BLANK(BLANK)) dut (.*);

  always @(posedge clk) if (pid_start) n_pid_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s (state %s v %0d)", $time, what, state.name(), v_target); end
  endtask

  task automatic request(input mode_e m);
    @(negedge clk); mode_valid = 1'b1; mode = m;
    @(negedge clk); mode_valid = 1'b0;
  endtask

  task automatic wait_state(input ctrl_state_e s, input int max_cycles);
    int n = 0;
    while (state != s && n < max_cycles) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reach %s", s.name()));
  endtask

  // One monitoring decision: present err, then check the new target.
  task automatic decide(input int e, input int exp_v, input bit exp_step);
    wait_state(ST_MONITOR, 200);
    @(negedge clk); err = 17'(e); err_valid = 1'b1;
    @(negedge clk); err_valid = 1'b0;
    check(int'(v_target) == exp_v, $sformatf("err %0d: v %0d expected %0d", e, v_target, exp_v));
    check((state == ST_MON_WAIT) == exp_step, $sformatf("err %0d: step %0d", e, exp_step));
  endtask

  initial begin
    int t0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(state == ST_IDLE && v_target == 8'd150, "reset: idle at V_MAX");
    // Calibration at the temperature-insensitive voltage.
    request(MODE_CAL);
    check(state == ST_CAL_RAMP && v_target == 8'd100, "calibration ramps to V_TI");
    while (!pid_start) @(negedge clk);
    check(vdd == 8'd100, "identifier started only after the supply settled");
    @(negedge clk);
    check(state == ST_CAL_MEAS, "measuring");
    request(MODE_PANIC);                    // ignored during calibration
    check(state == ST_CAL_MEAS && v_target == 8'd100, "request ignored while measuring");
    repeat (10) @(negedge clk);
    pid_done = 1'b1; @(negedge clk); pid_done = 1'b0;
    check(state == ST_LUT, "calibration ends in LUT mode");
    @(negedge clk);
    check(v_target == 8'd120, "LUT voltage applied");
    check(!mon_en, "replica counter off in LUT mode");
    wait_state(ST_MONITOR, 200);
    check(vdd == 8'd120 && mon_en, "monitoring after settling at the LUT voltage");
    // Monitoring steps.
    decide(-50, 121, 1);
    decide(MARGIN - 1, 122, 1);
    decide(MARGIN, 122, 0);
    decide(MARGIN + DEADBAND, 122, 0);
    decide(MARGIN + DEADBAND + 1, 121, 1);
    decide(300, 120, 1);
    decide(20, 120, 0);
    // Done blanking: a stale done must not end the wait at once.
    wait_state(ST_MONITOR, 200);
    force_done = 1'b1;
    @(negedge clk); err = -17'sd5; err_valid = 1'b1;
    @(negedge clk); err_valid = 1'b0;
    t0 = 0;
    while (state == ST_MON_WAIT && t0 < 50) begin @(negedge clk); t0++; end
    check(t0 >= BLANK, $sformatf("done ignored for %0d cycles", t0));
    force_done = 1'b0;
    // Panic: straight to the split's peak.
    request(MODE_PANIC);
    check(state == ST_PANIC && v_target == 8'd140, "panic to peak voltage");
    wait_state(ST_MONITOR, 200);
    check(vdd == 8'd140, "panic settles at peak before monitoring");
    // New target goes through the LUT.
    lut_v = 8'd110;
    request(MODE_RUN);
    check(state == ST_LUT, "new target enters LUT mode");
    wait_state(ST_MONITOR, 200);
    check(v_target == 8'd110, "new LUT voltage");
    // Upper limit.
    lut_v = 8'd150;
    request(MODE_RUN);
    wait_state(ST_MONITOR, 300);
    decide(-100, 150, 0);
    // Lower limit.
    lut_v = 8'd91;
    request(MODE_RUN);
    wait_state(ST_MONITOR, 300);
    decide(500, 90, 1);
    decide(500, 90, 0);
    // Recalibration from monitoring.
    request(MODE_CAL);
    check(state == ST_CAL_RAMP && v_target == 8'd100, "recalibration");
    while (!pid_start) @(negedge clk);
    repeat (3) @(negedge clk);
    pid_done = 1'b1; @(negedge clk); pid_done = 1'b0;
    check(n_pid_start == 2, "one identifier start per calibration");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
