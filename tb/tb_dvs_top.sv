// tb_dvs_top: end-to-end test of the DVS system at its default parameters.
// Behavioural models close the loop: osc_model instances stand for the ring
// oscillator and the critical-path replica (their speed depends on the
// regulator's output, the part's process and the temperature), and
// vreg_model for the voltage regulator. All traffic goes through the CPU
// bus of the performance manager.
//
// The test characterizes the models into the two tables (as a production
// test would), then:
//   1. calibrates a typical part and checks the identified split;
//   2. requests 200 MHz: LUT mode must apply the typical-split voltage,
//      then monitoring must lower the supply until the replica count sits
//      in the lock band;
//   3. heats the part to 125 C: monitoring must raise the supply again;
//   4. issues a panic request: the supply must go to the typical split's
//      peak, below the slow split's (worst-case) peak, then back to lock;
//   5. requests a frequency above the table (out of range) and a lower one;
//   6. recalibrates parts of other processes, including one between two
//      corners, which must get the slower corner.
// Every mechanism is counted and each must happen at least once.
`timescale 1ns/1ps
module tb_dvs_top;
  import dvs_pkg::*;
  localparam real T_CLK  = 100.0;   // 10 MHz reference
  localparam int  WINDOW = 64;      // dvs_top default
  localparam int  NF = 8, NS = 3;
  localparam int  MARGIN = 8, DEADBAND = 32;
  // Model constants, shared with the characterization below.
  localparam real RO_F0 = 105.0, RO_P = 60.0, RO_SL = 300.0, RO_TC = 0.002;
  localparam real CP_F0 = 100.0, CP_P = 55.0, CP_SL = 320.0, CP_TC = 0.002;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        bus_wr = 1'b0;
  logic [15:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic        ro_clk, cpr_clk;
  logic [7:0]  v_target, vdd;
  logic        reg_done;
  logic [15:0] f_target;
  ctrl_state_e state;
  logic [1:0]  split;
  logic        calibrated;
  int proc_milli = 1000, temp_c = 25;

  int checks = 0, failures = 0;
  int n_cal = 0, n_lut = 0, n_up = 0, n_down = 0, n_lock = 0, n_panic = 0;
  int n_oor = 0, n_split [NS] = '{0, 0, 0};
  ctrl_state_e state_q = ST_IDLE;
  logic [7:0]  v_q = 8'd150;

  always #(T_CLK/2) clk = ~clk;

  osc_model #(.F0_MHZ(RO_F0), .P_MHZ(RO_P), .SLOPE_MHZ(RO_SL), .TC(RO_TC)) u_ro (
    .vdd_code(vdd), .proc_milli, .temp_c, .osc(ro_clk));
  osc_model #(.F0_MHZ(CP_F0), .P_MHZ(CP_P), .SLOPE_MHZ(CP_SL), .TC(CP_TC)) u_cpr (
    .vdd_code(vdd), .proc_milli, .temp_c, .osc(cpr_clk));
  vreg_model #(.SLEW(2), .RESET_CODE(8'd150)) u_reg (
    .clk, .rst_n, .v_target, .vdd, .done(reg_done));

  dvs_top dut (.*);

  // ---------------------------------------------------------- event counting
  // Sampled on the falling edge, away from the design's clock edge.
  always @(negedge clk) begin
    if (state != state_q) begin
      if (state == ST_CAL_RAMP) n_cal++;
      if (state == ST_LUT)      n_lut++;
      if (state == ST_PANIC)    n_panic++;
      if (state == ST_MON_WAIT && state_q == ST_MONITOR) begin
        if (v_target > v_q) n_up++;
        if (v_target < v_q) n_down++;
      end
    end
    if (state == ST_MONITOR && state_q == ST_MONITOR && dut.err_valid
        && dut.err >= MARGIN && dut.err <= MARGIN + DEADBAND)
      n_lock++;
    state_q <= state;
    v_q     <= v_target;
  end

  // ------------------------------------------------------------- helpers
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s (state %s v %0d vdd %0d)", $time, what, state.name(), v_target, vdd);
    end
  endtask

  task automatic write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_wr = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = 1'b0;
  endtask

  task automatic read(input logic [15:0] a, output logic [15:0] d);
    @(negedge clk); bus_addr = a; #1 d = bus_rdata;
  endtask

  function automatic real freq(input real f0, input real p, input real sl, input real tc,
                               input real v, input int pm, input int t);
    return f0 + p * real'(pm) / 1000.0 + sl * (1.0 - tc * real'(t - 25)) * (v - 1.0);
  endfunction

  function automatic int cnt(input real mhz);
    return int'(mhz * real'(WINDOW) * T_CLK / 1000.0);
  endfunction

  // Characterized LUT voltage: lowest code at which a part of split s
  // reaches row frequency f at 125 C, plus one code of guard, in [90,150].
  function automatic int lut_code(input real f_mhz, input int s);
    for (int c = 90; c <= 150; c++)
      if (freq(CP_F0, CP_P, CP_SL, CP_TC, real'(c) / 100.0, s * 1000, 125) >= f_mhz * 1.02)
        return (c + 1 > 150) ? 150 : c + 1;
    return 150;
  endfunction

  int unsigned row_mhz [NF] = '{100, 125, 150, 175, 200, 215, 225, 230};
  int lut [NF][NS];

  task automatic wait_state(input ctrl_state_e s, input int max_cycles);
    int n = 0;
    while (state != s && n < max_cycles) begin @(negedge clk); n++; end
    check(state == s, $sformatf("reach %s", s.name()));
  endtask

  // Wait until monitoring has held the voltage for three windows.
  task automatic wait_lock(input int max_windows);
    int held = 0, n = 0;
    while (held < 3 && n < max_windows * WINDOW) begin
      @(negedge clk); n++;
      if (dut.err_valid) begin
        if (state == ST_MONITOR && dut.err >= MARGIN && dut.err <= MARGIN + DEADBAND) held++;
        else held = 0;
      end
    end
    check(held >= 3, "monitoring locks");
  endtask

  task automatic calibrate(input int pm, input int exp_split);
    logic [15:0] st;
    proc_milli = pm;
    write(REG_MODE, 16'(MODE_CAL));
    wait_state(ST_CAL_MEAS, 400);
    check(vdd == V_TI_DEFAULT, "calibration measures at 1.0 V");
    while (state == ST_CAL_MEAS) @(negedge clk);
    check(calibrated && int'(split) == exp_split,
          $sformatf("process %0d: split %0d expected %0d", pm, split, exp_split));
    read(REG_STATUS, st);
    check(st[8:3] == 6'(exp_split) && st[9], "status register shows the split");
    n_split[split]++;
  endtask

  real f_rep;
  logic [15:0] rd;
  int r200, v_typ_peak, v_slow_peak;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    check(v_target == V_MAX_DEFAULT, "reset at worst-case voltage");

    // Characterization data into the RO LUT and the split LUT.
    for (int s = 0; s < NS; s++)
      write(REG_RO_BASE + 16'(s), 16'(cnt(freq(RO_F0, RO_P, RO_SL, RO_TC, 1.0, s * 1000, 25))));
    for (int r = 0; r < NF; r++) begin
      write(REG_LUTF_BASE + 16'(r), 16'(cnt(real'(row_mhz[r]))));
      for (int s = 0; s < NS; s++) begin
        lut[r][s] = lut_code(real'(row_mhz[r]), s);
        write(REG_LUTV_BASE + 16'(r * 64 + s), 16'(lut[r][s]));
      end
    end
    v_typ_peak  = lut[NF-1][1];
    v_slow_peak = lut[NF-1][0];

    // 1. Calibration of a typical part, at a cold temperature.
    temp_c = -40;
    calibrate(1000, 1);
    temp_c = 25;

    // 2. 200 MHz: LUT voltage of the typical split, then monitoring down.
    write(REG_FTARGET, 16'(cnt(200.0)));
    check(f_target == 16'(cnt(200.0)), "f_target register to the PLL");
    wait_state(ST_LUT, 10);
    @(negedge clk);
    check(int'(v_target) == lut[4][1], $sformatf("LUT voltage %0d expected %0d", v_target, lut[4][1]));
    wait_state(ST_MONITOR, 400);
    check(int'(vdd) == lut[4][1], "monitoring starts at the LUT voltage");
    wait_lock(200);
    check(int'(v_target) < lut[4][1], "monitoring trims below the LUT voltage at 25 C");
    f_rep = freq(CP_F0, CP_P, CP_SL, CP_TC, real'(vdd) / 100.0, proc_milli, temp_c);
    check(f_rep >= 200.0, $sformatf("replica meets 200 MHz (%0.1f)", f_rep));

    // 3. Temperature rises: monitoring must raise the supply.
    r200 = int'(v_target);
    temp_c = 125;
    wait_lock(200);
    check(int'(v_target) > r200, "supply raised after heating");
    f_rep = freq(CP_F0, CP_P, CP_SL, CP_TC, real'(vdd) / 100.0, proc_milli, temp_c);
    check(f_rep >= 200.0, $sformatf("replica meets 200 MHz hot (%0.1f)", f_rep));
    check(int'(v_target) <= lut[4][1], "hot lock within the characterized voltage");

    // 4. Panic: the split's peak, lower than the worst-case split's.
    temp_c = 25;
    write(REG_MODE, 16'(MODE_PANIC));
    wait_state(ST_PANIC, 10);
    @(negedge clk);
    check(int'(v_target) == v_typ_peak, $sformatf("panic voltage %0d expected %0d", v_target, v_typ_peak));
    check(v_typ_peak < v_slow_peak, "typical peak below worst-case peak");
    wait_state(ST_MONITOR, 400);
    check(int'(vdd) == v_typ_peak, "panic reached before monitoring");
    wait_lock(300);

    // 5. Out-of-range target, then a lower one.
    write(REG_FTARGET, 16'(cnt(480.0)));
    @(negedge clk);
    read(REG_STATUS, rd);
    if (rd[11]) n_oor++;
    check(rd[11] == 1'b1, "target above the table flagged");
    wait_state(ST_MONITOR, 400);
    check(int'(v_target) == lut[NF-1][1] || state != ST_LUT, "last row used");
    write(REG_FTARGET, 16'(cnt(140.0)));
    wait_state(ST_LUT, 10);
    read(REG_LUTROW, rd);
    check(rd == 16'd2, "140 MHz uses the 150 MHz row");
    wait_lock(300);
    f_rep = freq(CP_F0, CP_P, CP_SL, CP_TC, real'(vdd) / 100.0, proc_milli, temp_c);
    check(f_rep >= 140.0, $sformatf("replica meets 140 MHz (%0.1f)", f_rep));

    // 6. Other parts: fast, slow, and between typical and fast.
    calibrate(2000, 2);
    calibrate(0, 0);
    temp_c = 125;
    calibrate(1500, 1);
    temp_c = 25;
    calibrate(2100, 2);

    // Every mechanism must have happened.
    check(n_cal >= 5,   $sformatf("calibrations %0d", n_cal));
    check(n_lut >= 3,   $sformatf("LUT-mode entries %0d", n_lut));
    check(n_up >= 1,    $sformatf("monitoring steps up %0d", n_up));
    check(n_down >= 1,  $sformatf("monitoring steps down %0d", n_down));
    check(n_lock >= 1,  $sformatf("lock decisions %0d", n_lock));
    check(n_panic >= 1, $sformatf("panic entries %0d", n_panic));
    check(n_oor >= 1,   $sformatf("out-of-range targets %0d", n_oor));
    for (int s = 0; s < NS; s++) check(n_split[s] >= 1, $sformatf("split %0d identified %0d times", s, n_split[s]));
    $display("events: cal=%0d lut=%0d up=%0d down=%0d lock=%0d panic=%0d oor=%0d splits=%0d/%0d/%0d",
             n_cal, n_lut, n_up, n_down, n_lock, n_panic, n_oor, n_split[0], n_split[1], n_split[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 400000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
