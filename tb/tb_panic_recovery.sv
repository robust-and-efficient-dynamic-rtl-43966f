// tb_panic_recovery: the panic-mode workload. Two identical typical-process
// chips run side by side at 200 MHz and 25 C, both locked in
// performance-monitoring mode. System 0 has been calibrated, so it uses the
// typical split's column. System 1 never is, so it keeps split 0 (slowest)
// and behaves as a conventional worst-case system. Both then receive a panic
// request at the same moment. The test checks that:
//   - the calibrated system's panic voltage V1 is below the conventional
//     V2 (each is the peak of the column it uses);
//   - both fall back to the same lock voltage (within one step);
//   - the calibrated system gets there sooner (t1 < t2);
//   - its energy over the recovery, the sum of V^2 per cycle, is lower.
`timescale 1ns/1ps
module tb_panic_recovery;
  import dvs_pkg::*;
  localparam real T_CLK = 100.0;
  localparam int  WINDOW = 64, NF = 8, NS = 3, MARGIN = 8, DEADBAND = 32;
  localparam real RO_F0 = 105.0, RO_P = 60.0, RO_SL = 300.0, RO_TC = 0.002;
  localparam real CP_F0 = 100.0, CP_P = 55.0, CP_SL = 320.0, CP_TC = 0.002;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        bus_wr [2];
  logic [15:0] bus_addr = '0, bus_wdata = '0;
  logic [15:0] bus_rdata [2];
  logic        ro_clk [2], cpr_clk [2];
  logic [7:0]  v_target [2], vdd [2];
  logic        reg_done [2];
  logic [15:0] f_target [2];
  ctrl_state_e state [2];
  logic [1:0]  split [2];
  logic        calibrated [2];
  int proc_milli = 1000, temp_c = 25;
  int checks = 0, failures = 0;

  always #(T_CLK/2) clk = ~clk;

  for (genvar i = 0; i < 2; i++) begin : g_sys
    osc_model #(.F0_MHZ(RO_F0), .P_MHZ(RO_P), .SLOPE_MHZ(RO_SL), .TC(RO_TC)) u_ro (
      .vdd_code(vdd[i]), .proc_milli, .temp_c, .osc(ro_clk[i]));
    osc_model #(.F0_MHZ(CP_F0), .P_MHZ(CP_P), .SLOPE_MHZ(CP_SL), .TC(CP_TC)) u_cpr (
      .vdd_code(vdd[i]), .proc_milli, .temp_c, .osc(cpr_clk[i]));
    vreg_model #(.SLEW(2), .RESET_CODE(8'd150)) u_reg (
      .clk, .rst_n, .v_target(v_target[i]), .vdd(vdd[i]), .done(reg_done[i]));
    dvs_top dut (
      .clk, .rst_n,
      .bus_wr(bus_wr[i]), .bus_addr, .bus_wdata, .bus_rdata(bus_rdata[i]),
      .ro_clk(ro_clk[i]), .cpr_clk(cpr_clk[i]),
      .v_target(v_target[i]), .reg_done(reg_done[i]),
      .f_target(f_target[i]), .state(state[i]), .split(split[i]),
      .calibrated(calibrated[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // Write to system 0, system 1 or both (mask bit per system).
  task automatic write(input logic [1:0] mask, input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_wr[0] = mask[0]; bus_wr[1] = mask[1]; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr[0] = 1'b0;    bus_wr[1] = 1'b0;
  endtask

  function automatic real freq(input real f0, input real p, input real sl, input real tc,
                               input real v, input int pm, input int t);
    return f0 + p * real'(pm) / 1000.0 + sl * (1.0 - tc * real'(t - 25)) * (v - 1.0);
  endfunction

  function automatic int cnt(input real mhz);
    return int'(mhz * real'(WINDOW) * T_CLK / 1000.0);
  endfunction

  function automatic int lut_code(input real f_mhz, input int s);
    for (int c = 90; c <= 150; c++)
      if (freq(CP_F0, CP_P, CP_SL, CP_TC, real'(c) / 100.0, s * 1000, 125) >= f_mhz * 1.02)
        return (c + 1 > 150) ? 150 : c + 1;
    return 150;
  endfunction

  function automatic bit locked(input int i);
    return state[i] == ST_MONITOR;
  endfunction

  int unsigned row_mhz [NF] = '{100, 125, 150, 175, 200, 210, 215, 220};
  int  peak [2], t_settle [2], v_end [2], stable [2];
  real energy [2];
  int  cyc;

  initial begin
    bus_wr[0] = 1'b0; bus_wr[1] = 1'b0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < NS; s++)
      write(2'b11, REG_RO_BASE + 16'(s), 16'(cnt(freq(RO_F0, RO_P, RO_SL, RO_TC, 1.0, s * 1000, 25))));
    for (int r = 0; r < NF; r++) begin
      write(2'b11, REG_LUTF_BASE + 16'(r), 16'(cnt(real'(row_mhz[r]))));
      for (int s = 0; s < NS; s++)
        write(2'b11, REG_LUTV_BASE + 16'(r * 64 + s), 16'(lut_code(real'(row_mhz[r]), s)));
    end
    // Only system 0 is calibrated.
    write(2'b01, REG_MODE, 16'(MODE_CAL));
    while (!calibrated[0]) @(negedge clk);
    check(split[0] == 2'd1 && split[1] == 2'd0, "system 0 typical, system 1 worst case");
    write(2'b11, REG_FTARGET, 16'(cnt(200.0)));
    // Let both lock.
    repeat (300 * WINDOW) @(negedge clk);
    check(locked(0) && locked(1), "both locked before panic");
    check(v_target[0] == v_target[1] || v_target[0] + 1 == v_target[1] || v_target[1] + 1 == v_target[0],
          "same lock voltage before panic");

    // Panic on both at once.
    write(2'b11, REG_MODE, 16'(MODE_PANIC));
    for (int i = 0; i < 2; i++) begin
      peak[i] = 0; t_settle[i] = -1; energy[i] = 0.0; stable[i] = 0;
    end
    cyc = 0;
    while ((t_settle[0] < 0 || t_settle[1] < 0) && cyc < 2000 * WINDOW) begin
      @(negedge clk); cyc++;
      for (int i = 0; i < 2; i++) begin
        if (int'(vdd[i]) > peak[i]) peak[i] = int'(vdd[i]);
        energy[i] += (real'(vdd[i]) / 100.0) * (real'(vdd[i]) / 100.0);
        // Settled: three windows in a row with no step after the panic peak.
        if (t_settle[i] < 0) begin
          if (state[i] == ST_MONITOR && vdd[i] == v_target[i]) stable[i]++;
          else stable[i] = 0;
          if (stable[i] >= 3 * WINDOW + 8) begin
            t_settle[i] = cyc - stable[i];
            v_end[i] = int'(vdd[i]);
          end
        end
      end
    end
    // Both energies are summed over the same cycles, up to the later settling.
    $display("panic: V1 = %0d  V2 = %0d (x10 mV), t1 = %0d  t2 = %0d cycles, end %0d / %0d",
             peak[0], peak[1], t_settle[0], t_settle[1], v_end[0], v_end[1]);
    check(t_settle[0] > 0 && t_settle[1] > 0, "both settle after panic");
    check(peak[0] < peak[1], "V1 below V2");
    check(t_settle[0] < t_settle[1], "t1 shorter than t2");
    check(v_end[0] - v_end[1] <= 1 && v_end[1] - v_end[0] <= 1, "both settle at the same voltage");
    check(energy[0] < energy[1], "less energy over the recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 3000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
