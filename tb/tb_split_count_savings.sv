// tb_split_count_savings: energy saving against the number of splits in the
// LUT. Four copies of dvs_top, built with 3, 4, 10 and 40 splits, serve the
// same population of 300 parts drawn from a Gaussian process distribution
// (slowest corner at -3 sigma, fastest at +3 sigma). Split k of an N-split
// system is the corner at -3 + 6k/(N-1) sigma. Its 200 MHz voltage falls
// linearly from 1.5 V at the slowest corner to 1.0 V at the fastest (an
// illustrative characterization; with three splits it gives 1.25 V for the
// typical one).
//
// For every part and system the test checks the identified split (the
// slower corner when between two) and the LUT-mode voltage. It then checks
// that the mean saving against 1.5 V equals the value the parts' processes
// call for, and that it grows with the number of splits.
`timescale 1ns/1ps
module tb_split_count_savings;
  import dvs_pkg::*;
  localparam real T_CLK = 100.0;
  localparam int  WINDOW = 64;
  localparam int  N_PARTS = 300;
  localparam int  NSYS = 4;
  localparam int  NSPL [NSYS] = '{3, 4, 10, 40};
  localparam real RO_F0 = 105.0, RO_P = 60.0, RO_SL = 300.0, RO_TC = 0.002;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NSYS-1:0] bus_wr = '0;
  logic [15:0] bus_addr = '0, bus_wdata = '0;
  logic [7:0]  v_target [NSYS];
  ctrl_state_e state [NSYS];
  logic [5:0]  split_w [NSYS];
  logic        calibrated [NSYS];
  logic [7:0]  v_lut [NSYS];      // V_target when LUT mode hands over
  ctrl_state_e state_q [NSYS];
  int proc_milli = 1000, temp_c = 25;
  int checks = 0, failures = 0;

  always #(T_CLK/2) clk = ~clk;

  for (genvar i = 0; i < NSYS; i++) begin : g_sys
    localparam int N  = NSPL[i];
    localparam int SW = $clog2(N);
    logic ro_clk, cpr_clk, reg_done;
    logic [7:0]  vdd;
    logic [15:0] f_target, bus_rdata;
    logic [SW-1:0] split;
    osc_model #(.F0_MHZ(RO_F0), .P_MHZ(RO_P), .SLOPE_MHZ(RO_SL), .TC(RO_TC)) u_ro (
      .vdd_code(vdd), .proc_milli, .temp_c, .osc(ro_clk));
    osc_model #(.F0_MHZ(100.0), .P_MHZ(55.0), .SLOPE_MHZ(320.0), .TC(0.002)) u_cpr (
      .vdd_code(vdd), .proc_milli, .temp_c, .osc(cpr_clk));
    vreg_model #(.SLEW(2), .RESET_CODE(8'd150)) u_reg (
      .clk, .rst_n, .v_target(v_target[i]), .vdd, .done(reg_done));
    dvs_top #(.NUM_SPLITS(N)) dut (
      .clk, .rst_n,
      .bus_wr(bus_wr[i]), .bus_addr, .bus_wdata, .bus_rdata,
      .ro_clk, .cpr_clk, .v_target(v_target[i]), .reg_done,
      .f_target, .state(state[i]), .split, .calibrated(calibrated[i]));
    assign split_w[i] = 6'(split);
  end

  always @(negedge clk)
    for (int i = 0; i < NSYS; i++) begin
      if (state_q[i] == ST_LUT && state[i] == ST_MONITOR) v_lut[i] <= v_target[i];
      state_q[i] <= state[i];
    end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic write(input logic [NSYS-1:0] mask, input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_wr = mask; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = '0;
  endtask

  function automatic int cnt(input real mhz);
    return int'(mhz * real'(WINDOW) * T_CLK / 1000.0);
  endfunction

  // Process of split k of an N-split system, in thousandths (0..2000).
  function automatic int corner(input int n, input int k);
    return (2000 * k) / (n - 1);
  endfunction

  // 200 MHz voltage code of split k.
  function automatic int vcode(input int n, input int k);
    return 150 - (50 * k + (n - 1) / 2) / (n - 1);
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  real sav [NSYS], sav_ref [NSYS];

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NSYS; i++) begin
      sav[i] = 0.0; sav_ref[i] = 0.0;
      for (int k = 0; k < NSPL[i]; k++) begin
        write(NSYS'(1 << i), REG_RO_BASE + 16'(k),
              16'(cnt(RO_F0 + RO_P * real'(corner(NSPL[i], k)) / 1000.0)));
        write(NSYS'(1 << i), REG_LUTV_BASE + 16'(k), 16'(vcode(NSPL[i], k)));
      end
    end
    // Row 0 is 200 MHz; the other rows stay at their worst-case reset values.
    write('1, REG_LUTF_BASE, 16'(cnt(200.0)));
    write('1, REG_FTARGET, 16'(cnt(200.0)));

    for (int part = 0; part < N_PARTS; part++) begin
      int n;
      bit all_mon;
      proc_milli = 1000 + int'(gauss() * 1000.0 / 3.0);
      write('1, REG_MODE, 16'(MODE_CAL));
      n = 0;
      while (state[0] != ST_CAL_RAMP && n < 10) begin @(negedge clk); n++; end
      n = 0;
      all_mon = 1'b0;
      while (!all_mon && n < 3000) begin
        @(negedge clk); n++;
        all_mon = 1'b1;
        for (int i = 0; i < NSYS; i++) if (state[i] != ST_MONITOR) all_mon = 1'b0;
      end
      check(all_mon, "all systems reach monitoring");
      @(negedge clk);   // let the last hand-over be captured in v_lut
      for (int i = 0; i < NSYS; i++) begin
        int exp_k, near;
        real v;
        exp_k = 0;
        near  = 0;
        for (int k = 0; k < NSPL[i]; k++) begin
          if (proc_milli >= corner(NSPL[i], k)) exp_k = k;
          // Within about one count of a corner the part may fall either way.
          if ((proc_milli - corner(NSPL[i], k)) * (proc_milli - corner(NSPL[i], k)) <= 36) near = 1;
        end
        if (!near) begin
          check(int'(split_w[i]) == exp_k,
                $sformatf("%0d splits, process %0d: split %0d expected %0d", NSPL[i], proc_milli, split_w[i], exp_k));
          check(int'(v_lut[i]) == vcode(NSPL[i], exp_k),
                $sformatf("%0d splits: voltage %0d expected %0d", NSPL[i], v_lut[i], vcode(NSPL[i], exp_k)));
        end
        v = real'(vcode(NSPL[i], int'(split_w[i]))) / 150.0;
        sav[i] += 1.0 - (real'(v_lut[i]) / 150.0) * (real'(v_lut[i]) / 150.0);
        sav_ref[i] += 1.0 - v * v;
      end
    end

    for (int i = 0; i < NSYS; i++) begin
      $display("%2d splits: mean energy saving %0.2f %%", NSPL[i], 100.0 * sav[i] / N_PARTS);
      check(sav[i] > sav_ref[i] - 1e-6 && sav[i] < sav_ref[i] + 1e-6, "saving follows the chosen voltages");
      if (i > 0) check(sav[i] > sav[i-1], $sformatf("more saving with %0d than %0d splits", NSPL[i], NSPL[i-1]));
    end
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
