// tb_energy_savings: the LUT-mode energy-saving workload. A population of
// parts with a Gaussian process spread (slow corner at -3 sigma, typical at
// the mean, fast at +3 sigma) goes one part at a time through calibration
// and a 200 MHz request on dvs_top at its default parameters. The 200 MHz
// row holds 1.5 V for the slow split and 1.0 V for the fast split; the
// typical split's 1.25 V is an illustrative value. For every part the
// voltage chosen in LUT mode is checked against the split its process
// belongs to (slower corner between two), and the energy saving against a
// conventional system that always applies the slow split's 1.5 V,
// 1 - (V/1.5)^2 averaged over the parts, is compared with the closed form
// 0.5*(1-(1.25/1.5)^2) + P(fast)*(1-(1.0/1.5)^2), about 15.3 %.
`timescale 1ns/1ps
module tb_energy_savings;
  import dvs_pkg::*;
  localparam real T_CLK = 100.0;
  localparam int  WINDOW = 64;
  localparam int  N_PARTS = 300;
  localparam real RO_F0 = 105.0, RO_P = 60.0, RO_SL = 300.0, RO_TC = 0.002;
  localparam int  V_ROW [3] = '{150, 125, 100};   // 200 MHz row: slow, typical, fast

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

  always #(T_CLK/2) clk = ~clk;

  osc_model #(.F0_MHZ(RO_F0), .P_MHZ(RO_P), .SLOPE_MHZ(RO_SL), .TC(RO_TC)) u_ro (
    .vdd_code(vdd), .proc_milli, .temp_c, .osc(ro_clk));
  osc_model #(.F0_MHZ(100.0), .P_MHZ(55.0), .SLOPE_MHZ(320.0), .TC(0.002)) u_cpr (
    .vdd_code(vdd), .proc_milli, .temp_c, .osc(cpr_clk));
  vreg_model #(.SLEW(2), .RESET_CODE(8'd150)) u_reg (
    .clk, .rst_n, .v_target, .vdd, .done(reg_done));

  dvs_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_wr = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = 1'b0;
  endtask

  function automatic int cnt(input real mhz);
    return int'(mhz * real'(WINDOW) * T_CLK / 1000.0);
  endfunction

  // Standard normal sample (Box-Muller).
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307 * u2);
  endfunction

  real sum_sav = 0.0, sum_ref = 0.0, closed, p_fast, z;
  int  n_split [3] = '{0, 0, 0}, n_checked = 0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 3; s++)
      write(REG_RO_BASE + 16'(s), 16'(cnt(RO_F0 + RO_P * real'(s))));
    // One table row per 50 MHz from 100 MHz; only the 200 MHz row matters.
    for (int r = 0; r < 8; r++) begin
      write(REG_LUTF_BASE + 16'(r), 16'(cnt(100.0 + 50.0 * real'(r))));
      for (int s = 0; s < 3; s++)
        write(REG_LUTV_BASE + 16'(r * 64 + s), 16'((r == 2) ? V_ROW[s] : 150));
    end
    write(REG_FTARGET, 16'(cnt(200.0)));

    for (int part = 0; part < N_PARTS; part++) begin
      int exp_s, n;
      real v;
      z = gauss();
      proc_milli = 1000 + int'(z * 1000.0 / 3.0);
      exp_s = (proc_milli >= 2000) ? 2 : (proc_milli >= 1000) ? 1 : 0;
      write(REG_MODE, 16'(MODE_CAL));
      n = 0;
      while (state != ST_CAL_RAMP && n < 10) begin @(negedge clk); n++; end
      check(state == ST_CAL_RAMP, "calibration starts");
      n = 0;
      while (state != ST_MONITOR && n < 2000) begin @(negedge clk); n++; end
      check(state == ST_MONITOR, "part reaches monitoring");
      v = real'(v_target) / 100.0;
      n_split[split]++;
      // Parts within a count of a corner may fall either way.
      if ((proc_milli - 1000) * (proc_milli - 1000) > 25 && (proc_milli - 2000) * (proc_milli - 2000) > 25) begin
        check(int'(split) == exp_s, $sformatf("process %0d: split %0d expected %0d", proc_milli, split, exp_s));
        check(int'(v_target) == V_ROW[exp_s], $sformatf("process %0d: LUT voltage %0d", proc_milli, v_target));
        n_checked++;
      end
      sum_sav += 1.0 - (v / 1.5) * (v / 1.5);
      sum_ref += 1.0 - (real'(V_ROW[exp_s]) / 150.0) * (real'(V_ROW[exp_s]) / 150.0);
    end

    p_fast = 0.00135;   // P(z >= 3)
    closed = 0.5 * (1.0 - (1.25 / 1.5) * (1.25 / 1.5)) + p_fast * (1.0 - (1.0 / 1.5) * (1.0 / 1.5));
    $display("parts %0d: slow %0d typical %0d fast %0d", N_PARTS, n_split[0], n_split[1], n_split[2]);
    $display("energy saving vs worst-case supply: design %0.2f %%, by process %0.2f %%, closed form %0.2f %%",
             100.0 * sum_sav / N_PARTS, 100.0 * sum_ref / N_PARTS, 100.0 * closed);
    check(n_checked > N_PARTS * 9 / 10, "most parts checked");
    check(sum_sav / N_PARTS > sum_ref / N_PARTS - 0.01 && sum_sav / N_PARTS < sum_ref / N_PARTS + 0.01,
          "saving matches the parts' processes");
    // Sampling spread of 300 parts: standard error about 0.9 %.
    check(sum_sav / N_PARTS > closed - 0.04 && sum_sav / N_PARTS < closed + 0.04,
          "saving near the closed form");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 2000000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
