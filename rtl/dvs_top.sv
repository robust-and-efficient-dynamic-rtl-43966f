// dvs_top: the hybrid dynamic voltage scaling (DVS) system. It sets the chip
// supply from a lookup table of characterized voltages chosen for the
// part's own process split (not the worst-case split), then trims it in
// closed loop against a critical-path replica to follow temperature, and
// falls back to the split's peak voltage in panic mode.
//
// Structure (the on-chip part of the system's block diagram):
//   perf_manager        CPU-facing registers: f_target, mode requests, table
//                       programming, status;
//   process_identifier  ring-oscillator counter and RO LUT, identifies the
//                       split during calibration;
//   split_lut           per-split frequency/voltage table;
//   freq_counter        counts the critical-path replica;
//   freq_error          replica count minus target count;
//   dvs_controller      mode sequencing, drives V_target.
// The ring oscillator, the critical-path replica, the voltage regulator, the
// PLL and the CPU are outside: the two oscillator outputs come in on ro_clk
// and cpr_clk, V_target and done connect to the regulator, and f_target is
// brought out for the PLL.
//
// Timing: all logic runs on clk (the reference clock of both frequency
// measurements) except the oscillator-side counters inside the two
// freq_counter instances. A frequency is a count of oscillator cycles in
// WINDOW clk cycles. Voltages are 8-bit codes of 10 mV.
//
// The blocks and their connections follow the architecture's block diagram;
// the CPU bus, the units and all sizes other than the three splits and the
// 1.0 V / 1.5 V voltages are this design's own choices.
module dvs_top
  import dvs_pkg::*;
#(
  parameter int unsigned NUM_FREQ   = 8,
  parameter int unsigned NUM_SPLITS = 3,
  parameter int unsigned COUNT_W    = 16,
  parameter int unsigned VCODE_W    = 8,
  parameter int unsigned WINDOW     = 64,
  parameter logic [VCODE_W-1:0] V_TI    = V_TI_DEFAULT,
  parameter logic [VCODE_W-1:0] V_MAX   = V_MAX_DEFAULT,
  parameter logic [VCODE_W-1:0] V_FLOOR = 8'd90,
  parameter logic [VCODE_W-1:0] V_STEP  = 8'd1,
  parameter int unsigned MARGIN     = 8,
  parameter int unsigned DEADBAND   = 32,
  parameter int unsigned DONE_BLANK = 4,
  localparam int unsigned SPLIT_W = (NUM_SPLITS > 1) ? $clog2(NUM_SPLITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // CPU bus to the performance manager
  input  logic               bus_wr,
  input  logic [15:0]        bus_addr,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata,
  // oscillators
  input  logic               ro_clk,      // process-identification ring oscillator
  input  logic               cpr_clk,     // critical-path replica oscillator
  // voltage regulator
  output logic [VCODE_W-1:0] v_target,
  input  logic               reg_done,
  // PLL
  output logic [COUNT_W-1:0] f_target,
  // status
  output ctrl_state_e        state,
  output logic [SPLIT_W-1:0] split,
  output logic               calibrated
);

  localparam int unsigned ROW_W = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1;

  logic               mode_valid;
  mode_e              mode;
  logic               ro_wr_en;
  logic [SPLIT_W-1:0] ro_wr_idx;
  logic [COUNT_W-1:0] ro_wr_data;
  logic               f_wr_en;
  logic [ROW_W-1:0]   f_wr_row;
  logic [COUNT_W-1:0] f_wr_data;
  logic               v_wr_en;
  logic [ROW_W-1:0]   v_wr_row;
  logic [SPLIT_W-1:0] v_wr_split;
  logic [VCODE_W-1:0] v_wr_data;

  logic               pid_start, pid_done, pid_busy;
  logic [COUNT_W-1:0] ro_count;
  logic [ROW_W-1:0]   lut_row;
  logic               lut_oor;
  logic [VCODE_W-1:0] lut_v, lut_v_peak;
  logic               mon_en;
  logic [COUNT_W-1:0] cpr_count;
  logic               cpr_valid;
  logic signed [COUNT_W:0] err;
  logic               err_valid;

  perf_manager #(
    .NUM_FREQ (NUM_FREQ), .NUM_SPLITS (NUM_SPLITS),
    .COUNT_W  (COUNT_W),  .VCODE_W    (VCODE_W)
  ) u_pm (
    .clk, .rst_n,
    .bus_wr, .bus_addr, .bus_wdata, .bus_rdata,
    .state, .split, .calibrated, .v_target, .ro_count,
    .pid_busy, .lut_row, .lut_oor,
    .f_target, .mode_valid, .mode,
    .ro_wr_en, .ro_wr_idx, .ro_wr_data,
    .f_wr_en, .f_wr_row, .f_wr_data,
    .v_wr_en, .v_wr_row, .v_wr_split, .v_wr_data
  );

  process_identifier #(
    .NUM_SPLITS (NUM_SPLITS), .COUNT_W (COUNT_W), .WINDOW (WINDOW)
  ) u_pid (
    .clk, .rst_n,
    .ro_clk,
    .start       (pid_start),
    .lut_wr_en   (ro_wr_en),
    .lut_wr_idx  (ro_wr_idx),
    .lut_wr_data (ro_wr_data),
    .busy        (pid_busy),
    .done        (pid_done),
    .calibrated,
    .split,
    .ro_count
  );

  split_lut #(
    .NUM_FREQ (NUM_FREQ), .NUM_SPLITS (NUM_SPLITS),
    .COUNT_W  (COUNT_W),  .VCODE_W    (VCODE_W),
    .V_RESET  (V_MAX)
  ) u_lut (
    .clk, .rst_n,
    .f_wr_en, .f_wr_row, .f_wr_data,
    .v_wr_en, .v_wr_row, .v_wr_split, .v_wr_data,
    .f_target,
    .split,
    .row          (lut_row),
    .out_of_range (lut_oor),
    .v_out        (lut_v),
    .v_peak       (lut_v_peak)
  );

  freq_counter #(
    .COUNT_W (COUNT_W), .WINDOW (WINDOW)
  ) u_cpr_counter (
    .clk, .rst_n,
    .osc_clk     (cpr_clk),
    .en          (mon_en),
    .count       (cpr_count),
    .count_valid (cpr_valid)
  );

  freq_error #(
    .COUNT_W (COUNT_W)
  ) u_err (
    .clk, .rst_n,
    .meas       (cpr_count),
    .meas_valid (cpr_valid),
    .target     (f_target),
    .err,
    .err_valid
  );

  dvs_controller #(
    .COUNT_W  (COUNT_W),  .VCODE_W (VCODE_W),
    .V_TI     (V_TI),     .V_MAX   (V_MAX),
    .V_FLOOR  (V_FLOOR),  .V_STEP  (V_STEP),
    .MARGIN   (MARGIN),   .DEADBAND (DEADBAND),
    .DONE_BLANK (DONE_BLANK)
  ) u_ctrl (
    .clk, .rst_n,
    .mode_valid, .mode,
    .lut_v, .lut_v_peak,
    .pid_start, .pid_done,
    .mon_en, .err, .err_valid,
    .v_target, .reg_done,
    .state
  );

endmodule
