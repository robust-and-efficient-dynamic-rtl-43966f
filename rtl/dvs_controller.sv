// dvs_controller: the controller of the hybrid DVS system. It decides the
// target voltage sent to the voltage regulator, switching between a
// one-time lookup-table setting and closed-loop tuning on a critical-path
// replica.
//
// How it works (states from dvs_pkg::ctrl_state_e):
//   CAL_RAMP   a calibration request sets V_target to V_TI, the voltage at
//              which logic speed does not depend on temperature;
//   CAL_MEAS   once the regulator reports done, the process identifier is
//              started and its split is awaited;
//   LUT        V_target follows the split LUT for the present f_target
//              (LUT mode); when the regulator is done the controller
//              switches to monitoring;
//   MONITOR    the replica counter runs; each frequency error moves
//              V_target one V_STEP up when the replica is slower than
//              target + MARGIN, one step down when it is faster than
//              target + MARGIN + DEADBAND, and leaves it alone in between;
//   MON_WAIT   after a step, wait for the regulator before measuring again;
//   PANIC      V_target jumps to the identified split's peak voltage; when
//              it is reached the controller returns to monitoring.
// A new f_target (a MODE_RUN request) always goes back through LUT mode, a
// MODE_PANIC request enters PANIC and a MODE_CAL request recalibrates, from
// any state except the two calibration states, which finish first and then
// go to LUT mode with the latest f_target. Before any calibration the split
// reads 0 (slowest), so the controller behaves like a conventional
// worst-case LUT system.
//
// Timing: the regulator's done is ignored for DONE_BLANK cycles after every
// change of V_target, so a done flag that still describes the old target is
// not taken as settled. pid_start is a one-cycle pulse; mon_en is high in
// MONITOR only, so every error used comes from a window measured entirely at
// the settled voltage.
//
// The modes, their order, the calibration at V_TI and the panic target
// follow the architecture. The step size, dead band, margin, limits, the
// done blanking and the handshake are this design's own choices; the
// replica margin is applied as a frequency margin (counts), not as a
// voltage offset.
module dvs_controller
  import dvs_pkg::*;
#(
  parameter int unsigned COUNT_W    = 16,
  parameter int unsigned VCODE_W    = 8,
  parameter logic [VCODE_W-1:0] V_TI    = V_TI_DEFAULT,  // 1.0 V
  parameter logic [VCODE_W-1:0] V_MAX   = V_MAX_DEFAULT, // 1.5 V
  parameter logic [VCODE_W-1:0] V_FLOOR = 8'd90,  // lowest monitoring voltage
  parameter logic [VCODE_W-1:0] V_STEP  = 8'd1,   // one monitoring step
  parameter int unsigned MARGIN     = 8,   // replica margin, counts
  parameter int unsigned DEADBAND   = 32,  // lock window width, counts
  parameter int unsigned DONE_BLANK = 4    // cycles done is ignored
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // mode requests from the performance manager
  input  logic                    mode_valid,
  input  mode_e                   mode,
  // split LUT
  input  logic [VCODE_W-1:0]      lut_v,
  input  logic [VCODE_W-1:0]      lut_v_peak,
  // process identifier
  output logic                    pid_start,
  input  logic                    pid_done,
  // replica measurement
  output logic                    mon_en,
  input  logic signed [COUNT_W:0] err,
  input  logic                    err_valid,
  // voltage regulator
  output logic [VCODE_W-1:0]      v_target,
  input  logic                    reg_done,
  // status
  output ctrl_state_e             state
);

  localparam int unsigned BLANK_W = $clog2(DONE_BLANK + 1);
  localparam logic signed [COUNT_W:0] LOW_LIM  = (COUNT_W+1)'(MARGIN);
  localparam logic signed [COUNT_W:0] HIGH_LIM = (COUNT_W+1)'(MARGIN + DEADBAND);

  ctrl_state_e        state_n;
  logic [VCODE_W-1:0] v_n;
  logic [BLANK_W-1:0] blank;
  logic               settled;

  assign settled = (blank == '0) && reg_done;
  assign mon_en  = (state == ST_MONITOR);

  always_comb begin
    state_n   = state;
    v_n       = v_target;
    pid_start = 1'b0;

    unique case (state)
      ST_IDLE: ;
      ST_CAL_RAMP: begin
        v_n = V_TI;
        if (settled) begin
          pid_start = 1'b1;
          state_n   = ST_CAL_MEAS;
        end
      end
      ST_CAL_MEAS: begin
        if (pid_done) state_n = ST_LUT;
      end
      ST_LUT: begin
        v_n = lut_v;
        if (settled && (lut_v == v_target)) state_n = ST_MONITOR;
      end
      ST_MONITOR: begin
        if (err_valid) begin
          if (err < LOW_LIM) begin
            if (v_target <= V_MAX - V_STEP) begin
              v_n     = v_target + V_STEP;
              state_n = ST_MON_WAIT;
            end else if (v_target != V_MAX) begin
              v_n     = V_MAX;
              state_n = ST_MON_WAIT;
            end
          end else if (err > HIGH_LIM) begin
            if (v_target >= V_FLOOR + V_STEP) begin
              v_n     = v_target - V_STEP;
              state_n = ST_MON_WAIT;
            end else if (v_target != V_FLOOR) begin
              v_n     = V_FLOOR;
              state_n = ST_MON_WAIT;
            end
          end
        end
      end
      ST_MON_WAIT: begin
        if (settled) state_n = ST_MONITOR;
      end
      ST_PANIC: begin
        v_n = lut_v_peak;
        if (settled && (lut_v_peak == v_target)) state_n = ST_MONITOR;
      end
      default: state_n = ST_IDLE;
    endcase

    // Requests from the performance manager. Calibration states finish first.
    if (mode_valid && (state != ST_CAL_RAMP) && (state != ST_CAL_MEAS)) begin
      unique case (mode)
        MODE_CAL:   begin state_n = ST_CAL_RAMP; v_n = V_TI;       pid_start = 1'b0; end
        MODE_RUN:   begin state_n = ST_LUT;      v_n = lut_v;      end
        MODE_PANIC: begin state_n = ST_PANIC;    v_n = lut_v_peak; end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      v_target <= V_MAX;
      blank    <= BLANK_W'(DONE_BLANK);
    end else begin
      state    <= state_n;
      v_target <= v_n;
      if (v_n != v_target)  blank <= BLANK_W'(DONE_BLANK);
      else if (blank != '0) blank <= blank - 1'b1;
    end
  end

  // Rules of the hand-over between modes.
  // The monitoring loop keeps the target inside its limits.
  a_v_range: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {ST_MONITOR, ST_MON_WAIT}) |-> (v_target <= V_MAX));
  // The process identifier starts only at the calibration voltage, with the
  // regulator reporting done.
  a_pid_start: assert property (@(posedge clk) disable iff (!rst_n)
    pid_start |-> (v_target == V_TI) && reg_done);
  // The replica is only measured at a settled voltage.
  a_mon_settled: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_MONITOR) |-> $stable(v_target));

endmodule
