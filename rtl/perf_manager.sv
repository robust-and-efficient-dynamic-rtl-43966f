// perf_manager: the hardware side of the performance manager. Software on
// the CPU decides the frequency the next task needs and writes it here; this
// block holds it in the f_target register, turns mode writes into requests
// for the controller and routes table programming to the two lookup tables.
//
// Register map (16-bit word addresses, see dvs_pkg):
//   REG_FTARGET   rw  target frequency, counts per measurement window;
//                     a write also issues a MODE_RUN request
//   REG_MODE      w   issue a request: 0 run, 1 calibrate, 2 panic
//   REG_STATUS    r   {lut out_of_range, identifier busy, calibrated,
//                     split[5:0], controller state[2:0]} in [11:0]
//   REG_LUTROW    r   split-LUT row selected for f_target
//   REG_VTARGET   r   present target-voltage code
//   REG_ROCOUNT   r   ring-oscillator count of the last calibration
//   REG_RO_BASE+s w   RO LUT entry of split s
//   REG_LUTF_BASE+r w   frequency of split-LUT row r
//   REG_LUTV_BASE+64*r+s  w  voltage of split-LUT row r, split s
//
// Timing: writes take effect on the clock edge after bus_wr; the register,
// the mode request (a one-cycle mode_valid pulse) and the table write
// strobes all appear together one cycle after the write. Reads are
// combinational. How software predicts the next task's needs is not part of
// this block. The register map and bus are this design's own choices; the
// f_target register and the Mode signal to the controller follow the block
// diagram.
module perf_manager
  import dvs_pkg::*;
#(
  parameter int unsigned NUM_FREQ   = 8,
  parameter int unsigned NUM_SPLITS = 3,
  parameter int unsigned COUNT_W    = 16,
  parameter int unsigned VCODE_W    = 8,
  localparam int unsigned ROW_W   = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1,
  localparam int unsigned SPLIT_W = (NUM_SPLITS > 1) ? $clog2(NUM_SPLITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // CPU bus
  input  logic               bus_wr,
  input  logic [15:0]        bus_addr,
  input  logic [15:0]        bus_wdata,
  output logic [15:0]        bus_rdata,
  // status from the rest of the system
  input  ctrl_state_e        state,
  input  logic [SPLIT_W-1:0] split,
  input  logic               calibrated,
  input  logic [VCODE_W-1:0] v_target,
  input  logic [COUNT_W-1:0] ro_count,
  input  logic               pid_busy,
  input  logic [ROW_W-1:0]   lut_row,
  input  logic               lut_oor,
  // target frequency and mode request
  output logic [COUNT_W-1:0] f_target,
  output logic               mode_valid,
  output mode_e              mode,
  // RO LUT programming
  output logic               ro_wr_en,
  output logic [SPLIT_W-1:0] ro_wr_idx,
  output logic [COUNT_W-1:0] ro_wr_data,
  // split LUT programming
  output logic               f_wr_en,
  output logic [ROW_W-1:0]   f_wr_row,
  output logic [COUNT_W-1:0] f_wr_data,
  output logic               v_wr_en,
  output logic [ROW_W-1:0]   v_wr_row,
  output logic [SPLIT_W-1:0] v_wr_split,
  output logic [VCODE_W-1:0] v_wr_data
);

  logic sel_ro, sel_lutf, sel_lutv;
  assign sel_ro   = (bus_addr[15:8] == REG_RO_BASE[15:8])   && (int'(bus_addr[7:0]) < int'(NUM_SPLITS));
  assign sel_lutf = (bus_addr[15:8] == REG_LUTF_BASE[15:8]) && (int'(bus_addr[7:0]) < int'(NUM_FREQ));
  assign sel_lutv = (bus_addr[15:12] == REG_LUTV_BASE[15:12])
                 && (int'(bus_addr[11:6]) < int'(NUM_FREQ))
                 && (int'(bus_addr[5:0]) < int'(NUM_SPLITS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_target   <= '0;
      mode_valid <= 1'b0;
      mode       <= MODE_RUN;
      ro_wr_en   <= 1'b0;
      ro_wr_idx  <= '0;
      ro_wr_data <= '0;
      f_wr_en    <= 1'b0;
      f_wr_row   <= '0;
      f_wr_data  <= '0;
      v_wr_en    <= 1'b0;
      v_wr_row   <= '0;
      v_wr_split <= '0;
      v_wr_data  <= '0;
    end else begin
      mode_valid <= 1'b0;
      ro_wr_en   <= 1'b0;
      f_wr_en    <= 1'b0;
      v_wr_en    <= 1'b0;
      if (bus_wr) begin
        if (bus_addr == REG_FTARGET) begin
          f_target   <= COUNT_W'(bus_wdata);
          mode_valid <= 1'b1;
          mode       <= MODE_RUN;
        end
        if (bus_addr == REG_MODE && bus_wdata[1:0] != 2'd3) begin
          mode_valid <= 1'b1;
          mode       <= mode_e'(bus_wdata[1:0]);
        end
        if (sel_ro) begin
          ro_wr_en   <= 1'b1;
          ro_wr_idx  <= SPLIT_W'(bus_addr[7:0]);
          ro_wr_data <= COUNT_W'(bus_wdata);
        end
        if (sel_lutf) begin
          f_wr_en   <= 1'b1;
          f_wr_row  <= ROW_W'(bus_addr[7:0]);
          f_wr_data <= COUNT_W'(bus_wdata);
        end
        if (sel_lutv) begin
          v_wr_en    <= 1'b1;
          v_wr_row   <= ROW_W'(bus_addr[11:6]);
          v_wr_split <= SPLIT_W'(bus_addr[5:0]);
          v_wr_data  <= VCODE_W'(bus_wdata);
        end
      end
    end
  end

  always_comb begin
    bus_rdata = '0;
    unique case (bus_addr)
      REG_FTARGET: bus_rdata = 16'(f_target);
      REG_STATUS:  bus_rdata = {4'd0, lut_oor, pid_busy, calibrated, 6'(split), 3'(state)};
      REG_LUTROW:  bus_rdata = 16'(lut_row);
      REG_VTARGET: bus_rdata = 16'(v_target);
      REG_ROCOUNT: bus_rdata = 16'(ro_count);
      default:     bus_rdata = '0;
    endcase
  end

endmodule
