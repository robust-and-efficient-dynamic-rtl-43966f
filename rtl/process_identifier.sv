// process_identifier: the automatic process identifier. During calibration,
// with the supply held at the voltage where logic speed does not depend on
// temperature, it counts the cycles of a small ring oscillator, looks the
// count up in the ring-oscillator table and latches the process split.
//
// How it works: a start pulse enables a freq_counter on the ring-oscillator
// clock. The first complete window's count goes through ro_lut and the
// result is stored in split, which keeps its value until the next
// calibration. The counter is disabled again once the measurement is in.
//
// Interface and timing: start is a one-cycle pulse given once the supply has
// settled. done pulses one cycle after the count arrives, WINDOW + 3 clk
// cycles after start; split and ro_count are valid from then on and
// calibrated stays high. busy is high from start to done. Before the first
// calibration split reads 0, the slowest split. The ring oscillator itself
// is analog and lies outside this block; its clock enters on ro_clk.
//
// The chain oscillator -> counter -> RO table and the measurement at the
// temperature-insensitive voltage follow the architecture; a single window
// per calibration and the start/done handshake are this design's choices.
module process_identifier #(
  parameter int unsigned NUM_SPLITS = 3,
  parameter int unsigned COUNT_W    = 16,
  parameter int unsigned WINDOW     = 64,
  localparam int unsigned SPLIT_W   = (NUM_SPLITS > 1) ? $clog2(NUM_SPLITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ro_clk,       // ring-oscillator output
  input  logic               start,        // begin a calibration measurement
  // RO LUT programming
  input  logic               lut_wr_en,
  input  logic [SPLIT_W-1:0] lut_wr_idx,
  input  logic [COUNT_W-1:0] lut_wr_data,
  // results
  output logic               busy,
  output logic               done,         // one-cycle pulse
  output logic               calibrated,
  output logic [SPLIT_W-1:0] split,
  output logic [COUNT_W-1:0] ro_count
);

  logic [COUNT_W-1:0] meas_count;
  logic               meas_valid;
  logic [SPLIT_W-1:0] lut_split;

  freq_counter #(
    .COUNT_W (COUNT_W),
    .WINDOW  (WINDOW)
  ) u_ro_counter (
    .clk         (clk),
    .rst_n       (rst_n),
    .osc_clk     (ro_clk),
    .en          (busy),
    .count       (meas_count),
    .count_valid (meas_valid)
  );

  ro_lut #(
    .NUM_SPLITS (NUM_SPLITS),
    .COUNT_W    (COUNT_W)
  ) u_ro_lut (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (lut_wr_en),
    .wr_idx  (lut_wr_idx),
    .wr_data (lut_wr_data),
    .count   (meas_count),
    .split   (lut_split)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      calibrated <= 1'b0;
      split      <= '0;
      ro_count   <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
      end else if (busy && meas_valid) begin
        busy       <= 1'b0;
        done       <= 1'b1;
        calibrated <= 1'b1;
        split      <= lut_split;
        ro_count   <= meas_count;
      end
    end
  end

endmodule
