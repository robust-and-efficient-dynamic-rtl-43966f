// split_lut: the split-compensation lookup table. Row r holds one target
// frequency f[r] and, for every process split s, the supply voltage v[r][s]
// at which a part of that split meets f[r] at the worst-case temperature.
// There is one row per target frequency the software can request.
//
// How it works: for the requested frequency the table takes the first row
// whose frequency reaches it (rows are programmed in rising frequency), so
// the part is never set below the voltage the request needs; a request above
// every row takes the last row and raises out_of_range. Only the column of
// the identified split is read; the other splits' voltages are ignored.
// v_peak is the largest voltage in that column, the split's maximum, which
// is where the supply goes in panic mode.
//
// Interface and timing: lookups are combinational from f_target and split.
// Frequencies and voltages are written through their own one-entry-per-cycle
// ports. After reset every frequency is the largest count and every voltage
// is V_RESET, so an unprogrammed table behaves like the conventional
// worst-case table. Table shape and use follow the architecture; the row
// search, the reset contents and the ports are this design's own choices.
module split_lut #(
  parameter int unsigned NUM_FREQ   = 8,
  parameter int unsigned NUM_SPLITS = 3,
  parameter int unsigned COUNT_W    = 16,
  parameter int unsigned VCODE_W    = 8,
  parameter logic [VCODE_W-1:0] V_RESET = 8'd150,
  localparam int unsigned ROW_W   = (NUM_FREQ > 1) ? $clog2(NUM_FREQ) : 1,
  localparam int unsigned SPLIT_W = (NUM_SPLITS > 1) ? $clog2(NUM_SPLITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // frequency column programming
  input  logic               f_wr_en,
  input  logic [ROW_W-1:0]   f_wr_row,
  input  logic [COUNT_W-1:0] f_wr_data,
  // voltage programming
  input  logic               v_wr_en,
  input  logic [ROW_W-1:0]   v_wr_row,
  input  logic [SPLIT_W-1:0] v_wr_split,
  input  logic [VCODE_W-1:0] v_wr_data,
  // lookup
  input  logic [COUNT_W-1:0] f_target,
  input  logic [SPLIT_W-1:0] split,
  output logic [ROW_W-1:0]   row,
  output logic               out_of_range,
  output logic [VCODE_W-1:0] v_out,
  output logic [VCODE_W-1:0] v_peak
);

  logic [COUNT_W-1:0] freq [NUM_FREQ];
  logic [VCODE_W-1:0] volt [NUM_FREQ][NUM_SPLITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NUM_FREQ); r++) freq[r] <= '1;
    end else if (f_wr_en && (int'(f_wr_row) < int'(NUM_FREQ))) begin
      freq[f_wr_row] <= f_wr_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NUM_FREQ); r++)
        for (int s = 0; s < int'(NUM_SPLITS); s++)
          volt[r][s] <= V_RESET;
    end else if (v_wr_en && (int'(v_wr_row) < int'(NUM_FREQ))
                         && (int'(v_wr_split) < int'(NUM_SPLITS))) begin
      volt[v_wr_row][v_wr_split] <= v_wr_data;
    end
  end

  // First row (lowest index) whose frequency reaches the target.
  always_comb begin
    row          = ROW_W'(NUM_FREQ - 1);
    out_of_range = 1'b1;
    for (int r = int'(NUM_FREQ) - 1; r >= 0; r--)
      if (freq[r] >= f_target) begin
        row          = ROW_W'(r);
        out_of_range = 1'b0;
      end
  end

  always_comb begin
    v_out  = volt[row][split];
    v_peak = '0;
    for (int r = 0; r < int'(NUM_FREQ); r++)
      if (volt[r][split] > v_peak) v_peak = volt[r][split];
  end

endmodule
