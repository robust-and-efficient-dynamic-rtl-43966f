// ro_lut: the ring-oscillator lookup table of the automatic process
// identifier. Entry s holds the ring-oscillator count characterized for
// process split s at the temperature-insensitive supply voltage; splits are
// numbered from the slowest (0) to the fastest (NUM_SPLITS-1), so entries
// rise with the index.
//
// How it works: a measured count selects the fastest split whose entry it
// reaches. A count between two entries therefore selects the slower of the
// two corners, as the architecture requires, and a count below every entry
// selects split 0. Entry 0 is stored (it is part of the characterization
// table) but cannot change the result.
//
// Interface and timing: the table is written one entry per cycle through
// wr_en/wr_idx/wr_data. The lookup is combinational from count to split.
// After reset entries 1 and up hold the largest count, so an unprogrammed
// table identifies every part as the slowest split, which gives the supply
// of a conventional worst-case system. The table contents and the
// "slower corner" rule follow the architecture; the reset contents and the
// programming port are this design's own choices.
module ro_lut #(
  parameter int unsigned NUM_SPLITS = 3,
  parameter int unsigned COUNT_W    = 16,
  localparam int unsigned SPLIT_W   = (NUM_SPLITS > 1) ? $clog2(NUM_SPLITS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [SPLIT_W-1:0] wr_idx,
  input  logic [COUNT_W-1:0] wr_data,
  input  logic [COUNT_W-1:0] count,     // measured ring-oscillator count
  output logic [SPLIT_W-1:0] split      // identified split, 0 = slowest
);

  logic [COUNT_W-1:0] entry [NUM_SPLITS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(NUM_SPLITS); s++)
        entry[s] <= (s == 0) ? '0 : '1;
    end else if (wr_en && (int'(wr_idx) < int'(NUM_SPLITS))) begin
      entry[wr_idx] <= wr_data;
    end
  end

  always_comb begin
    split = '0;
    for (int s = 1; s < int'(NUM_SPLITS); s++)
      if (count >= entry[s]) split = SPLIT_W'(s);
  end

endmodule
