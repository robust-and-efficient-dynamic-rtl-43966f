// freq_counter: measures the frequency of an asynchronous oscillator (the
// process-identification ring oscillator or the critical-path replica) as
// the number of its cycles seen in a window of WINDOW reference-clock cycles.
//
// How it works: a Gray-coded counter runs in the oscillator's own clock
// domain. The reference domain samples it through a two-flop synchronizer
// (only one bit changes per oscillator edge, so every sample is a value the
// counter really held, at most one count late), converts it to binary and,
// at the end of each window, reports the difference from the value sampled
// at the end of the previous window.
//
// Interface and timing: while en is high, count_valid pulses for one
// reference cycle every WINDOW cycles, with count holding the cycles of the
// window just ended. The first window starts on the first cycle en is seen
// high, so a measurement never spans a time when en was low. The
// oscillator-domain counter runs freely; both ends of a window are sampled
// with the same synchronizer delay, so the window covers exactly WINDOW
// reference periods of oscillator activity.
//
// The block diagram names a counter after the ring oscillator and after the
// replica; the Gray-code transfer, the window length and the count width
// are this design's own choices. The oscillator must make fewer than
// 2**COUNT_W cycles per window; it may run faster than clk.
module freq_counter #(
  parameter int unsigned COUNT_W = 16,
  parameter int unsigned WINDOW  = 64     // reference cycles per measurement
) (
  input  logic               clk,         // reference clock
  input  logic               rst_n,       // asynchronous active-low reset
  input  logic               osc_clk,     // oscillator being measured
  input  logic               en,          // measure while high (clk domain)
  output logic [COUNT_W-1:0] count,       // cycles in the last window
  output logic               count_valid  // one-cycle pulse per window
);

  localparam int unsigned WIN_W = (WINDOW > 1) ? $clog2(WINDOW) : 1;

  // ---------------------------------------------------------------- osc domain
  logic [COUNT_W-1:0] bin_osc;
  logic [COUNT_W-1:0] gray_osc;

  always_ff @(posedge osc_clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_osc  <= '0;
      gray_osc <= '0;
    end else begin
      bin_osc  <= bin_osc + 1'b1;
      gray_osc <= (bin_osc + 1'b1) ^ ((bin_osc + 1'b1) >> 1);
    end
  end

  // ---------------------------------------------------------------- ref domain
  logic [COUNT_W-1:0] gray_s1, gray_s2;
  logic [COUNT_W-1:0] bin_ref;
  logic [COUNT_W-1:0] bin_prev;
  logic [WIN_W-1:0]   win_cnt;
  logic               running;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gray_s1 <= '0;
      gray_s2 <= '0;
    end else begin
      gray_s1 <= gray_osc;
      gray_s2 <= gray_s1;
    end
  end

  // Gray to binary: each binary bit is the XOR of all Gray bits above it.
  always_comb begin
    bin_ref[COUNT_W-1] = gray_s2[COUNT_W-1];
    for (int i = int'(COUNT_W) - 2; i >= 0; i--)
      bin_ref[i] = bin_ref[i+1] ^ gray_s2[i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bin_prev    <= '0;
      win_cnt     <= '0;
      running     <= 1'b0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= 1'b0;
      if (!en) begin
        running  <= 1'b0;
        win_cnt  <= '0;
        bin_prev <= bin_ref;
      end else if (!running) begin
        // First cycle with en high: open the window at the present value.
        running  <= 1'b1;
        win_cnt  <= '0;
        bin_prev <= bin_ref;
      end else if (win_cnt == WIN_W'(WINDOW - 1)) begin
        win_cnt     <= '0;
        bin_prev    <= bin_ref;
        count       <= bin_ref - bin_prev;
        count_valid <= 1'b1;
      end else begin
        win_cnt <= win_cnt + 1'b1;
      end
    end
  end

endmodule
