// freq_error: the summing node of the performance-monitoring loop. It
// subtracts the target frequency from the frequency measured on the
// critical-path replica, both as cycle counts per measurement window, and
// registers the signed result.
//
// Interface and timing: when meas_valid is high, err = meas - target is
// registered and err_valid pulses on the next cycle. err is COUNT_W+1 bits
// wide, so it never overflows: positive means the replica runs faster than
// required, negative that it is too slow. The signs follow the block
// diagram ("+" from the replica counter, "-" from the target); registering
// the result is this design's own choice.
module freq_error #(
  parameter int unsigned COUNT_W = 16
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [COUNT_W-1:0]        meas,
  input  logic                      meas_valid,
  input  logic [COUNT_W-1:0]        target,
  output logic signed [COUNT_W:0]   err,
  output logic                      err_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err       <= '0;
      err_valid <= 1'b0;
    end else begin
      err_valid <= meas_valid;
      if (meas_valid)
        err <= $signed({1'b0, meas}) - $signed({1'b0, target});
    end
  end

endmodule
