// tb_process_identifier: drives process_identifier with a ring oscillator of
// known period and a programmed RO LUT. For counts at, between and beyond
// the table entries it checks the identified split (slower corner when
// between entries), the latched count, the done pulse, the busy window and
// the latency from start to done (WINDOW + 3 cycles here), and that split
// keeps its value when no calibration runs.
`timescale 1ns/1ps
module tb_process_identifier;
  localparam int unsigned WINDOW = 64;
  localparam real T_CLK = 100.0;

  logic clk = 1'b0, rst_n = 1'b0, ro_clk = 1'b0, start = 1'b0;
  logic        lut_wr_en = 1'b0;
  logic [1:0]  lut_wr_idx = '0;
  logic [15:0] lut_wr_data = '0;
  logic        busy, done, calibrated;
  logic [1:0]  split;
  logic [15:0] ro_count;
  real t_ro = 10.0;
  int checks = 0, failures = 0, cyc = 0;
  int unsigned tbl [3] = '{640, 1024, 1408};   // 100, 160, 220 MHz over 6.4 us

  always #(T_CLK/2) clk = ~clk;
  always #(t_ro/2) ro_clk = ~ro_clk;
  always @(posedge clk) cyc++;

  process_identifier #(.NUM_SPLITS(3), .COUNT_W(16), .WINDOW(WINDOW)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic calibrate(input real f_mhz, input int exp_split);
    int c0, n_done = 0;
    real exp_cnt = f_mhz * real'(WINDOW) * T_CLK / 1000.0;
    t_ro = 1000.0 / f_mhz;
    repeat (5) @(posedge clk);
    @(negedge clk) start = 1'b1;
    c0 = cyc;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    while (!done) begin
      @(negedge clk);
      if (cyc - c0 > 4 * WINDOW) break;
    end
    check(done, "done pulse");
    check(cyc - c0 == WINDOW + 3, $sformatf("latency %0d", cyc - c0));
    check(!busy && calibrated, "busy cleared, calibrated set");
    check(int'(split) == exp_split, $sformatf("f=%0.1f split %0d expected %0d", f_mhz, split, exp_split));
    check(real'(ro_count) > exp_cnt - 1.5 && real'(ro_count) < exp_cnt + 1.5,
          $sformatf("count %0d expected %0.1f", ro_count, exp_cnt));
    @(negedge clk);
    check(!done, "done is one cycle");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    #1;
    check(!calibrated && split == 2'd0, "reset state");
    for (int s = 0; s < 3; s++) begin
      @(negedge clk); lut_wr_en = 1'b1; lut_wr_idx = 2'(s); lut_wr_data = 16'(tbl[s]);
    end
    @(negedge clk); lut_wr_en = 1'b0;
    calibrate(230.0, 2);   // beyond fast
    calibrate(190.0, 1);   // between typical and fast: typical
    calibrate(162.0, 1);   // at typical
    calibrate(130.0, 0);   // between slow and typical: slow
    calibrate(80.0,  0);   // below slow
    calibrate(221.0, 2);
    // split holds without a new start.
    t_ro = 1000.0 / 120.0;
    repeat (3 * WINDOW) @(posedge clk);
    check(split == 2'd2 && !busy, "split holds between calibrations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T_CLK * 20000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
