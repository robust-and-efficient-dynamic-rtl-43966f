// tb_freq_counter: checks freq_counter against oscillators of known period,
// slower and faster than the 10 MHz reference clock. Each window count must
// be within one cycle of WINDOW*T_clk/T_osc, reports must come exactly
// WINDOW cycles apart, the first one WINDOW+1 cycles after en rises, and
// none may come while en is low.
`timescale 1ns/1ps
module tb_freq_counter;
  localparam int unsigned WINDOW = 64;
  localparam real T_CLK = 100.0;

  logic clk = 1'b0, rst_n = 1'b0, osc = 1'b0, en = 1'b0;
  logic [15:0] count;
  logic        count_valid;
  real t_osc = 7.0;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #(T_CLK/2) clk = ~clk;
  always #(t_osc/2) osc = ~osc;
  always @(posedge clk) cyc++;

  freq_counter #(.COUNT_W(16), .WINDOW(WINDOW)) dut (
    .clk, .rst_n, .osc_clk(osc), .en, .count, .count_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Measure NWIN windows at oscillator period tp and check each count.
  task automatic measure(input real tp, input int nwin);
    real expect_cnt;
    int  start_cyc, last_cyc, got;
    t_osc = tp;
    repeat (3) @(posedge clk);
    expect_cnt = real'(WINDOW) * T_CLK / tp;
    @(negedge clk) en = 1'b1;
    start_cyc = cyc;
    last_cyc  = -1;
    got = 0;
    while (got < nwin) begin
      @(posedge clk); #1;
      if (count_valid) begin
        if (got == 0)
          check(cyc - start_cyc == WINDOW + 1,
                $sformatf("first report after %0d cycles", cyc - start_cyc));
        else
          check(cyc - last_cyc == WINDOW,
                $sformatf("report spacing %0d", cyc - last_cyc));
        check(real'(count) >= expect_cnt - 1.01 && real'(count) <= expect_cnt + 1.01,
              $sformatf("T=%0.2f ns count %0d expected %0.2f", tp, count, expect_cnt));
        last_cyc = cyc;
        got++;
      end
    end
    @(negedge clk) en = 1'b0;
    // No reports while disabled.
    repeat (3 * WINDOW) begin
      @(posedge clk); #1;
      check(!count_valid, "report while en is low");
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    measure(7.0, 4);      // ~914 counts, oscillator faster than clk
    measure(3.3, 3);      // ~1939 counts
    measure(350.0, 3);    // ~18 counts, oscillator slower than clk
    measure(13.7, 3);
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
