// tb_freq_error: checks freq_error with random and extreme counts: err must
// equal meas - target one cycle after meas_valid, err_valid must follow
// meas_valid by one cycle, and err must hold while meas_valid is low.
`timescale 1ns/1ps
module tb_freq_error;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] meas = '0, target = '0;
  logic        meas_valid = 1'b0;
  logic signed [16:0] err;
  logic        err_valid;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  freq_error #(.COUNT_W(16)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apply(input int unsigned m, input int unsigned t, input bit v);
    int e_prev = int'(err);
    @(negedge clk);
    meas = 16'(m); target = 16'(t); meas_valid = v;
    @(negedge clk);
    meas_valid = 1'b0;
    check(err_valid == v, "err_valid timing");
    if (v) check(int'(err) == int'(m) - int'(t),
                 $sformatf("%0d - %0d gave %0d", m, t, err));
    else   check(int'(err) == e_prev, "err changed without meas_valid");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply(0, 65535, 1'b1);
    apply(65535, 0, 1'b1);
    apply(1280, 1280, 1'b1);
    apply(5, 9, 1'b0);
    repeat (500) apply($urandom_range(0, 65535), $urandom_range(0, 65535), 1'($urandom_range(0, 3) != 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
