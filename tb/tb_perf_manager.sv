// tb_perf_manager: checks the register interface. Writing f_target must
// update the register and issue one MODE_RUN request; mode writes must issue
// the written request (and value 3 none); table writes must produce one
// strobe with the decoded index and data, and none for addresses beyond the
// table sizes; status reads must return the packed status inputs.
`timescale 1ns/1ps
module tb_perf_manager;
  import dvs_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        bus_wr = 1'b0;
  logic [15:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  ctrl_state_e state = ST_MONITOR;
  logic [1:0]  split = 2'd2;
  logic        calibrated = 1'b1;
  logic [7:0]  v_target = 8'd123;
  logic [15:0] ro_count = 16'd1234;
  logic        pid_busy = 1'b0;
  logic [2:0]  lut_row = 3'd5;
  logic        lut_oor = 1'b1;
  logic [15:0] f_target;
  logic        mode_valid;
  mode_e       mode;
  logic        ro_wr_en;  logic [1:0] ro_wr_idx;  logic [15:0] ro_wr_data;
  logic        f_wr_en;   logic [2:0] f_wr_row;   logic [15:0] f_wr_data;
  logic        v_wr_en;   logic [2:0] v_wr_row;   logic [1:0]  v_wr_split;
  logic [7:0]  v_wr_data;
  int checks = 0, failures = 0;
  int n_mode = 0, n_ro = 0, n_f = 0, n_v = 0;

  always #50 clk = ~clk;

  perf_manager #(.NUM_FREQ(8), .NUM_SPLITS(3), .COUNT_W(16), .VCODE_W(8)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    n_mode += int'(mode_valid); n_ro += int'(ro_wr_en);
    n_f += int'(f_wr_en);       n_v += int'(v_wr_en);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk); bus_wr = 1'b1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_wr = 1'b0;
  endtask

  initial begin
    int m0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    m0 = n_mode;
    write(REG_FTARGET, 16'd1280);
    check(f_target == 16'd1280 && mode_valid && mode == MODE_RUN, "f_target write");
    @(negedge clk);
    check(!mode_valid && n_mode == m0 + 1, "one run request");
    write(REG_MODE, 16'd2);
    check(mode_valid && mode == MODE_PANIC, "panic request");
    write(REG_MODE, 16'd1);
    check(mode_valid && mode == MODE_CAL, "calibration request");
    write(REG_MODE, 16'd3);
    check(!mode_valid, "no request for value 3");
    write(REG_RO_BASE + 16'd2, 16'd1408);
    check(ro_wr_en && ro_wr_idx == 2'd2 && ro_wr_data == 16'd1408, "RO LUT write");
    write(REG_RO_BASE + 16'd3, 16'd1);
    check(!ro_wr_en, "RO LUT index beyond table ignored");
    write(REG_LUTF_BASE + 16'd7, 16'd2880);
    check(f_wr_en && f_wr_row == 3'd7 && f_wr_data == 16'd2880, "LUT frequency write");
    write(REG_LUTF_BASE + 16'd8, 16'd5);
    check(!f_wr_en, "LUT row beyond table ignored");
    write(REG_LUTV_BASE + 16'd6 * 16'd64 + 16'd1, 16'd117);
    check(v_wr_en && v_wr_row == 3'd6 && v_wr_split == 2'd1 && v_wr_data == 8'd117, "LUT voltage write");
    write(REG_LUTV_BASE + 16'd2 * 16'd64 + 16'd3, 16'd99);
    check(!v_wr_en, "LUT split beyond table ignored");
    check(n_ro == 1 && n_f == 1 && n_v == 1, "exactly one strobe per table write");
    bus_addr = REG_STATUS; #1;
    check(bus_rdata == {4'd0, 1'b1, 1'b0, 1'b1, 6'd2, 3'(ST_MONITOR)}, $sformatf("status %h", bus_rdata));
    bus_addr = REG_VTARGET; #1;  check(bus_rdata == 16'd123, "v_target read");
    bus_addr = REG_ROCOUNT; #1;  check(bus_rdata == 16'd1234, "ro_count read");
    bus_addr = REG_LUTROW;  #1;  check(bus_rdata == 16'd5, "LUT row read");
    bus_addr = REG_FTARGET; #1;  check(bus_rdata == 16'd1280, "f_target read");
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
