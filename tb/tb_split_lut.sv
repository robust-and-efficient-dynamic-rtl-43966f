// tb_split_lut: checks split_lut. After reset every lookup must give V_RESET
// (the worst-case voltage). Then a table of 8 rising frequencies and per-split
// voltages is written, and random target frequencies and splits are checked
// against a reference: first row whose frequency reaches the target (last
// row and out_of_range when none), that row's voltage for the split, and
// the largest voltage of the split's column as peak.
`timescale 1ns/1ps
module tb_split_lut;
  localparam int NF = 8, NS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic        f_wr_en = 1'b0, v_wr_en = 1'b0;
  logic [2:0]  f_wr_row = '0, v_wr_row = '0, row;
  logic [15:0] f_wr_data = '0, f_target = '0;
  logic [1:0]  v_wr_split = '0, split = '0;
  logic [7:0]  v_wr_data = '0, v_out, v_peak;
  logic        out_of_range;
  int checks = 0, failures = 0;
  int unsigned ftab [NF];
  int unsigned vtab [NF][NS];

  always #50 clk = ~clk;

  split_lut #(.NUM_FREQ(NF), .NUM_SPLITS(NS), .COUNT_W(16), .VCODE_W(8),
              .V_RESET(8'd150)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic probe(input int unsigned f, input int s);
    int r = NF - 1, oor = 1, pk = 0;
    for (int i = NF - 1; i >= 0; i--) if (ftab[i] >= f) begin r = i; oor = 0; end
    for (int i = 0; i < NF; i++) if (vtab[i][s] > pk) pk = vtab[i][s];
    f_target = 16'(f); split = 2'(s);
    #1;
    check(int'(row) == r && int'(out_of_range) == oor,
          $sformatf("f=%0d row %0d/%0d oor %0d/%0d", f, row, r, out_of_range, oor));
    check(int'(v_out) == vtab[r][s], $sformatf("f=%0d s=%0d v %0d/%0d", f, s, v_out, vtab[r][s]));
    check(int'(v_peak) == pk, $sformatf("s=%0d peak %0d/%0d", s, v_peak, pk));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    f_target = 16'd500; split = 2'd2; #1;
    check(v_out == 8'd150 && v_peak == 8'd150, "reset contents");
    // Rows 100..450 MHz-like counts; voltages fall with faster splits.
    for (int r = 0; r < NF; r++) begin
      ftab[r] = 640 + 320 * r;
      for (int s = 0; s < NS; s++) vtab[r][s] = 95 + 7 * r - 8 * s + ((r * 3 + s) % 2);
    end
    for (int r = 0; r < NF; r++) begin
      @(negedge clk); f_wr_en = 1'b1; f_wr_row = 3'(r); f_wr_data = 16'(ftab[r]);
      for (int s = 0; s < NS; s++) begin
        @(negedge clk); f_wr_en = 1'b0;
        v_wr_en = 1'b1; v_wr_row = 3'(r); v_wr_split = 2'(s); v_wr_data = 8'(vtab[r][s]);
      end
      @(negedge clk); v_wr_en = 1'b0;
    end
    // Boundaries and random lookups.
    for (int s = 0; s < NS; s++) begin
      probe(0, s); probe(640, s); probe(641, s); probe(2880, s); probe(2881, s); probe(65535, s);
    end
    repeat (600) probe($urandom_range(0, 3200), $urandom_range(0, NS - 1));
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
