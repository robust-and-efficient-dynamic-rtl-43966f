// tb_ro_lut: checks ro_lut. After reset every count must map to split 0.
// Then a rising table is written and boundary and random counts are checked
// against a reference that picks the fastest split whose entry the count
// reaches (the slower corner when between two entries).
`timescale 1ns/1ps
module tb_ro_lut;
  localparam int NS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [1:0]  wr_idx = '0;
  logic [15:0] wr_data = '0, count = '0;
  logic [1:0]  split;
  int checks = 0, failures = 0;
  int unsigned tbl [NS] = '{700, 1050, 1470};

  always #50 clk = ~clk;

  ro_lut #(.NUM_SPLITS(NS), .COUNT_W(16)) dut (.*);

  function automatic int ref_split(input int unsigned c);
    int r = 0;
    for (int s = 1; s < NS; s++) if (c >= tbl[s]) r = s;
    return r;
  endfunction

  task automatic probe(input int unsigned c, input int exp);
    count = 16'(c);
    #1;
    checks++;
    if (int'(split) != exp) begin
      failures++;
      $display("FAIL: count %0d split %0d expected %0d", c, split, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // Unprogrammed table: slowest split for any count.
    probe(0, 0); probe(1500, 0); probe(65534, 0);
    for (int s = 0; s < NS; s++) begin
      @(negedge clk); wr_en = 1'b1; wr_idx = 2'(s); wr_data = 16'(tbl[s]);
    end
    @(negedge clk); wr_en = 1'b0;
    // Boundaries.
    probe(0, 0); probe(699, 0); probe(700, 0); probe(1049, 0);
    probe(1050, 1); probe(1469, 1); probe(1470, 2); probe(65535, 2);
    // Random counts.
    repeat (500) begin
      int unsigned c = $urandom_range(0, 2000);
      probe(c, ref_split(c));
    end
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
