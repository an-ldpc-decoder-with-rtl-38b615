// tb_storage_i: fills the channel-LLR store with random values in load order
// and reads every (group, offset) back, comparing each of the eight words
// with a model array; also checks that a write is not visible before the
// clock edge that performs it.
`timescale 1ns/1ps
module tb_storage_i;
  import ldpc_pkg::*;

  logic clk = 0;
  logic wr_en = 0;
  logic [$clog2(NBC)-1:0] wr_col = '0;
  logic [ZW-1:0] wr_off = '0, rd_off = '0;
  llr_t wr_data = '0;
  logic [1:0] rd_grp = '0;
  llr_t rd_data [CPG];
  llr_t model [NBC][Z];
  int checks = 0, failures = 0;

  storage_i dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int g = 0; g < NGRP; g++)
      for (int c = 0; c < Z; c++) begin
        rd_grp = 2'(g); rd_off = ZW'(c);
        #1;
        for (int k = 0; k < CPG; k++) begin
          checks++;
          if (rd_data[k] != model[g * CPG + k][c]) begin
            failures++;
            $display("FAIL g=%0d c=%0d k=%0d", g, c, k);
          end
        end
      end
  endtask

  initial begin
    for (int round = 0; round < 3; round++) begin
      for (int j = 0; j < NBC; j++)
        for (int c = 0; c < Z; c++) begin
          @(negedge clk);
          wr_en = 1; wr_col = 5'(j); wr_off = ZW'(c); wr_data = llr_t'($urandom);
          model[j][c] = wr_data;
        end
      @(negedge clk) wr_en = 0;
      read_all();
    end
    // write visible only after the edge
    @(negedge clk);
    rd_grp = 2'd1; rd_off = 5'd4;
    wr_en = 1; wr_col = 5'(CPG + 2); wr_off = 5'd4; wr_data = ~model[CPG + 2][4];
    #1 checks++;
    if (rd_data[2] != model[CPG + 2][4]) failures++;
    @(posedge clk) #1;
    checks++;
    if (rd_data[2] != wr_data) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
