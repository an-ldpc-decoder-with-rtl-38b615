// tb_et_output_buffer: feeds hard-decision passes in the decoder's order
// (groups 0..2, offsets 0..Z-1, eight bits per cycle) and checks that
// synd_zero_nxt on the last cycle of a pass says whether the word satisfies
// every parity check (valid codewords, codewords with 1..3 flipped bits),
// that a new pass forgets the previous syndrome, and that the buffered word
// is streamed out column by column with out_last on the last column.
`timescale 1ns/1ps
module tb_et_output_buffer;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::*;

  logic clk = 0, rst_n = 0;
  logic hd_valid = 0, pass_start = 0, synd_zero_nxt, out_start = 0;
  logic [1:0] hd_grp = '0;
  logic [ZW-1:0] hd_off = '0;
  logic [CPG-1:0] hd = '0;
  logic out_valid, out_last;
  logic [$clog2(NBC)-1:0] out_col;
  logic [Z-1:0] out_bits;
  int checks = 0, failures = 0;

  et_output_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic send_pass(word_t w, bit exp_ok);
    for (int g = 0; g < NGRP; g++)
      for (int c = 0; c < Z; c++) begin
        @(negedge clk);
        hd_valid = 1; hd_grp = 2'(g); hd_off = ZW'(c);
        pass_start = (g == 0 && c == 0);
        for (int k = 0; k < CPG; k++) hd[k] = w[(g * CPG + k) * Z + c];
        #1;
        if (g == NGRP - 1 && c == Z - 1) chk(synd_zero_nxt == exp_ok, "syndrome verdict");
      end
    @(negedge clk);
    hd_valid = 0; pass_start = 0;
  endtask

  task automatic read_out(word_t w);
    word_t got;
    int n = 0;
    @(negedge clk) out_start = 1;
    @(negedge clk) out_start = 0;
    while (n < NBC) begin
      chk(out_valid, "streaming");
      chk(out_col == 5'(n), "column");
      chk(out_last == (n == NBC - 1), "last");
      got[n * Z +: Z] = out_bits;
      n++;
      @(negedge clk);
    end
    chk(!out_valid, "stream ended");
    chk(got == w, "streamed word");
  endtask

  initial begin
    word_t cw;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 12; f++) begin
      cw = random_codeword();
      if (f % 2 == 1) begin
        for (int b = 0; b <= f % 3; b++) cw[$urandom_range(0, N - 1)] ^= 1'b1;
      end
      send_pass(cw, parity_ok(cw));
      read_out(cw);
    end
    // a failing pass followed by a valid one: syndrome must restart
    cw = random_codeword();
    cw[5] ^= 1'b1;
    send_pass(cw, 1'b0);
    cw[5] ^= 1'b1;
    send_pass(cw, 1'b1);
    read_out(cw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
