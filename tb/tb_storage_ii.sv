// tb_storage_ii: random read/write traffic on all 88 edge memories at once,
// each with its own address and write enable, compared with a model array.
`timescale 1ns/1ps
module tb_storage_ii;
  import ldpc_pkg::*;

  logic clk = 0;
  logic          we    [NE];
  logic [ZW-1:0] addr  [NE];
  llr_t          wdata [NE];
  llr_t          rdata [NE];
  llr_t model [NE][Z];
  int checks = 0, failures = 0;

  storage_ii dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // initialise every word
    for (int a = 0; a < Z; a++) begin
      @(negedge clk);
      for (int e = 0; e < NE; e++) begin
        we[e] = 1; addr[e] = ZW'(a); wdata[e] = llr_t'($urandom);
        model[e][a] = wdata[e];
      end
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int e = 0; e < NE; e++) begin
        we[e] = 1'($urandom_range(0, 1));
        addr[e] = ZW'($urandom_range(0, Z - 1));
        wdata[e] = llr_t'($urandom);
      end
      #1;
      for (int e = 0; e < NE; e++) begin
        checks++;
        if (rdata[e] != model[e][addr[e]]) begin
          failures++;
          $display("FAIL e=%0d a=%0d", e, addr[e]);
        end
        if (we[e]) model[e][addr[e]] = wdata[e];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
