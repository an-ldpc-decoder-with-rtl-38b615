// tb_snr_processor: checks the SNR scaling against an integer reference.
// Random samples over the full 8-bit range with random SNR integer parts
// (below, inside and above the 1..10 table range) and fractions; the output
// must equal round((int_sel + dec_sel/4) * y), saturated to +-127, exactly
// one cycle after the input, and must hold when no input is valid.
`timescale 1ns/1ps
module tb_snr_processor;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::snr_scale;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  llr_t in_y = '0, out_llr;
  logic signed [7:0] snr_int = '0;
  logic [3:0] snr_frac = '0;
  int checks = 0, failures = 0;

  snr_processor dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int y, si, sf, exp_v;
    llr_t held;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      y  = $urandom_range(0, 254) - 127;
      si = $urandom_range(0, 17) - 4;
      sf = $urandom_range(0, 15);
      @(negedge clk);
      in_valid = 1; in_y = llr_t'(y); snr_int = 8'(si); snr_frac = 4'(sf);
      exp_v = snr_scale(y, si, sf);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(out_llr) != exp_v) begin
        failures++;
        $display("FAIL y=%0d snr=%0d frac=%0d got %0d exp %0d v=%0b", y, si, sf, out_llr, exp_v, out_valid);
      end
      held = out_llr;
      in_y = llr_t'($urandom);
      @(negedge clk);
      checks++;
      if (out_valid || out_llr != held) begin
        failures++;
        $display("FAIL output changed without input");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
