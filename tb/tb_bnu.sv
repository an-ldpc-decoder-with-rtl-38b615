// tb_bnu: compares the bit-node unit with the update equations on random
// messages: posterior = channel + sum of used inputs, output per used port
// = saturate(posterior - own input), hard decision = posterior < 0, and in
// the first pass (init) all inputs counted as zero.
`timescale 1ns/1ps
module tb_bnu;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::clip;

  localparam int DV = 12;
  llr_t lch;
  llr_t r [DV];
  logic en [DV];
  logic init;
  llr_t q [DV];
  logic signed [15:0] post;
  logic hd;
  int checks = 0, failures = 0;

  bnu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int sum;
      lch  = llr_t'($urandom_range(0, 254) - 127);
      init = ($urandom_range(0, 4) == 0);
      for (int p = 0; p < DV; p++) begin
        en[p] = (n % 2) ? 1'b1 : 1'($urandom_range(0, 1));
        r[p]  = llr_t'(($urandom_range(0, 3) == 0) ? $urandom_range(0, 254) - 127
                                                   : $urandom_range(0, 40) - 20);
      end
      sum = lch;
      for (int p = 0; p < DV; p++) if (en[p] && !init) sum += r[p];
      #1;
      checks += 2;
      if (int'(post) != sum) begin failures++; $display("FAIL post %0d exp %0d", post, sum); end
      if (hd != (sum < 0)) failures++;
      for (int p = 0; p < DV; p++) begin
        automatic int e = !en[p] ? 0 : clip(sum - (init ? 0 : int'(r[p])), 127);
        checks++;
        if (int'(q[p]) != e) begin
          failures++;
          $display("FAIL n=%0d port %0d en=%0d init=%0d got %0d exp %0d t=%0t", n, p, en[p], init, q[p], e, $time);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
