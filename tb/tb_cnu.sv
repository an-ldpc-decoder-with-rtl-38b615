// tb_cnu: compares the check-node unit with the reference check rule on
// random messages, including the extremes, for random sets of used ports
// (full degree 8, degree 7, and sparse sets). Unused ports must output 0.
`timescale 1ns/1ps
module tb_cnu;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::*;

  localparam int DC = 8;
  llr_t q [DC];
  logic en [DC];
  llr_t r [DC];
  int checks = 0, failures = 0;

  cnu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20000; n++) begin
      int qs [];
      int rs [];
      int idx [DC];
      automatic int d = 0;
      for (int p = 0; p < DC; p++) begin
        case (n % 3)
          0: en[p] = 1'b1;
          1: en[p] = (p != n % DC);
          default: en[p] = 1'($urandom_range(0, 1));
        endcase
        case ($urandom_range(0, 5))
          0: q[p] = llr_t'($urandom_range(0, 254) - 127);
          1: q[p] = llr_t'(($urandom_range(0, 1) ? 127 : -127));
          default: q[p] = llr_t'($urandom_range(0, 64) - 32);
        endcase
      end
      for (int p = 0; p < DC; p++) if (en[p]) d++;
      qs = new[d];
      d = 0;
      for (int p = 0; p < DC; p++) if (en[p]) begin qs[d] = q[p]; idx[d] = p; d++; end
      #1;
      if (d > 0) check_rule(qs, rs);
      for (int k = 0; k < d; k++) begin
        checks++;
        if (int'(r[idx[k]]) != rs[k]) begin
          failures++;
          $display("FAIL n=%0d port %0d got %0d exp %0d", n, idx[k], r[idx[k]], rs[k]);
        end
      end
      for (int p = 0; p < DC; p++) if (!en[p]) begin
        checks++;
        if (r[p] != '0) failures++;
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
