// tb_ldpc_ctrl: checks the controller's frame sequencing and its schedule.
// A frame is loaded with random gaps; the Storage I write addresses must walk
// the codeword in order. During decoding every cycle's BNU/CNU activity,
// groups, offset, init flag and pass_start are compared with the schedule
// of four Z-cycle slots per iteration (BNU1+CNU3, BNU2, BNU3+CNU1, CNU2).
// The parity verdict is driven by the test: frames stop on it at a chosen
// pass, or at the iteration limit; the stop time, out_iters and
// out_parity_ok are checked, and the controller must accept a new frame only
// after out_last.
`timescale 1ns/1ps
module tb_ldpc_ctrl;
  import ldpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, snr_valid = 0, wr_en;
  logic [$clog2(NBC)-1:0] wr_col;
  logic [ZW-1:0] wr_off, off;
  logic [4:0] max_iter = '0, out_iters;
  logic bnu_act, bnu_init, cnu_act, pass_start, synd_zero_nxt = 0;
  logic [1:0] bnu_grp, cnu_grp;
  logic out_start, out_last = 0, out_parity_ok;
  int checks = 0, failures = 0;

  ldpc_ctrl dut (.*);
  always #5 clk = ~clk;

  // the SNR processor's one-cycle delay
  always_ff @(posedge clk) snr_valid <= in_valid && in_ready;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  // ok_pass: pass at which the verdict is 1 (-1: never)
  task automatic frame(int mi, int ok_pass);
    int n = 0, w = 0, cycle = 0, exp_it;
    bit done = 0;
    @(negedge clk);
    max_iter = 5'(mi);
    while (w < N) begin
      in_valid = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
      if (wr_en) begin
        chk(int'(wr_col) * Z + int'(wr_off) == w, "write address order");
        w++;
      end
      @(negedge clk);
    end
    in_valid = 1;  // must be refused from now on
    @(negedge clk); // the last write takes place at this edge
    exp_it = (ok_pass >= 0 && ok_pass < mi) ? ok_pass : mi;
    while (!done) begin
      int slot = cycle / Z, t = cycle % Z, ph = slot % 4, p = slot / 4;
      bit eb = (ph != 3);
      bit ec = (ph == 2) || (ph == 3) || (ph == 0 && p > 0);
      synd_zero_nxt = (ph == 2 && t == Z - 1 && p == ok_pass);
      #1;
      chk(!in_ready, "no input while decoding");
      chk(bnu_act == eb && cnu_act == ec, $sformatf("activity at slot %0d", slot));
      if (eb) chk(int'(bnu_grp) == ph, "bnu group");
      if (ec) chk(int'(cnu_grp) == (ph == 2 ? 0 : ph == 3 ? 1 : 2), "cnu group");
      chk(int'(off) == t, "offset");
      chk(bnu_init == (p == 0), "init flag");
      chk(pass_start == (ph == 0 && t == 0), "pass start");
      @(negedge clk);
      cycle++;
      if (ph == 2 && t == Z - 1 && p == exp_it) done = 1;
    end
    synd_zero_nxt = 0;
    chk(out_start, "out_start after the stop");
    chk(!bnu_act && !cnu_act, "idle after the stop");
    chk(int'(out_iters) == exp_it, "out_iters");
    chk(out_parity_ok == (ok_pass == exp_it), "out_parity_ok");
    chk(cycle == (4 * exp_it + 3) * Z, "decode cycles");
    repeat (5) begin
      @(negedge clk);
      chk(!in_ready, "waiting for the output");
    end
    out_last = 1;
    @(negedge clk);
    out_last = 0;
    #1 chk(in_ready, "ready for the next frame");
    in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    frame(8, 0);
    frame(8, 3);
    frame(2, -1);
    frame(0, -1);
    frame(16, 16);
    frame(5, 7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
