// tb_ldpc_decoder: end-to-end test of the decoder at its full size.
//
// Random codewords of the n = 648 code are sent over a BPSK/Gaussian channel
// at several noise levels, SNR settings and iteration limits. For each frame
// the decoded word, the iteration count and the parity flag are compared
// with a bit-true reference model, and the decode latency with the schedule
// of four Z-cycle slots per iteration: (4*iters + 3)*Z cycles between the
// last sample and the stop decision. The test also counts the mechanisms of
// the design and fails if one never occurred: early termination on the
// channel decisions (no check-node update), termination after iterations,
// stopping at the iteration limit with unsatisfied checks, concurrent BNU and
// CNU operation, input back-pressure, each SNR integer select saturating low
// and high, and every decimal select.
`timescale 1ns/1ps
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::*;

  localparam int NFRAMES = 24;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  llr_t in_y = '0;
  logic signed [7:0] snr_int = '0;
  logic [3:0] snr_frac = '0, dummy;
  logic [4:0] max_iter = '0;
  logic out_valid, out_last, out_parity_ok;
  logic [$clog2(NBC)-1:0] out_col;
  logic [Z-1:0] out_bits;
  logic [4:0] out_iters;

  ldpc_decoder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_et0 = 0, n_et_iter = 0, n_limit_fail = 0, n_overlap = 0, n_stall = 0;
  int n_int_lo = 0, n_int_hi = 0, n_dec [4] = '{0, 0, 0, 0}, n_correct = 0;

  always @(posedge clk)
    if (dut.u_ctrl.bnu_act && dut.u_ctrl.cnu_act) n_overlap++;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(word_t cw, real sigma, int si, int sf, int mi);
    int y [N];
    int lch [N];
    word_t ref_w, got_w;
    int ref_it;
    bit ref_ok;
    longint t_last, t_stop;
    int n;
    for (int k = 0; k < N; k++) begin
      y[k]   = channel(cw[k], sigma);
      lch[k] = snr_scale(y[k], si, sf);
    end
    ref_decode(lch, mi, ref_w, ref_it, ref_ok);
    if (si < 2) n_int_lo++;
    if (si >= 10) n_int_hi++;
    n_dec[sf / 4]++;
    // send the frame with random gaps
    @(negedge clk);
    snr_int  = 8'(si);
    snr_frac = 4'(sf);
    max_iter = 5'(mi);
    n = 0;
    while (n < N) begin
      bit acc;
      in_valid = ($urandom_range(0, 7) != 0);
      in_y     = llr_t'(y[n]);
      #1 acc = in_valid && in_ready;   // handshake sampled before the edge
      @(posedge clk);
      if (acc) begin
        n++;
        t_last = cyc;
      end
      @(negedge clk);
    end
    // keep offering data while the decoder is busy: it must not accept
    in_valid = 1;
    in_y     = llr_t'(y[0]);
    // wait for the output
    n = 0;
    while (n < NBC) begin
      @(posedge clk);
      if (in_ready) begin
        check(0, "decoder accepted data while busy");
      end else if (in_valid) n_stall++;
      if (out_valid) begin
        if (n == 0) t_stop = cyc;
        check(out_col == $clog2(NBC)'(n), "output column order");
        got_w[n * Z +: Z] = out_bits;
        check(out_last == (n == NBC - 1), "out_last position");
        n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    check(got_w == ref_w, "decoded word matches the reference");
    check(int'(out_iters) == ref_it, $sformatf("iterations %0d, reference %0d", out_iters, ref_it));
    check(out_parity_ok == ref_ok, "parity flag matches the reference");
    check(out_parity_ok == parity_ok(got_w), "parity flag matches the word");
    // last sample accepted at t_last; stop decision (4*it+3)*Z cycles after
    // the SNR processor's write; first output word two cycles later
    check(t_stop - t_last == longint'((4 * ref_it + 3) * Z + 3),
          $sformatf("latency %0d for %0d iterations", t_stop - t_last, ref_it));
    if (ref_ok && ref_it == 0) n_et0++;
    if (ref_ok && ref_it > 0) n_et_iter++;
    if (!ref_ok) n_limit_fail++;
    if (got_w == cw) n_correct++;
    $display("frame sigma=%0.2f snr=%0d+%0d/16 max=%0d: iters=%0d ok=%0d correct=%0d",
             sigma, si, sf, mi, out_iters, out_parity_ok, got_w == cw);
  endtask

  initial begin
    word_t cw;
    build_code();
    check(rank == M, "parity check matrix has full rank");
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noiseless-like channel: early termination before any check update
    run_frame(random_codeword(), 0.05, 12, 0, 8);
    run_frame('0, 0.05, -3, 4, 8);
    for (int f = 0; f < NFRAMES; f++) begin
      real sigma;
      int si, sf, mi;
      cw = random_codeword();
      check(parity_ok(cw), "generated codeword satisfies H");
      sigma = 0.55 + 0.05 * (f % 6);
      si = (f % 5 == 0) ? -1 : (f % 5 == 1) ? 11 : 1 + (f % 9);
      sf = (f * 5) % 16;
      mi = (f % 4 == 3) ? 1 : (f % 7 == 0) ? 16 : 8;
      run_frame(cw, sigma, si, sf, mi);
    end
    // very noisy frame with a small limit: stops unsolved
    run_frame(random_codeword(), 1.2, 1, 0, 2);
    $display("mechanisms: et0=%0d et_iter=%0d limit_fail=%0d overlap_cycles=%0d stall=%0d int_lo=%0d int_hi=%0d dec=%0d/%0d/%0d/%0d correct=%0d",
             n_et0, n_et_iter, n_limit_fail, n_overlap, n_stall, n_int_lo, n_int_hi,
             n_dec[0], n_dec[1], n_dec[2], n_dec[3], n_correct);
    check(n_et0 > 0, "early termination before any check-node update happened");
    check(n_et_iter > 0, "termination after iterations happened");
    check(n_limit_fail > 0, "stop at the iteration limit happened");
    check(n_overlap > 0, "concurrent BNU/CNU operation happened");
    check(n_stall > 0, "input back-pressure happened");
    check(n_int_lo > 0 && n_int_hi > 0, "SNR integer select saturated both ways");
    check(n_dec[0] > 0 && n_dec[1] > 0 && n_dec[2] > 0 && n_dec[3] > 0, "all decimal selects used");
    check(n_correct > NFRAMES / 2, "most frames decoded to the sent codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
