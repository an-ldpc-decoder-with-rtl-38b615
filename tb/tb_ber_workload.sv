// tb_ber_workload: bit-error-rate run of the decoder with and without SNR
// information, at a fixed iteration limit of 8.
//
// For each Eb/N0 point, random codewords are sent over BPSK with Gaussian
// noise (sigma^2 = 1 / (2 * R * Eb/N0), R = 1/2) and decoded twice: once
// with the SNR processor given the true SNR in dB, once with the SNR input
// forced below 2 dB, which makes the scaling factor 1 (no SNR information).
// Bit errors over the 324 information positions (the pivot-free positions
// are not distinguished: all 648 bits are counted), frame errors and the
// iterations used are reported. Checks: every frame's output satisfies the
// parity flag it reports, and at every point the SNR-informed decoder makes
// no more bit errors and uses no more iterations in total than the
// uninformed one.
// A second run follows the fixed-point iteration sweep: the same frames at
// 2.5 dB decoded with SNR information and limits of 3, 5, 7 and 10
// iterations. Because a frame that stops early takes the same path under
// any larger limit, the frame error count must not grow with the limit.
`timescale 1ns/1ps
module tb_ber_workload;
  import ldpc_pkg::*;
  import tb_ldpc_util_pkg::*;

  localparam int NPTS   = 4;
  localparam int FRAMES = 150;
  localparam int SWEEP_FRAMES = 100;
  localparam real EBN0_DB [NPTS] = '{1.5, 2.0, 2.5, 3.0};

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  llr_t in_y = '0;
  logic signed [7:0] snr_int = '0;
  logic [3:0] snr_frac = '0;
  logic [4:0] max_iter = 5'd8;
  logic out_valid, out_last, out_parity_ok;
  logic [$clog2(NBC)-1:0] out_col;
  logic [Z-1:0] out_bits;
  logic [4:0] out_iters;

  ldpc_decoder dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic decode(int y [N], int si, int sf, output word_t w, output int it, output bit ok);
    int n = 0;
    @(negedge clk);
    snr_int = 8'(si); snr_frac = 4'(sf);
    while (n < N) begin
      bit acc;
      in_valid = 1; in_y = llr_t'(y[n]);
      #1 acc = in_ready;   // handshake sampled before the edge
      @(negedge clk);
      if (acc) n++;
    end
    in_valid = 0;
    n = 0;
    while (n < NBC) begin
      @(posedge clk);
      if (out_valid) begin w[n * Z +: Z] = out_bits; n++; end
    end
    it = out_iters;
    ok = out_parity_ok;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int pt = 0; pt < NPTS; pt++) begin
      automatic real sigma = $sqrt(1.0 / (10.0 ** (EBN0_DB[pt] / 10.0)));
      automatic int si = $rtoi($floor(EBN0_DB[pt]));
      automatic int sf = $rtoi($floor((EBN0_DB[pt] - si) * 16.0));
      int be [2], fe [2], its [2];
      be = '{0, 0}; fe = '{0, 0}; its = '{0, 0};
      for (int f = 0; f < FRAMES; f++) begin
        word_t cw, w;
        int y [N];
        int it;
        bit ok;
        cw = random_codeword();
        for (int k = 0; k < N; k++) y[k] = channel(cw[k], sigma);
        for (int mode = 0; mode < 2; mode++) begin
          decode(y, mode == 0 ? si : -10, mode == 0 ? sf : 0, w, it, ok);
          checks++;
          if (ok != parity_ok(w)) begin failures++; $display("FAIL parity flag"); end
          be[mode] += $countones(w ^ cw);
          if (w != cw) fe[mode]++;
          its[mode] += it;
        end
      end
      $display("Eb/N0 %0.1f dB: with SNR  BER %0.2e FER %0.3f avg iters %0.2f", EBN0_DB[pt],
               real'(be[0]) / (FRAMES * N), real'(fe[0]) / FRAMES, real'(its[0]) / FRAMES);
      $display("Eb/N0 %0.1f dB: no SNR    BER %0.2e FER %0.3f avg iters %0.2f", EBN0_DB[pt],
               real'(be[1]) / (FRAMES * N), real'(fe[1]) / FRAMES, real'(its[1]) / FRAMES);
      checks += 2;
      if (be[0] > be[1]) begin failures++; $display("FAIL: SNR information did not lower the bit errors"); end
      if (its[0] > its[1]) begin failures++; $display("FAIL: SNR information did not lower the iterations"); end
    end
    begin : sweep
      automatic int lims [4] = '{3, 5, 7, 10};
      automatic real sigma = $sqrt(1.0 / (10.0 ** (2.5 / 10.0)));
      int fe [4], be [4];
      fe = '{0, 0, 0, 0}; be = '{0, 0, 0, 0};
      for (int f = 0; f < SWEEP_FRAMES; f++) begin
        word_t cw, w;
        int y [N];
        int it;
        bit ok;
        cw = random_codeword();
        for (int k = 0; k < N; k++) y[k] = channel(cw[k], sigma);
        for (int l = 0; l < 4; l++) begin
          max_iter = 5'(lims[l]);
          decode(y, 2, 8, w, it, ok);
          checks++;
          if (it > lims[l]) begin failures++; $display("FAIL iteration limit exceeded"); end
          be[l] += $countones(w ^ cw);
          if (w != cw) fe[l]++;
        end
      end
      for (int l = 0; l < 4; l++) begin
        $display("Eb/N0 2.5 dB, limit %0d iterations: BER %0.2e FER %0.3f", lims[l],
                 real'(be[l]) / (SWEEP_FRAMES * N), real'(fe[l]) / SWEEP_FRAMES);
        if (l > 0) begin
          checks++;
          if (fe[l] > fe[l-1]) begin failures++; $display("FAIL frame errors grew with the limit"); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
