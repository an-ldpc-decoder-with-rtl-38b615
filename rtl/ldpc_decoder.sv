// ldpc_decoder: partially parallel LDPC decoder for the IEEE 802.11n
// rate-1/2, n = 648 code (Z = 27), with SNR-scaled initialisation, a
// reordered min-sum-correct flow and a reordered parity check matrix.
//
// Data path: received samples enter through the SNR processor, which scales
// them by the known SNR into channel LLRs held in Storage I. Storage II holds
// one message per graph edge (88 circulants of Z words). Four check-node
// units serve the four block rows of the active CNU group and eight bit-node
// units the eight block columns of the active BNU group, one row / bit offset
// per cycle, through the message router. The bit-node units also deliver
// hard decisions to the early-termination and output buffer, which keeps the
// decoded word and the syndrome. The controller runs the overlapped group
// schedule and stops as soon as every parity check holds (possibly already
// on the channel decisions, before any check-node update) or after max_iter
// iterations.
//
// Interface: in_valid/in_ready handshake for the 648 samples of a frame in
// codeword order (8-bit, 4 fraction bits, positive = bit 0); snr_int (dB,
// signed integer part) and snr_frac (1/16 dB) stay stable during loading;
// max_iter is sampled when decoding starts. The result leaves as 24 words of
// Z bits (out_valid, out_col, out_bits, out_last), with out_iters and
// out_parity_ok valid from the first output word until the next frame ends.
// Timing: 648 cycles to load (one sample per cycle), 1 cycle of SNR
// processing, (4*iters + 3)*27 cycles to decode, 24 cycles to output.
// Block structure and algorithm follow the document; the interfaces,
// arithmetic details and timing are this design's. Each bit-node unit's
// unsaturated posterior goes to a local net that nothing reads: only its sign (the
// hard decision) is used, and lint reports the unread net.
module ldpc_decoder
  import ldpc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  llr_t                   in_y,
  input  logic signed [7:0]      snr_int,
  input  logic        [3:0]      snr_frac,
  input  logic        [4:0]      max_iter,
  output logic                   out_valid,
  output logic [$clog2(NBC)-1:0] out_col,
  output logic [Z-1:0]           out_bits,
  output logic                   out_last,
  output logic [4:0]             out_iters,
  output logic                   out_parity_ok
);

  // SNR processor -> Storage I
  logic snr_valid;
  llr_t snr_llr;
  logic                   wr_en;
  logic [$clog2(NBC)-1:0] wr_col;
  logic [ZW-1:0]          wr_off;

  // schedule
  logic          bnu_act, bnu_init, cnu_act, pass_start, synd_zero_nxt, out_start;
  logic [1:0]    bnu_grp, cnu_grp;
  logic [ZW-1:0] off;

  // memories and units
  llr_t          lch      [CPG];
  logic          mem_we   [NE];
  logic [ZW-1:0] mem_addr [NE];
  llr_t          mem_wdata[NE];
  llr_t          mem_rdata[NE];
  llr_t          cnu_q    [RPG][DC_MAX];
  logic          cnu_en   [RPG][DC_MAX];
  llr_t          cnu_r    [RPG][DC_MAX];
  llr_t          bnu_r    [CPG][DV_MAX];
  logic          bnu_en   [CPG][DV_MAX];
  llr_t          bnu_q    [CPG][DV_MAX];
  logic [CPG-1:0] hd;

  snr_processor u_snr (
    .clk, .rst_n, .in_valid(in_valid && in_ready), .in_y, .snr_int, .snr_frac,
    .out_valid(snr_valid), .out_llr(snr_llr)
  );

  ldpc_ctrl u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .snr_valid,
    .wr_en, .wr_col, .wr_off, .max_iter,
    .bnu_act, .bnu_grp, .bnu_init, .cnu_act, .cnu_grp, .off, .pass_start,
    .synd_zero_nxt, .out_start, .out_last, .out_iters, .out_parity_ok
  );

  storage_i u_st1 (
    .clk, .wr_en, .wr_col, .wr_off, .wr_data(snr_llr),
    .rd_grp(bnu_grp), .rd_off(off), .rd_data(lch)
  );

  storage_ii u_st2 (
    .clk, .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  msg_router u_router (
    .cnu_act, .cnu_grp, .off_c(off), .bnu_act, .bnu_grp, .off_b(off),
    .mem_rdata, .mem_we, .mem_addr, .mem_wdata,
    .cnu_q, .cnu_en, .cnu_r, .bnu_r, .bnu_en, .bnu_q
  );

  // Check-node units, each as wide as the largest row it serves.
  for (genvar k = 0; k < RPG; k++) begin : g_cnu
    localparam int DC = f_cnu_deg(k);
    llr_t q [DC];
    logic en [DC];
    llr_t r [DC];
    always_comb begin
      for (int p = 0; p < DC; p++) begin
        q[p]  = cnu_q[k][p];
        en[p] = cnu_en[k][p];
      end
      for (int p = 0; p < DC_MAX; p++) cnu_r[k][p] = (p < DC) ? r[p] : '0;
    end
    cnu #(.DC(DC)) u_cnu (.q, .en, .r);
  end

  // Bit-node units, each as wide as the largest column it serves.
  for (genvar k = 0; k < CPG; k++) begin : g_bnu
    localparam int DV = f_bnu_deg(k);
    llr_t r  [DV];
    logic en [DV];
    llr_t q  [DV];
    logic signed [15:0] post;   // posterior, kept for observation
    always_comb begin
      for (int p = 0; p < DV; p++) begin
        r[p]  = bnu_r[k][p];
        en[p] = bnu_en[k][p];
      end
      for (int p = 0; p < DV_MAX; p++) bnu_q[k][p] = (p < DV) ? q[p] : '0;
    end
    bnu #(.DV(DV)) u_bnu (
      .lch(lch[k]), .r, .en, .init(bnu_init), .q, .post, .hd(hd[k])
    );
  end

  et_output_buffer u_et (
    .clk, .rst_n, .hd_valid(bnu_act), .pass_start, .hd_grp(bnu_grp),
    .hd_off(off), .hd, .synd_zero_nxt,
    .out_start, .out_valid, .out_col, .out_bits, .out_last
  );

endmodule
