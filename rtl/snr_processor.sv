// snr_processor: scales each received sample y by the known SNR to form the
// channel LLR of a bit node, without a multiplier.
//
// The SNR, in dB, arrives as a signed integer part and a 4-bit fraction
// (sixteenths of a dB). A mapping table turns it into a factor made of an
// integer select and a decimal select:
//   integer part  <2 -> 1, 2..9 -> itself, >=10 -> 10
//   fraction      [0,.25) -> 0, [.25,.5) -> .25, [.5,.75) -> .5, [.75,1) -> .75
// The integer multiple is picked from a pool of sums of shifted copies of y
// (y<<3, y<<2, y<<1, y), the decimal multiple from sums of y>>1 and y>>2, and
// the two are added. Table, shift-and-add structure and the 1..10.75 range
// follow the document. The sum is kept with two extra fraction bits, rounded
// to nearest, saturated to +-127/16 and registered: one cycle of latency,
// one sample per cycle. No sign is flipped: a positive sample stands for
// bit 0, the convention of the decoder's hard decision (this sign convention
// and the sample format, 8-bit with 4 fraction bits, are this design's).
// The two low bits of snr_frac lie below the quarter-dB steps of the table
// and are not used.
module snr_processor
  import ldpc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,   // input enable
  input  llr_t              in_y,       // received sample
  input  logic signed [7:0] snr_int,    // SNR integer part, dB
  input  logic        [3:0] snr_frac,   // SNR fraction part, 1/16 dB
  output logic              out_valid,
  output llr_t              out_llr     // scaled LLR to Storage I
);

  logic [3:0] int_sel;   // 1..10
  logic [1:0] dec_sel;   // quarters 0..3

  // SNR mapping table
  always_comb begin
    if (snr_int < 8'sd2)       int_sel = 4'd1;
    else if (snr_int > 8'sd9)  int_sel = 4'd10;
    else                       int_sel = 4'(snr_int);
    dec_sel = snr_frac[3:2];
  end

  // Shifted copies of y with two guard fraction bits (x1 = y).
  logic signed [15:0] x1, x2, x4, x8, h, q;
  logic signed [15:0] int_pool, dec_pool, sum, rounded;

  always_comb begin
    x1 = 16'(in_y) <<< 2;
    x2 = x1 <<< 1;
    x4 = x1 <<< 2;
    x8 = x1 <<< 3;
    h  = x1 >>> 1;
    q  = x1 >>> 2;
    // integer add pool and multiplexer
    unique case (int_sel)
      4'd1:    int_pool = x1;
      4'd2:    int_pool = x2;
      4'd3:    int_pool = x2 + x1;
      4'd4:    int_pool = x4;
      4'd5:    int_pool = x4 + x1;
      4'd6:    int_pool = x4 + x2;
      4'd7:    int_pool = x4 + x2 + x1;
      4'd8:    int_pool = x8;
      4'd9:    int_pool = x8 + x1;
      default: int_pool = x8 + x2;      // 10
    endcase
    // decimal add pool and multiplexer
    unique case (dec_sel)
      2'd0:    dec_pool = '0;
      2'd1:    dec_pool = q;
      2'd2:    dec_pool = h;
      default: dec_pool = h + q;
    endcase
    sum     = int_pool + dec_pool;
    rounded = (sum + 16'sd2) >>> 2;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_llr   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_llr <= f_sat(rounded);
    end
  end

endmodule
