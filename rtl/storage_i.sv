// storage_i: channel-LLR memory of one frame, N = 648 messages.
//
// Organised as NBC block columns of Z words each, so that the bit-node
// group being processed can read bit c of all CPG (= 8) block columns of
// its group in the same cycle. One write port takes the SNR processor's
// output, one sample per cycle, addressed by block column and offset.
// Reads are asynchronous (combinational from address to data); a write
// becomes visible on the next clock edge. The document names this store
// only; its organisation and ports are this design's.
module storage_i
  import ldpc_pkg::*;
(
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(NBC)-1:0]   wr_col,
  input  logic [ZW-1:0]            wr_off,
  input  llr_t                     wr_data,
  input  logic [1:0]               rd_grp,   // BNU group 0..2
  input  logic [ZW-1:0]            rd_off,   // bit offset 0..Z-1
  output llr_t                     rd_data [CPG]
);

  llr_t mem [NBC][Z];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_col][wr_off] <= wr_data;
  end

  always_comb begin
    for (int k = 0; k < CPG; k++)
      rd_data[k] = mem[int'(rd_grp) * CPG + k][rd_off];
  end

endmodule
