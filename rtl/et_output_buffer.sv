// et_output_buffer: early-termination check and output buffer.
//
// During every bit-node pass the BNUs deliver the hard decisions of the CPG
// bits at offset hd_off of the block columns in group hd_grp. Each decision
// is stored in the codeword buffer and XORed into the syndrome bits of the
// checks it belongs to: bit c of block column j meets check row
// (c - shift) mod Z of every block row with a non-zero block in column j.
// pass_start clears the syndrome in the same cycle as the first decisions
// of a pass arrive, so after the pass's last cycle the syndrome is that of
// the complete hard-decision word. synd_zero_nxt reports, combinationally
// during that last cycle, whether all M = 324 checks will be satisfied
// including the decisions of the current cycle; the controller uses it to
// stop. On out_start the buffer streams the decoded word, one block column
// of Z bits per cycle (column 0 first, bit c of the word = bit c of the
// column), with out_last on column NBC-1.
// Checking all parity equations for early termination follows the document;
// the incremental syndrome and the output format are this design's choices.
module et_output_buffer
  import ldpc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // hard decisions from the bit-node units
  input  logic                   hd_valid,
  input  logic                   pass_start,
  input  logic [1:0]             hd_grp,
  input  logic [ZW-1:0]          hd_off,
  input  logic [CPG-1:0]         hd,
  output logic                   synd_zero_nxt,
  // output stream
  input  logic                   out_start,
  output logic                   out_valid,
  output logic [$clog2(NBC)-1:0] out_col,
  output logic [Z-1:0]           out_bits,
  output logic                   out_last
);

  logic [Z-1:0] synd [NBR];
  logic [Z-1:0] synd_n [NBR];
  logic [Z-1:0] cw [NBC];
  logic         streaming;

  always_comb begin
    for (int i = 0; i < NBR; i++) synd_n[i] = pass_start ? '0 : synd[i];
    if (hd_valid) begin
      for (int e = 0; e < NE; e++)
        if (int'(hd_grp) == EDGE_COL[e] / CPG)
          synd_n[EDGE_ROW[e]][f_submod(hd_off, EDGE_SHIFT[e])] ^= hd[EDGE_COL[e] % CPG];
    end
    synd_zero_nxt = 1'b1;
    for (int i = 0; i < NBR; i++)
      if (synd_n[i] != '0) synd_zero_nxt = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NBR; i++) synd[i] <= '0;
    end else if (hd_valid || pass_start) begin
      synd <= synd_n;
    end
  end

  // codeword buffer (no reset needed: every bit is written by a pass
  // before it is streamed out)
  always_ff @(posedge clk) begin
    if (hd_valid)
      for (int k = 0; k < CPG; k++)
        cw[int'(hd_grp) * CPG + k][hd_off] <= hd[k];
  end

  // output streaming
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      streaming <= 1'b0;
      out_col   <= '0;
    end else if (out_start) begin
      streaming <= 1'b1;
      out_col   <= '0;
    end else if (streaming) begin
      if (out_col == $clog2(NBC)'(NBC - 1)) begin
        streaming <= 1'b0;
        out_col   <= '0;
      end else begin
        out_col   <= out_col + 1'b1;
      end
    end
  end

  assign out_valid = streaming;
  assign out_bits  = cw[out_col];
  assign out_last  = streaming && (out_col == $clog2(NBC)'(NBC - 1));

endmodule
