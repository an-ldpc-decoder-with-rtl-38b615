// storage_ii: edge-message memory, one message per edge of the Tanner graph.
//
// There is one Z-word memory per non-zero circulant of the base matrix
// (NE = 88), word r holding the message on the edge between check row r of
// that block row and its bit in that block column. Messages are stored in
// place: a bit-node update overwrites the check-to-bit message it consumed
// with its bit-to-check message, and a check-node update does the reverse.
// Each edge memory therefore has a single port per cycle: combinational
// read at addr, and a write of wdata at the same addr on the clock edge when
// we is set. Which unit drives each port is decided by the message router.
// The document names this store only; its organisation is this design's.
module storage_ii
  import ldpc_pkg::*;
(
  input  logic          clk,
  input  logic          we    [NE],
  input  logic [ZW-1:0] addr  [NE],
  input  llr_t          wdata [NE],
  output llr_t          rdata [NE]
);

  llr_t mem [NE][Z];

  always_ff @(posedge clk) begin
    for (int e = 0; e < NE; e++)
      if (we[e]) mem[e][addr[e]] <= wdata[e];
  end

  always_comb begin
    for (int e = 0; e < NE; e++)
      rdata[e] = mem[e][addr[e]];
  end

endmodule
