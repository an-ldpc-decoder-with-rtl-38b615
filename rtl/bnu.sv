// bnu: bit-node update unit.
//
// Adds the channel LLR and all check-to-bit messages of the bit node to form
// the posterior LLR, gives each edge the posterior minus that edge's own
// incoming message (the extrinsic bit-to-check message, saturated to
// +-127/16), and takes the hard decision: bit 1 when the posterior is
// negative, bit 0 otherwise. These rules are the document's.
// In the reordered schedule the first bit-node update of a frame runs
// before any check-node update; with init = 1 the unit treats all incoming
// check messages as zero, which performs the initialisation in the same
// pass (the stale memory contents are ignored). Ports with en = 0 are
// absent (output 0). Purely combinational; one bit node per cycle.
module bnu
  import ldpc_pkg::*;
#(
  parameter int DV = 12     // ports (largest column degree served)
) (
  input  llr_t lch,         // channel LLR from Storage I
  input  llr_t r    [DV],   // check-to-bit messages
  input  logic en   [DV],   // port used by the current column
  input  logic init,        // first pass: incoming messages are zero
  output llr_t q    [DV],   // bit-to-check messages
  output logic signed [15:0] post,  // posterior LLR (unsaturated)
  output logic hd           // hard decision
);

  always_comb begin
    post = 16'(lch);
    for (int i = 0; i < DV; i++)
      if (en[i] && !init) post += 16'(r[i]);
    hd = post[15];
    for (int i = 0; i < DV; i++) begin
      if (!en[i])    q[i] = '0;
      else if (init) q[i] = f_sat(post);
      else           q[i] = f_sat(post - 16'(r[i]));
    end
  end

endmodule
