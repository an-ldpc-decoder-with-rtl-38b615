// cnu: check-node update unit, min-sum-correct rule.
//
// For each port i the output is the box-plus of the inputs on all other used
// ports, where the pairwise box-plus is
//   a [+] b = sign(a) sign(b) min(|a|,|b|) + f(|a+b|) - f(|a-b|),
//   f(x) = log(1 + exp(-x)), read from a small table (ldpc_pkg::f_corr).
// That pairwise rule is the document's. Extending it to DC inputs is this
// design's choice: a forward chain F[i] = q0 [+] ... [+] q(i-1) and a
// backward chain B[i] = q(DC-1) [+] ... [+] q(i+1), both folded one input at
// a time, and out[i] = F[i] [+] B[i] (either side is skipped when empty).
// Ports with en = 0 are absent from the check (their output is 0).
// Purely combinational; one check node per cycle.
module cnu
  import ldpc_pkg::*;
#(
  parameter int DC = 8      // ports (largest row degree served)
) (
  input  llr_t q  [DC],     // bit-to-check messages
  input  logic en [DC],     // port used by the current check
  output llr_t r  [DC]      // check-to-bit messages
);

  llr_t fwd  [DC];
  logic fwdv [DC];
  llr_t bwd  [DC];
  logic bwdv [DC];

  always_comb begin
    // forward: fwd[i] combines ports 0..i-1
    fwd[0]  = '0;
    fwdv[0] = 1'b0;
    for (int i = 1; i < DC; i++) begin
      if (!en[i-1])       begin fwd[i] = fwd[i-1];  fwdv[i] = fwdv[i-1]; end
      else if (!fwdv[i-1]) begin fwd[i] = q[i-1];   fwdv[i] = 1'b1;      end
      else                begin fwd[i] = f_boxplus(fwd[i-1], q[i-1]); fwdv[i] = 1'b1; end
    end
    // backward: bwd[i] combines ports i+1..DC-1
    bwd[DC-1]  = '0;
    bwdv[DC-1] = 1'b0;
    for (int i = DC - 2; i >= 0; i--) begin
      if (!en[i+1])        begin bwd[i] = bwd[i+1]; bwdv[i] = bwdv[i+1]; end
      else if (!bwdv[i+1]) begin bwd[i] = q[i+1];   bwdv[i] = 1'b1;      end
      else                 begin bwd[i] = f_boxplus(bwd[i+1], q[i+1]); bwdv[i] = 1'b1; end
    end
    for (int i = 0; i < DC; i++) begin
      if (!en[i])                r[i] = '0;
      else if (fwdv[i] && bwdv[i]) r[i] = f_boxplus(fwd[i], bwd[i]);
      else if (fwdv[i])          r[i] = fwd[i];
      else                       r[i] = bwd[i];
    end
  end

endmodule
