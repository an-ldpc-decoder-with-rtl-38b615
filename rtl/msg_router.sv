// msg_router: interconnect between the edge memories and the node units.
//
// Each cycle at most one CNU group (four block rows, one check row per unit)
// and one BNU group (eight block columns, one bit per unit) are active, at
// offsets off_c and off_b within their Z-row / Z-column slices. Every edge
// memory belongs to exactly one block row and one block column, so it is
// connected to at most one unit port: to port EDGE_RPOS of the CNU serving
// its row when that row's group is active (address off_c), or to port
// EDGE_CPOS of the BNU serving its column when that column's group is
// active (address (off_b - shift) mod Z, the check row that bit c of a
// circulant shifted by 'shift' meets). The write-back of the unit's result
// goes to the same address. The two cases never coincide because the
// controller only pairs disjoint groups (BNU1 with CNU3, BNU3 with CNU1).
// The document asks for this flexible interconnect; the wiring is derived
// here from the reordered base matrix. Purely combinational.
module msg_router
  import ldpc_pkg::*;
(
  input  logic          cnu_act,
  input  logic [1:0]    cnu_grp,
  input  logic [ZW-1:0] off_c,
  input  logic          bnu_act,
  input  logic [1:0]    bnu_grp,
  input  logic [ZW-1:0] off_b,
  // edge memories
  input  llr_t          mem_rdata [NE],
  output logic          mem_we    [NE],
  output logic [ZW-1:0] mem_addr  [NE],
  output llr_t          mem_wdata [NE],
  // check-node units
  output llr_t          cnu_q  [RPG][DC_MAX],
  output logic          cnu_en [RPG][DC_MAX],
  input  llr_t          cnu_r  [RPG][DC_MAX],
  // bit-node units
  output llr_t          bnu_r  [CPG][DV_MAX],
  output logic          bnu_en [CPG][DV_MAX],
  input  llr_t          bnu_q  [CPG][DV_MAX]
);

  // Memory side: one owner per edge. Address and write data are produced
  // in separate processes: the data depends, through the units, on what
  // the address reads.
  logic hit_c [NE];
  logic hit_b [NE];

  always_comb begin
    for (int e = 0; e < NE; e++) begin
      hit_c[e]    = cnu_act && int'(cnu_grp) == EDGE_ROW[e] / RPG;
      hit_b[e]    = bnu_act && int'(bnu_grp) == EDGE_COL[e] / CPG;
      mem_we[e]   = hit_c[e] || hit_b[e];
      mem_addr[e] = hit_c[e] ? off_c
                  : hit_b[e] ? f_submod(off_b, EDGE_SHIFT[e]) : '0;
    end
  end

  always_comb begin
    for (int e = 0; e < NE; e++)
      mem_wdata[e] = hit_c[e] ? cnu_r[EDGE_ROW[e] % RPG][EDGE_RPOS[e]]
                   : hit_b[e] ? bnu_q[EDGE_COL[e] % CPG][EDGE_CPOS[e]] : '0;
  end

  // Unit side: ports of the active group's rows / columns.
  always_comb begin
    for (int k = 0; k < RPG; k++)
      for (int p = 0; p < DC_MAX; p++) begin
        cnu_q[k][p]  = '0;
        cnu_en[k][p] = 1'b0;
        for (int g = 0; g < NGRP; g++)
          if (int'(cnu_grp) == g && CNU_EDGE[(g * RPG + k) * DC_MAX + p] >= 0) begin
            cnu_q[k][p]  = mem_rdata[CNU_EDGE[(g * RPG + k) * DC_MAX + p]];
            cnu_en[k][p] = cnu_act;
          end
      end
    for (int k = 0; k < CPG; k++)
      for (int p = 0; p < DV_MAX; p++) begin
        bnu_r[k][p]  = '0;
        bnu_en[k][p] = 1'b0;
        for (int g = 0; g < NGRP; g++)
          if (int'(bnu_grp) == g && BNU_EDGE[(g * CPG + k) * DV_MAX + p] >= 0) begin
            bnu_r[k][p]  = mem_rdata[BNU_EDGE[(g * CPG + k) * DV_MAX + p]];
            bnu_en[k][p] = bnu_act;
          end
      end
  end

endmodule
