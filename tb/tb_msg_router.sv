// tb_msg_router: checks the edge-to-unit wiring against connections worked
// out here directly from the base matrix. For random group pairs (both
// allowed overlaps and single groups) and offsets, random memory data and
// unit results are applied; every edge's write enable, address and write
// data, and every unit port's input and enable, are compared.
`timescale 1ns/1ps
module tb_msg_router;
  import ldpc_pkg::*;

  logic          cnu_act = 0, bnu_act = 0;
  logic [1:0]    cnu_grp = '0, bnu_grp = '0;
  logic [ZW-1:0] off_c = '0, off_b = '0;
  llr_t          mem_rdata [NE];
  logic          mem_we    [NE];
  logic [ZW-1:0] mem_addr  [NE];
  llr_t          mem_wdata [NE];
  llr_t          cnu_q  [RPG][DC_MAX];
  logic          cnu_en [RPG][DC_MAX];
  llr_t          cnu_r  [RPG][DC_MAX];
  llr_t          bnu_r  [CPG][DV_MAX];
  logic          bnu_en [CPG][DV_MAX];
  llr_t          bnu_q  [CPG][DV_MAX];
  int checks = 0, failures = 0;

  msg_router dut (.*);

  // edge numbering: row-major over non-zero blocks
  int eid [NBR][NBC];
  initial begin
    int n = 0;
    for (int i = 0; i < NBR; i++)
      for (int j = 0; j < NBC; j++)
        if (HB[i][j] >= 0) begin eid[i][j] = n; n++; end else eid[i][j] = -1;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #1;
    for (int n = 0; n < 3000; n++) begin
      automatic int mode = n % 4;
      bnu_act = (mode != 3);
      cnu_act = (mode != 1);
      case (mode)
        0: begin bnu_grp = 2'd2; cnu_grp = 2'd0; end
        1: begin bnu_grp = 2'($urandom_range(0, 2)); cnu_grp = 2'd0; end
        2: begin bnu_grp = 2'd0; cnu_grp = 2'd2; end
        default: begin cnu_grp = 2'($urandom_range(0, 2)); bnu_grp = 2'd0; end
      endcase
      off_c = ZW'($urandom_range(0, Z - 1));
      off_b = ZW'($urandom_range(0, Z - 1));
      for (int e = 0; e < NE; e++) mem_rdata[e] = llr_t'($urandom);
      for (int k = 0; k < RPG; k++) for (int p = 0; p < DC_MAX; p++) cnu_r[k][p] = llr_t'($urandom);
      for (int k = 0; k < CPG; k++) for (int p = 0; p < DV_MAX; p++) bnu_q[k][p] = llr_t'($urandom);
      #1;
      // memory side
      for (int i = 0; i < NBR; i++) begin
        automatic int rp = 0;
        for (int j = 0; j < NBC; j++) if (HB[i][j] >= 0) begin
          automatic int e = eid[i][j];
          automatic int cp = 0;
          automatic bit hc = cnu_act && (i / RPG == int'(cnu_grp));
          automatic bit hb = bnu_act && (j / CPG == int'(bnu_grp));
          for (int a = 0; a < i; a++) if (HB[a][j] >= 0) cp++;
          chk(mem_we[e] == (hc || hb), $sformatf("we edge %0d", e));
          if (hc) begin
            chk(mem_addr[e] == off_c, "cnu address");
            chk(mem_wdata[e] == cnu_r[i % RPG][rp], "cnu write data");
          end else if (hb) begin
            chk(int'(mem_addr[e]) == (int'(off_b) - HB[i][j] + Z) % Z, "bnu address");
            chk(mem_wdata[e] == bnu_q[j % CPG][cp], "bnu write data");
          end
          rp++;
        end
      end
      // unit side
      for (int k = 0; k < RPG; k++) begin
        automatic int i = int'(cnu_grp) * RPG + k;
        automatic int p = 0;
        for (int j = 0; j < NBC; j++) if (HB[i][j] >= 0) begin
          chk(cnu_en[k][p] == cnu_act, "cnu enable");
          chk(cnu_q[k][p] == mem_rdata[eid[i][j]], "cnu input");
          p++;
        end
        for (; p < DC_MAX; p++) chk(!cnu_en[k][p], "cnu unused port");
      end
      for (int k = 0; k < CPG; k++) begin
        automatic int j = int'(bnu_grp) * CPG + k;
        automatic int p = 0;
        for (int i = 0; i < NBR; i++) if (HB[i][j] >= 0) begin
          chk(bnu_en[k][p] == bnu_act, "bnu enable");
          chk(bnu_r[k][p] == mem_rdata[eid[i][j]], "bnu input");
          p++;
        end
        for (; p < DV_MAX; p++) chk(!bnu_en[k][p], "bnu unused port");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
