// ldpc_ctrl: frame sequencing and the overlapped node-update schedule.
//
// A frame goes through three phases. LOAD: in_ready is high until N = 648
// samples have been accepted; the SNR-scaled samples are written to Storage I
// in arrival order (bit c of block column j is sample j*Z + c). DECODE: the
// reordered min-sum-correct flow, bit-node update first, then check-node
// update, repeated. Time is cut into slots of Z cycles; in each cycle of a
// slot the active BNU group handles one bit offset t and the active CNU group
// one check offset t. The slot pattern, four slots per iteration instead of
// six, is
//   phase 0: BNU1 (+ CNU3 of the previous iteration, not in the first pass)
//   phase 1: BNU2
//   phase 2: BNU3 + CNU1
//   phase 3: CNU2
// so BNU3 overlaps CNU1 and BNU1 overlaps CNU3, the pairs that share no
// block of the reordered matrix. The first bit-node pass (pass 0) runs with
// bnu_init set, i.e. with all check messages taken as zero, so the channel
// hard decision is checked before any check-node update. At the last cycle
// of every bit-node pass (phase 2, t = Z-1) the decoder stops if all parity
// checks hold or max_iter check-node passes have been done; otherwise it
// continues. OUTPUT: out_start is pulsed to the output buffer, whose
// out_last returns the controller to LOAD. out_iters is the number of
// check-node passes the frame used and out_parity_ok whether its word
// satisfies every check. Decoding takes (4*iters + 3)*Z cycles.
// The group pattern is the document's schedule; slot length, stop test
// position and frame handshake are this design's reading of it.
module ldpc_ctrl
  import ldpc_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // input side
  input  logic                   in_valid,
  output logic                   in_ready,
  input  logic                   snr_valid,     // scaled sample available
  output logic                   wr_en,
  output logic [$clog2(NBC)-1:0] wr_col,
  output logic [ZW-1:0]          wr_off,
  input  logic [4:0]             max_iter,      // sampled at decode start
  // schedule
  output logic                   bnu_act,
  output logic [1:0]             bnu_grp,
  output logic                   bnu_init,
  output logic                   cnu_act,
  output logic [1:0]             cnu_grp,
  output logic [ZW-1:0]          off,
  output logic                   pass_start,
  input  logic                   synd_zero_nxt,
  // output side
  output logic                   out_start,
  input  logic                   out_last,
  output logic [4:0]             out_iters,
  output logic                   out_parity_ok
);

  typedef enum logic [1:0] {S_LOAD, S_DEC, S_OUT} state_t;
  state_t state;

  logic [$clog2(N+1)-1:0] acc_cnt;
  logic [1:0]             phase;
  logic [4:0]             pass;
  logic [4:0]             max_l;

  assign in_ready = (state == S_LOAD) && (acc_cnt < ($clog2(N+1))'(N));
  assign wr_en    = snr_valid;

  always_comb begin
    bnu_act    = (state == S_DEC) && (phase != 2'd3);
    bnu_grp    = phase;
    bnu_init   = (pass == '0);
    cnu_act    = (state == S_DEC) &&
                 ((phase == 2'd2) || (phase == 2'd3) || (phase == 2'd0 && pass != '0));
    unique case (phase)
      2'd2:    cnu_grp = 2'd0;
      2'd3:    cnu_grp = 2'd1;
      default: cnu_grp = 2'd2;
    endcase
    pass_start = (state == S_DEC) && (phase == 2'd0) && (off == '0);
  end

  logic last_wr;
  assign last_wr = snr_valid && (wr_col == $clog2(NBC)'(NBC - 1)) && (wr_off == ZW'(Z - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_LOAD;
      acc_cnt       <= '0;
      wr_col        <= '0;
      wr_off        <= '0;
      phase         <= '0;
      pass          <= '0;
      off           <= '0;
      max_l         <= '0;
      out_start     <= 1'b0;
      out_iters     <= '0;
      out_parity_ok <= 1'b0;
    end else begin
      out_start <= 1'b0;
      unique case (state)
        S_LOAD: begin
          if (in_valid && in_ready) acc_cnt <= acc_cnt + 1'b1;
          if (snr_valid) begin
            if (wr_off == ZW'(Z - 1)) begin
              wr_off <= '0;
              wr_col <= wr_col + 1'b1;
            end else begin
              wr_off <= wr_off + 1'b1;
            end
          end
          if (last_wr) begin
            state  <= S_DEC;
            wr_col <= '0;
            phase  <= '0;
            pass   <= '0;
            off    <= '0;
            max_l  <= max_iter;
          end
        end
        S_DEC: begin
          if (off == ZW'(Z - 1)) begin
            off <= '0;
            if (phase == 2'd2) begin
              if (synd_zero_nxt || pass == max_l) begin
                state         <= S_OUT;
                out_start     <= 1'b1;
                out_iters     <= pass;
                out_parity_ok <= synd_zero_nxt;
              end else begin
                phase <= 2'd3;
              end
            end else if (phase == 2'd3) begin
              phase <= 2'd0;
              pass  <= pass + 1'b1;
            end else begin
              phase <= phase + 1'b1;
            end
          end else begin
            off <= off + 1'b1;
          end
        end
        default: begin  // S_OUT
          if (out_last) begin
            state   <= S_LOAD;
            acc_cnt <= '0;
          end
        end
      endcase
    end
  end

  // Only groups that share no block may be active together.
  a_disjoint: assert property (@(posedge clk) disable iff (!rst_n)
                               (bnu_act && cnu_act) |-> f_disjoint(int'(bnu_grp), int'(cnu_grp)));

endmodule
