// exit_predictor: next-block predictor of the G-tile.
//
// A TRIPS block may have up to 8 exits (predicated branches), exactly one of
// which fires. Instead of predicting branches, the predictor predicts which
// exit will fire and then the target of that exit.
//   1. The local exit history table (LHT), indexed by block address, holds
//      the last 5 exits of that block, 2 bits of each exit number (10 bits).
//   2. The exit prediction table, indexed by the block address XOR the local
//      history, holds a 3-bit exit number and 2 hysteresis bits.
//   3. The target buffer, indexed by block address and predicted exit,
//      holds the target address and the branch type (branch, call, return).
//      Without a target the predictor falls through to the next block
//      address, BADDR + 5 chunks.
// Prediction is combinational on pred_addr. At commit the G-tile calls
// update with the exit that fired, its target and type: the prediction
// entry's hysteresis counts up on a correct exit and down on a wrong one and
// the entry takes the new exit when the count is zero; the history shifts in
// the exit; the target buffer is written.
//
// From the document: exit prediction with local exit history, 2 of the 3
// exit bits per history entry, 5 exits per history entry, exit IDs with
// hysteresis bits in the prediction table, target chosen by predicted branch
// type, predictor updated at commit. This design's own choices: table
// sizes, the index hash, 2 hysteresis bits, untagged tables. Not built: the
// global and choice histories, the speculative history update with its
// repair file, and the return address stack with call/return learning.
module exit_predictor
  import trips_pkg::*;
#(
  parameter int LHT_ENTRIES = 512,
  parameter int PT_ENTRIES  = 1024,
  parameter int TB_ENTRIES  = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  // prediction
  input  addr_t      pred_addr,
  output logic [2:0] pred_exit,
  output addr_t      pred_target,
  output bkind_e     pred_kind,
  // update at commit
  input  logic       upd_v,
  input  addr_t      upd_addr,
  input  logic [2:0] upd_exit,
  input  addr_t      upd_target,
  input  bkind_e     upd_kind
);

  localparam int LW = $clog2(LHT_ENTRIES);
  localparam int PW = $clog2(PT_ENTRIES);
  localparam int TW = $clog2(TB_ENTRIES);

  logic [9:0]  lht  [LHT_ENTRIES];
  logic [2:0]  pt_exit [PT_ENTRIES];
  logic [1:0]  pt_hyst [PT_ENTRIES];
  logic        tb_v  [TB_ENTRIES];
  addr_t       tb_tgt[TB_ENTRIES];
  bkind_e      tb_kind[TB_ENTRIES];

  // block addresses are chunk (128-byte) aligned
  function automatic logic [LW-1:0] lht_idx(addr_t a);
    return a[7 +: LW];
  endfunction
  function automatic logic [PW-1:0] pt_idx(addr_t a, logic [9:0] h);
    return a[7 +: PW] ^ PW'(h);
  endfunction
  function automatic logic [TW-1:0] tb_idx(addr_t a, logic [2:0] e);
    return a[7 +: TW] ^ TW'({e, 7'b0});
  endfunction

  logic [9:0] ph;
  logic [PW-1:0] pi;
  logic [TW-1:0] ti;
  assign ph        = lht[lht_idx(pred_addr)];
  assign pi        = pt_idx(pred_addr, ph);
  assign pred_exit = pt_exit[pi];
  assign ti        = tb_idx(pred_addr, pred_exit);
  assign pred_target = tb_v[ti] ? tb_tgt[ti] : pred_addr + addr_t'(5 * 128);
  assign pred_kind   = tb_v[ti] ? tb_kind[ti] : BK_BRANCH;

  logic [9:0] uh;
  logic [PW-1:0] ui;
  assign uh = lht[lht_idx(upd_addr)];
  assign ui = pt_idx(upd_addr, uh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LHT_ENTRIES; i++) lht[i] <= '0;
      for (int i = 0; i < PT_ENTRIES; i++) begin
        pt_exit[i] <= '0;
        pt_hyst[i] <= '0;
      end
      for (int i = 0; i < TB_ENTRIES; i++) begin
        tb_v[i]    <= 1'b0;
        tb_tgt[i]  <= '0;
        tb_kind[i] <= BK_BRANCH;
      end
    end else if (upd_v) begin
      lht[lht_idx(upd_addr)] <= {uh[7:0], upd_exit[1:0]};
      if (pt_exit[ui] == upd_exit) begin
        if (pt_hyst[ui] != 2'd3) pt_hyst[ui] <= pt_hyst[ui] + 2'd1;
      end else if (pt_hyst[ui] == 2'd0) begin
        pt_exit[ui] <= upd_exit;
      end else begin
        pt_hyst[ui] <= pt_hyst[ui] - 2'd1;
      end
      tb_v   [tb_idx(upd_addr, upd_exit)] <= 1'b1;
      tb_tgt [tb_idx(upd_addr, upd_exit)] <= upd_target;
      tb_kind[tb_idx(upd_addr, upd_exit)] <= upd_kind;
    end
  end

endmodule
