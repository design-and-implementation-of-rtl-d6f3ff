// gtile: global control tile (G-tile) of a TRIPS core.
//
// The G-tile maps blocks onto the eight frames of the execution array, which
// it manages as a circular queue: frames are allocated at the tail when a
// block is fetched and freed at the head (the oldest block) after commit.
// Per frame it keeps the state listed by the document: V (valid), BADDR and
// NADDR (block and predicted next-block address), RC/SC/BC (registers,
// stores, branch completed), E (exception), CS (commit sent), RCT/SCT
// (registers/stores committed), M (misprediction), UC (predictor updated).
// O and Y (oldest, youngest) follow from the head and tail pointers. L (load
// violation) never lingers here: a violation flushes at once.
//
//   Fetch   - when a frame is free, fewer than max_frames blocks are in
//             flight and the I-tiles are idle, send a fetch command for
//             fetch_addr and ask the exit predictor for the next address.
//   Header  - rows 0 and 1 of the header chunk carry the 32-bit store mask
//             in their upper nibbles; after row 1 the mask, frame and block
//             address go to the D-tiles.
//   Resolve - a branch arrives on the OPN as a PC write: the target is
//             BADDR + 128 x offset (BRO, CALLO) or the operand (BR, CALL,
//             RET). If it differs from NADDR the younger frames are flushed
//             and fetching restarts at the target.
//   Violate - a D-tile's load/store violation flushes the violating frame and
//             all younger ones and refetches the violating block.
//   Commit  - Commit <= V & O & RC & SC & BC & ~E & ~CS. The cycle after the
//             condition is detected the GCN carries the commit and the
//             predictor is updated. R-tile and D-tile acknowledgements set
//             RCT and SCT; Dealloc <= V & O & CS & RCT & SCT & UC frees the
//             frame one cycle later.
//   Halt    - when the oldest block has completed with an exception (for
//             instance a system call) the G-tile flushes the younger blocks,
//             stops fetching and raises halted.
// A flush and a commit never share a GCN cycle; the flush goes first.
//
// From the document: the per-frame state and the Commit and Dealloc
// equations, the circular frame queue, 8 frames, the commit pipeline
// (detect, send with predictor update, acknowledgements, deallocation), the
// completion sources (R-tiles on the GSN, D-tile 0 for stores, the branch on
// the OPN), flush on misprediction and on violation, halt on exception,
// branch offsets in chunks, number of blocks in flight set by software.
// This design's own choices: the store-mask nibble layout, one cycle per
// step, each R-tile reporting directly. Not built: ITLB, I-cache directory
// and refill, T-morph (4 threads), the architected-register interface,
// the ESN.
module gtile
  import trips_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,          // begin at start_pc
  input  addr_t                 start_pc,
  input  logic [3:0]            max_frames,     // blocks in flight, 1..8
  output logic                  running,
  output logic                  halted,
  // fetch command to the I-tiles
  output logic                  fetch_v,
  output frame_t                fetch_frame,
  output addr_t                 fetch_addr_o,
  input  logic                  itile_busy,
  // block header from the header I-tile
  input  logic                  hdr_v,
  input  frame_t                hdr_frame,
  input  logic [2:0]            hdr_row,
  input  logic [15:0]           hdr_nibbles,    // upper nibbles of H(4r)..H(4r+3)
  // block dispatch to the D-tiles
  output logic                  disp_v,
  output frame_t                disp_frame,
  output logic [31:0]           disp_smask,
  output addr_t                 disp_baddr,
  // OPN (branches)
  input  logic                  opn_in_valid,
  input  opn_pkt_t              opn_in,
  output logic                  opn_in_hold,
  // GCN
  output gcn_t                  gcn,
  output frame_t                oldest_frame,
  output logic [NUM_FRAMES-1:0] frame_live,
  // GSN
  input  logic [3:0]            r_done_v,
  input  frame_t                r_done_frame [4],
  input  logic [3:0]            r_done_exc,
  input  logic [3:0]            r_ack_v,
  input  frame_t                r_ack_frame  [4],
  input  logic                  d_done_v,       // from D-tile 0
  input  frame_t                d_done_frame,
  input  logic [3:0]            d_ack_v,
  input  frame_t                d_ack_frame  [4],
  input  logic [3:0]            d_viol_v,
  input  frame_t                d_viol_frame [4],
  // statistics
  output logic [31:0]           blocks_committed,
  output logic                  ev_commit,
  output logic                  ev_flush,
  output logic                  ev_mispredict,
  output logic                  ev_violation,
  output logic                  ev_dealloc
);

  // ---------------------------------------------------------- per-frame state
  logic [NUM_FRAMES-1:0] V, RC, SC, BC, E, CS, SCT, RCT, M, UC;
  logic [3:0]  rc_bits [NUM_FRAMES];
  logic [3:0]  rct_bits[NUM_FRAMES];
  logic [3:0]  sct_bits[NUM_FRAMES];
  addr_t       BADDR [NUM_FRAMES];
  addr_t       NADDR [NUM_FRAMES];
  addr_t       ATGT  [NUM_FRAMES];   // resolved target
  logic [2:0]  AEXIT [NUM_FRAMES];
  bkind_e      AKIND [NUM_FRAMES];
  logic [31:0] smask [NUM_FRAMES];

  frame_t     head, tail;
  logic [3:0] count;
  addr_t      fetch_addr;

  assign oldest_frame = head;
  assign frame_live   = V;
  assign opn_in_hold  = 1'b0;

  logic     bq_v;
  opn_pkt_t bq;

  // ---------------------------------------------------------- predictor
  logic [2:0] p_exit;
  addr_t      p_target;
  bkind_e     p_kind;
  logic       upd_v;

  exit_predictor u_pred (
    .clk, .rst_n,
    .pred_addr  (fetch_addr),
    .pred_exit  (p_exit),
    .pred_target(p_target),
    .pred_kind  (p_kind),
    .upd_v      (upd_v),
    .upd_addr   (BADDR[head]),
    .upd_exit   (AEXIT[head]),
    .upd_target (ATGT[head]),
    .upd_kind   (AKIND[head])
  );

  function automatic logic [2:0] age(frame_t f, frame_t h);
    return f - h;
  endfunction

  // ---------------------------------------------------------- branch resolution
  logic   br_v;
  frame_t br_f;
  addr_t  br_tgt;
  bkind_e br_kind;
  always_comb begin
    br_v    = bq_v && bq.ptype == PT_PC_WRITE && V[bq.frame];
    br_f    = bq.frame;
    br_kind = (bq.op == OP_CALL || bq.op == OP_CALLO) ? BK_CALL :
              (bq.op == OP_RET) ? BK_RET : BK_BRANCH;
    if (bq.op == OP_BRO || bq.op == OP_CALLO)
      br_tgt = BADDR[br_f] + addr_t'({bq.data[AW-8:0], 7'b0});
    else
      br_tgt = bq.data[AW-1:0];
  end

  // a misprediction: the target differs from what was fetched next
  logic br_mis;
  logic br_youngest;
  assign br_youngest = (br_f + 3'd1) == tail;
  assign br_mis = br_v && !bq.exc && (br_tgt != NADDR[br_f]);

  // violation: oldest reporting frame
  logic   vi_v;
  frame_t vi_f;
  always_comb begin
    vi_v = 1'b0;
    vi_f = '0;
    for (int t = 0; t < 4; t++) begin
      if (d_viol_v[t] && V[d_viol_frame[t]] &&
          (!vi_v || age(d_viol_frame[t], head) < age(vi_f, head))) begin
        vi_v = 1'b1;
        vi_f = d_viol_frame[t];
      end
    end
  end

  // halt: oldest block completed with an exception
  logic halt_now;
  assign halt_now = running && V[head] && RC[head] && SC[head] && BC[head] && E[head];

  // flush: first frame to flush (inclusive) and where to refetch
  logic   fl_v;
  frame_t fl_from;
  addr_t  fl_addr;
  always_comb begin
    fl_v    = 1'b0;
    fl_from = '0;
    fl_addr = '0;
    if (br_mis && !br_youngest) begin
      fl_v    = 1'b1;
      fl_from = br_f + 3'd1;
      fl_addr = br_tgt;
    end
    if (vi_v && (!fl_v || age(vi_f, head) < age(fl_from, head))) begin
      fl_v    = 1'b1;
      fl_from = vi_f;
      fl_addr = BADDR[vi_f];
    end
    if (halt_now && count > 4'd1) begin
      fl_v    = 1'b1;
      fl_from = head + 3'd1;
      fl_addr = fetch_addr;
    end
  end

  logic [NUM_FRAMES-1:0] fl_mask;
  always_comb begin
    fl_mask = '0;
    for (int f = 0; f < NUM_FRAMES; f++)
      if (fl_v && V[f] && age(frame_t'(f), head) >= age(fl_from, head)) fl_mask[f] = 1'b1;
  end

  // branch packets from the OPN are registered first; a packet of a frame
  // being flushed in the cycle it arrives is dropped
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bq_v <= 1'b0;
      bq   <= '0;
    end else begin
      bq_v <= opn_in_valid && !(fl_v && fl_mask[opn_in.frame]);
      bq   <= opn_in;
    end
  end

  // ---------------------------------------------------------- commit
  logic commit_ok, cdet;
  assign commit_ok = V[head] && RC[head] && SC[head] && BC[head] && !E[head] && !CS[head];
  logic commit_send;
  assign commit_send = cdet && commit_ok && !fl_v;
  assign upd_v       = commit_send;
  logic dealloc;
  assign dealloc = V[head] && CS[head] && RCT[head] && SCT[head] && UC[head];

  // ---------------------------------------------------------- fetch
  logic can_fetch;
  assign can_fetch = running && !halted && !fl_v && count < max_frames &&
                     count < 4'(NUM_FRAMES) && !itile_busy && !halt_now &&
                     !(br_mis && br_youngest);
  assign fetch_v      = can_fetch;
  assign fetch_frame  = tail;
  assign fetch_addr_o = fetch_addr;

  always_comb begin
    gcn = '0;
    if (fl_v) begin
      gcn.flush = 1'b1;
      gcn.mask  = fl_mask;
    end else if (commit_send) begin
      gcn.commit = 1'b1;
      gcn.mask   = NUM_FRAMES'(1) << head;
    end
  end

  // header: store mask from rows 0 and 1
  always_comb begin
    disp_v     = hdr_v && hdr_row == 3'd1 && V[hdr_frame];
    disp_frame = hdr_frame;
    disp_smask = {hdr_nibbles, smask[hdr_frame][15:0]};
    disp_baddr = BADDR[hdr_frame];
  end

  assign ev_commit     = commit_send;
  assign ev_flush      = fl_v;
  assign ev_mispredict = br_mis;
  assign ev_violation  = vi_v;
  assign ev_dealloc    = dealloc;

  // ---------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      V <= '0; RC <= '0; SC <= '0; BC <= '0; E <= '0; CS <= '0;
      SCT <= '0; RCT <= '0; M <= '0; UC <= '0;
      for (int f = 0; f < NUM_FRAMES; f++) begin
        rc_bits[f] <= '0; rct_bits[f] <= '0; sct_bits[f] <= '0;
        BADDR[f] <= '0; NADDR[f] <= '0; ATGT[f] <= '0; AEXIT[f] <= '0;
        AKIND[f] <= BK_BRANCH; smask[f] <= '0;
      end
      head <= '0;  tail <= '0;  count <= '0;
      fetch_addr <= '0;
      running <= 1'b0;  halted <= 1'b0;
      cdet <= 1'b0;
      blocks_committed <= '0;
    end else begin
      logic [3:0] cnt_n;
      cnt_n = count;
      cdet  <= commit_ok && !commit_send;
      if (start) begin
        running    <= 1'b1;
        halted     <= 1'b0;
        fetch_addr <= start_pc;
      end
      // GSN completions
      for (int t = 0; t < 4; t++) begin
        if (r_done_v[t]) begin
          rc_bits[r_done_frame[t]][t] <= 1'b1;
          if (r_done_exc[t]) E[r_done_frame[t]] <= 1'b1;
        end
        if (r_ack_v[t]) rct_bits[r_ack_frame[t]][t] <= 1'b1;
        if (d_ack_v[t]) sct_bits[d_ack_frame[t]][t] <= 1'b1;
      end
      for (int f = 0; f < NUM_FRAMES; f++) begin
        RC[f]  <= V[f] && (rc_bits[f] == 4'hF);
        RCT[f] <= V[f] && (rct_bits[f] == 4'hF);
        SCT[f] <= V[f] && (sct_bits[f] == 4'hF);
      end
      if (d_done_v && V[d_done_frame]) SC[d_done_frame] <= 1'b1;
      if (hdr_v && hdr_row == 3'd0) smask[hdr_frame][15:0] <= hdr_nibbles;
      // branch
      if (br_v) begin
        BC[br_f]    <= 1'b1;
        ATGT[br_f]  <= br_tgt;
        AEXIT[br_f] <= bq.lsid[2:0];
        AKIND[br_f] <= br_kind;
        if (bq.exc) E[br_f] <= 1'b1;
        if (br_mis) M[br_f] <= 1'b1;
        if (br_mis && br_youngest) fetch_addr <= br_tgt;
      end
      // commit
      if (commit_send) begin
        CS[head] <= 1'b1;
        UC[head] <= 1'b1;
        blocks_committed <= blocks_committed + 32'd1;
      end
      // deallocation
      if (dealloc) begin
        V[head]  <= 1'b0;  CS[head] <= 1'b0;  UC[head] <= 1'b0;
        RC[head] <= 1'b0;  SC[head] <= 1'b0;  BC[head] <= 1'b0;
        RCT[head] <= 1'b0; SCT[head] <= 1'b0; M[head] <= 1'b0; E[head] <= 1'b0;
        rc_bits[head] <= '0; rct_bits[head] <= '0; sct_bits[head] <= '0;
        head  <= head + 3'd1;
        cnt_n = cnt_n - 4'd1;
      end
      // flush
      if (fl_v) begin
        for (int f = 0; f < NUM_FRAMES; f++) begin
          if (fl_mask[f]) begin
            V[f] <= 1'b0;  RC[f] <= 1'b0;  SC[f] <= 1'b0;  BC[f] <= 1'b0;
            E[f] <= 1'b0;  CS[f] <= 1'b0;  M[f] <= 1'b0;   UC[f] <= 1'b0;
            RCT[f] <= 1'b0; SCT[f] <= 1'b0;
            rc_bits[f] <= '0; rct_bits[f] <= '0; sct_bits[f] <= '0;
          end
        end
        tail  <= fl_from;
        cnt_n = 4'(age(fl_from, head)) - (dealloc ? 4'd1 : 4'd0);
        fetch_addr <= fl_addr;
      end
      // fetch
      if (can_fetch) begin
        V[tail]     <= 1'b1;
        BADDR[tail] <= fetch_addr;
        NADDR[tail] <= p_target;
        rc_bits[tail] <= '0; rct_bits[tail] <= '0; sct_bits[tail] <= '0;
        RC[tail] <= 1'b0; SC[tail] <= 1'b0; BC[tail] <= 1'b0; E[tail] <= 1'b0;
        CS[tail] <= 1'b0; M[tail] <= 1'b0; UC[tail] <= 1'b0;
        RCT[tail] <= 1'b0; SCT[tail] <= 1'b0;
        tail       <= tail + 3'd1;
        fetch_addr <= p_target;
        cnt_n      = cnt_n + 4'd1;
      end
      if (halt_now && !fl_v) begin
        halted  <= 1'b1;
        running <= 1'b0;
      end
      count <= cnt_n;
    end
  end

endmodule
