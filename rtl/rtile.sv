// rtile: one register tile (R-tile), the home of one of the four register
// banks of a TRIPS core.
//
// Bank B holds general registers B, B+4, B+8, ... for each of 4 threads:
// 32 registers x 4 threads = 128 registers. A block's header gives each bank
// up to 8 read and 8 write instructions; they arrive on the GDN and sit in a
// 64-entry read queue (RQ) and a 64-entry write queue (WQ), 8 frames x 8.
//
// Reads: a pending read first looks for a write to the same register in an
// older frame still in flight (register forwarding). The youngest such write
// supplies the value when it has arrived; if it has not, the read waits. A
// nullified write is skipped. Without an older write the register file is
// read. The value goes out on the OPN to the read's one or two targets, one
// packet per cycle. Pending reads are examined one per cycle, round-robin.
// Read targets are 8 bits with an implied top bit of 1: RT[7] picks operand
// 0 or 1 and RT[6:0] the instruction; an all-zero RT means no target.
//
// Writes: an OPN packet for write slot WID (bank WID[1:0], slot WID[4:2])
// fills its WQ entry. When the header of a frame has been dispatched and all
// its valid writes have arrived, the tile reports the frame complete on the
// GSN, with the exception bit if any write carried an exception token. A GCN
// commit copies the frame's non-null writes into the register file and is
// acknowledged on the GSN one cycle later; a flush only clears the frame.
//
// From the document: bank interleaving, 128 registers per tile, 64-entry RQ
// and WQ (8 frames x 8), forwarding of in-flight values, per-block write
// completion, commit with acknowledgement, read target encoding. This
// design's own choices: one read examined per cycle, each R-tile reports to
// the G-tile directly rather than through a chain from the farthest R-tile,
// and a debug port that reads or writes the register file when idle.
module rtile
  import trips_pkg::*;
#(
  parameter int BANK = 0,
  parameter int NREG = 128      // registers in this bank (32 x 4 threads)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  gdn_reg_t              gdn,
  input  logic [1:0]            gdn_thread,
  input  gcn_t                  gcn,
  input  frame_t                oldest_frame,
  input  logic                  opn_in_valid,
  input  opn_pkt_t              opn_in,
  output logic                  opn_in_hold,
  output logic                  opn_out_valid,
  output opn_pkt_t              opn_out,
  input  logic                  opn_out_hold,
  // GSN
  output logic                  gsn_done_v,
  output frame_t                gsn_done_frame,
  output logic                  gsn_done_exc,
  output logic                  gsn_ack_v,
  output frame_t                gsn_ack_frame,
  // register file access port (architected-register access while halted)
  input  logic                  dbg_we,
  input  logic [$clog2(NREG)-1:0] dbg_addr,
  input  word_t                 dbg_wdata,
  output word_t                 dbg_rdata,
  output logic                  ev_forward
);

  localparam int NQ = NUM_FRAMES * SLOTS;
  localparam int RW = $clog2(NREG);

  word_t rf [NREG];

  // read queue
  logic          rq_pend [NQ];
  logic [RW-1:0] rq_reg  [NQ];
  logic [7:0]    rq_rt   [NQ][2];
  // write queue
  logic          wq_v    [NQ];
  logic [RW-1:0] wq_reg  [NQ];
  logic          wq_arr  [NQ];
  word_t         wq_val  [NQ];
  logic          wq_nul  [NQ];
  logic          wq_exc  [NQ];

  logic [NUM_FRAMES-1:0] hdr_done, reported;

  assign opn_in_hold = 1'b0;

  // ---------------------------------------------------------------- read select
  logic [5:0] rr;
  logic       cand_v;
  logic [5:0] cand;
  always_comb begin
    cand_v = 1'b0;
    cand   = '0;
    for (int k = 0; k < NQ; k++) begin
      logic [5:0] e;
      e = rr + 6'(k);
      if (!cand_v && rq_pend[e]) begin
        cand_v = 1'b1;
        cand   = e;
      end
    end
  end

  // forwarding search for the candidate: youngest older frame with a write
  logic   f_hit, f_wait;
  word_t  f_val;
  always_comb begin
    frame_t cf;
    logic [2:0] age;    // frames between oldest and the candidate
    cf     = cand[5:3];
    age    = cf - oldest_frame;
    f_hit  = 1'b0;
    f_wait = 1'b0;
    f_val  = '0;
    for (int k = 0; k < NUM_FRAMES; k++) begin
      frame_t f;
      f = oldest_frame + 3'(k);
      for (int s = 0; s < SLOTS; s++) begin
        logic [5:0] e;
        e = {f, 3'(s)};
        if (3'(k) < age) begin
          if (wq_v[e] && wq_reg[e] == rq_reg[cand]) begin
            if (!wq_arr[e]) begin
              f_wait = 1'b1;  f_hit = 1'b0;
            end else if (!wq_nul[e]) begin
              f_wait = 1'b0;  f_hit = 1'b1;  f_val = wq_val[e];
            end
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- read send stage
  logic       sv;          // a read value is being sent
  frame_t     s_frame;
  word_t      s_val;
  logic [7:0] s_rt [2];
  logic [1:0] s_left;      // targets still to send

  logic s_busy_next;
  logic s_pick;            // which target goes now
  assign s_pick = !s_left[0];

  always_comb begin
    logic [7:0] rt;
    rt             = s_rt[s_pick];
    opn_out        = '0;
    opn_out_valid  = sv && s_left != 2'b00;
    opn_out.ptype  = PT_GENERIC;
    opn_out.frame  = s_frame;
    opn_out.tgt    = {1'b1, rt};
    opn_out.data   = s_val;
    opn_out.dx     = 3'(iid_x(rt[6:0])) + 3'd1;
    opn_out.dy     = 3'(iid_y(rt[6:0])) + 3'd1;
  end

  logic sent;
  assign sent        = opn_out_valid && !opn_out_hold;
  assign s_busy_next = sv && !(sent && (s_left == 2'b01 || s_left == 2'b10));

  logic go;                // candidate resolves and leaves the queue now
  assign go = cand_v && !f_wait && !s_busy_next && !(gcn.flush && gcn.mask[cand[5:3]]);

  // ---------------------------------------------------------------- completion
  logic [NUM_FRAMES-1:0] complete;
  logic [NUM_FRAMES-1:0] cexc;
  always_comb begin
    for (int f = 0; f < NUM_FRAMES; f++) begin
      complete[f] = hdr_done[f] && !reported[f];
      cexc[f]     = 1'b0;
      for (int s = 0; s < SLOTS; s++) begin
        if (wq_v[f*SLOTS+s] && !wq_arr[f*SLOTS+s]) complete[f] = 1'b0;
        if (wq_v[f*SLOTS+s] && wq_exc[f*SLOTS+s])  cexc[f] = 1'b1;
      end
    end
  end

  always_comb begin
    gsn_done_v     = 1'b0;
    gsn_done_frame = '0;
    gsn_done_exc   = 1'b0;
    for (int f = NUM_FRAMES - 1; f >= 0; f--) begin
      if (complete[f]) begin
        gsn_done_v     = 1'b1;
        gsn_done_frame = 3'(f);
        gsn_done_exc   = cexc[f];
      end
    end
  end

  assign dbg_rdata  = rf[dbg_addr];
  assign ev_forward = go && f_hit;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) rf[r] <= '0;
      for (int e = 0; e < NQ; e++) begin
        rq_pend[e] <= 1'b0;  rq_reg[e] <= '0;  rq_rt[e][0] <= '0;  rq_rt[e][1] <= '0;
        wq_v[e] <= 1'b0;  wq_reg[e] <= '0;  wq_arr[e] <= 1'b0;
        wq_val[e] <= '0;  wq_nul[e] <= 1'b0;  wq_exc[e] <= 1'b0;
      end
      hdr_done  <= '0;
      reported  <= '0;
      rr        <= '0;
      sv        <= 1'b0;
      s_frame   <= '0;
      s_val     <= '0;
      s_rt[0]   <= '0;
      s_rt[1]   <= '0;
      s_left    <= '0;
      gsn_ack_v <= 1'b0;
      gsn_ack_frame <= '0;
    end else begin
      // header dispatch
      if (gdn.valid) begin
        logic [5:0] e;
        e = {gdn.frame, gdn.slot};
        rq_pend[e]  <= gdn.rd[21];
        rq_reg[e]   <= RW'({gdn_thread, gdn.rd[20:16]});
        rq_rt[e][0] <= gdn.rd[15:8];
        rq_rt[e][1] <= gdn.rd[7:0];
        wq_v[e]     <= gdn.wr[5];
        wq_reg[e]   <= RW'({gdn_thread, gdn.wr[4:0]});
        if (gdn.slot == 3'd7) hdr_done[gdn.frame] <= 1'b1;
      end
      // write arrivals
      if (opn_in_valid && opn_in.ptype == PT_GENERIC && tgt_is_write(opn_in.tgt)) begin
        logic [5:0] e;
        e = {opn_in.frame, opn_in.tgt[4:2]};
        wq_arr[e] <= 1'b1;
        wq_val[e] <= opn_in.data;
        wq_nul[e] <= opn_in.null_t;
        wq_exc[e] <= opn_in.exc;
      end
      if (gsn_done_v) reported[gsn_done_frame] <= 1'b1;
      // read processing
      if (cand_v) rr <= go ? cand + 6'd1 : (f_wait ? cand + 6'd1 : rr);
      if (sent) s_left[s_pick] <= 1'b0;
      if (sv && !s_busy_next) sv <= 1'b0;
      if (go) begin
        rq_pend[cand] <= 1'b0;
        sv            <= (rq_rt[cand][0] != 0) || (rq_rt[cand][1] != 0);
        s_frame       <= cand[5:3];
        s_val         <= f_hit ? f_val : rf[rq_reg[cand]];
        s_rt[0]       <= rq_rt[cand][0];
        s_rt[1]       <= rq_rt[cand][1];
        s_left        <= {rq_rt[cand][1] != 0, rq_rt[cand][0] != 0};
      end
      // commit and flush
      gsn_ack_v <= 1'b0;
      if (gcn.commit || gcn.flush) begin
        for (int f = 0; f < NUM_FRAMES; f++) begin
          if (gcn.mask[f]) begin
            for (int s = 0; s < SLOTS; s++) begin
              if (gcn.commit && wq_v[f*SLOTS+s] && wq_arr[f*SLOTS+s] && !wq_nul[f*SLOTS+s])
                rf[wq_reg[f*SLOTS+s]] <= wq_val[f*SLOTS+s];
              rq_pend[f*SLOTS+s] <= 1'b0;
              wq_v[f*SLOTS+s]    <= 1'b0;
              wq_arr[f*SLOTS+s]  <= 1'b0;
            end
            hdr_done[f] <= 1'b0;
            reported[f] <= 1'b0;
          end
        end
        if (sv && gcn.flush && gcn.mask[s_frame]) sv <= 1'b0;
        if (gcn.commit) begin
          gsn_ack_v <= 1'b1;
          for (int f = NUM_FRAMES - 1; f >= 0; f--)
            if (gcn.mask[f]) gsn_ack_frame <= 3'(f);
        end
      end
      if (dbg_we) rf[dbg_addr] <= dbg_wdata;
    end
  end

endmodule
