// dtile: one data tile (D-tile) of a TRIPS core. The four D-tiles split the
// data address space by 64-byte line (line address bits [7:6] pick the tile).
//
// Load/store queue: 256 entries, one per frame (8) and load/store ID (32),
// direct-mapped and non-associative as in the prototype. Stores are kept in
// the queue until their block commits. A load reads the data array and lays
// over it, byte by byte, every store already in the queue that comes before
// it in program order (older frames, then lower LSIDs of its own frame), so
// an earlier store's data is forwarded to the load.
//
// Dependence prediction: a 1024-bit table indexed by a hash of the load's
// block address and LSID. A load predicted dependent is deferred until every
// earlier store of the program has arrived, then replayed. When a store
// arrives and finds a later load to an overlapping byte that already ran, the
// tile reports a load/store violation for the oldest such load's frame (the
// G-tile flushes and refetches from there) and sets that load's predictor
// bit. The table is flash-cleared after DEP_CLEAR_BLOCKS committed blocks.
// dep_mode: 0 regular (use the predictor), 1 serial (defer every load),
// 2 override (never defer).
//
// Store counting: at dispatch each D-tile records the block's 32-bit store
// mask. A store arrival is counted locally and broadcast to the other three
// D-tiles on the data status network (DSN); a frame's stores are complete
// when every bit of its mask has arrived (a null store counts). The tile
// reports completion on the GSN (in the core, D-tile 0's report is used).
// On a GCN commit the frame's stores held here are written into the data
// array in LSID order, one per cycle, then the commit is acknowledged.
// Replies to loads wait in a 4-entry queue for the OPN; the tile holds its
// OPN input while that queue could overflow. Queued replies of a flushed
// frame are dropped.
//
// From the document: line interleaving, 256-entry LSQ with 32 per block,
// 1024-bit PC-based dependence predictor with deferral, flash clear and the
// three speculation modes, store mask and store counting across D-tiles,
// commit in LSID order one store per cycle per tile, commit acknowledgement.
// This design's own choices: the data array is 8 KB of directly addressed
// storage (address bits [14:8] and [5:3]); there are no tags, misses, MSHRs,
// DTLB or merge buffer, so every access hits. The DSN is one cycle.
// Accesses are naturally aligned.
module dtile
  import trips_pkg::*;
#(
  parameter int ROW              = 0,
  parameter int DWORDS           = 1024,   // 8 KB data array
  parameter int DEP_BITS         = 1024,
  parameter int DEP_CLEAR_BLOCKS = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // block dispatch (GDN)
  input  logic                  disp_v,
  input  frame_t                disp_frame,
  input  logic [31:0]           disp_smask,
  input  addr_t                 disp_baddr,
  input  gcn_t                  gcn,
  input  frame_t                oldest_frame,
  input  logic [1:0]            dep_mode,
  // OPN
  input  logic                  opn_in_valid,
  input  opn_pkt_t              opn_in,
  output logic                  opn_in_hold,
  output logic                  opn_out_valid,
  output opn_pkt_t              opn_out,
  input  logic                  opn_out_hold,
  // DSN
  output logic                  dsn_out_v,
  output frame_t                dsn_out_frame,
  output logic [4:0]            dsn_out_lsid,
  input  logic [3:0]            dsn_in_v,
  input  frame_t                dsn_in_frame [4],
  input  logic [4:0]            dsn_in_lsid  [4],
  // GSN
  output logic                  gsn_done_v,
  output frame_t                gsn_done_frame,
  output logic                  gsn_ack_v,
  output frame_t                gsn_ack_frame,
  output logic                  viol_v,
  output frame_t                viol_frame,
  // data array access port
  input  logic                  dbg_we,
  input  logic [$clog2(DWORDS)-1:0] dbg_addr,
  input  word_t                 dbg_wdata,
  output word_t                 dbg_rdata,
  // events
  output logic                  ev_lsq_fwd,
  output logic                  ev_deferred,
  output logic                  ev_violation,
  output logic                  ev_store_commit
);

  localparam int NQ = NUM_FRAMES * NUM_LSID;
  localparam int MW = $clog2(DWORDS);
  localparam int PW = $clog2(DEP_BITS);

  word_t mem [DWORDS];
  logic  dep [DEP_BITS];

  // LSQ, indexed {frame, lsid}
  logic        q_v     [NQ];   // a load or store occupies the entry
  logic        q_st    [NQ];
  logic        q_done  [NQ];   // load executed / store holds data
  logic        q_defer [NQ];   // load waiting for earlier stores
  logic [36:0] q_dw    [NQ];   // doubleword address, addr[39:3]
  logic [7:0]  q_be    [NQ];   // byte enables
  word_t       q_data  [NQ];   // store data, aligned to the doubleword
  logic        q_nul   [NQ];
  opn_pkt_t    q_pkt   [NQ];   // deferred load's packet

  logic [31:0] smask   [NUM_FRAMES];
  logic [31:0] arrived [NUM_FRAMES];
  logic [NUM_FRAMES-1:0] live, reported;
  addr_t       baddr   [NUM_FRAMES];

  // ------------------------------------------------------------ helpers
  function automatic logic [7:0] bytes_of(logic [1:0] sz, logic [2:0] off);
    logic [7:0] m;
    case (sz)
      2'd0: m = 8'h01;
      2'd1: m = 8'h03;
      2'd2: m = 8'h0F;
      default: m = 8'hFF;
    endcase
    return m << off;
  endfunction

  function automatic logic [2:0] age_of(frame_t f, frame_t old);
    return f - old;
  endfunction

  // all stores before (frame f, lsid l) have arrived
  function automatic logic prior_stores_in(frame_t f, logic [4:0] l,
      logic [NUM_FRAMES-1:0] lv, logic [31:0] sm [NUM_FRAMES],
      logic [31:0] ar [NUM_FRAMES], frame_t old);
    logic ok;
    ok = ((sm[f] & ~ar[f]) & ((32'd1 << l) - 32'd1)) == 32'd0;
    for (int k = 0; k < NUM_FRAMES; k++) begin
      frame_t g;
      g = frame_t'(k);
      if (lv[g] && age_of(g, old) < age_of(f, old) && (sm[g] & ~ar[g]) != 32'd0)
        ok = 1'b0;
    end
    return ok;
  endfunction

  function automatic logic [PW-1:0] dep_idx(addr_t ba, logic [4:0] l);
    return PW'(ba[AW-1:7] ^ (AW-7)'({l, 5'b0}) ^ (AW-7)'(l));
  endfunction

  // ------------------------------------------------------------ load execution
  // the load executed this cycle: a new arrival or a woken deferred load
  logic       in_load, in_store;
  assign in_load  = opn_in_valid && !opn_in_hold && opn_in.ptype == PT_LOAD;
  assign in_store = opn_in_valid && !opn_in_hold && opn_in.ptype == PT_STORE;

  logic       wake_v;
  logic [7:0] wake_idx;
  always_comb begin
    wake_v   = 1'b0;
    wake_idx = '0;
    for (int e = 0; e < NQ; e++) begin
      if (!wake_v && q_v[e] && q_defer[e] &&
          prior_stores_in(frame_t'(e / NUM_LSID), 5'(e % NUM_LSID), live, smask, arrived, oldest_frame)) begin
        wake_v   = 1'b1;
        wake_idx = 8'(e);
      end
    end
  end

  logic     predict_dep;
  logic     defer_new;
  assign predict_dep = (dep_mode == 2'd1) ||
                       (dep_mode == 2'd0 && dep[dep_idx(baddr[opn_in.frame], opn_in.lsid)]);
  assign defer_new = in_load && predict_dep &&
                     !prior_stores_in(opn_in.frame, opn_in.lsid, live, smask, arrived, oldest_frame);

  logic     lx_v;        // a load executes now
  opn_pkt_t lx;
  assign lx_v = (in_load && !defer_new) || (wake_v && !in_load);
  assign lx   = (in_load && !defer_new) ? opn_in : q_pkt[wake_idx];

  logic [7:0]  lx_be;
  logic [36:0] lx_dw;
  word_t       lx_word;
  logic        lx_fwd;
  word_t       lx_val;
  assign lx_be = bytes_of(mem_size(lx.op), lx.addr[2:0]);
  assign lx_dw = lx.addr[AW-1:3];

  always_comb begin
    logic [2:0] lage;
    word_t w;
    lage   = age_of(lx.frame, oldest_frame);
    w      = mem[MW'({lx.addr[14:8], lx.addr[5:3]})];
    lx_fwd = 1'b0;
    // oldest first, so that the youngest earlier store is laid on last
    for (int k = 0; k < NUM_FRAMES; k++) begin
      frame_t g;
      g = oldest_frame + 3'(k);
      for (int l = 0; l < NUM_LSID; l++) begin
        int e;
        e = int'(g) * NUM_LSID + l;
        if (q_v[e] && q_st[e] && q_done[e] && !q_nul[e] && q_dw[e] == lx_dw &&
            (3'(k) < lage || (g == lx.frame && 5'(l) < lx.lsid)) &&
            (live[g])) begin
          for (int b = 0; b < 8; b++) begin
            if (q_be[e][b] && lx_be[b]) begin
              w[b*8 +: 8] = q_data[e][b*8 +: 8];
              lx_fwd = 1'b1;
            end
          end
        end
      end
    end
    lx_word = w >> {lx.addr[2:0], 3'b000};
    case (mem_size(lx.op))
      2'd0: lx_val = mem_signed(lx.op) ? word_t'(64'(signed'(lx_word[7:0])))  : word_t'(lx_word[7:0]);
      2'd1: lx_val = mem_signed(lx.op) ? word_t'(64'(signed'(lx_word[15:0]))) : word_t'(lx_word[15:0]);
      2'd2: lx_val = mem_signed(lx.op) ? word_t'(64'(signed'(lx_word[31:0]))) : word_t'(lx_word[31:0]);
      default: lx_val = lx_word;
    endcase
  end

  // ------------------------------------------------------------ violation check
  logic   vio_v;
  frame_t vio_frame;
  logic [7:0] vio_idx;
  always_comb begin
    logic [2:0] sage;
    logic [7:0] sbe;
    sage      = age_of(opn_in.frame, oldest_frame);
    sbe       = bytes_of(mem_size(opn_in.op), opn_in.addr[2:0]);
    vio_v     = 1'b0;
    vio_frame = '0;
    vio_idx   = '0;
    for (int k = 0; k < NUM_FRAMES; k++) begin
      frame_t g;
      g = oldest_frame + 3'(k);
      for (int l = 0; l < NUM_LSID; l++) begin
        int e;
        e = int'(g) * NUM_LSID + l;
        if (!vio_v && in_store && !opn_in.null_t && q_v[e] && !q_st[e] && q_done[e] &&
            q_dw[e] == opn_in.addr[AW-1:3] && (q_be[e] & sbe) != 8'h00 &&
            (3'(k) > sage || (g == opn_in.frame && 5'(l) > opn_in.lsid))) begin
          vio_v     = 1'b1;
          vio_frame = g;
          vio_idx   = 8'(e);
        end
      end
    end
  end

  // ------------------------------------------------------------ reply queue
  opn_pkt_t rq [4];
  logic       rq_dead [4];   // reply of a flushed frame, dropped at the head
  logic [1:0] rq_rd, rq_wr;
  logic [2:0] rq_n;
  logic       rq_push, rq_pop;

  opn_pkt_t reply;
  always_comb begin
    reply        = '0;
    reply.ptype  = PT_GENERIC;
    reply.frame  = lx.frame;
    reply.tgt    = lx.tgt;
    reply.data   = lx_val;
    reply.null_t = lx.null_t;
    reply.exc    = lx.exc;
    if (tgt_is_write(lx.tgt)) begin
      reply.dx = 3'(lx.tgt[1:0]) + 3'd1;
      reply.dy = 3'd0;
    end else begin
      reply.dx = 3'(iid_x(lx.tgt[6:0])) + 3'd1;
      reply.dy = 3'(iid_y(lx.tgt[6:0])) + 3'd1;
    end
  end

  assign rq_push       = lx_v && tgt_valid(lx.tgt) && !(gcn.flush && gcn.mask[lx.frame]);
  assign opn_out_valid = rq_n != 0 && !rq_dead[rq_rd];
  assign opn_out       = rq[rq_rd];
  assign rq_pop        = rq_n != 0 && (rq_dead[rq_rd] || !opn_out_hold);
  assign opn_in_hold   = rq_n >= 3'd3;

  // ------------------------------------------------------------ store commit
  logic       cm_v;        // committing a frame
  frame_t     cm_frame;
  logic       cm_has;
  logic [4:0] cm_lsid;
  always_comb begin
    cm_has  = 1'b0;
    cm_lsid = '0;
    for (int l = 0; l < NUM_LSID; l++) begin
      int e;
      e = int'(cm_frame) * NUM_LSID + l;
      if (!cm_has && q_v[e] && q_st[e]) begin
        cm_has  = 1'b1;
        cm_lsid = 5'(l);
      end
    end
  end

  // ------------------------------------------------------------ completion
  always_comb begin
    gsn_done_v     = 1'b0;
    gsn_done_frame = '0;
    for (int f = NUM_FRAMES - 1; f >= 0; f--) begin
      if (live[f] && !reported[f] && (smask[f] & ~arrived[f]) == 32'd0) begin
        gsn_done_v     = 1'b1;
        gsn_done_frame = 3'(f);
      end
    end
  end

  assign dsn_out_v     = in_store;
  assign dsn_out_frame = opn_in.frame;
  assign dsn_out_lsid  = opn_in.lsid;
  // the violation report is registered; one against a frame flushed in the
  // same cycle is dropped
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      viol_v     <= 1'b0;
      viol_frame <= '0;
    end else begin
      viol_v     <= vio_v && !(gcn.flush && gcn.mask[vio_frame]);
      viol_frame <= vio_frame;
    end
  end
  assign dbg_rdata     = mem[dbg_addr];
  assign ev_lsq_fwd    = lx_v && lx_fwd;
  assign ev_deferred   = defer_new;
  assign ev_violation  = vio_v;
  assign ev_store_commit = cm_v && cm_has;

  logic [$clog2(DEP_CLEAR_BLOCKS+1)-1:0] blocks;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DWORDS; i++) mem[i] <= '0;
      for (int i = 0; i < DEP_BITS; i++) dep[i] <= 1'b0;
      for (int e = 0; e < NQ; e++) begin
        q_v[e] <= 1'b0;  q_st[e] <= 1'b0;  q_done[e] <= 1'b0;  q_defer[e] <= 1'b0;
        q_dw[e] <= '0;   q_be[e] <= '0;    q_data[e] <= '0;    q_nul[e] <= 1'b0;
        q_pkt[e] <= '0;
      end
      for (int f = 0; f < NUM_FRAMES; f++) begin
        smask[f] <= '0;  arrived[f] <= '0;  baddr[f] <= '0;
      end
      live <= '0;  reported <= '0;
      for (int i = 0; i < 4; i++) begin
        rq[i]      <= '0;
        rq_dead[i] <= 1'b0;
      end
      rq_rd <= '0;  rq_wr <= '0;  rq_n <= '0;
      cm_v <= 1'b0;  cm_frame <= '0;
      gsn_ack_v <= 1'b0;  gsn_ack_frame <= '0;
      blocks <= '0;
    end else begin
      gsn_ack_v <= 1'b0;
      if (disp_v) begin
        smask[disp_frame]   <= disp_smask;
        arrived[disp_frame] <= '0;
        baddr[disp_frame]   <= disp_baddr;
        live[disp_frame]    <= 1'b1;
        reported[disp_frame] <= 1'b0;
      end
      if (gsn_done_v) reported[gsn_done_frame] <= 1'b1;
      // store arrivals, local and from the other D-tiles
      if (in_store) arrived[opn_in.frame][opn_in.lsid] <= 1'b1;
      for (int t = 0; t < 4; t++)
        if (t != ROW && dsn_in_v[t]) arrived[dsn_in_frame[t]][dsn_in_lsid[t]] <= 1'b1;
      if (in_store) begin
        logic [7:0] e;
        e = {opn_in.frame, opn_in.lsid};
        q_v[e]    <= 1'b1;
        q_st[e]   <= 1'b1;
        q_done[e] <= 1'b1;
        q_defer[e] <= 1'b0;
        q_dw[e]   <= opn_in.addr[AW-1:3];
        q_be[e]   <= bytes_of(mem_size(opn_in.op), opn_in.addr[2:0]);
        q_data[e] <= opn_in.data << {opn_in.addr[2:0], 3'b000};
        q_nul[e]  <= opn_in.null_t;
      end
      if (vio_v) dep[dep_idx(baddr[vio_frame], 5'(vio_idx % NUM_LSID))] <= 1'b1;
      // loads
      if (defer_new) begin
        q_v[{opn_in.frame, opn_in.lsid}]     <= 1'b1;
        q_st[{opn_in.frame, opn_in.lsid}]    <= 1'b0;
        q_done[{opn_in.frame, opn_in.lsid}]  <= 1'b0;
        q_defer[{opn_in.frame, opn_in.lsid}] <= 1'b1;
        q_pkt[{opn_in.frame, opn_in.lsid}]   <= opn_in;
      end
      if (lx_v) begin
        q_v[{lx.frame, lx.lsid}]     <= 1'b1;
        q_st[{lx.frame, lx.lsid}]    <= 1'b0;
        q_done[{lx.frame, lx.lsid}]  <= 1'b1;
        q_defer[{lx.frame, lx.lsid}] <= 1'b0;
        q_dw[{lx.frame, lx.lsid}]    <= lx_dw;
        q_be[{lx.frame, lx.lsid}]    <= lx_be;
      end
      // reply queue
      if (gcn.flush)
        for (int i = 0; i < 4; i++)
          if (gcn.mask[rq[i].frame]) rq_dead[i] <= 1'b1;
      if (rq_push) begin
        rq_dead[rq_wr] <= 1'b0;
        rq[rq_wr] <= reply;
        rq_wr     <= rq_wr + 2'd1;
      end
      if (rq_pop) rq_rd <= rq_rd + 2'd1;
      rq_n <= rq_n + 3'(rq_push) - 3'(rq_pop);
      // commit: write stores in LSID order, then acknowledge
      if (gcn.commit) begin
        cm_v <= 1'b1;
        for (int f = NUM_FRAMES - 1; f >= 0; f--)
          if (gcn.mask[f]) cm_frame <= 3'(f);
      end
      if (cm_v) begin
        if (cm_has) begin
          logic [7:0] e;
          e = {cm_frame, cm_lsid};
          if (!q_nul[e])
            for (int b = 0; b < 8; b++)
              if (q_be[e][b])
                mem[MW'({q_dw[e][11:5], q_dw[e][2:0]})][b*8 +: 8] <= q_data[e][b*8 +: 8];
          q_v[e] <= 1'b0;
        end else begin
          cm_v          <= 1'b0;
          gsn_ack_v     <= 1'b1;
          gsn_ack_frame <= cm_frame;
          live[cm_frame] <= 1'b0;
          for (int l = 0; l < NUM_LSID; l++) begin
            q_v[int'(cm_frame) * NUM_LSID + l]     <= 1'b0;
            q_defer[int'(cm_frame) * NUM_LSID + l] <= 1'b0;
          end
          if (32'(blocks) == DEP_CLEAR_BLOCKS - 1) begin
            blocks <= '0;
            for (int i = 0; i < DEP_BITS; i++) dep[i] <= 1'b0;
          end else begin
            blocks <= blocks + 1'b1;
          end
        end
      end
      // flush
      if (gcn.flush) begin
        for (int f = 0; f < NUM_FRAMES; f++) begin
          if (gcn.mask[f]) begin
            live[f]    <= 1'b0;
            arrived[f] <= '0;
            smask[f]   <= '0;
            for (int l = 0; l < NUM_LSID; l++) begin
              q_v[f * NUM_LSID + l]     <= 1'b0;
              q_defer[f * NUM_LSID + l] <= 1'b0;
            end
          end
        end
      end
      if (dbg_we) mem[dbg_addr] <= dbg_wdata;
    end
  end

endmodule
