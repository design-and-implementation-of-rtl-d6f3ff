// trips_core: one TRIPS processor core, the tiles of a TRIPS EDGE processor
// wired together.
//
// Tile layout (row, column) on the 5x5 operand network (OPN):
//
//        col 0   col 1  col 2  col 3  col 4        I-tiles (column -1)
//   row0   G       R0     R1     R2     R3          I-hdr
//   row1   D0      E      E      E      E           I0
//   row2   D1      E      E      E      E           I1
//   row3   D2      E      E      E      E           I2
//   row4   D3      E      E      E      E           I3
//
// The G-tile fetches a block: all five I-tiles stream the block's 8 rows, the
// header I-tile to the R-tiles (reads and writes, GDN) and to the G-tile
// (store mask), each instruction I-tile to its row of E-tiles, one
// instruction per E-tile per cycle. Dispatch rows of a frame that is no
// longer live (flushed) are dropped. Register reads leave the R-tiles as OPN
// packets, instructions fire in dataflow order in the E-tiles, loads and
// stores go to the D-tile that owns the line, register writes return to the
// R-tiles and the branch to the G-tile. R-tiles and D-tile 0 report
// completion and all R/D tiles acknowledge commit on the global status
// network (GSN, point-to-point wires here); the G-tile's commit and flush
// commands reach every tile on the global control network (GCN, a broadcast
// here). The D-tiles share store arrivals over the DSN, a one-cycle
// broadcast.
//
// Ports outside the core: a refill port writes the I-tile arrays (standing
// in for the OCN refill path), an access port reads and writes the data
// arrays of the D-tiles, and another the architected registers of thread 0.
// `events` has one strobe per mechanism for observation:
//   [0] local bypass   [1] remote operand  [2] OPN stall on hold
//   [3] predicate bubble [4] register forward [5] LSQ forward
//   [6] deferred load  [7] violation       [8] store commit
//   [9] block commit  [10] flush          [11] misprediction
//  [12] deallocation  [13] an OPN router input queue full (hold raised)
//
// From the document: the tile set and layout (G, R x4, I x5, D x4, E x16),
// the OPN joining 25 tiles, the networks between tiles. This design's own
// choices: GDN, GCN, GSN and DSN as direct wires of one cycle or less, the
// store-mask nibble order, and the access ports.
module trips_core
  import trips_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  // control
  input  logic          start,
  input  addr_t         start_pc,
  input  logic [3:0]    max_frames,
  input  logic [1:0]    dep_mode,
  output logic          running,
  output logic          halted,
  output logic [31:0]   blocks_committed,
  // instruction refill: tile 0 header, 1..4 instruction rows 0..3
  input  logic          refill_we,
  input  logic [2:0]    refill_tile,
  input  logic [9:0]    refill_addr,
  input  logic [127:0]  refill_data,
  // data array access: tile = address bits [7:6], index = {[14:8],[5:3]}
  input  logic          dmem_we,
  input  logic [1:0]    dmem_tile,
  input  logic [9:0]    dmem_addr,
  input  word_t         dmem_wdata,
  output word_t         dmem_rdata,
  // architected registers of thread 0, GR 0..127
  input  logic          reg_we,
  input  logic [6:0]    reg_addr,
  input  word_t         reg_wdata,
  output word_t         reg_rdata,
  output logic [13:0]   events
);

  // ----------------------------------------------------------- OPN mesh
  logic [4:0] r_in_v   [5][5];
  opn_pkt_t   r_in_p   [5][5][5];
  logic [4:0] r_in_h   [5][5];
  logic [4:0] r_out_v  [5][5];
  opn_pkt_t   r_out_p  [5][5][5];
  logic [4:0] r_out_h  [5][5];

  // local tile side of each router
  logic       t_out_v [5][5];
  opn_pkt_t   t_out_p [5][5];
  logic       t_in_h  [5][5];

  gcn_t   gcn;
  frame_t oldest;
  logic [NUM_FRAMES-1:0] live;

  for (genvar y = 0; y < 5; y++) begin : g_row
    for (genvar x = 0; x < 5; x++) begin : g_col
      // neighbour links: port p meets the neighbour's port (p+2)%5
      for (genvar p = 0; p < 4; p++) begin : g_port
        localparam int NY = (p == 0) ? y - 1 : (p == 2) ? y + 1 : y;
        localparam int NX = (p == 1) ? x + 1 : (p == 3) ? x - 1 : x;
        localparam int Q  = (p + 2) % 4;
        if (NY >= 0 && NY < 5 && NX >= 0 && NX < 5) begin : g_link
          assign r_in_v[y][x][p]  = r_out_v[NY][NX][Q];
          assign r_in_p[y][x][p]  = r_out_p[NY][NX][Q];
          assign r_out_h[y][x][p] = r_in_h[NY][NX][Q];
        end else begin : g_edge
          assign r_in_v[y][x][p]  = 1'b0;
          assign r_in_p[y][x][p]  = '0;
          assign r_out_h[y][x][p] = 1'b1;
        end
      end
      assign r_in_v[y][x][4]  = t_out_v[y][x];
      assign r_in_p[y][x][4]  = t_out_p[y][x];
      assign r_out_h[y][x][4] = t_in_h[y][x];

      opn_router #(.X(x), .Y(y)) u_router (
        .clk, .rst_n,
        .flush_mask (gcn.flush ? gcn.mask : '0),
        .in_valid   (r_in_v[y][x]),
        .in_pkt     (r_in_p[y][x]),
        .in_hold    (r_in_h[y][x]),
        .out_valid  (r_out_v[y][x]),
        .out_pkt    (r_out_p[y][x]),
        .out_hold   (r_out_h[y][x])
      );
    end
  end

  // ----------------------------------------------------------- I-tiles
  logic         fetch_v;
  frame_t       fetch_frame;
  addr_t        fetch_addr;
  logic [4:0]   it_busy;
  logic         it_row_v   [5];
  logic [2:0]   it_row_fr  [5];
  logic [2:0]   it_row_idx [5];
  logic [127:0] it_row     [5];

  for (genvar i = 0; i < 5; i++) begin : g_itile
    itile u_itile (
      .clk, .rst_n,
      .fetch_v     (fetch_v),
      .fetch_frame (fetch_frame),
      .fetch_slot  (fetch_addr[13:7]),
      .busy        (it_busy[i]),
      .abort_mask  (gcn.flush ? gcn.mask : '0),
      .row_v       (it_row_v[i]),
      .row_frame   (it_row_fr[i]),
      .row_idx     (it_row_idx[i]),
      .row_data    (it_row[i]),
      .refill_we   (refill_we && refill_tile == 3'(i)),
      .refill_addr (refill_addr),
      .refill_data (refill_data)
    );
  end

  // ----------------------------------------------------------- G-tile
  logic [3:0] r_done_v, r_done_exc, r_ack_v, d_ack_v, d_viol_v;
  frame_t     r_done_fr [4], r_ack_fr [4], d_ack_fr [4], d_viol_fr [4];
  logic       d_done_v  [4];
  frame_t     d_done_fr [4];
  logic       disp_v;
  frame_t     disp_frame;
  logic [31:0] disp_smask;
  addr_t      disp_baddr;
  logic       hdr_live;
  logic       ev_commit, ev_flush, ev_mispredict, ev_gviol, ev_dealloc;

  assign hdr_live = it_row_v[0] && live[it_row_fr[0]];

  gtile u_gtile (
    .clk, .rst_n,
    .start, .start_pc, .max_frames, .running, .halted,
    .fetch_v, .fetch_frame, .fetch_addr_o (fetch_addr),
    .itile_busy   (|it_busy),
    .hdr_v        (hdr_live),
    .hdr_frame    (it_row_fr[0]),
    .hdr_row      (it_row_idx[0]),
    .hdr_nibbles  ({it_row[0][127:124], it_row[0][95:92], it_row[0][63:60], it_row[0][31:28]}),
    .disp_v, .disp_frame, .disp_smask, .disp_baddr,
    .opn_in_valid (r_out_v[0][0][4]),
    .opn_in       (r_out_p[0][0][4]),
    .opn_in_hold  (t_in_h[0][0]),
    .gcn, .oldest_frame (oldest), .frame_live (live),
    .r_done_v, .r_done_frame (r_done_fr), .r_done_exc,
    .r_ack_v, .r_ack_frame (r_ack_fr),
    .d_done_v (d_done_v[0]), .d_done_frame (d_done_fr[0]),
    .d_ack_v, .d_ack_frame (d_ack_fr),
    .d_viol_v, .d_viol_frame (d_viol_fr),
    .blocks_committed,
    .ev_commit, .ev_flush, .ev_mispredict, .ev_violation (ev_gviol), .ev_dealloc
  );
  assign t_out_v[0][0] = 1'b0;      // the G-tile only receives on the OPN
  assign t_out_p[0][0] = '0;

  // ----------------------------------------------------------- R-tiles
  word_t      r_dbg_rdata [4];
  logic [3:0] ev_fwd;
  for (genvar b = 0; b < 4; b++) begin : g_rtile
    gdn_reg_t gr;
    assign gr.valid = hdr_live;
    assign gr.frame = it_row_fr[0];
    assign gr.slot  = it_row_idx[0];
    assign gr.rd    = it_row[0][b*32+6 +: 22];
    assign gr.wr    = it_row[0][b*32 +: 6];

    rtile #(.BANK(b)) u_rtile (
      .clk, .rst_n,
      .gdn            (gr),
      .gdn_thread     (2'd0),
      .gcn,
      .oldest_frame   (oldest),
      .opn_in_valid   (r_out_v[0][b+1][4]),
      .opn_in         (r_out_p[0][b+1][4]),
      .opn_in_hold    (t_in_h[0][b+1]),
      .opn_out_valid  (t_out_v[0][b+1]),
      .opn_out        (t_out_p[0][b+1]),
      .opn_out_hold   (r_in_h[0][b+1][4]),
      .gsn_done_v     (r_done_v[b]),
      .gsn_done_frame (r_done_fr[b]),
      .gsn_done_exc   (r_done_exc[b]),
      .gsn_ack_v      (r_ack_v[b]),
      .gsn_ack_frame  (r_ack_fr[b]),
      .dbg_we         (reg_we && reg_addr[1:0] == 2'(b)),
      .dbg_addr       ({2'b00, reg_addr[6:2]}),
      .dbg_wdata      (reg_wdata),
      .dbg_rdata      (r_dbg_rdata[b]),
      .ev_forward     (ev_fwd[b])
    );
  end
  assign reg_rdata = r_dbg_rdata[reg_addr[1:0]];

  // ----------------------------------------------------------- D-tiles
  logic       dsn_v  [4];
  frame_t     dsn_fr [4];
  logic [4:0] dsn_ls [4];
  logic [3:0] dsn_q_v;
  frame_t     dsn_q_fr [4];
  logic [4:0] dsn_q_ls [4];
  word_t      d_dbg_rdata [4];
  logic [3:0] ev_lsqf, ev_defer, ev_dviol, ev_scommit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsn_q_v <= '0;
      for (int t = 0; t < 4; t++) begin
        dsn_q_fr[t] <= '0;
        dsn_q_ls[t] <= '0;
      end
    end else begin
      for (int t = 0; t < 4; t++) begin
        dsn_q_v[t]  <= dsn_v[t];
        dsn_q_fr[t] <= dsn_fr[t];
        dsn_q_ls[t] <= dsn_ls[t];
      end
    end
  end

  for (genvar d = 0; d < 4; d++) begin : g_dtile
    dtile #(.ROW(d)) u_dtile (
      .clk, .rst_n,
      .disp_v, .disp_frame, .disp_smask, .disp_baddr,
      .gcn, .oldest_frame (oldest), .dep_mode,
      .opn_in_valid   (r_out_v[d+1][0][4]),
      .opn_in         (r_out_p[d+1][0][4]),
      .opn_in_hold    (t_in_h[d+1][0]),
      .opn_out_valid  (t_out_v[d+1][0]),
      .opn_out        (t_out_p[d+1][0]),
      .opn_out_hold   (r_in_h[d+1][0][4]),
      .dsn_out_v      (dsn_v[d]),
      .dsn_out_frame  (dsn_fr[d]),
      .dsn_out_lsid   (dsn_ls[d]),
      .dsn_in_v       (dsn_q_v),
      .dsn_in_frame   (dsn_q_fr),
      .dsn_in_lsid    (dsn_q_ls),
      .gsn_done_v     (d_done_v[d]),
      .gsn_done_frame (d_done_fr[d]),
      .gsn_ack_v      (d_ack_v[d]),
      .gsn_ack_frame  (d_ack_fr[d]),
      .viol_v         (d_viol_v[d]),
      .viol_frame     (d_viol_fr[d]),
      .dbg_we         (dmem_we && dmem_tile == 2'(d)),
      .dbg_addr       (dmem_addr),
      .dbg_wdata      (dmem_wdata),
      .dbg_rdata      (d_dbg_rdata[d]),
      .ev_lsq_fwd     (ev_lsqf[d]),
      .ev_deferred    (ev_defer[d]),
      .ev_violation   (ev_dviol[d]),
      .ev_store_commit(ev_scommit[d])
    );
  end
  assign dmem_rdata = d_dbg_rdata[dmem_tile];

  // ----------------------------------------------------------- E-tiles
  logic [15:0] ev_issue, ev_lb, ev_rem, ev_stall, ev_bub;
  for (genvar ey = 0; ey < 4; ey++) begin : g_erow
    for (genvar ex = 0; ex < 4; ex++) begin : g_ecol
      gdn_inst_t gi;
      assign gi.valid = it_row_v[ey+1] && live[it_row_fr[ey+1]];
      assign gi.frame = it_row_fr[ey+1];
      assign gi.slot  = it_row_idx[ey+1];
      assign gi.inst  = it_row[ey+1][ex*32 +: 32];

      etile #(.EX(ex), .EY(ey)) u_etile (
        .clk, .rst_n,
        .gdn            (gi),
        .gcn,
        .oldest_frame   (oldest),
        .opn_in_valid   (r_out_v[ey+1][ex+1][4]),
        .opn_in         (r_out_p[ey+1][ex+1][4]),
        .opn_in_hold    (t_in_h[ey+1][ex+1]),
        .opn_out_valid  (t_out_v[ey+1][ex+1]),
        .opn_out        (t_out_p[ey+1][ex+1]),
        .opn_out_hold   (r_in_h[ey+1][ex+1][4]),
        .ev_issue       (ev_issue[ey*4+ex]),
        .ev_local_bypass(ev_lb[ey*4+ex]),
        .ev_remote      (ev_rem[ey*4+ex]),
        .ev_opn_stall   (ev_stall[ey*4+ex]),
        .ev_pred_bubble (ev_bub[ey*4+ex])
      );
    end
  end

  // a router input queue is full and holds its sender
  logic any_hold;
  always_comb begin
    any_hold = 1'b0;
    for (int y = 0; y < 5; y++)
      for (int x = 0; x < 5; x++)
        any_hold |= |r_in_h[y][x];
  end

  assign events = {any_hold, ev_dealloc, ev_mispredict, ev_flush, ev_commit,
                   |ev_scommit, |ev_dviol, |ev_defer, |ev_lsqf, |ev_fwd,
                   |ev_bub, |ev_stall, |ev_rem, |ev_lb};

endmodule
