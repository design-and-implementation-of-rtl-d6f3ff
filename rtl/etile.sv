// etile: one execution tile (E-tile) of the 4x4 TRIPS execution array.
//
// The tile holds 64 reservation stations, 8 slots for each of the 8 frames
// (blocks in flight). The global dispatch network (GDN) writes instructions
// into their slots; operands and predicates arrive independently, either on
// the operand network (OPN) or through the tile's own local bypass, and may
// arrive before their instruction. An instruction is ready when it has every
// operand it uses and, when predicated (PR=10 on false, PR=11 on true), a
// matching predicate; several predicates may arrive, and any matching one
// enables it (predicate OR-ing). Operands carrying a null or exception token
// make the result null or exceptional.
//
// Pipeline, two stages:
//   select  - a priority encoder picks one ready instruction, oldest frame
//             first and lowest slot first inside a frame. An operand that a
//             local bypass or an OPN packet delivers in this same cycle
//             already counts (early wakeup), so a local consumer executes in
//             the cycle right after its producer.
//   execute - the integer ALU computes the result in one cycle and the
//             targets are sent: at most one local target (bypass into this
//             tile's stations) and one remote target (OPN packet) per cycle.
//             LL and RR target pairs take 2 cycles, LR takes 1. While the
//             execute stage still has targets to send, selection waits.
// A bypassed predicate that turns out not to match is found in execute; that
// issue slot is lost (a bubble) and the instruction waits again.
// Loads and stores leave as OPN packets to the D-tile that owns the address
// (one 64-byte line per D-tile); branches leave as PC-write packets to the
// G-tile. A GCN commit or flush clears the stations of the named frames.
//
// From the document: 64 stations (8 frames x 8 slots), target format and the
// {Y, slot, X} placement of instruction IDs, predication and predicate
// OR-ing, null/exception tokens, slot-based priority, one local and one
// remote target per cycle, the bypass bubble, 1-cycle integer ALU, G/I/L/S/
// B/C formats. This design's own choices: oldest-frame-first priority across
// frames, XOP unused, branch offsets sent to the G-tile unscaled.
// Not built: MUL/DIV and the floating-point units, MOV3/MOV4 (formats not
// given), MFPC.
module etile
  import trips_pkg::*;
#(
  parameter int EX = 0,     // column in the E-tile array, 0..3
  parameter int EY = 0      // row in the E-tile array, 0..3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  gdn_inst_t             gdn,          // instruction dispatch
  input  gcn_t                  gcn,          // commit / flush
  input  frame_t                oldest_frame, // for select priority
  input  logic                  opn_in_valid, // from router local port
  input  opn_pkt_t              opn_in,
  output logic                  opn_in_hold,
  output logic                  opn_out_valid,// to router local port
  output opn_pkt_t              opn_out,
  input  logic                  opn_out_hold,
  // event strobes, for observation
  output logic                  ev_issue,
  output logic                  ev_local_bypass,
  output logic                  ev_remote,
  output logic                  ev_opn_stall,
  output logic                  ev_pred_bubble
);

  localparam int NE = NUM_FRAMES * SLOTS;     // 64 stations

  // ------------------------------------------------------------- stations
  logic        rs_inst_v [NE];
  logic [31:0] rs_inst   [NE];
  logic        rs_issued [NE];
  logic        rs_op_v   [NE][2];
  word_t       rs_op     [NE][2];
  logic        rs_op_nul [NE][2];
  logic        rs_op_exc [NE][2];
  logic        rs_pred_ok[NE];   // a matching predicate has arrived

  // ------------------------------------------------------------- operand writes
  // write port A: OPN, write port B: local bypass
  typedef struct packed {
    logic       v;
    logic [5:0] idx;    // {frame, slot}
    logic [1:0] ttype;
    word_t      val;
    logic       nul;
    logic       exc;
  } opw_t;

  opw_t wa, wb;

  assign opn_in_hold = 1'b0;  // operand buffers always have room

  always_comb begin
    wa     = '0;
    wa.v   = opn_in_valid && opn_in.ptype == PT_GENERIC && opn_in.tgt[8:7] != 2'b00;
    wa.idx = {opn_in.frame, iid_slot(opn_in.tgt[6:0])};
    wa.ttype = opn_in.tgt[8:7];
    wa.val = opn_in.data;
    wa.nul = opn_in.null_t;
    wa.exc = opn_in.exc;
  end

  // ------------------------------------------------------------- execute stage
  logic        ex_v;
  logic [5:0]  ex_idx;
  logic [1:0]  ex_done;      // targets already sent (T0, T1)

  logic [31:0] xi;
  logic [6:0]  xop;
  word_t       a, b, res;
  logic        r_nul, r_exc;
  logic        ex_enabled;
  logic signed [63:0] simm9, sconst;

  assign xi  = rs_inst[ex_idx];
  assign xop = xi[31:25];
  assign a   = rs_op[ex_idx][0];
  assign b   = rs_op[ex_idx][1];
  assign simm9  = 64'(signed'(xi[17:9]));
  assign sconst = 64'(signed'(xi[24:9]));

  function automatic logic cmp(logic [6:0] op, word_t x, word_t y);
    case (op)
      OP_TEQ, OP_TEQI:   return x == y;
      OP_TNE, OP_TNEI:   return x != y;
      OP_TLE, OP_TLEI:   return $signed(x) <= $signed(y);
      OP_TLEU, OP_TLEUI: return x <= y;
      OP_TLT, OP_TLTI:   return $signed(x) <  $signed(y);
      OP_TLTU, OP_TLTUI: return x <  y;
      OP_TGE, OP_TGEI:   return $signed(x) >= $signed(y);
      OP_TGEU, OP_TGEUI: return x >= y;
      OP_TGT, OP_TGTI:   return $signed(x) >  $signed(y);
      default:           return x >  y;   // TGTU, TGTUI
    endcase
  endfunction

  always_comb begin
    word_t y;
    y = (op_fmt(xop) == FMT_I) ? word_t'(simm9) : b;
    case (xop)
      OP_ADD, OP_ADDI: res = a + y;
      OP_SUB, OP_SUBI: res = a - y;
      OP_AND, OP_ANDI: res = a & y;
      OP_OR,  OP_ORI:  res = a | y;
      OP_XOR, OP_XORI: res = a ^ y;
      OP_SLL, OP_SLLI: res = a << y[5:0];
      OP_SRL, OP_SRLI: res = a >> y[5:0];
      OP_SRA, OP_SRAI: res = word_t'($signed(a) >>> y[5:0]);
      OP_EXTSB: res = word_t'(64'(signed'(a[7:0])));
      OP_EXTSH: res = word_t'(64'(signed'(a[15:0])));
      OP_EXTSW: res = word_t'(64'(signed'(a[31:0])));
      OP_EXTUB: res = word_t'(a[7:0]);
      OP_EXTUH: res = word_t'(a[15:0]);
      OP_EXTUW: res = word_t'(a[31:0]);
      OP_MOV:   res = a;
      OP_MOVI:  res = word_t'(simm9);
      OP_GENS:  res = word_t'(sconst);
      OP_GENU:  res = word_t'(xi[24:9]);
      OP_APP:   res = {a[47:0], xi[24:9]};
      OP_LB, OP_LBS, OP_LH, OP_LHS, OP_LW, OP_LWS, OP_LD,
      OP_SB, OP_SH, OP_SW, OP_SD: res = a + word_t'(simm9);   // address
      OP_BRO, OP_CALLO: res = word_t'(64'(signed'(xi[19:0])));  // chunks
      OP_BR, OP_CALL, OP_RET: res = a;
      default: res = word_t'(cmp(xop, a, y));                  // tests
    endcase
    r_nul = (op_needs0(xop) && rs_op_nul[ex_idx][0]) ||
            (op_needs1(xop) && rs_op_nul[ex_idx][1]) || xop == OP_NULL;
    r_exc = (op_needs0(xop) && rs_op_exc[ex_idx][0]) ||
            (op_needs1(xop) && rs_op_exc[ex_idx][1]) || xop == OP_SCALL;
    if (op_fmt(xop) == FMT_C) ex_enabled = 1'b1;
    else if (!xi[24]) ex_enabled = 1'b1;
    else ex_enabled = rs_pred_ok[ex_idx];
  end

  // targets of the executing instruction
  target_t t0, t1;
  logic    t0_v, t1_v;          // still to be sent
  logic    t0_loc, t1_loc;      // target lies in this tile
  logic    mem_pkt, br_pkt;     // one OPN packet replaces the targets

  function automatic logic is_local(target_t t);
    return t[8:7] != 2'b00 && 32'(iid_x(t[6:0])) == EX && 32'(iid_y(t[6:0])) == EY;
  endfunction

  always_comb begin
    fmt_e f;
    f       = op_fmt(xop);
    t0      = xi[8:0];
    t1      = (f == FMT_G) ? xi[17:9] : 9'd0;
    mem_pkt = op_is_load(xop) || op_is_store(xop);
    br_pkt  = op_is_branch(xop);
    if (mem_pkt || br_pkt || f == FMT_S || f == FMT_B) begin
      t0 = '0;
      t1 = '0;
    end
    t0_v   = ex_v && ex_enabled && tgt_valid(t0) && !ex_done[0];
    t1_v   = ex_v && ex_enabled && tgt_valid(t1) && !ex_done[1];
    t0_loc = is_local(t0);
    t1_loc = is_local(t1);
  end

  // choose at most one local and one remote delivery this cycle
  logic send_l0, send_l1, send_r0, send_r1, send_mem;
  always_comb begin
    send_l0  = t0_v && t0_loc;
    send_l1  = t1_v && t1_loc && !send_l0;
    send_r0  = t0_v && !t0_loc && !opn_out_hold;
    send_r1  = t1_v && !t1_loc && !send_r0 && !opn_out_hold;
    send_mem = ex_v && ex_enabled && (mem_pkt || br_pkt) && !ex_done[0] && !opn_out_hold;
  end

  logic ex_finish;   // the executing instruction leaves the stage now
  assign ex_finish = ex_v && (!ex_enabled ||
      (((mem_pkt || br_pkt) ? (send_mem || ex_done[0]) :
        (!t0_v || send_l0 || send_r0) && (!t1_v || send_l1 || send_r1))));

  // local bypass write
  always_comb begin
    target_t t;
    t      = send_l0 ? t0 : t1;
    wb     = '0;
    wb.v   = send_l0 || send_l1;
    wb.idx = {ex_idx[5:3], iid_slot(t[6:0])};
    wb.ttype = t[8:7];
    wb.val = res;
    wb.nul = r_nul;
    wb.exc = r_exc;
  end

  // remote packet
  always_comb begin
    target_t t;
    opn_out       = '0;
    opn_out_valid = 1'b0;
    t = send_r0 ? t0 : t1;
    opn_out.frame  = ex_idx[5:3];
    opn_out.null_t = r_nul;
    opn_out.exc    = r_exc;
    opn_out.data   = res;
    opn_out.op     = xop;
    if (send_mem && mem_pkt) begin
      opn_out_valid = 1'b1;
      opn_out.ptype = op_is_load(xop) ? PT_LOAD : PT_STORE;
      opn_out.addr  = addr_t'(res);
      opn_out.data  = b;                        // store data
      opn_out.null_t = r_nul;
      opn_out.lsid  = xi[22:18];
      opn_out.tgt   = xi[8:0];                  // load's target
      opn_out.dx    = 3'd0;
      opn_out.dy    = 3'(dtile_of(addr_t'(res))) + 3'd1;
    end else if (send_mem && br_pkt) begin
      opn_out_valid = 1'b1;
      opn_out.ptype = PT_PC_WRITE;
      opn_out.lsid  = {2'b00, xi[22:20]};       // exit number
      opn_out.dx    = 3'd0;
      opn_out.dy    = 3'd0;
    end else if (send_r0 || send_r1) begin
      opn_out_valid = 1'b1;
      opn_out.ptype = PT_GENERIC;
      opn_out.tgt   = t;
      if (tgt_is_write(t)) begin
        opn_out.dx = 3'(t[1:0]) + 3'd1;         // R-tile of bank WID%4
        opn_out.dy = 3'd0;
      end else begin
        opn_out.dx = 3'(iid_x(t[6:0])) + 3'd1;
        opn_out.dy = 3'(iid_y(t[6:0])) + 3'd1;
      end
    end
  end

  // ------------------------------------------------------------- select stage
  function automatic logic arrives(opw_t w, logic [5:0] e, logic [1:0] tt);
    return w.v && w.idx == e && w.ttype == tt;
  endfunction

  logic       sel_v;
  logic [5:0] sel_idx;

  always_comb begin
    sel_v   = 1'b0;
    sel_idx = '0;
    for (int k = 0; k < NUM_FRAMES; k++) begin
      for (int s = 0; s < SLOTS; s++) begin
        logic [5:0] e;
        logic [6:0] op;
        logic o0, o1, pr;
        e  = {3'(oldest_frame + 3'(k)), 3'(s)};
        op = rs_inst[e][31:25];
        o0 = rs_op_v[e][0] || arrives(wa, e, TT_OP0) || arrives(wb, e, TT_OP0);
        o1 = rs_op_v[e][1] || arrives(wa, e, TT_OP1) || arrives(wb, e, TT_OP1);
        pr = rs_pred_ok[e] || arrives(wa, e, TT_PRED) || arrives(wb, e, TT_PRED) ||
             !rs_inst[e][24] || op_fmt(op) == FMT_C;
        if (!sel_v && rs_inst_v[e] && !rs_issued[e] && op != OP_NOP &&
            (!op_needs0(op) || o0) && (!op_needs1(op) || o1) && pr &&
            !(ex_v && ex_idx == e)) begin
          sel_v   = 1'b1;
          sel_idx = e;
        end
      end
    end
  end

  logic take;      // selected instruction enters execute
  assign take = sel_v && (!ex_v || ex_finish);

  // ------------------------------------------------------------- state
  function automatic logic pred_match(logic [31:0] inst, word_t v, logic nul);
    return !nul && inst[24] && (inst[23] == v[0]);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NE; e++) begin
        rs_inst_v[e]    <= 1'b0;
        rs_inst[e]      <= '0;
        rs_issued[e]    <= 1'b0;
        rs_pred_ok[e]   <= 1'b0;
        for (int j = 0; j < 2; j++) begin
          rs_op_v[e][j]   <= 1'b0;
          rs_op[e][j]     <= '0;
          rs_op_nul[e][j] <= 1'b0;
          rs_op_exc[e][j] <= 1'b0;
        end
      end
      ex_v    <= 1'b0;
      ex_idx  <= '0;
      ex_done <= '0;
    end else begin
      // operand and predicate arrivals (two write ports)
      for (int p = 0; p < 2; p++) begin
        opw_t w;
        w = (p == 0) ? wa : wb;
        if (w.v) begin
          if (w.ttype == TT_PRED) begin
            if (pred_match(rs_inst[w.idx], w.val, w.nul) ||
                (gdn.valid && {gdn.frame, gdn.slot} == w.idx &&
                 pred_match(gdn.inst, w.val, w.nul)))
              rs_pred_ok[w.idx] <= 1'b1;
          end else begin
            rs_op_v  [w.idx][w.ttype[0]] <= 1'b1;
            rs_op    [w.idx][w.ttype[0]] <= w.val;
            rs_op_nul[w.idx][w.ttype[0]] <= w.nul;
            rs_op_exc[w.idx][w.ttype[0]] <= w.exc;
          end
        end
      end
      // a predicate that arrived before its instruction is matched at dispatch
      if (gdn.valid) begin
        rs_inst_v[{gdn.frame, gdn.slot}] <= 1'b1;
        rs_inst  [{gdn.frame, gdn.slot}] <= gdn.inst;
      end
      // execute stage
      if (ex_v && !ex_enabled) rs_issued[ex_idx] <= 1'b0;   // bubble: wait again
      if (ex_finish || !ex_v) begin
        ex_v    <= take;
        ex_idx  <= sel_idx;
        ex_done <= '0;
      end else begin
        ex_done <= ex_done | {send_l1 || send_r1, send_l0 || send_r0 || send_mem};
      end
      if (take) rs_issued[sel_idx] <= 1'b1;
      // commit / flush clear the frame's stations
      if (gcn.commit || gcn.flush) begin
        for (int e = 0; e < NE; e++) begin
          if (gcn.mask[e/SLOTS]) begin
            rs_inst_v[e]    <= 1'b0;
            rs_issued[e]    <= 1'b0;
            rs_pred_ok[e]   <= 1'b0;
            rs_op_v[e][0]   <= 1'b0;
            rs_op_v[e][1]   <= 1'b0;
          end
        end
        if (ex_v && gcn.mask[ex_idx[5:3]]) ex_v <= 1'b0;
        if (take && gcn.mask[sel_idx[5:3]]) ex_v <= 1'b0;
      end
    end
  end

  assign ev_issue        = ex_v && ex_enabled && ex_done == 2'b00;
  assign ev_local_bypass = wb.v;
  assign ev_remote       = opn_out_valid;
  assign ev_opn_stall    = ex_v && opn_out_hold &&
                           ((t0_v && !t0_loc) || (t1_v && !t1_loc) ||
                            ((mem_pkt || br_pkt) && !ex_done[0] && ex_enabled));
  assign ev_pred_bubble  = ex_v && !ex_enabled;

endmodule
