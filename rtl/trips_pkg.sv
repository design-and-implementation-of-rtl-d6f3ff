// trips_pkg: types and constants shared by the tiles of one TRIPS core.
//
// A TRIPS block holds up to 128 instructions placed on a 4x4 array of
// execution tiles (E-tiles), 8 reservation-station slots per tile and frame,
// plus 32 register reads and 32 register writes held in the block header.
// Eight blocks (frames) may be in flight. Instructions name their consumers
// directly with 9-bit targets; a target's 7-bit instruction ID is read as
// {Y[1:0], slot[2:0], X[1:0]} to find the E-tile and slot.
//
// Taken from the ISA: the 32-bit G/I/L/S/B/C formats and their bit fields,
// the 22-bit read and 6-bit write formats, the 9-bit target encoding, the
// PR encoding, the header-chunk layout (word k = {nibble, read, write} of
// bank k%4, slot k/4), the OPN control-packet types and the mnemonics.
// This design's own choice: the numeric opcode values (the ISA lists names
// only; XOP is not used, every operation has its own 7-bit opcode), the
// 64-bit operand width and the fields carried by an OPN packet.
package trips_pkg;

  localparam int NUM_FRAMES = 8;     // D-morph: 8 blocks in flight
  localparam int SLOTS      = 8;     // slots per E-tile per frame
  localparam int GRID       = 4;     // 4x4 E-tiles, 4 R-tiles, 4 D-tiles
  localparam int NUM_LSID   = 32;    // load/store IDs per block
  localparam int DW         = 64;    // operand width
  localparam int AW         = 40;    // system address width

  typedef logic [2:0]    frame_t;
  typedef logic [DW-1:0] word_t;
  typedef logic [AW-1:0] addr_t;

  // ---------------------------------------------------------------- targets
  // 9-bit target: [8:7] type. 00 with [6:5]=01 names write slot WID[4:0];
  // all zero is "no target"; 01 predicate, 10 operand 0, 11 operand 1.
  typedef enum logic [1:0] {TT_WRITE = 2'b00, TT_PRED = 2'b01,
                            TT_OP0 = 2'b10, TT_OP1 = 2'b11} ttype_e;
  typedef logic [8:0] target_t;

  function automatic logic tgt_valid(target_t t);
    return t != 9'd0;
  endfunction
  function automatic logic tgt_is_write(target_t t);
    return t[8:7] == 2'b00 && t[6:5] == 2'b01;
  endfunction
  // E-tile coordinates of an instruction ID {Y, slot, X}
  function automatic logic [1:0] iid_y(logic [6:0] iid); return iid[6:5]; endfunction
  function automatic logic [2:0] iid_slot(logic [6:0] iid); return iid[4:2]; endfunction
  function automatic logic [1:0] iid_x(logic [6:0] iid); return iid[1:0]; endfunction

  // ---------------------------------------------------------------- opcodes
  typedef enum logic [6:0] {
    OP_NOP   = 7'h00,
    // G format, two sources
    OP_ADD   = 7'h01, OP_SUB  = 7'h02, OP_AND  = 7'h03, OP_OR   = 7'h04,
    OP_XOR   = 7'h05, OP_SLL  = 7'h06, OP_SRL  = 7'h07, OP_SRA  = 7'h08,
    OP_TEQ   = 7'h09, OP_TNE  = 7'h0A, OP_TLE  = 7'h0B, OP_TLEU = 7'h0C,
    OP_TLT   = 7'h0D, OP_TLTU = 7'h0E, OP_TGE  = 7'h0F, OP_TGEU = 7'h10,
    OP_TGT   = 7'h11, OP_TGTU = 7'h12,
    // G format, one source / none
    OP_MOV   = 7'h18, OP_EXTSB = 7'h19, OP_EXTSH = 7'h1A, OP_EXTSW = 7'h1B,
    OP_EXTUB = 7'h1C, OP_EXTUH = 7'h1D, OP_EXTUW = 7'h1E, OP_NULL = 7'h1F,
    // I format
    OP_ADDI  = 7'h21, OP_SUBI = 7'h22, OP_ANDI = 7'h23, OP_ORI  = 7'h24,
    OP_XORI  = 7'h25, OP_SLLI = 7'h26, OP_SRLI = 7'h27, OP_SRAI = 7'h28,
    OP_TEQI  = 7'h29, OP_TNEI = 7'h2A, OP_TLEI = 7'h2B, OP_TLEUI = 7'h2C,
    OP_TLTI  = 7'h2D, OP_TLTUI = 7'h2E, OP_TGEI = 7'h2F, OP_TGEUI = 7'h30,
    OP_TGTI  = 7'h31, OP_TGTUI = 7'h32, OP_MOVI = 7'h33,
    // L and S formats
    OP_LB    = 7'h40, OP_LBS  = 7'h41, OP_LH   = 7'h42, OP_LHS  = 7'h43,
    OP_LW    = 7'h44, OP_LWS  = 7'h45, OP_LD   = 7'h46,
    OP_SB    = 7'h48, OP_SH   = 7'h49, OP_SW   = 7'h4A, OP_SD   = 7'h4B,
    // B format
    OP_BR    = 7'h50, OP_BRO  = 7'h51, OP_CALL = 7'h52, OP_CALLO = 7'h53,
    OP_RET   = 7'h54, OP_SCALL = 7'h55,
    // C format
    OP_GENS  = 7'h60, OP_GENU = 7'h61, OP_APP  = 7'h62
  } opcode_e;

  typedef enum logic [2:0] {FMT_G, FMT_I, FMT_L, FMT_S, FMT_B, FMT_C} fmt_e;

  function automatic fmt_e op_fmt(logic [6:0] op);
    if (op >= 7'h60)      return FMT_C;
    else if (op >= 7'h50) return FMT_B;
    else if (op >= 7'h48) return FMT_S;
    else if (op >= 7'h40) return FMT_L;
    else if (op >= 7'h20) return FMT_I;
    else if (op == 7'h00) return FMT_C;
    else                  return FMT_G;
  endfunction

  // does the instruction wait for operand 0 / operand 1
  function automatic logic op_needs0(logic [6:0] op);
    case (op)
      OP_NOP, OP_NULL, OP_MOVI, OP_BRO, OP_CALLO, OP_SCALL, OP_GENS, OP_GENU: return 1'b0;
      default: return 1'b1;
    endcase
  endfunction
  function automatic logic op_needs1(logic [6:0] op);
    return (op >= 7'h01 && op <= 7'h12) || (op >= 7'h48 && op <= 7'h4B);
  endfunction
  function automatic logic op_is_load(logic [6:0] op);
    return op >= 7'h40 && op <= 7'h46;
  endfunction
  function automatic logic op_is_store(logic [6:0] op);
    return op >= 7'h48 && op <= 7'h4B;
  endfunction
  function automatic logic op_is_branch(logic [6:0] op);
    return op >= 7'h50 && op <= 7'h55;
  endfunction

  // access size in bytes, log2: 0 byte, 1 half, 2 word, 3 double
  function automatic logic [1:0] mem_size(logic [6:0] op);
    case (op)
      OP_LB, OP_LBS, OP_SB: return 2'd0;
      OP_LH, OP_LHS, OP_SH: return 2'd1;
      OP_LW, OP_LWS, OP_SW: return 2'd2;
      default:              return 2'd3;
    endcase
  endfunction
  function automatic logic mem_signed(logic [6:0] op);
    return op == OP_LBS || op == OP_LHS || op == OP_LWS;
  endfunction

  // branch kinds reported to the predictor
  typedef enum logic [1:0] {BK_BRANCH = 2'd0, BK_CALL = 2'd1, BK_RET = 2'd2} bkind_e;

  // ---------------------------------------------------------------- OPN
  // Control-packet types printed in the OPN section.
  typedef enum logic [3:0] {
    PT_GENERIC = 4'd0, PT_LOAD = 4'd1, PT_STORE = 4'd2,
    PT_PC_READ = 4'd4, PT_PC_WRITE = 4'd5,
    PT_SREG_READ = 4'd14, PT_SREG_WRITE = 4'd15
  } ptype_e;

  // One OPN packet: the control part (routing, type, frame, target) and the
  // data part travel together here as one flit.
  typedef struct packed {
    logic [2:0] dy;       // destination row    0..4 (row 0: G, R-tiles)
    logic [2:0] dx;       // destination column 0..4 (column 0: G, D-tiles)
    ptype_e     ptype;
    frame_t     frame;
    target_t    tgt;      // consumer (generic), load's target (load)
    logic [4:0] lsid;     // load/store ID; branch: [2:0] exit number
    logic [6:0] op;       // load/store opcode; branch: opcode
    logic       null_t;   // null token
    logic       exc;      // exception token
    addr_t      addr;     // load/store effective address
    word_t      data;     // operand, store data, branch target/offset
  } opn_pkt_t;

  // ---------------------------------------------------------------- GDN
  // Per-row instruction dispatch: one instruction per E-tile column per cycle.
  typedef struct packed {
    logic        valid;
    frame_t      frame;
    logic [2:0]  slot;
    logic [31:0] inst;
  } gdn_inst_t;

  // Header dispatch to one R-tile: one read and one write per cycle.
  typedef struct packed {
    logic        valid;
    frame_t      frame;
    logic [2:0]  slot;
    logic [21:0] rd;      // R format: V, GR, RT0, RT1
    logic [5:0]  wr;      // W format: V, GR
  } gdn_reg_t;

  // ---------------------------------------------------------------- GCN
  typedef struct packed {
    logic                  commit;
    logic                  flush;
    logic [NUM_FRAMES-1:0] mask;
  } gcn_t;

  // Address interleaving across the four D-tiles: one 64-byte line per tile.
  function automatic logic [1:0] dtile_of(addr_t a);
    return a[7:6];
  endfunction

endpackage
