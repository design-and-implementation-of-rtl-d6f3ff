// tb_trips_core: end-to-end test of the whole core at its default size.
//
// Three hand-assembled blocks run from the I-tiles:
//   LOOP (0x1000): C[i] = A[i] + B[i] over 16 doublewords, one element per
//        block; i lives in GR4 and is read by each block from the write of
//        the block before it (register forwarding between blocks in flight).
//        Two predicated branches, loop back or leave to EXIT.
//   EXIT (0x1280): a store whose address comes through a long operand chain
//        and a younger load of the same address that is ready at once: the
//        first run is a load/store violation, the refetched block defers the
//        load and the LSQ forwards the stored 42 to it; the load writes GR12.
//   HALT (0x1500): a system call, whose exception stops the core, and two
//        operand streams that meet in one router to exercise flow control.
// Results are read back through the access ports and compared with a model
// computed here. Each mechanism has an event strobe from the core; every
// mechanism that never happened counts as a failure.
module tb_trips_core;
  import trips_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic          start;
  addr_t         start_pc;
  logic [3:0]    max_frames;
  logic [1:0]    dep_mode;
  logic          running, halted;
  logic [31:0]   blocks_committed;
  logic          refill_we;
  logic [2:0]    refill_tile;
  logic [9:0]    refill_addr;
  logic [127:0]  refill_data;
  logic          dmem_we;
  logic [1:0]    dmem_tile;
  logic [9:0]    dmem_addr;
  word_t         dmem_wdata, dmem_rdata;
  logic          reg_we;
  logic [6:0]    reg_addr;
  word_t         reg_wdata, reg_rdata;
  logic [13:0]   events;

  trips_core dut (.*);

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- assembler
  function automatic logic [6:0] iid(int x, int y, int s);
    return {2'(y), 3'(s), 2'(x)};
  endfunction
  function automatic target_t op0(int x, int y, int s); return {2'b10, iid(x, y, s)}; endfunction
  function automatic target_t op1(int x, int y, int s); return {2'b11, iid(x, y, s)}; endfunction
  function automatic target_t prd(int x, int y, int s); return {2'b01, iid(x, y, s)}; endfunction
  function automatic target_t wrt(int bank, int slot); return {4'b0001, 3'(slot), 2'(bank)}; endfunction

  function automatic logic [31:0] g_fmt(opcode_e op, logic [1:0] pr, target_t t1, target_t t0);
    return {op, pr, 5'd0, t1, t0};
  endfunction
  function automatic logic [31:0] i_fmt(opcode_e op, logic [1:0] pr, int imm, target_t t0);
    return {op, pr, 5'd0, 9'(imm), t0};
  endfunction
  function automatic logic [31:0] l_fmt(opcode_e op, int lsid, int imm, target_t t0);
    return {op, 2'b00, 5'(lsid), 9'(imm), t0};
  endfunction
  function automatic logic [31:0] s_fmt(opcode_e op, int lsid, int imm);
    return {op, 2'b00, 5'(lsid), 9'(imm), 9'd0};
  endfunction
  function automatic logic [31:0] b_fmt(opcode_e op, logic [1:0] pr, int ex, int off);
    return {op, pr, 3'(ex), 20'(off)};
  endfunction
  function automatic logic [21:0] rd_fmt(int gr, target_t a, target_t b);
    return {1'b1, 5'(gr), a[7:0], b[7:0]};
  endfunction

  // image: block b, I-tile t (0 header, 1+y instruction row y), row, word
  localparam int NB = 3;
  localparam addr_t BA [NB] = '{40'h1000, 40'h1280, 40'h1500};
  logic [31:0] img [NB][5][8][4];

  task automatic put(int b, int x, int y, int s, logic [31:0] w);
    img[b][y+1][s][x] = w;
  endtask
  // header word for bank/slot: store-mask nibble, read, write
  task automatic hdr(int b, int bank, int slot, logic [3:0] nib, logic [21:0] rd, logic [5:0] wr);
    img[b][0][slot][bank] = {nib, rd, wr};
  endtask

  localparam addr_t BASE = 40'h2000;
  localparam addr_t SCR  = 40'h3000;
  localparam int    N    = 16;

  task automatic build();
    for (int b = 0; b < NB; b++)
      for (int t = 0; t < 5; t++)
        for (int r = 0; r < 8; r++)
          for (int w = 0; w < 4; w++) img[b][t][r][w] = 32'd0;
    // LOOP
    hdr(0, 0, 0, 4'b0100, rd_fmt(1, op0(1,0,0), op0(1,0,1)), {1'b1, 5'd1}); // GR4
    hdr(0, 1, 0, 4'b0000, rd_fmt(1, op1(0,1,0), 9'd0), 6'd0);              // GR5
    put(0, 1,0,0, g_fmt(OP_MOV, 2'b00, op0(2,0,0), op0(1,0,2)));
    put(0, 1,0,1, g_fmt(OP_MOV, 2'b00, op0(2,0,2), op0(1,0,3)));
    put(0, 1,0,2, l_fmt(OP_LD, 0, -128, op0(2,0,1)));
    put(0, 2,0,0, l_fmt(OP_LD, 1, 0,    op1(2,0,1)));
    put(0, 2,0,1, g_fmt(OP_ADD, 2'b00, 9'd0, op1(2,0,2)));
    put(0, 2,0,2, s_fmt(OP_SD, 2, 128));
    // ADDI has one target in the I format; a MOV fans the new i out
    put(0, 1,0,3, i_fmt(OP_ADDI, 2'b00, 8, op0(1,0,4)));
    put(0, 1,0,4, g_fmt(OP_MOV, 2'b00, wrt(0, 0), op0(0,1,0)));
    // the local predicate reaches the taken-path branch early; on the last
    // trip it does not match (a bubble)
    put(0, 0,1,0, g_fmt(OP_TLT, 2'b00, prd(1,1,1), prd(0,1,1)));
    put(0, 0,1,1, b_fmt(OP_BRO, 2'b11, 0, 0));
    put(0, 1,1,1, b_fmt(OP_BRO, 2'b10, 1, 5));
    // EXIT
    hdr(1, 2, 0, 4'b0000, rd_fmt(1, op0(3,3,0), op0(0,0,1)), 6'd0);        // GR6
    hdr(1, 0, 1, 4'b0000, 22'd0, {1'b1, 5'd3});                            // GR12
    hdr(1, 0, 0, 4'b0001, 22'd0, 6'd0);                                 // LSID 0 is a store
    put(1, 3,3,0, i_fmt(OP_ADDI, 2'b00, 0, op0(0,3,0)));
    put(1, 0,3,0, i_fmt(OP_ADDI, 2'b00, 0, op0(0,2,0)));
    put(1, 3,0,0, i_fmt(OP_MOVI, 2'b00, 42, op1(0,2,0)));
    put(1, 0,2,0, s_fmt(OP_SD, 0, 0));
    put(1, 0,0,1, l_fmt(OP_LD, 1, 0, wrt(0, 1)));
    put(1, 1,1,0, b_fmt(OP_BRO, 2'b00, 0, 5));
    // HALT
    put(2, 0,0,0, b_fmt(OP_SCALL, 2'b00, 0, 0));
    // two streams of 8 operands from E-tiles (3,1) and (3,2) into the ADDs
    // of E-tile (1,1) merge in one router and fill its queues
    for (int s = 0; s < 8; s++) begin
      put(2, 3,1,s, i_fmt(OP_MOVI, 2'b00, s,
                          (s % 2 == 0) ? op0(1,1,s/2) : op1(1,1,s/2)));
      put(2, 3,2,s, i_fmt(OP_MOVI, 2'b00, s,
                          (s % 2 == 0) ? op0(1,1,4+s/2) : op1(1,1,4+s/2)));
      put(2, 1,1,s, g_fmt(OP_ADD, 2'b00, 9'd0, 9'd0));
    end
  endtask

  // data array location of an address
  function automatic logic [1:0] d_tile(addr_t a); return a[7:6]; endfunction
  function automatic logic [9:0] d_idx(addr_t a);  return {a[14:8], a[5:3]}; endfunction

  task automatic dwrite(addr_t a, word_t v);
    @(negedge clk);
    dmem_we = 1'b1; dmem_tile = d_tile(a); dmem_addr = d_idx(a); dmem_wdata = v;
    @(negedge clk);
    dmem_we = 1'b0;
  endtask
  task automatic dread(addr_t a, output word_t v);
    @(negedge clk);
    dmem_tile = d_tile(a); dmem_addr = d_idx(a);
    #1 v = dmem_rdata;
  endtask
  task automatic rwrite(int r, word_t v);
    @(negedge clk);
    reg_we = 1'b1; reg_addr = 7'(r); reg_wdata = v;
    @(negedge clk);
    reg_we = 1'b0;
  endtask
  task automatic rread(int r, output word_t v);
    @(negedge clk);
    reg_addr = 7'(r);
    #1 v = reg_rdata;
  endtask

  // ---------------------------------------------------------- events
  int ev_cnt [14];
  string ev_name [14] = '{"local bypass", "remote operand", "OPN stall",
    "predicate bubble", "register forward", "LSQ forward", "deferred load",
    "violation", "store commit", "commit", "flush", "misprediction",
    "deallocation", "router hold"};
  always @(posedge clk)
    if (rst_n)
      for (int i = 0; i < 14; i++) if (events[i]) ev_cnt[i]++;

  initial begin
    #3_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  word_t a_v [N], b_v [N];
  word_t v;
  int cyc;

  initial begin
    for (int i = 0; i < 14; i++) ev_cnt[i] = 0;
    start = 1'b0; start_pc = BA[0]; max_frames = 4'd8; dep_mode = 2'd0;
    refill_we = 1'b0; refill_tile = '0; refill_addr = '0; refill_data = '0;
    dmem_we = 1'b0; dmem_tile = '0; dmem_addr = '0; dmem_wdata = '0;
    reg_we = 1'b0; reg_addr = '0; reg_wdata = '0;
    build();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // instruction image: clear every row, then the three blocks
    for (int t = 0; t < 5; t++)
      for (int r = 0; r < 1024; r++) begin
        @(negedge clk);
        refill_we = 1'b1; refill_tile = 3'(t); refill_addr = 10'(r);
        refill_data = '0;
        for (int b = 0; b < NB; b++)
          if (BA[b][13:7] == 7'(r >> 3)) begin
            for (int w = 0; w < 4; w++) refill_data[w*32 +: 32] = img[b][t][r%8][w];
          end
      end
    @(negedge clk);
    refill_we = 1'b0;

    // data and registers
    for (int i = 0; i < N; i++) begin
      a_v[i] = word_t'($urandom) << 8 | word_t'(i);
      b_v[i] = word_t'($urandom);
      dwrite(BASE - 128 + addr_t'(8*i), a_v[i]);
      dwrite(BASE + addr_t'(8*i), b_v[i]);
      dwrite(BASE + 40'd128 + addr_t'(8*i), 64'hDEAD);
    end
    dwrite(SCR, 64'd99);
    rwrite(4, word_t'(BASE));
    rwrite(5, word_t'(BASE + 128));
    rwrite(6, word_t'(SCR));
    rwrite(12, 64'd0);

    @(negedge clk);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!halted && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    check(halted, "core halts on the system call");
    $display("halted after %0d cycles, %0d blocks committed", cyc, blocks_committed);
    check(blocks_committed == 32'(N + 1), $sformatf("blocks committed %0d", blocks_committed));

    for (int i = 0; i < N; i++) begin
      dread(BASE + 128 + addr_t'(8*i), v);
      check(v == a_v[i] + b_v[i], $sformatf("C[%0d] = %h, expected %h", i, v, a_v[i] + b_v[i]));
      dread(BASE - 128 + addr_t'(8*i), v);
      check(v == a_v[i], $sformatf("A[%0d] unchanged", i));
    end
    dread(SCR, v);
    check(v == 64'd42, $sformatf("scratch = %0d", v));
    rread(4, v);
    check(v == word_t'(BASE + 128), $sformatf("GR4 = %h", v));
    rread(12, v);
    check(v == 64'd42, $sformatf("GR12 = %0d (load forwarded from store)", v));
    rread(5, v);
    check(v == word_t'(BASE + 128), "GR5 unchanged");

    for (int i = 0; i < 14; i++) begin
      $display("  %-18s %0d", ev_name[i], ev_cnt[i]);
      check(ev_cnt[i] > 0, $sformatf("mechanism never seen: %s", ev_name[i]));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
