// tb_dtile: one D-tile (row 0, lines with address bits [7:6] = 0).
//   1. A block whose LSID 0 is a store runs its load (LSID 1) first: the
//      load returns array data, then the store to the same address reports
//      a violation and trains the dependence predictor.
//   2. The block is flushed and dispatched again: the load is now deferred,
//      and when the store arrives it is woken and gets the stored value from
//      the queue (forwarding).
//   3. Store completion on the GSN, commit into the array, acknowledgement.
//   4. A byte load after commit returns the right byte.
// Every reply is checked for value, target and route.
module tb_dtile;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic        disp_v;
  frame_t      disp_frame;
  logic [31:0] disp_smask;
  addr_t       disp_baddr;
  gcn_t        gcn;
  frame_t      oldest_frame;
  logic [1:0]  dep_mode;
  logic        opn_in_valid, opn_in_hold, opn_out_valid, opn_out_hold;
  opn_pkt_t    opn_in, opn_out;
  logic        dsn_out_v;
  frame_t      dsn_out_frame;
  logic [4:0]  dsn_out_lsid;
  logic [3:0]  dsn_in_v;
  frame_t      dsn_in_frame [4];
  logic [4:0]  dsn_in_lsid [4];
  logic        gsn_done_v, gsn_ack_v, viol_v;
  frame_t      gsn_done_frame, gsn_ack_frame, viol_frame;
  logic        dbg_we;
  logic [9:0]  dbg_addr;
  word_t       dbg_wdata, dbg_rdata;
  logic        ev_lsq_fwd, ev_deferred, ev_violation, ev_store_commit;

  dtile #(.ROW(0)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  opn_pkt_t got [$];
  int n_viol = 0, n_def = 0, n_fwd = 0, n_done = 0, n_ack = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (opn_out_valid && !opn_out_hold) got.push_back(opn_out);
      if (viol_v) n_viol++;
      if (ev_deferred) n_def++;
      if (ev_lsq_fwd) n_fwd++;
      if (gsn_done_v && gsn_done_frame == 3'd0) n_done++;
      if (gsn_ack_v && gsn_ack_frame == 3'd0) n_ack++;
    end

  initial begin
    #1_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  localparam addr_t A  = 40'h0000_2408;     // bits [7:6] = 0
  localparam addr_t BA = 40'h0000_1000;
  function automatic logic [9:0] idx(addr_t a); return {a[14:8], a[5:3]}; endfunction

  task automatic dispatch(frame_t f, logic [31:0] m);
    @(negedge clk);
    disp_v = 1; disp_frame = f; disp_smask = m; disp_baddr = BA;
    @(negedge clk);
    disp_v = 0;
  endtask
  task automatic mem_op(ptype_e t, opcode_e op, frame_t f, int lsid, addr_t a, word_t d);
    @(negedge clk);
    while (opn_in_hold) @(negedge clk);
    opn_in_valid = 1; opn_in = '0;
    opn_in.ptype = t; opn_in.op = op; opn_in.frame = f; opn_in.lsid = 5'(lsid);
    opn_in.addr = a; opn_in.data = d;
    opn_in.tgt = {2'b10, 2'd2, 3'd5, 2'd1};      // operand 0 of E-tile (1,2) slot 5
    @(negedge clk);
    opn_in_valid = 0;
  endtask

  initial begin
    word_t m0, x;
    gcn = '0; oldest_frame = 0; dep_mode = 2'd0;
    disp_v = 0; disp_frame = 0; disp_smask = 0; disp_baddr = 0;
    opn_in_valid = 0; opn_in = '0; opn_out_hold = 0;
    dsn_in_v = 0;
    for (int i = 0; i < 4; i++) begin dsn_in_frame[i] = 0; dsn_in_lsid[i] = 0; end
    dbg_we = 0; dbg_addr = 0; dbg_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    m0 = {$urandom, $urandom};
    x  = {$urandom, $urandom};
    @(negedge clk);
    dbg_we = 1; dbg_addr = idx(A); dbg_wdata = m0;
    @(negedge clk);
    dbg_we = 0;

    // 1. load before store: violation
    dispatch(3'd0, 32'h1);
    mem_op(PT_LOAD, OP_LD, 3'd0, 1, A, '0);
    repeat (4) @(negedge clk);
    check(got.size() == 1 && got[0].data == m0, "load returns array data");
    check(got.size() == 1 && got[0].dy == 3'd3 && got[0].dx == 3'd2 &&
          got[0].tgt == {2'b10, 2'd2, 3'd5, 2'd1}, "reply routed to its target");
    mem_op(PT_STORE, OP_SD, 3'd0, 0, A, x);
    repeat (4) @(negedge clk);
    check(n_viol == 1, "violation reported");

    // 2. flush and refetch: the load is deferred and forwarded
    @(negedge clk);
    gcn = '{commit: 1'b0, flush: 1'b1, mask: 8'h01};
    @(negedge clk);
    gcn = '0;
    got.delete();
    n_done = 0;
    dispatch(3'd0, 32'h1);
    mem_op(PT_LOAD, OP_LD, 3'd0, 1, A, '0);
    repeat (4) @(negedge clk);
    check(n_def == 1 && got.size() == 0, "predicted-dependent load is deferred");
    check(n_done == 0, "stores not complete yet");
    mem_op(PT_STORE, OP_SD, 3'd0, 0, A, x);
    repeat (6) @(negedge clk);
    check(got.size() == 1 && got[0].data == x, "deferred load gets the stored value");
    check(n_fwd > 0, "forwarding event");
    check(n_viol == 1, "no second violation");
    check(n_done == 1, "store completion reported once");

    // 3. commit
    @(negedge clk);
    gcn = '{commit: 1'b1, flush: 1'b0, mask: 8'h01};
    @(negedge clk);
    gcn = '0;
    repeat (6) @(negedge clk);
    check(n_ack == 1, "commit acknowledged");
    dbg_addr = idx(A);
    #1 check(dbg_rdata == x, "store written at commit");

    // 4. byte load, sign-extended
    got.delete();
    oldest_frame = 3'd1;
    dispatch(3'd1, 32'h0);   // no stores: the load is not held back
    mem_op(PT_LOAD, OP_LBS, 3'd1, 1, A + 40'd3, '0);
    repeat (4) @(negedge clk);
    check(got.size() == 1 && got[0].data == word_t'(signed'(x[31:24])), "signed byte load");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
