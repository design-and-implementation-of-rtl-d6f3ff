// tb_rtile: one R-tile (bank 1). Registers are loaded through the access
// port. Frame 0 reads GR3 and GR7 and writes GR3; frame 1, younger, reads
// GR3 and must wait for frame 0's write and receive its value (forwarding).
// Checks the read packets (target, route, value), write completion on the
// GSN, commit into the register file with its acknowledgement, and that a
// flushed frame's write never reaches the register file.
module tb_rtile;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  gdn_reg_t  gdn;
  logic [1:0] gdn_thread;
  gcn_t      gcn;
  frame_t    oldest_frame;
  logic      opn_in_valid, opn_in_hold, opn_out_valid, opn_out_hold;
  opn_pkt_t  opn_in, opn_out;
  logic      gsn_done_v, gsn_done_exc, gsn_ack_v;
  frame_t    gsn_done_frame, gsn_ack_frame;
  logic      dbg_we;
  logic [6:0] dbg_addr;
  word_t     dbg_wdata, dbg_rdata;
  logic      ev_forward;

  rtile #(.BANK(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  opn_pkt_t got [$];
  int done_seen [8];
  int ack_seen [8];
  int n_fwd = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (opn_out_valid && !opn_out_hold) got.push_back(opn_out);
      if (gsn_done_v) done_seen[gsn_done_frame]++;
      if (gsn_ack_v) ack_seen[gsn_ack_frame]++;
      if (ev_forward) n_fwd++;
    end

  initial begin
    #1_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // header of one frame: slot 0 and 1 given, the rest empty
  task automatic header(frame_t f, logic [21:0] rd0, logic [5:0] wr0, logic [21:0] rd1);
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      gdn = '0;
      gdn.valid = 1'b1; gdn.frame = f; gdn.slot = 3'(s);
      if (s == 0) begin gdn.rd = rd0; gdn.wr = wr0; end
      if (s == 1) gdn.rd = rd1;
    end
    @(negedge clk);
    gdn = '0;
  endtask

  function automatic opn_pkt_t find(frame_t f, logic [6:0] iid, output bit ok);
    ok = 0;
    foreach (got[i])
      if (got[i].frame == f && got[i].tgt == {2'b10, iid}) begin ok = 1; return got[i]; end
    return '0;
  endfunction

  initial begin
    word_t rv [32];
    word_t wv;
    opn_pkt_t p;
    bit ok;
    gdn = '0; gdn_thread = 0; gcn = '0; oldest_frame = 0;
    opn_in_valid = 0; opn_in = '0; opn_out_hold = 0;
    dbg_we = 0; dbg_addr = 0; dbg_wdata = 0;
    for (int i = 0; i < 8; i++) begin done_seen[i] = 0; ack_seen[i] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 32; i++) begin
      rv[i] = {$urandom, $urandom};
      @(negedge clk);
      dbg_we = 1; dbg_addr = 7'(i); dbg_wdata = rv[i];
    end
    @(negedge clk);
    dbg_we = 0;

    // frame 0: read GR3 -> iid 0x25 op0, read GR7 -> iid 0x12 op0; write GR3
    header(3'd0, {1'b1, 5'd3, 8'h25, 8'h00}, {1'b1, 5'd3}, {1'b1, 5'd7, 8'h12, 8'h00});
    // frame 1: read GR3 -> iid 0x33 op0
    header(3'd1, {1'b1, 5'd3, 8'h33, 8'h00}, 6'd0, 22'd0);
    repeat (10) @(negedge clk);
    p = find(3'd0, 7'h25, ok);
    check(ok && p.data == rv[3], "frame 0 reads GR3 from the register file");
    check(ok && p.dy == 3'd2 && p.dx == 3'd2, "read routed to E-tile (1,1)");
    p = find(3'd0, 7'h12, ok);
    check(ok && p.data == rv[7], "frame 0 reads GR7");
    p = find(3'd1, 7'h33, ok);
    check(!ok, "frame 1 waits for the older write of GR3");
    check(done_seen[0] == 0, "frame 0 not complete before its write");
    check(done_seen[1] == 1, "frame 1 (no writes) complete");

    // write of GR3 by frame 0, write slot {0, bank 1}
    wv = {$urandom, $urandom};
    @(negedge clk);
    opn_in_valid = 1; opn_in = '0; opn_in.frame = 3'd0; opn_in.tgt = {4'b0001, 5'd1};
    opn_in.data = wv;
    @(negedge clk);
    opn_in_valid = 0;
    repeat (6) @(negedge clk);
    p = find(3'd1, 7'h33, ok);
    check(ok && p.data == wv, "frame 1 receives the forwarded value");
    check(n_fwd > 0, "forward event");
    check(done_seen[0] == 1, "frame 0 complete");

    // commit frame 0
    @(negedge clk);
    gcn = '{commit: 1'b1, flush: 1'b0, mask: 8'h01};
    @(negedge clk);
    gcn = '0;
    repeat (3) @(negedge clk);
    check(ack_seen[0] == 1, "commit acknowledged");
    dbg_addr = 7'd3;
    #1 check(dbg_rdata == wv, "GR3 committed");

    // frame 2 writes GR5 but is flushed
    oldest_frame = 3'd1;
    header(3'd2, 22'd0, {1'b1, 5'd5}, 22'd0);
    @(negedge clk);
    opn_in_valid = 1; opn_in = '0; opn_in.frame = 3'd2; opn_in.tgt = {4'b0001, 5'd1};
    opn_in.data = 64'h1234;
    @(negedge clk);
    opn_in_valid = 0;
    gcn = '{commit: 1'b0, flush: 1'b1, mask: 8'h04};
    @(negedge clk);
    gcn = '0;
    repeat (3) @(negedge clk);
    dbg_addr = 7'd5;
    #1 check(dbg_rdata == rv[5], "flushed write not committed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
