// tb_etile: one E-tile (column 1, row 1) fed through its dispatch and
// operand ports. For each of the 8 frames a small block is dispatched:
//   slot 0 MOVI k        -> slot 1 operand 0 (local bypass)
//   slot 1 ADDI +3       -> register write slot 6
//   slot 2 ADD op0, op1  -> register write slot 1, operands from the OPN
//   slot 3 LD [op0 + 8]  -> load packet to the D-tile owning the address
//   slot 4 TEQ op0, op1  -> predicate of slot 5
//   slot 5 MOVI 7 if true -> register write slot 2
// Every packet leaving the tile is compared with the expected one; a GCN
// commit must free the frame for a new block.
module tb_etile;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  gdn_inst_t gdn;
  gcn_t      gcn;
  frame_t    oldest_frame;
  logic      opn_in_valid, opn_in_hold, opn_out_valid, opn_out_hold;
  opn_pkt_t  opn_in, opn_out;
  logic      ev_issue, ev_local_bypass, ev_remote, ev_opn_stall, ev_pred_bubble;

  etile #(.EX(1), .EY(1)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic target_t op(int t, int s); return {2'(t), 2'd1, 3'(s), 2'd1}; endfunction
  function automatic target_t wrt(int w); return {4'b0001, 5'(w)}; endfunction

  opn_pkt_t got [$];
  int n_bypass = 0;
  always @(posedge clk)
    if (rst_n) begin
      if (opn_out_valid && !opn_out_hold) got.push_back(opn_out);
      if (ev_local_bypass) n_bypass++;
    end

  initial begin
    #2_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic disp(frame_t f, int s, logic [31:0] w);
    @(negedge clk);
    gdn = '{valid: 1'b1, frame: f, slot: 3'(s), inst: w};
    @(negedge clk);
    gdn = '0;
  endtask
  task automatic send(frame_t f, target_t t, word_t v);
    @(negedge clk);
    opn_in_valid = 1'b1;
    opn_in = '0;
    opn_in.dy = 3'd2; opn_in.dx = 3'd2; opn_in.ptype = PT_GENERIC;
    opn_in.frame = f; opn_in.tgt = t; opn_in.data = v;
    @(negedge clk);
    opn_in_valid = 1'b0;
  endtask

  function automatic bit has(opn_pkt_t p);
    foreach (got[i])
      if (got[i].frame == p.frame && got[i].ptype == p.ptype && got[i].tgt == p.tgt &&
          got[i].dx == p.dx && got[i].dy == p.dy && got[i].data == p.data &&
          (p.ptype != PT_LOAD || got[i].addr == p.addr)) return 1;
    return 0;
  endfunction

  initial begin
    word_t a [8], b [8], k [8];
    opn_pkt_t e;
    gdn = '0; gcn = '0; oldest_frame = 0;
    opn_in_valid = 0; opn_in = '0; opn_out_hold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int round = 0; round < 2; round++) begin
      got.delete();
      for (int f = 0; f < 8; f++) begin
        a[f] = {$urandom, $urandom}; b[f] = (f % 2 == 0) ? a[f] : word_t'($urandom);
        k[f] = word_t'(f + 10 * round);
        disp(3'(f), 0, {OP_MOVI, 2'b00, 5'd0, 9'(k[f]), op(2, 1)});
        disp(3'(f), 1, {OP_ADDI, 2'b00, 5'd0, 9'd3, wrt(6)});
        disp(3'(f), 2, {OP_ADD, 2'b00, 5'd0, 9'd0, wrt(1)});
        disp(3'(f), 3, {OP_LD, 2'b00, 5'd4, 9'd8, op(2, 7)});
        disp(3'(f), 4, {OP_TEQ, 2'b00, 5'd0, 9'd0, op(1, 5)});
        disp(3'(f), 5, {OP_MOVI, 2'b11, 5'd0, 9'd7, wrt(2)});
        send(3'(f), op(2, 2), a[f]);
        send(3'(f), op(3, 2), b[f]);
        send(3'(f), op(2, 3), a[f]);
        send(3'(f), op(2, 4), a[f]);
        send(3'(f), op(3, 4), b[f]);
      end
      repeat (20) @(negedge clk);
      for (int f = 0; f < 8; f++) begin
        e = '0; e.frame = 3'(f); e.ptype = PT_GENERIC; e.dy = 0;
        e.tgt = wrt(6); e.dx = 3'd3; e.data = k[f] + 3;
        check(has(e), $sformatf("frame %0d ADDI after local MOVI", f));
        e.tgt = wrt(1); e.dx = 3'd2; e.data = a[f] + b[f];
        check(has(e), $sformatf("frame %0d ADD of two OPN operands", f));
        e.tgt = wrt(2); e.dx = 3'd3; e.data = 7;
        check(has(e) == (f % 2 == 0), $sformatf("frame %0d predicated MOVI", f));
        e = '0; e.frame = 3'(f); e.ptype = PT_LOAD; e.dx = 0;
        e.dy = 3'(dtile_of(addr_t'(a[f] + 8)) + 1); e.addr = addr_t'(a[f] + 8);
        e.tgt = op(2, 7); e.data = '0;
        check(has(e), $sformatf("frame %0d load packet", f));
      end
      check(got.size() == 8 * 3 + 4, $sformatf("%0d packets", got.size()));
      // commit all frames: stations are freed for the next round
      @(negedge clk);
      gcn = '{commit: 1'b1, flush: 1'b0, mask: 8'hff};
      @(negedge clk);
      gcn = '0;
    end
    check(n_bypass >= 16, "local bypasses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
