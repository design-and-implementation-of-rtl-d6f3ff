// tb_gtile: the G-tile with the rest of the core replaced by a reactive
// model. The model streams 8 header rows per fetch (holding itile_busy),
// then reports the block complete (all R-tiles, D-tile 0) and sends its
// branch: 0x1000 falls through to 0x1280 (predicted right), 0x1280 branches
// to 0x4000 (mispredicted: younger frames are flushed and fetch restarts at
// 0x4000), 0x4000 raises an exception (the core halts). Blocks on the wrong
// path never complete. Commits are acknowledged by every R- and D-tile one
// cycle after the commit command. Checks commit order, count, recovery,
// deallocation and the halt.
module tb_gtile;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic        start, running, halted;
  addr_t       start_pc;
  logic [3:0]  max_frames;
  logic        fetch_v, itile_busy;
  frame_t      fetch_frame;
  addr_t       fetch_addr_o;
  logic        hdr_v;
  frame_t      hdr_frame;
  logic [2:0]  hdr_row;
  logic [15:0] hdr_nibbles;
  logic        disp_v;
  frame_t      disp_frame;
  logic [31:0] disp_smask;
  addr_t       disp_baddr;
  logic        opn_in_valid, opn_in_hold;
  opn_pkt_t    opn_in;
  gcn_t        gcn;
  frame_t      oldest_frame;
  logic [NUM_FRAMES-1:0] frame_live;
  logic [3:0]  r_done_v, r_done_exc, r_ack_v, d_ack_v, d_viol_v;
  frame_t      r_done_frame [4], r_ack_frame [4], d_ack_frame [4], d_viol_frame [4];
  logic        d_done_v;
  frame_t      d_done_frame;
  logic [31:0] blocks_committed;
  logic        ev_commit, ev_flush, ev_mispredict, ev_violation, ev_dealloc;

  gtile dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // model state per frame
  logic  f_v [8];
  addr_t f_a [8];
  int    f_t [8];          // cycles until the block completes
  int    strm_n;           // header rows left to stream
  frame_t strm_f;
  addr_t commits [$];
  int n_mis = 0, n_flush = 0, n_dealloc = 0;
  bit saw_4000 = 0;

  function automatic bit known(addr_t a);
    return a == 40'h1000 || a == 40'h1280 || a == 40'h4000;
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int f = 0; f < 8; f++) begin f_v[f] <= 0; f_a[f] <= 0; f_t[f] <= 0; end
      strm_n <= 0; strm_f <= 0;
    end else begin
      if (ev_mispredict) n_mis++;
      if (ev_flush) n_flush++;
      if (ev_dealloc) n_dealloc++;
      if (gcn.commit) for (int f = 0; f < 8; f++) if (gcn.mask[f]) commits.push_back(f_a[f]);
      for (int f = 0; f < 8; f++) begin
        if (f_v[f] && f_t[f] > 0) f_t[f] <= f_t[f] - 1;
        if ((gcn.flush || gcn.commit) && gcn.mask[f]) f_v[f] <= 0;
      end
      if (strm_n > 0) strm_n <= strm_n - 1;
      if (fetch_v) begin
        f_v[fetch_frame] <= 1; f_a[fetch_frame] <= fetch_addr_o; f_t[fetch_frame] <= 12;
        strm_n <= 8; strm_f <= fetch_frame;
        if (fetch_addr_o == 40'h4000) saw_4000 = 1;
      end
    end
  end

  // drive the model outputs at the negative edge
  always @(negedge clk) begin
    bit sent;
    r_done_v = 0; d_done_v = 0; r_done_exc = 0; opn_in_valid = 0; opn_in = '0;
    r_ack_v = 0; d_ack_v = 0; hdr_v = 0;
    itile_busy = strm_n > 1;
    if (rst_n && strm_n > 0) begin
      hdr_v = 1; hdr_frame = strm_f; hdr_row = 3'(8 - strm_n);
    end
    sent = 0;
    for (int f = 0; f < 8; f++)
      if (rst_n && !sent && f_v[f] && f_t[f] == 1 && known(f_a[f])) begin
        sent = 1;
        r_done_v = 4'hf; d_done_v = 1;
        for (int b = 0; b < 4; b++) r_done_frame[b] = 3'(f);
        d_done_frame = 3'(f);
        opn_in_valid = 1;
        opn_in.ptype = PT_PC_WRITE; opn_in.frame = 3'(f);
        case (f_a[f])
          40'h1000: begin opn_in.op = OP_BRO; opn_in.data = 64'd5; end
          40'h1280: begin opn_in.op = OP_BR;  opn_in.data = 64'h4000; opn_in.lsid = 5'd2; end
          default:  begin opn_in.op = OP_SCALL; opn_in.exc = 1; end
        endcase
      end
    // acknowledge a commit seen at the last edge
    if (rst_n && ack_f_v) begin
      r_ack_v = 4'hf; d_ack_v = 4'hf;
      for (int b = 0; b < 4; b++) begin r_ack_frame[b] = ack_f; d_ack_frame[b] = ack_f; end
    end
  end

  logic ack_f_v;
  frame_t ack_f;
  always @(posedge clk) begin
    ack_f_v <= rst_n && gcn.commit;
    for (int f = 0; f < 8; f++) if (gcn.mask[f]) ack_f <= 3'(f);
  end

  initial begin
    #1_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    start = 0; start_pc = 40'h1000; max_frames = 4'd4;
    hdr_frame = 0; hdr_row = 0; hdr_nibbles = 0;
    d_viol_v = 0;
    for (int b = 0; b < 4; b++) begin
      r_done_frame[b] = 0; r_ack_frame[b] = 0; d_ack_frame[b] = 0; d_viol_frame[b] = 0;
    end
    d_done_frame = 0; ack_f_v = 0; ack_f = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < 2000 && !halted; i++) @(negedge clk);
    check(halted, "halts on the exception of the oldest block");
    check(blocks_committed == 32'd2, $sformatf("%0d blocks committed", blocks_committed));
    check(commits.size() == 2 && commits[0] == 40'h1000 && commits[1] == 40'h1280,
          "commit order 0x1000, 0x1280");
    check(n_mis >= 1 && n_flush >= 1, "misprediction flushed the wrong path");
    check(saw_4000, "fetch restarted at the branch target");
    check(n_dealloc == 2, "both committed frames deallocated");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
