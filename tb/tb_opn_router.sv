// tb_opn_router: random traffic through a router in the middle of the mesh.
// Each input sends packets to random destinations and respects the hold
// signal; each output is randomly held. Every packet must leave on the
// output given by Y-X routing, in order per input, exactly once. A flush
// mask must drop queued packets of the named frames.
module tb_opn_router;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic [7:0] flush_mask;
  logic [4:0] in_valid, in_hold, out_valid, out_hold;
  opn_pkt_t   in_pkt [5];
  opn_pkt_t   out_pkt [5];

  opn_router #(.X(2), .Y(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int route(opn_pkt_t p);
    if (p.dy < 3'd2) return 0;
    if (p.dy > 3'd2) return 2;
    if (p.dx > 3'd2) return 1;
    if (p.dx < 3'd2) return 3;
    return 4;
  endfunction

  opn_pkt_t exp_q [5][5][$];   // [out][in]
  int sent = 0, recvd = 0, dropped = 0;
  int tag = 1;
  logic drain = 1'b0;
  logic use_flush = 1'b0;

  initial begin
    #2_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // drive at negedge, sample at posedge
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < 5; i++) begin
        if (!(in_valid[i] && in_hold[i])) begin
          in_valid[i] = !drain && ($urandom % 3 != 0);
          in_pkt[i] = '0;
          in_pkt[i].dy = 3'($urandom % 5);
          in_pkt[i].dx = 3'($urandom % 5);
          if (i == 0) in_pkt[i].dy = 3'(2 + $urandom % 3);   // from N: not back north
          in_pkt[i].frame = use_flush ? 3'd5 : 3'($urandom % 4);
          in_pkt[i].data = 64'(tag);
          tag++;
        end
      end
      for (int o = 0; o < 5; o++) out_hold[o] = drain ? 1'b0 : ($urandom % 4 == 0);
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < 5; o++)
        if (out_valid[o]) begin
          bit found;
          found = 0;
          check(!out_hold[o], "no output while held");
          for (int i = 0; i < 5; i++)
            if (!found && exp_q[o][i].size() > 0 && exp_q[o][i][0] == out_pkt[o]) begin
              found = 1;
              void'(exp_q[o][i].pop_front());
            end
          check(found, $sformatf("output %0d packet %0d in order on its route", o, out_pkt[o].data));
          recvd++;
        end
      for (int i = 0; i < 5; i++)
        if (in_valid[i] && !in_hold[i]) begin
          exp_q[route(in_pkt[i])][i].push_back(in_pkt[i]);
          sent++;
        end
    end
  end

  initial begin
    int left;
    flush_mask = 0; in_valid = 0; out_hold = 0;
    for (int i = 0; i < 5; i++) in_pkt[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    drain = 1'b1;
    repeat (50) @(posedge clk);
    left = 0;
    for (int o = 0; o < 5; o++) for (int i = 0; i < 5; i++) left += exp_q[o][i].size();
    check(left == 0, $sformatf("%0d packets never left", left));
    check(sent > 1000 && sent == recvd, $sformatf("sent %0d received %0d", sent, recvd));

    // flush: fill with frame 5 packets while outputs are held, then flush
    @(negedge clk);
    drain = 1'b0; use_flush = 1'b1;
    repeat (10) @(posedge clk);
    @(negedge clk);
    drain = 1'b1;
    in_valid = 0;
    out_hold = 5'h1f;
    @(negedge clk);
    flush_mask = 8'b0010_0000;
    @(negedge clk);
    flush_mask = 0;
    for (int o = 0; o < 5; o++) for (int i = 0; i < 5; i++) exp_q[o][i].delete();
    repeat (10) @(posedge clk);
    check(out_valid == 0, "flushed packets are dropped");
    check(in_hold == 0, "queues empty after flush");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
