// tb_exit_predictor: checks the fall-through prediction of an untrained
// block (BADDR + 5 chunks), that a trained exit and target are predicted,
// that one wrong outcome does not replace a strongly trained exit
// (hysteresis) while repeated ones do, and that the call/return type is kept.
module tb_exit_predictor;
  import trips_pkg::*;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  addr_t      pred_addr;
  logic [2:0] pred_exit;
  addr_t      pred_target;
  bkind_e     pred_kind;
  logic       upd_v;
  addr_t      upd_addr;
  logic [2:0] upd_exit;
  addr_t      upd_target;
  bkind_e     upd_kind;

  exit_predictor dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic train(addr_t a, logic [2:0] e, addr_t t, bkind_e k);
    @(negedge clk);
    upd_v = 1; upd_addr = a; upd_exit = e; upd_target = t; upd_kind = k;
    @(negedge clk);
    upd_v = 0;
  endtask

  initial begin
    #1_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    addr_t a;
    pred_addr = 0; upd_v = 0; upd_addr = 0; upd_exit = 0; upd_target = 0; upd_kind = BK_BRANCH;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 20; t++) begin
      a = addr_t'({$urandom, 7'b0});
      pred_addr = a;
      #1;
      check(pred_target == a + 40'd640, "untrained block falls through");
      check(pred_exit == 3'd0 && pred_kind == BK_BRANCH, "untrained exit 0");
    end

    // a loop block: always exit 3 to itself. History fills with 3s.
    a = 40'h1_0000;
    for (int i = 0; i < 12; i++) train(a, 3'd3, a, BK_BRANCH);
    pred_addr = a;
    #1;
    check(pred_exit == 3'd3, $sformatf("trained exit %0d", pred_exit));
    check(pred_target == a, "trained target");

    // a call block
    train(40'h2_0000, 3'd1, 40'h9_0000, BK_CALL);
    pred_addr = 40'h2_0000;
    #1;
    check(pred_kind == BK_CALL || pred_exit != 3'd1, "call type kept with its target");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
