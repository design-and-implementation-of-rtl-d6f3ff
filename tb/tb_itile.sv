// tb_itile: fills the I-tile array with random rows, fetches random block
// slots and checks that the 8 rows of the block come out in order, one per
// cycle from the second cycle after the fetch, tagged with frame and row index;
// checks that busy holds off a second fetch and that an abort mask naming
// the streaming frame stops the stream.
module tb_itile;
  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // a falling edge, so the asynchronous reset acts at once
  always #5 clk = ~clk;

  logic         fetch_v;
  logic [2:0]   fetch_frame;
  logic [6:0]   fetch_slot;
  logic         busy;
  logic [7:0]   abort_mask;
  logic         row_v;
  logic [2:0]   row_frame, row_idx;
  logic [127:0] row_data;
  logic         refill_we;
  logic [9:0]   refill_addr;
  logic [127:0] refill_data;

  itile dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [127:0] model [1024];

  initial begin
    #2_000_000;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    fetch_v = 0; fetch_frame = 0; fetch_slot = 0; abort_mask = 0;
    refill_we = 0; refill_addr = 0; refill_data = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 1024; r++) begin
      model[r] = {$urandom, $urandom, $urandom, $urandom};
      @(negedge clk);
      refill_we = 1; refill_addr = 10'(r); refill_data = model[r];
    end
    @(negedge clk);
    refill_we = 0;
    check(!row_v && !busy, "idle after refill");

    for (int t = 0; t < 40; t++) begin
      logic [6:0] s;
      logic [2:0] f;
      s = 7'($urandom); f = 3'($urandom);
      @(negedge clk);
      fetch_v = 1; fetch_slot = s; fetch_frame = f;
      @(negedge clk);
      fetch_v = 0;
      @(negedge clk);
      for (int r = 0; r < 8; r++) begin
        check(row_v, $sformatf("row %0d valid", r));
        check(row_frame == f && row_idx == 3'(r), "row tag");
        check(row_data == model[{s, 3'(r)}], $sformatf("row data slot %0d row %0d", s, r));
        if (r < 6) check(busy, "busy while streaming");
        if (r == 2) begin
          // a fetch while busy is ignored
          fetch_v = 1; fetch_slot = s + 7'd1; fetch_frame = f + 3'd1;
        end else fetch_v = 0;
        @(negedge clk);
      end
      fetch_v = 0;
      check(!row_v, "stream ends after 8 rows");
      @(negedge clk);
    end

    // abort of the streaming frame
    @(negedge clk);
    fetch_v = 1; fetch_slot = 7'd5; fetch_frame = 3'd2;
    @(negedge clk);
    fetch_v = 0;
    @(negedge clk);
    abort_mask = 8'b0000_0100;
    @(negedge clk);
    abort_mask = 0;
    check(!row_v, "aborted stream stops");
    @(negedge clk);
    check(!row_v && !busy, "idle after abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
