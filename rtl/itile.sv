// itile: one instruction tile (I-tile), the instruction cache bank of one
// row of a TRIPS core. Five I-tiles sit in column 0: the one beside the
// G-tile holds the block header chunks (read and write instructions for the
// R-tiles), the other four hold instruction chunk 0..3 for E-tile rows 0..3.
//
// Storage is 16 KB: 1024 rows of 128 bits, four 32-bit instruction words per
// row. A block occupies 8 rows (one 128-byte chunk) at row {slot, r}, r=0..7,
// where the block slot comes from block address bits [13:7]. Row r of an
// instruction chunk holds the instructions for slot r of the four E-tiles of
// the row (word x for column x); row r of the header chunk holds header words
// H(4r)..H(4r+3), the reads and writes for slot r of banks 0..3.
// A fetch command streams the 8 rows out, one per cycle; the first row is on
// the outputs two cycles after the command (one to start, one array read): a whole block reaches the execution array in 8 cycles,
// which matches the predictor's rate of one prediction every 8 cycles.
// A refill port writes one row per cycle. A flush of the frame being
// streamed stops the stream.
//
// From the document: 16 KB per I-tile, one I-tile per row, header and
// instruction chunks of 32 words, 128-bit instruction-cache width.
// This design's own choices: the cache is directly indexed by the block
// address (no tags here; the G-tile keeps the directory), the 4-instruction
// per cycle dispatch width, and the plain refill port in place of the OCN
// refill path.
module itile #(
  parameter int ROWS = 1024         // 16 KB of 128-bit rows
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // fetch command from the G-tile (through the I-tile column)
  input  logic                    fetch_v,
  input  logic [2:0]              fetch_frame,
  input  logic [$clog2(ROWS)-4:0] fetch_slot,
  output logic                    busy,
  input  logic [7:0]              abort_mask,  // frames flushed this cycle
  // dispatch output, one row per cycle
  output logic                    row_v,
  output logic [2:0]              row_frame,
  output logic [2:0]              row_idx,
  output logic [127:0]            row_data,
  // refill
  input  logic                    refill_we,
  input  logic [$clog2(ROWS)-1:0] refill_addr,
  input  logic [127:0]            refill_data
);

  localparam int RA = $clog2(ROWS);

  logic [127:0] sram [ROWS];

  logic              act;
  logic [2:0]        cnt;
  logic [2:0]        frame;
  logic [RA-4:0]     slot;

  assign busy = act && cnt != 3'd7;

  always_ff @(posedge clk) begin
    if (refill_we) sram[refill_addr] <= refill_data;
    row_data <= sram[{slot, cnt}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act       <= 1'b0;
      cnt       <= '0;
      frame     <= '0;
      slot      <= '0;
      row_v     <= 1'b0;
      row_frame <= '0;
      row_idx   <= '0;
    end else begin
      row_v     <= act && !abort_mask[frame];
      row_frame <= frame;
      row_idx   <= cnt;
      if (act) begin
        cnt <= cnt + 3'd1;
        if (cnt == 3'd7 || abort_mask[frame]) act <= 1'b0;
      end
      if (fetch_v && !busy) begin
        act   <= 1'b1;
        cnt   <= '0;
        frame <= fetch_frame;
        slot  <= fetch_slot;
      end
    end
  end

endmodule
