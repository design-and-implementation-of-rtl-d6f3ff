// opn_router: one node of the operand network (OPN) that joins the 25 tiles
// of a TRIPS core (G, 4 R, 4 D and 16 E tiles on a 5x5 mesh).
//
// Five ports: 0 north (row-1), 1 east (column+1), 2 south (row+1),
// 3 west (column-1), 4 local tile. Every input has a 4-entry FIFO. Packets
// are routed in dimension order, first along Y (rows) and then along X
// (columns). Flow control is on/off: a router raises the 1-bit hold of an
// input while that input's FIFO is full, and an upstream sender does not
// send while it sees hold. Each output port chooses among the inputs whose
// head packet wants it with a round-robin pointer. A packet written into a
// FIFO in one cycle may leave in the next, so a hop costs one cycle.
// A GCN flush marks the queued packets of the flushed frames dead; they are
// dropped when they reach the head of their FIFO.
//
// From the document: 4-entry FIFOs per direction, Y-X dimension-order
// routing, on/off flow control with a hold bit, one cycle per hop, FIFOs
// cleared by the flush. This design's own choices: a packet is a single
// flit carrying the control and data parts side by side (the document sends
// the data flit one cycle after the control flit on dedicated wires), and
// round-robin output arbitration.
module opn_router
  import trips_pkg::*;
#(
  parameter int X     = 0,
  parameter int Y     = 0,
  parameter int DEPTH = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_FRAMES-1:0] flush_mask,  // frames being flushed this cycle
  input  logic [4:0]            in_valid,
  input  opn_pkt_t              in_pkt  [5],
  output logic [4:0]            in_hold,     // to the upstream sender
  output logic [4:0]            out_valid,
  output opn_pkt_t              out_pkt [5],
  input  logic [4:0]            out_hold     // from the downstream receiver
);

  localparam int PW = $clog2(DEPTH);

  opn_pkt_t        fifo  [5][DEPTH];
  logic            dead  [5][DEPTH];
  logic [PW-1:0]   rd_ptr[5], wr_ptr[5];
  logic [PW:0]     count [5];

  // route of each head packet: 0 N, 1 E, 2 S, 3 W, 4 local
  logic [2:0] route [5];
  logic [4:0] head_v;
  logic [4:0] head_dead;

  always_comb begin
    for (int i = 0; i < 5; i++) begin
      opn_pkt_t h;
      int       hy, hx;
      h            = fifo[i][rd_ptr[i]];
      hy           = int'({1'b0, h.dy});
      hx           = int'({1'b0, h.dx});
      head_v[i]    = count[i] != 0;
      head_dead[i] = dead[i][rd_ptr[i]] || flush_mask[h.frame];
      if (hy < Y)      route[i] = 3'd0;
      else if (hy > Y) route[i] = 3'd2;
      else if (hx > X) route[i] = 3'd1;
      else if (hx < X) route[i] = 3'd3;
      else                    route[i] = 3'd4;
    end
  end

  // output arbitration
  logic [2:0] rr    [5];
  logic [4:0] grant [5];   // grant[o][i]
  logic [4:0] pop;

  always_comb begin
    int i;
    i   = 0;
    pop = '0;
    for (int o = 0; o < 5; o++) begin
      grant[o]     = '0;
      out_valid[o] = 1'b0;
      out_pkt[o]   = '0;
      if (!out_hold[o]) begin
        for (int k = 0; k < 5; k++) begin
          i = (32'(rr[o]) + k) % 5;
          if (grant[o] == '0 && head_v[i] && !head_dead[i] && 32'(route[i]) == o) begin
            grant[o][i] = 1'b1;
          end
        end
      end
      for (int j = 0; j < 5; j++) begin
        if (grant[o][j]) begin
          out_valid[o] = 1'b1;
          out_pkt[o]   = fifo[j][rd_ptr[j]];
          pop[j]       = 1'b1;
        end
      end
    end
    // dead heads are dropped without using an output
    for (int j = 0; j < 5; j++)
      if (head_v[j] && head_dead[j]) pop[j] = 1'b1;
  end

  always_comb
    for (int i = 0; i < 5; i++) in_hold[i] = count[i] == (PW+1)'(DEPTH);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) begin
        rd_ptr[i] <= '0;
        wr_ptr[i] <= '0;
        count[i]  <= '0;
        rr[i]     <= '0;
        for (int d = 0; d < DEPTH; d++) begin
          fifo[i][d] <= '0;
          dead[i][d] <= 1'b0;
        end
      end
    end else begin
      for (int i = 0; i < 5; i++) begin
        logic push;
        push = in_valid[i] && !in_hold[i];
        for (int d = 0; d < DEPTH; d++)
          if (flush_mask[fifo[i][d].frame]) dead[i][d] <= 1'b1;
        if (push) begin
          fifo[i][wr_ptr[i]] <= in_pkt[i];
          dead[i][wr_ptr[i]] <= flush_mask[in_pkt[i].frame];
          wr_ptr[i]          <= wr_ptr[i] + 1'b1;
        end
        if (pop[i]) rd_ptr[i] <= rd_ptr[i] + 1'b1;
        count[i] <= count[i] + (PW+1)'(push) - (PW+1)'(pop[i]);
      end
      for (int o = 0; o < 5; o++)
        if (grant[o] != '0) rr[o] <= (rr[o] == 3'd4) ? 3'd0 : rr[o] + 3'd1;
    end
  end

  // a sender never pushes into a full FIFO
  for (genvar i = 0; i < 5; i++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk)
      count[i] <= (PW+1)'(DEPTH));
  end

endmodule
