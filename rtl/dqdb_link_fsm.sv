// dqdb_link_fsm: receiver for one signal from the complementary MAC.
//
// The two MACs of a node run from the clocks of their own physical layers, so
// each of the two queue-control signals between them is sent as a toggle: the
// sender inverts its line once per event. This FSM synchronises the line with
// two flip-flops, detects a change and registers it as a pending event. The
// events are counted (up to 2^PEND_W - 1), because the complementary MAC may
// queue its next cell before the request bit of the previous one has found
// a passing cell. One event is consumed in each clock in which `take` is high
// and `hold` is low. In the DQDB-MAC instance, `take` is tied high and `hold` is
// the request counter lock, so `pend` is the increment strobe of the request
// counter. In the DQDB-REQ instance, `take` is the DQDB-QUEUE FSM setting the
// request bit of a passing cell. Toggle signalling and the synchroniser are
// this design's choice; the document only says the two FSMs are identical
// and register requests from the complementary MAC.
// Timing: `pend` rises three clocks after the line toggles. Events must be at
// least two clocks apart (they come at most once per 53-clock cell).
// In scan mode the synchroniser and the event counter shift as one 3+PEND_W-bit
// register from `scan_in` to `scan_out`.
module dqdb_link_fsm #(
  parameter int unsigned PEND_W = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic tgl_in,   // toggle line from the complementary MAC
  input  logic take,     // local logic consumes one pending event
  input  logic hold,     // lock: keep the events pending
  output logic pend,     // at least one event is pending
  // scan path
  input  logic scan_mode = 1'b0,
  input  logic scan_in   = 1'b0,
  output logic scan_out
);

  logic [2:0]        sync;    // two synchroniser stages and the edge detector stage
  logic              edge_seen;
  logic              consume;
  logic [PEND_W-1:0] count;   // events registered and not yet consumed
  logic [PEND_W+2:0] scan_q;

  assign scan_q   = {sync, count};
  assign scan_out = scan_q[PEND_W+2];

  assign edge_seen = sync[2] ^ sync[1];
  assign pend      = (count != '0);
  assign consume   = pend && take && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync  <= '0;
      count <= '0;
    end else if (scan_mode) begin
      {sync, count} <= {scan_q[PEND_W+1:0], scan_in};
    end else begin
      sync <= {sync[1:0], tgl_in};
      if (edge_seen && !consume)      count <= count + 1'b1;
      else if (consume && !edge_seen) count <= count - 1'b1;
    end
  end

  // More pending events than the counter holds would be lost.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n || scan_mode)
                                 edge_seen |-> (count != '1));

endmodule
