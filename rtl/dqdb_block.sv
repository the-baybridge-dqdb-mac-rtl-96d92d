// dqdb_block: the distributed queue of one DQDB MAC.
//
// Holds the three DQDB counters and four FSMs of the protocol:
//  * request counter (RQ): requests of downstream MACs still waiting. It
//    counts up when the complementary MAC reports a set request bit on the
//    other bus (DQDB-MAC FSM) and down when an empty cell passes while this
//    MAC has nothing queued (Monitor FSM, in receive_block).
//  * count down counter (CD): empty cells to let pass before sending. The
//    DQDB-SAR FSM loads it from RQ and clears RQ when the SAR asks to send,
//    and toggles `cmp_set_req_out` so that the complementary MAC sets a request
//    bit on the other bus. The Monitor FSM decrements it.
//  * bandwidth balancing counter (BWB): cells this MAC may still send in a
//    row. The Monitor FSM decrements it for each cell sent and reloads it
//    from the bandwidth balancing constant whenever it lets an empty cell
//    pass. It is also loaded after reset and when the constant is written.
//  * DQDB-QUEUE FSM: at every cell start it looks at the request bit of the
//    incoming ACF. A set bit is passed to the complementary MAC (toggle on
//    `cmp_inc_req_out`). A clear bit is set in the outgoing copy of this cell
//    (`mark_req`) if the complementary MAC has a bandwidth request pending
//    (DQDB-REQ FSM).
// The DQDB-SAR FSM queues only when the Monitor FSM does not hold `dqdb_lock`
// and holds the request counter lock for its one queueing clock, so an
// increment that arrives then waits in the DQDB-MAC FSM. Counter commands
// from the Monitor FSM arrive registered, one clock after the cell start,
// which is the pipelining the document describes for its counters.
// `queued` is high from the queueing clock until `send_start`. The FSM then
// waits for `sar_send_req` to fall before it queues again.
// Counter widths (10 bits) follow the document; the 8-bit bandwidth balancing
// constant, its default of 8 and the toggle signalling are this design's.
// Scan path: in scan mode every register of the block shifts one place per
// clock, in the order request counter, count down counter, bandwidth balancing
// counter, DQDB-MAC FSM, DQDB-REQ FSM, DQDB-SAR FSM, DQDB-QUEUE FSM,
// bandwidth balancing constant (56 bits); the scan inputs default to 0.
module dqdb_block
  import mac_pkg::*;
#(
  parameter int unsigned          BWB_W       = 8,
  parameter logic [BWB_W-1:0]     BWB_DEFAULT = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // incoming cell, from the physical layer
  input  logic             rx_soc,        // byte 0 (ACF) of a cell on rx_acf
  input  logic [7:0]       rx_acf,
  // Monitor FSM commands (registered, one clock after rx_soc)
  input  logic             mon_dec_rq,
  input  logic             mon_dec_cd,
  input  logic             mon_ld_bwb,
  input  logic             mon_dec_bwb,
  input  logic             dqdb_lock,
  input  logic             send_start,    // DQDB status update from the send side
  // SAR
  input  logic             sar_send_req,
  // complementary MAC, toggle signalling
  input  logic             cmp_set_req_in,
  input  logic             cmp_inc_req_in,
  output logic             cmp_set_req_out,
  output logic             cmp_inc_req_out,
  // bandwidth balancing constant pre-load
  input  logic             bwb_we,
  input  logic [BWB_W-1:0] bwb_wdata,
  // status
  output logic             queued,
  output logic             rq_zero,
  output logic             cd_zero,
  output logic             bwb_zero,
  output logic             mark_req,      // set REQ in the outgoing copy of this cell
  output logic [CTR_W-1:0] rq_cnt,
  output logic [CTR_W-1:0] cd_cnt,
  // scan path
  input  logic             scan_mode = 1'b0,
  input  logic             scan_in   = 1'b0,
  output logic             scan_out
);

  // Scan chain: scan_in -> request counter -> count down counter -> bandwidth
  // balancing counter -> DQDB-MAC FSM -> DQDB-REQ FSM -> SAR FSM -> QUEUE FSM
  // -> bandwidth balancing constant -> scan_out.
  logic sc_rq, sc_cd, sc_bwb, sc_mac, sc_req, sc_sar, sc_queue;

  // ---------------- DQDB-SAR FSM ----------------
  typedef enum logic [1:0] {SAR_IDLE, SAR_QUEUE, SAR_QUEUED, SAR_DONE} sar_state_e;
  sar_state_e sar_state;
  logic       rq_lock;
  logic       rq_clr, cd_ld;

  assign rq_lock = (sar_state == SAR_QUEUE);
  assign rq_clr  = rq_lock;
  assign cd_ld   = rq_lock;
  assign queued  = (sar_state == SAR_QUEUE) || (sar_state == SAR_QUEUED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sar_state       <= SAR_IDLE;
      cmp_set_req_out <= 1'b0;
    end else if (scan_mode) begin
      {sar_state, cmp_set_req_out} <= {sar_state[0], cmp_set_req_out, sc_req};
    end else begin
      unique case (sar_state)
        SAR_IDLE:   if (sar_send_req && !dqdb_lock) begin
                      sar_state       <= SAR_QUEUE;
                      cmp_set_req_out <= ~cmp_set_req_out;
                    end
        SAR_QUEUE:  sar_state <= SAR_QUEUED;
        SAR_QUEUED: if (send_start) sar_state <= SAR_DONE;
        SAR_DONE:   if (!sar_send_req) sar_state <= SAR_IDLE;
      endcase
    end
  end

  // ---------------- DQDB-MAC and DQDB-REQ FSMs ----------------
  logic rq_inc;       // DQDB-MAC: increment request counter
  logic bw_req_pend;  // DQDB-REQ: bandwidth request pending
  logic bw_req_take;

  dqdb_link_fsm u_mac_fsm (
    .clk, .rst_n, .tgl_in(cmp_inc_req_in), .take(1'b1), .hold(rq_lock), .pend(rq_inc),
    .scan_mode, .scan_in(sc_bwb), .scan_out(sc_mac)
  );
  dqdb_link_fsm u_req_fsm (
    .clk, .rst_n, .tgl_in(cmp_set_req_in), .take(bw_req_take), .hold(1'b0), .pend(bw_req_pend),
    .scan_mode, .scan_in(sc_mac), .scan_out(sc_req)
  );

  // ---------------- DQDB-QUEUE FSM ----------------
  logic req_bit_in;
  assign req_bit_in  = rx_acf[ACF_REQ];
  assign bw_req_take = rx_soc && !req_bit_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_inc_req_out <= 1'b0;
      mark_req        <= 1'b0;
    end else if (scan_mode) begin
      {cmp_inc_req_out, mark_req} <= {mark_req, sc_sar};
    end else if (rx_soc) begin
      if (req_bit_in) cmp_inc_req_out <= ~cmp_inc_req_out;
      mark_req <= !req_bit_in && bw_req_pend;
    end
  end

  // ---------------- counters ----------------
  logic [BWB_W-1:0] bwb_const;
  logic [BWB_W-1:0] bwb_cnt;
  logic             bwb_init;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bwb_const <= BWB_DEFAULT;
      bwb_init  <= 1'b1;
    end else if (scan_mode) begin
      {bwb_const, bwb_init} <= {bwb_const[BWB_W-2:0], bwb_init, sc_queue};
    end else begin
      bwb_init <= 1'b0;
      if (bwb_we) bwb_const <= bwb_wdata;
    end
  end

  dqdb_counter #(.W(CTR_W)) u_req_cnt (
    .clk, .rst_n, .clr(rq_clr), .ld(1'b0), .ld_val('0),
    .inc(rq_inc && !rq_lock), .dec(mon_dec_rq), .cnt(rq_cnt), .zero(rq_zero),
    .scan_mode, .scan_in, .scan_out(sc_rq)
  );

  dqdb_counter #(.W(CTR_W)) u_cd_cnt (
    .clk, .rst_n, .clr(1'b0), .ld(cd_ld), .ld_val(rq_cnt),
    .inc(1'b0), .dec(mon_dec_cd), .cnt(cd_cnt), .zero(cd_zero),
    .scan_mode, .scan_in(sc_rq), .scan_out(sc_cd)
  );

  assign sc_sar   = sar_state[1];
  assign sc_queue = cmp_inc_req_out;
  assign scan_out = bwb_const[BWB_W-1];

  dqdb_counter #(.W(BWB_W)) u_bwb_cnt (
    .clk, .rst_n, .clr(1'b0), .ld(mon_ld_bwb || bwb_init || bwb_we),
    .ld_val(bwb_we ? bwb_wdata : bwb_const),
    .inc(1'b0), .dec(mon_dec_bwb), .cnt(bwb_cnt), .zero(bwb_zero),
    .scan_mode, .scan_in(sc_cd), .scan_out(sc_bwb)
  );

  // The Monitor FSM must keep the SAR FSM from queueing while it updates the
  // counters, so a queueing clock never meets a monitor command.
  a_lock: assert property (@(posedge clk) disable iff (!rst_n || scan_mode)
                           rq_lock |-> !(mon_dec_rq || mon_dec_cd));

endmodule
