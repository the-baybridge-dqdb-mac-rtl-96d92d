// mac_top: a DQDB (IEEE 802.6) queue-arbitrated MAC for one bus.
//
// A DQDB node has two of these, one on each bus, joined by the two-signal
// queue-control links (cmp_*). Cells arrive from the physical layer (PLCP)
// a byte per clock and leave to it TX_TAP+2 = 5 clocks later, unchanged
// unless this MAC sends in an empty cell or sets a request bit in it.
//   receive_block  position counter, receive FIFO, Monitor, Receive and
//                  Send-To-SAR FSMs; busy cells go to the SAR as 12 words
//   send_block     Send FSM, From-SAR FIFO, CRC unit and PLCP output mux
//   dqdb_block     request, count down and bandwidth balancing counters and
//                  the DQDB-SAR, -QUEUE, -REQ and -MAC FSMs
//   mid_table      MID table SRAM with its update and timeout subblocks
// Interfaces:
//   PLCP   rx_data/rx_soc in, tx_data/tx_soc out, soc marking the ACF byte.
//   CAM    ext_addr_match, valid CAM_LATENCY clocks after the last byte of
//          the destination address (byte 14) was on rx_data. The CAM watches
//          rx_data itself.
//   SAR    send side: sar_send_req (level, held until sar_ack), sar_ack
//          (one clock), then 12 words on sar_tx_data, each held four clocks
//          starting the clock after sar_ack. Receive side: sar_rx_data and
//          sar_status, see receive_block.
//   cmp_*  queue control to and from the complementary MAC: each line
//          toggles once per event; they may be driven from another clock.
//   cfg    cfg_we writes cfg_wdata to the bandwidth balancing constant
//          (cfg_sel = 0) or the MID timeout period constant (cfg_sel = 1).
// After reset the MID table spends WORDS clocks writing zeros
// (`mid_init_done` then rises); the chip passes cells and queues meanwhile.
// Scan path: with `scan_mode` high every control register of the MAC is one
// 195-bit shift register from `scan_in` through the DQDB, receive, send and
// MID table blocks to `scan_out` (the request counter's bit 0 is the first
// stage); with it low the path is transparent and the MAC runs normally. The
// data paths (receive FIFO, SAR buffers, From-SAR FIFO bytes, tx_data, MID
// SRAM) are not on it, as in the chip. Mode, input and output follow the
// document; the order and length of the chain are this design's. The block structure
// and its behaviour follow the document; the clock-exact timing, toggle
// signalling, status encoding and configuration port are this design's.
module mac_top
  import mac_pkg::*;
#(
  parameter int unsigned RX_DEPTH    = 12,
  parameter int unsigned TX_TAP      = 3,
  parameter int unsigned CAM_LATENCY = 2,
  parameter int unsigned FS_DEPTH    = 16,
  parameter int unsigned MID_WORDS   = 1024,
  parameter int unsigned TMO_POS     = 30,
  parameter logic [7:0]  BWB_DEFAULT = 8'd8,
  parameter logic [7:0]  TMO_DEFAULT = 8'd0
) (
  input  logic         clk,
  input  logic         rst_n,
  // physical layer (PLCP)
  input  logic [7:0]   rx_data,
  input  logic         rx_soc,
  output logic [7:0]   tx_data,
  output logic         tx_soc,
  // external CAM
  input  logic         ext_addr_match,
  // SAR
  input  logic         sar_send_req,
  output logic         sar_ack,
  input  logic [31:0]  sar_tx_data,
  output logic [31:0]  sar_rx_data,
  output cell_status_t sar_status,
  // complementary MAC
  input  logic         cmp_set_req_in,
  input  logic         cmp_inc_req_in,
  output logic         cmp_set_req_out,
  output logic         cmp_inc_req_out,
  // constants
  input  logic         cfg_we,
  input  logic         cfg_sel,
  input  logic [7:0]   cfg_wdata,
  // status
  output logic         queued,
  output logic [9:0]   rq_cnt,
  output logic [9:0]   cd_cnt,
  output logic         mid_init_done,
  // scan path
  input  logic         scan_mode,
  input  logic         scan_in,
  output logic         scan_out
);

  pos_t       pos;
  logic       in_cell, mid_valid;
  logic [7:0] tap_byte;
  logic       tap_soc;
  logic       rq_zero, cd_zero, bwb_zero;
  logic       mon_dec_rq, mon_dec_cd, mon_ld_bwb, mon_dec_bwb, send_wake, dqdb_lock;
  logic       send_start, mark_req;
  logic       sc_dqdb, sc_rcv, sc_send;

  receive_block #(.RX_DEPTH(RX_DEPTH), .TX_TAP(TX_TAP), .CAM_LATENCY(CAM_LATENCY)) u_rcv (
    .clk, .rst_n, .rx_data, .rx_soc, .ext_addr_match, .mid_valid, .pos, .in_cell,
    .tap_byte, .tap_soc, .queued, .rq_zero, .cd_zero, .bwb_zero,
    .mon_dec_rq, .mon_dec_cd, .mon_ld_bwb, .mon_dec_bwb, .send_wake, .dqdb_lock,
    .sar_rx_data, .sar_status,
    .scan_mode, .scan_in(sc_dqdb), .scan_out(sc_rcv)
  );

  send_block #(.FIFO_DEPTH(FS_DEPTH), .TX_TAP(TX_TAP)) u_send (
    .clk, .rst_n, .tap_byte, .tap_soc, .send_wake, .mark_req, .send_start,
    .sar_ack, .sar_tx_data, .tx_data, .tx_soc,
    .scan_mode, .scan_in(sc_rcv), .scan_out(sc_send)
  );

  dqdb_block #(.BWB_W(8), .BWB_DEFAULT(BWB_DEFAULT)) u_dqdb (
    .clk, .rst_n, .rx_soc, .rx_acf(rx_data),
    .mon_dec_rq, .mon_dec_cd, .mon_ld_bwb, .mon_dec_bwb, .dqdb_lock, .send_start,
    .sar_send_req, .cmp_set_req_in, .cmp_inc_req_in, .cmp_set_req_out, .cmp_inc_req_out,
    .bwb_we(cfg_we && !cfg_sel), .bwb_wdata(cfg_wdata),
    .queued, .rq_zero, .cd_zero, .bwb_zero, .mark_req, .rq_cnt, .cd_cnt,
    .scan_mode, .scan_in, .scan_out(sc_dqdb)
  );

  mid_table #(.WORDS(MID_WORDS), .MATCH_POS(DA_LAST + CAM_LATENCY), .TMO_POS(TMO_POS),
              .TMO_DEFAULT(TMO_DEFAULT)) u_mid (
    .clk, .rst_n, .rx_data, .pos, .in_cell, .ext_addr_match,
    .tmo_we(cfg_we && cfg_sel), .tmo_wdata(cfg_wdata), .mid_valid, .init_done(mid_init_done),
    .scan_mode, .scan_in(sc_send), .scan_out
  );

endmodule
