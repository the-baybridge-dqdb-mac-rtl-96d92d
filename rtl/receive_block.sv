// receive_block: Receive FIFO shifter, Receive FSM, Monitor FSM and
// Send-To-SAR FSM with its 32-bit buffer.
//
// The physical layer delivers one byte per clock on `rx_data`, `rx_soc` high
// with byte 0 (the ACF), the 53 bytes of a cell back to back; cells may be
// separated by idle clocks. A position counter gives every other unit the
// index of the byte on `rx_data` (`pos`, valid while `in_cell`).
//  * Monitor FSM: at each ACF it latches the busy and slot type bits; the
//    next clock it decides and the clock after that its registered commands
//    reach the DQDB block. For an empty QA cell: with nothing queued it
//    decrements the request counter (if not zero) and reloads the bandwidth
//    balancing counter; queued but not allowed to send (count down not zero,
//    or bandwidth balancing counter at zero) it decrements the count down
//    counter (if not zero) and reloads the bandwidth balancing counter;
//    allowed to send it pulses `send_wake` (two clocks after the ACF) and
//    decrements the bandwidth balancing counter. Busy cells are ignored.
//    `dqdb_lock` covers these three clocks.
//  * Receive FSM: for a busy QA cell it compares bytes 1-4 with the NCI
//    constant, runs the CRC over bytes 5-52, samples the CAM's
//    `ext_addr_match` at byte MATCH_POS = 14 + CAM_LATENCY, and wakes the
//    Send-To-SAR FSM at byte RX_DEPTH + 4. The cell's NCI and CRC results are
//    kept until the next cell ends.
//  * Send-To-SAR FSM: loads the 12 words of the segment (bytes 5-52) from the
//    end of the receive FIFO into the buffer `sar_rx_data`, one every four
//    clocks. At the first word it decides the match: the CAM result for BOM
//    and SSM cells, `mid_valid` for COM and EOM cells. `sar_status` gives
//    strobe (first clock of each word), sof (first word), match (all words)
//    and accept (last word: match, NCI and CRC all good).
// The FIFO is RX_DEPTH bytes deep so that the first word leaves after the
// address match is known; this needs RX_DEPTH >= CAM_LATENCY + 10. The
// division into FSMs and their duties follow the document; the clock-exact
// schedule, the status encoding and passing the whole 48-byte segment
// (header and trailer of the segment included) are this design's.
// Scan path: in scan mode the control registers shift one place per clock, in
// the order CRC unit, position counter, Monitor FSM, Receive FSM, Send-To-SAR
// FSM with its status register (43 bits). The receive FIFO and the 32-bit
// buffer are data paths and stay off the chain, as in the chip.
module receive_block
  import mac_pkg::*;
#(
  parameter int unsigned RX_DEPTH    = 12,
  parameter int unsigned TX_TAP      = 3,
  parameter int unsigned CAM_LATENCY = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // physical layer
  input  logic [7:0]   rx_data,
  input  logic         rx_soc,
  // external CAM
  input  logic         ext_addr_match,
  // MID table
  input  logic         mid_valid,
  output pos_t         pos,
  output logic         in_cell,
  // to the send block
  output logic [7:0]   tap_byte,
  output logic         tap_soc,
  // DQDB block
  input  logic         queued,
  input  logic         rq_zero,
  input  logic         cd_zero,
  input  logic         bwb_zero,
  output logic         mon_dec_rq,
  output logic         mon_dec_cd,
  output logic         mon_ld_bwb,
  output logic         mon_dec_bwb,
  output logic         send_wake,
  output logic         dqdb_lock,
  // SAR reassembly side
  output logic [31:0]  sar_rx_data,
  output cell_status_t sar_status,
  // scan path
  input  logic         scan_mode = 1'b0,
  input  logic         scan_in   = 1'b0,
  output logic         scan_out
);

  localparam int unsigned MATCH_POS = DA_LAST + CAM_LATENCY;
  localparam int unsigned WAKE_POS  = RX_DEPTH + 4;

  // Scan chain: scan_in -> CRC unit -> position counter -> Monitor FSM ->
  // Receive FSM -> Send-To-SAR FSM and status -> scan_out. The receive FIFO
  // and the 32-bit buffer are data paths and are not on it.
  logic        sc_crc;
  logic [7:0]  scan_mon;
  logic [6:0]  scan_rcv;
  logic [11:0] scan_x;

  // ---------------- cell position ----------------
  pos_t cnt_q;

  assign pos     = rx_soc ? pos_t'(0) : cnt_q;
  assign in_cell = rx_soc || (cnt_q != pos_t'(0) && cnt_q < pos_t'(CELL_BYTES));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     cnt_q <= '0;
    else if (scan_mode)             cnt_q <= {cnt_q[4:0], sc_crc};
    else if (rx_soc)                cnt_q <= pos_t'(1);
    else if (cnt_q != pos_t'(0) && cnt_q < pos_t'(CELL_BYTES)) cnt_q <= cnt_q + 1'b1;
    else                            cnt_q <= '0;
  end

  // ---------------- Receive FIFO shifter ----------------
  logic [31:0] fifo_word;

  receive_fifo #(.DEPTH(RX_DEPTH), .TX_TAP(TX_TAP)) u_fifo (
    .clk, .rst_n, .din(rx_data), .sin(rx_soc),
    .tap_byte, .tap_soc, .word(fifo_word)
  );

  // ---------------- Monitor FSM ----------------
  typedef enum logic [1:0] {M_IDLE, M_DECIDE, M_EXEC} mon_state_e;
  mon_state_e mon_state;
  logic       acf_empty;

  assign dqdb_lock = rx_soc || (mon_state != M_IDLE);
  assign scan_mon  = {mon_state, acf_empty, mon_dec_rq, mon_dec_cd, mon_ld_bwb, mon_dec_bwb, send_wake};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_state   <= M_IDLE;
      acf_empty   <= 1'b0;
      mon_dec_rq  <= 1'b0;
      mon_dec_cd  <= 1'b0;
      mon_ld_bwb  <= 1'b0;
      mon_dec_bwb <= 1'b0;
      send_wake   <= 1'b0;
    end else if (scan_mode) begin
      {mon_state, acf_empty, mon_dec_rq, mon_dec_cd, mon_ld_bwb, mon_dec_bwb, send_wake}
        <= {scan_mon[6:0], cnt_q[5]};
    end else begin
      mon_dec_rq  <= 1'b0;
      mon_dec_cd  <= 1'b0;
      mon_ld_bwb  <= 1'b0;
      mon_dec_bwb <= 1'b0;
      send_wake   <= 1'b0;
      unique case (mon_state)
        M_IDLE:   if (rx_soc) begin
                    acf_empty <= !rx_data[ACF_BUSY] && !rx_data[ACF_SL];
                    mon_state <= M_DECIDE;
                  end
        M_DECIDE: begin
                    mon_state <= M_EXEC;
                    if (acf_empty) begin
                      if (!queued) begin
                        mon_dec_rq <= !rq_zero;
                        mon_ld_bwb <= 1'b1;
                      end else if (!cd_zero || bwb_zero) begin
                        mon_dec_cd <= !cd_zero;
                        mon_ld_bwb <= 1'b1;
                      end else begin
                        send_wake   <= 1'b1;
                        mon_dec_bwb <= 1'b1;
                      end
                    end
                  end
        M_EXEC:   mon_state <= M_IDLE;
        default:  mon_state <= M_IDLE;
      endcase
    end
  end

  // ---------------- Receive FSM ----------------
  typedef enum logic [1:0] {R_IDLE, R_ACTIVE, R_DONE} rcv_state_e;
  rcv_state_e rcv_state;
  logic       nci_ok_q, cam_q, is_addr_cell;
  logic       cell_nci_ok, cell_crc_ok;   // results of the last finished cell
  logic       crc_ok;
  logic       stsar_wake;

  crc10 u_crc (
    .clk, .rst_n, .clr(rx_soc),
    .en(rcv_state == R_ACTIVE && in_cell && pos >= pos_t'(HDR_BYTES)),
    .din(rx_data), .crc(), .ok(crc_ok),
    .scan_mode, .scan_in, .scan_out(sc_crc)
  );

  assign scan_rcv = {rcv_state, nci_ok_q, cam_q, is_addr_cell, cell_nci_ok, cell_crc_ok};

  assign stsar_wake = (rcv_state != R_IDLE) && in_cell && (pos == pos_t'(WAKE_POS));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcv_state    <= R_IDLE;
      nci_ok_q     <= 1'b0;
      cam_q        <= 1'b0;
      is_addr_cell <= 1'b0;
      cell_nci_ok  <= 1'b0;
      cell_crc_ok  <= 1'b0;
    end else if (scan_mode) begin
      {rcv_state, nci_ok_q, cam_q, is_addr_cell, cell_nci_ok, cell_crc_ok}
        <= {scan_rcv[5:0], scan_mon[7]};
    end else begin
      unique case (rcv_state)
        R_IDLE:   if (rx_soc && rx_data[ACF_BUSY] && !rx_data[ACF_SL]) begin
                    rcv_state <= R_ACTIVE;
                    nci_ok_q  <= 1'b1;
                  end
        R_ACTIVE: begin
                    if (pos >= pos_t'(1) && pos <= pos_t'(4) &&
                        rx_data != NCI_QA_CL[8*(4-int'(pos)) +: 8])
                      nci_ok_q <= 1'b0;
                    if (pos == pos_t'(5))
                      is_addr_cell <= (rx_data[7:6] == ST_BOM) || (rx_data[7:6] == ST_SSM);
                    if (pos == pos_t'(MATCH_POS)) cam_q <= ext_addr_match;
                    if (pos == pos_t'(CELL_BYTES - 1)) rcv_state <= R_DONE;
                    if (!in_cell) rcv_state <= R_IDLE;   // cell cut short
                  end
        R_DONE:   begin
                    cell_nci_ok <= nci_ok_q;
                    cell_crc_ok <= crc_ok;
                    rcv_state   <= R_IDLE;
                    // a new cell may start in this clock
                    if (rx_soc && rx_data[ACF_BUSY] && !rx_data[ACF_SL]) begin
                      rcv_state <= R_ACTIVE;
                      nci_ok_q  <= 1'b1;
                    end
                  end
        default:  rcv_state <= R_IDLE;
      endcase
    end
  end

  // ---------------- Send-To-SAR FSM ----------------
  typedef enum logic {X_IDLE, X_XFER} x_state_e;
  x_state_e   x_state;
  logic [3:0] x_word;
  logic [1:0] x_sub;
  logic       x_match;

  assign scan_x   = {x_state, x_word, x_sub, x_match, sar_status};
  assign scan_out = scan_x[11];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_state     <= X_IDLE;
      x_word      <= '0;
      x_sub       <= '0;
      x_match     <= 1'b0;
      sar_rx_data <= '0;
      sar_status  <= '0;
    end else if (scan_mode) begin
      {x_state, x_word, x_sub, x_match, sar_status} <= {scan_x[10:0], scan_rcv[6]};
    end else begin
      sar_status.strobe <= 1'b0;
      unique case (x_state)
        X_IDLE: if (stsar_wake) begin
                  x_state <= X_XFER;
                  x_word  <= '0;
                  x_sub   <= '0;
                end else begin
                  sar_status <= '0;
                end
        X_XFER: begin
                  x_sub <= x_sub + 1'b1;
                  if (x_sub == 2'd0) begin
                    logic m;
                    m = (x_word == 4'd0) ? (is_addr_cell ? cam_q : mid_valid) : x_match;
                    x_match            <= m;
                    sar_rx_data        <= fifo_word;
                    sar_status.strobe  <= 1'b1;
                    sar_status.sof     <= (x_word == 4'd0);
                    sar_status.match   <= m;
                    sar_status.accept  <= (x_word == 4'(SEG_WORDS - 1)) && m
                                          && cell_nci_ok && cell_crc_ok;
                  end
                  if (x_sub == 2'd3) begin
                    x_word <= x_word + 1'b1;
                    if (x_word == 4'(SEG_WORDS - 1)) x_state <= X_IDLE;
                  end
                end
        default: x_state <= X_IDLE;
      endcase
    end
  end

endmodule
