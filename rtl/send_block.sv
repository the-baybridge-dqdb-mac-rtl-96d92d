// send_block: Send FSM, From-SAR FIFO, CRC unit and PLCP output mux.
//
// Every cell leaves the chip through this block, one byte per clock, TX_TAP+2
// clocks after it arrived: the PLCP output mux takes the byte stream from the
// receive FIFO tap and registers it onto `tx_data`/`tx_soc`.
//  * Cell not used for sending: passed unchanged, except that the modify
//    busy/request logic sets the request bit of the ACF when the DQDB block
//    asks for it (`mark_req`, sampled at the ACF).
//  * Cell used for sending: the Monitor FSM pulses `send_wake` two clocks
//    after the cell's ACF arrived. The pulse is also the acknowledge to the
//    SAR (`sar_ack`) and the DQDB status update (`send_start`). The SAR then
//    puts the 12 words of the segment (CRC field zero) on `sar_tx_data`, a new
//    word every four clocks starting the clock after the acknowledge; the
//    Send FSM stores each word in its second clock. The CRC unit reads the
//    stored bytes one per clock and, one clock after the last, the CRC is
//    written into the CRC field while it is still in the FIFO. On the output,
//    the ACF gets its busy bit set, the four NCI bytes FF FF F0 22 follow,
//    then the 48 FIFO bytes.
// The three mux channels, the hardwired NCI, the word pace of four clocks and
// the CRC insertion inside the FIFO follow the document; the clock-exact
// schedule is this design's. TX_TAP must be at least 3 so that the CRC is in
// the FIFO before the output reaches it.
// Scan path: in scan mode the control registers shift one place per clock, in
// the order CRC unit, From-SAR FIFO pointers, Send FSM, output side state,
// tx_soc (39 bits); the byte FIFO and tx_data are data paths and stay off it.
module send_block
  import mac_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned TX_TAP     = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  // byte stream from the receive FIFO tap
  input  logic [7:0]  tap_byte,
  input  logic        tap_soc,
  // DQDB and monitor
  input  logic        send_wake,
  input  logic        mark_req,
  output logic        send_start,
  // SAR segmentation side
  output logic        sar_ack,
  input  logic [31:0] sar_tx_data,
  // physical layer
  output logic [7:0]  tx_data,
  output logic        tx_soc,
  // scan path
  input  logic        scan_mode = 1'b0,
  input  logic        scan_in   = 1'b0,
  output logic        scan_out
);

  // The CRC reaches the FIFO 54 clocks after the ACF arrived; the output
  // reads the CRC field TX_TAP + 52 clocks after it.
  if (TX_TAP < 3) begin : g_tap_check
    $error("send_block: TX_TAP must be at least 3");
  end

  // ---------------- Send FSM: load from the SAR, compute the CRC ----------------
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_CRC} state_e;
  state_e     state;
  logic [5:0] cyc;          // clocks since the acknowledge, less one
  logic       fifo_wr, crc_en, ld_crc;
  logic [9:0] crc;
  logic [7:0] crc_byte;
  logic       fifo_rd;
  logic [7:0] fifo_byte;
  // Scan chain: scan_in -> CRC unit -> FIFO pointers -> Send FSM -> output
  // side state -> tx_soc -> scan_out. tx_data is a data path and is not on it.
  logic       sc_crc, sc_fifo;
  logic [7:0] scan_fsm;

  assign scan_fsm = {state, cyc};

  assign sar_ack    = send_wake;
  assign send_start = send_wake;

  assign fifo_wr = (state == S_LOAD) && (cyc[1:0] == 2'd1) && (cyc <= 6'd45);
  assign crc_en  = (state == S_LOAD) && (cyc >= 6'd2) && (cyc <= 6'd49);
  assign ld_crc  = (state == S_CRC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cyc   <= '0;
    end else if (scan_mode) begin
      {state, cyc} <= {scan_fsm[6:0], sc_fifo};
    end else begin
      unique case (state)
        S_IDLE: if (send_wake) begin
                  state <= S_LOAD;
                  cyc   <= '0;
                end
        S_LOAD: begin
                  cyc <= cyc + 1'b1;
                  if (cyc == 6'd49) state <= S_CRC;
                end
        S_CRC:  state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  from_sar_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr(fifo_wr), .wdata(sar_tx_data),
    .ld_crc, .crc,
    .rd(fifo_rd), .rdata(fifo_byte),
    .crc_rd(crc_en), .crc_data(crc_byte),
    .scan_mode, .scan_in(sc_crc), .scan_out(sc_fifo)
  );

  crc10 u_crc (
    .clk, .rst_n, .clr(send_wake), .en(crc_en), .din(crc_byte), .crc, .ok(),
    .scan_mode, .scan_in, .scan_out(sc_crc)
  );

  // ---------------- output side: modify logic and PLCP output mux ----------------
  typedef enum logic [1:0] {MUX_PASS, MUX_ACF, MUX_NCI, MUX_FIFO} mux_e;
  logic       send_cell;    // the next cell at the tap is the one being sent
  logic       tx_sending;   // the cell at the tap is being sent
  pos_t       tpos;         // position at the tap, valid while tx_sending
  mux_e       mux_sel;
  logic [7:0] acf_mod;
  logic [7:0] nci_byte;
  logic [7:0] scan_out_q;   // output side state on the scan chain

  assign scan_out_q = {send_cell, tx_sending, tpos};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      send_cell  <= 1'b0;
      tx_sending <= 1'b0;
      tpos       <= '0;
    end else if (scan_mode) begin
      {send_cell, tx_sending, tpos} <= {scan_out_q[6:0], scan_fsm[7]};
    end else begin
      if (send_wake) send_cell <= 1'b1;
      if (tap_soc) begin
        tx_sending <= send_cell && !send_wake;
        send_cell  <= send_wake;
        tpos       <= pos_t'(1);
      end else if (tpos != pos_t'(CELL_BYTES)) begin
        tpos <= tpos + 1'b1;
      end
      if (!tap_soc && tpos == pos_t'(CELL_BYTES - 1)) tx_sending <= 1'b0;
    end
  end

  always_comb begin
    acf_mod = tap_byte;
    if (mark_req) acf_mod[ACF_REQ] = 1'b1;
    if (tap_soc && send_cell) acf_mod[ACF_BUSY] = 1'b1;
    unique case (tpos)
      pos_t'(1): nci_byte = NCI_QA_CL[31:24];
      pos_t'(2): nci_byte = NCI_QA_CL[23:16];
      pos_t'(3): nci_byte = NCI_QA_CL[15:8];
      default:   nci_byte = NCI_QA_CL[7:0];
    endcase
    if (tap_soc)                             mux_sel = MUX_ACF;
    else if (tx_sending && tpos < pos_t'(HDR_BYTES)) mux_sel = MUX_NCI;
    else if (tx_sending && tpos < pos_t'(CELL_BYTES)) mux_sel = MUX_FIFO;
    else                                     mux_sel = MUX_PASS;
  end

  assign fifo_rd  = (mux_sel == MUX_FIFO);
  assign scan_out = tx_soc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_data <= '0;
      tx_soc  <= 1'b0;
    end else if (scan_mode) begin
      tx_soc  <= scan_out_q[7];
    end else begin
      tx_soc <= tap_soc;
      unique case (mux_sel)
        MUX_ACF:  tx_data <= acf_mod;
        MUX_NCI:  tx_data <= nci_byte;
        MUX_FIFO: tx_data <= fifo_byte;
        default:  tx_data <= tap_byte;
      endcase
    end
  end

endmodule
