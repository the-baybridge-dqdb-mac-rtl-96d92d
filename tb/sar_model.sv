// sar_model: behavioural model of one SAR board port of a MAC.
// Send side: segments pushed into `send_q` are offered one at a time:
// sar_send_req rises, and after sar_ack the 12 words follow, a new word
// every four clocks from the clock after the acknowledge; the next request
// comes only after the last word. Receive side: the words of every cell are
// gathered; accepted cells go to `rx_q`, cells whose address or MID matched
// but were refused (bad NCI or CRC) are counted in `n_refused`.
module sar_model (
  input  logic         clk,
  input  logic         rst_n,
  output logic         sar_send_req,
  input  logic         sar_ack,
  output logic [31:0]  sar_tx_data,
  input  logic [31:0]  sar_rx_data,
  input  mac_pkg::cell_status_t sar_status
);
  import tb_cell_pkg::*;
  logic [383:0] send_q [$];
  logic [383:0] rx_q [$];
  int n_refused = 0, n_words_bad = 0, n_sent = 0;
  logic [383:0] cur;
  int ack_cnt = -1;
  logic [383:0] rx_cur;
  int rx_w = -1;

  initial begin sar_send_req = 0; sar_tx_data = 0; end

  always @(posedge clk) begin
    if (!rst_n) begin
      sar_send_req <= 0; ack_cnt = -1;
    end else begin
      if (ack_cnt >= 0) begin
        if (ack_cnt < 48) sar_tx_data <= cur[383 - 32*(ack_cnt / 4) -: 32];
        else sar_tx_data <= 32'hDEAD_BEEF;
        ack_cnt++;
        if (ack_cnt == 49) ack_cnt = -1;
      end
      if (sar_ack) begin
        sar_send_req <= 0;
        cur = send_q.pop_front();
        n_sent++;
        sar_tx_data <= cur[383 -: 32];
        ack_cnt = 1;
      end else if (ack_cnt < 0 && !sar_send_req && send_q.size() > 0) begin
        sar_send_req <= 1;
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n && sar_status.strobe) begin
      if (sar_status.sof) rx_w = 0;
      if (rx_w >= 0) begin
        rx_cur[383 - 32*rx_w -: 32] = sar_rx_data;
        rx_w++;
        if (rx_w == 12) begin
          if (sar_status.accept) rx_q.push_back(rx_cur);
          else if (sar_status.match) n_refused++;
          rx_w = -1;
        end
      end
    end
  end
endmodule
