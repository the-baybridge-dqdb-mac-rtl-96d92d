// tb_send_block: the testbench drives the receive FIFO tap with cells, plays
// the Monitor FSM (send_wake two clocks before the ACF reaches the tap) and
// the SAR (a word every four clocks after the acknowledge). Every output
// cell must be the input cell, with the request bit set when asked, or, when
// sent, the busy ACF, the NCI constant and the SAR segment with the CRC of
// the reference model.
module tb_send_block;
  import mac_pkg::*;
  import tb_cell_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic [7:0] tap_byte = 0;
  logic tap_soc = 0, send_wake = 0, mark_req = 0;
  logic send_start, sar_ack;
  logic [31:0] sar_tx_data = 0;
  logic [7:0] tx_data;
  logic tx_soc;
  int checks = 0, failures = 0, n_sent = 0, n_mark = 0;
  logic [423:0] exp_q[$];
  seg_t sar_seg;
  int ack_time = -1;
  int cyc = 0;

  send_block #(.FIFO_DEPTH(16), .TX_TAP(3)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // SAR model: word k from the clock after the acknowledge, four clocks each
  always @(negedge clk) begin
    if (sar_ack) ack_time = cyc;
    if (ack_time >= 0 && cyc > ack_time && cyc <= ack_time + 48)
      sar_tx_data = seg_word(sar_seg, (cyc - ack_time - 1) / 4);
    else
      sar_tx_data = $urandom;
  end

  // output checker: one clock after the tap
  function automatic logic [423:0] pack_cell(input cell_t c);
    logic [423:0] v;
    for (int i = 0; i < 53; i++) v[8*(52-i) +: 8] = c[i];
    return v;
  endfunction

  int opos = -1;
  logic [423:0] cur;
  always @(posedge clk) begin
    if (rst_n) begin
      if (tx_soc) begin
        opos = 0;
        if (exp_q.size() == 0) begin failures++; $display("unexpected cell"); end
        else cur = exp_q.pop_front();
      end
      if (opos >= 0 && opos < 53) begin
        checks++;
        if (tx_data != cur[8*(52-opos) +: 8]) begin
          failures++; $display("%0t byte %0d: %h expected %h", $time, opos, tx_data, cur[8*(52-opos) +: 8]);
        end
        opos++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      cell_t c, o;
      logic busy, send, mark;
      seg_t s;
      busy = $urandom % 2; send = !busy && ($urandom % 2); mark = ($urandom % 3) == 0;
      s = make_seg(2'($urandom), 10'($urandom), {$urandom, $urandom}, $urandom);
      c = make_cell({busy, 7'($urandom) & 7'h3E}, add_crc(make_seg(2'($urandom), 10'($urandom), 64'h1, $urandom)));
      o = c;
      if (mark) o[0][ACF_REQ] = 1'b1;
      if (send) begin
        o = make_cell(o[0] | 8'h80, add_crc(s));
        sar_seg = s;
        n_sent++;
      end
      if (mark) n_mark++;
      exp_q.push_back(pack_cell(o));
      for (int t = 0; t < 53; t++) begin
        @(negedge clk);
        // the wake-up is two clocks ahead of the ACF at the tap
        send_wake = 0;
        if (t == 51 && send) send_wake = 1;
        tap_soc = (t == 0) ? 1'b0 : 1'b0;
        tap_byte = 8'h00;
        if (t == 0) mark_req = 1'b0;
      end
      // the cell at the tap
      for (int t = 0; t < 53; t++) begin
        @(negedge clk);
        send_wake = 0;
        tap_soc = (t == 0);
        tap_byte = c[t];
        mark_req = mark;
        if (send && t == 1) begin
          checks++;
          if (!(ack_time == cyc - 3)) begin failures++; $display("ack timing"); end
        end
      end
      @(negedge clk); tap_soc = 0;
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || n_sent == 0 || n_mark == 0) begin failures++; $display("cells missing or no send"); end
    $display("sent=%0d marked=%0d", n_sent, n_mark);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
