// tb_receive_block: random cells (busy or empty, QA or PA, BOM/COM/EOM/SSM,
// some with a bad NCI or CRC) enter back to back or with gaps; a CAM model
// answers at byte 16 and `mid_valid` and the DQDB counter flags are random
// per cell. Checks: the Monitor FSM commands and their clock, the tap to the
// send block, and the 12 words and status bits given to the SAR with the
// clock of the first word.
module tb_receive_block;
  import mac_pkg::*;
  import tb_cell_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic [7:0] rx_data = 0;
  logic rx_soc = 0, ext_addr_match = 0, mid_valid = 0;
  pos_t pos;
  logic in_cell;
  logic [7:0] tap_byte;
  logic tap_soc;
  logic queued = 0, rq_zero = 0, cd_zero = 0, bwb_zero = 0;
  logic mon_dec_rq, mon_dec_cd, mon_ld_bwb, mon_dec_bwb, send_wake, dqdb_lock;
  logic [31:0] sar_rx_data;
  cell_status_t sar_status;
  int checks = 0, failures = 0;
  int cyc = 0;
  int n_rx = 0, n_accept = 0, n_reject = 0, n_wake = 0;

  receive_block #(.RX_DEPTH(12), .TX_TAP(3), .CAM_LATENCY(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t %s", $time, what); end
  endtask

  // expectations for the SAR side, in cell order
  typedef struct { logic [31:0] w[12]; logic match; logic accept; int t0; } exp_t;
  exp_t xq[$];
  exp_t xc;
  int wi = -1;
  always @(posedge clk) begin
    if (rst_n && sar_status.strobe) begin
      if (sar_status.sof) begin
        if (xq.size() == 0) begin failures++; $display("unexpected SAR cell"); end
        else begin
          xc = xq.pop_front(); wi = 0;
          chk(cyc - xc.t0 == 18, $sformatf("first word %0d clocks after ACF", cyc - xc.t0));
        end
      end
      if (wi >= 0 && wi < 12) begin
        chk(sar_rx_data == xc.w[wi], $sformatf("word %0d %h exp %h", wi, sar_rx_data, xc.w[wi]));
        chk(sar_status.match == xc.match, "match");
        chk(sar_status.accept == (wi == 11 && xc.accept), "accept");
        chk(sar_status.sof == (wi == 0), "sof");
        wi++;
      end
    end
  end

  // tap check: the byte on rx_data reappears at the tap four clocks later
  logic [8:0] hist [5];
  always @(posedge clk) begin
    for (int i = 4; i > 0; i--) hist[i] <= hist[i-1];
    hist[0] <= {rx_soc, rx_data};
    if (rst_n && cyc > 10) chk({tap_soc, tap_byte} == hist[3], "tap");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 600; n++) begin
      cell_t c;
      seg_t s;
      logic busy, sl, cam, bad_nci, bad_crc, mv;
      logic [1:0] st;
      logic e_dec_rq, e_dec_cd, e_ld, e_dbwb, e_wake;
      logic g_dec_rq, g_dec_cd, g_ld, g_dbwb, g_wake;
      exp_t x;
      busy = $urandom % 2; sl = ($urandom % 6) == 0; st = 2'($urandom);
      cam = $urandom % 2; mv = $urandom % 2;
      bad_nci = ($urandom % 8) == 0; bad_crc = ($urandom % 8) == 0;
      s = add_crc(make_seg(st, 10'($urandom), {$urandom, $urandom}, $urandom));
      if (bad_crc) s[20] = ~s[20];
      c = make_cell({busy, sl, 6'b0}, s);
      if (bad_nci) c[3] = 8'hF1;
      {queued, rq_zero, cd_zero, bwb_zero} = 4'($urandom);
      mid_valid = mv;
      // monitor model
      {e_dec_rq, e_dec_cd, e_ld, e_dbwb, e_wake} = '0;
      if (!busy && !sl) begin
        if (!queued) begin e_dec_rq = !rq_zero; e_ld = 1; end
        else if (!cd_zero || bwb_zero) begin e_dec_cd = !cd_zero; e_ld = 1; end
        else begin e_wake = 1; e_dbwb = 1; end
      end
      {g_dec_rq, g_dec_cd, g_ld, g_dbwb, g_wake} = '0;
      if (busy && !sl) begin
        for (int k = 0; k < 12; k++) x.w[k] = seg_word(s, k);
        x.match  = (st == ST_BOM || st == ST_SSM) ? cam : mv;
        x.accept = x.match && !bad_nci && !bad_crc;
        x.t0 = cyc + 1;
        xq.push_back(x);
        n_rx++;
        if (x.accept) n_accept++; else n_reject++;
      end
      for (int t = 0; t < 53; t++) begin
        @(negedge clk);
        rx_soc = (t == 0); rx_data = c[t];
        ext_addr_match = (t >= 16) ? cam : 1'b0;
        if (t >= 1 && t <= 5) begin
          // commands as seen during this clock
          if (mon_dec_rq)  g_dec_rq = 1;
          if (mon_dec_cd)  g_dec_cd = 1;
          if (mon_ld_bwb)  g_ld = 1;
          if (mon_dec_bwb) g_dbwb = 1;
          if (send_wake) begin g_wake = 1; chk(t == 2, "send_wake two clocks after the ACF"); end
        end
        if (t == 1) chk(dqdb_lock, "lock");
      end
      chk({g_dec_rq, g_dec_cd, g_ld, g_dbwb, g_wake} == {e_dec_rq, e_dec_cd, e_ld, e_dbwb, e_wake},
          $sformatf("monitor commands %b expected %b", {g_dec_rq, g_dec_cd, g_ld, g_dbwb, g_wake},
                    {e_dec_rq, e_dec_cd, e_ld, e_dbwb, e_wake}));
      if (e_wake) n_wake++;
      if ($urandom % 3 == 0) begin
        @(negedge clk); rx_soc = 0; rx_data = 8'h5A;
        repeat ($urandom % 20) @(negedge clk);
      end
    end
    rx_soc = 0;
    repeat (100) @(negedge clk);
    chk(xq.size() == 0, "SAR cells missing");
    chk(n_accept > 0 && n_reject > 0 && n_wake > 0, "accepted, rejected and send cells seen");
    $display("rx=%0d accepted=%0d rejected=%0d wakes=%0d", n_rx, n_accept, n_reject, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
