// tb_mac_top: end-to-end test of a small dual-bus DQDB network built from
// mac_top at its default parameters.
//
// NODES nodes, each with a MAC on bus A (cells flow from node 0 upwards) and
// a MAC on bus B (cells flow from the last node downwards), the two MACs of a
// node joined by their queue-control links. Each MAC has a CAM model holding
// its node's address and a SAR model. Bus heads generate empty QA cells, and
// now and then a foreign busy cell: a BOM with a bad CRC or a bad NCI to a
// node, or a BOM to an unknown address. Every node sends multi-segment
// messages (BOM, COMs, EOM) and single-segment messages to every other node,
// on the bus that leads to it. Checks: every segment arrives exactly once,
// intact, at its destination only; busy cells leaving the bus ends carry the
// right NCI and CRC; foreign bad cells are refused at their destination.
// A second, DS3-paced phase follows: the heads leave 149 idle clocks after
// every cell (one cell per 202 clocks) while each node sends a 3-segment
// message to the next. After the traffic the network idles until MID entries have timed out, and
// a COM with a timed-out MID must then be refused. Each mechanism of the
// design is counted and must happen at least once.
// Before the traffic, a scan phase runs on all six MACs at once: the chain
// length is measured with a single one, a random pattern must come out
// unchanged one chain length later, a pattern loaded through the chain must
// appear on the request and count down counters, a circular scan (scan_out
// fed back to scan_in for one chain length) must leave them as they were,
// and with the mode low scan_in must have no effect. The MACs are then reset
// again for the network test.
module tb_mac_top;
  import mac_pkg::*;
  import tb_cell_pkg::*;

  localparam int NODES = 3;
  localparam int M = 2 * NODES;         // MAC m: bus A node m, bus B node m-NODES

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("%0t %s", $time, what); end
  endtask

  function automatic logic [63:0] node_addr(input int n);
    return 64'hC0DE_5EED_0000_0000 | 64'(n);
  endfunction

  // ---------------- the network ----------------
  logic [7:0]   rx_data [M];
  logic         rx_soc  [M];
  logic [7:0]   tx_data [M];
  logic         tx_soc  [M];
  logic         match   [M];
  logic         send_req [M], ack [M];
  logic [31:0]  sar_tx  [M], sar_rx [M];
  cell_status_t status  [M];
  logic         set_out [M], inc_out [M];
  logic         cfg_we  [M];
  logic [7:0]   cfg_wdata [M];
  logic         queued  [M], init_done [M];
  logic [9:0]   rq_cnt  [M], cd_cnt [M];
  logic [7:0]   headA_data, headB_data;
  logic         scan_mode = 1'b0, scan_loop = 1'b0, scan_bit = 1'b0;
  logic         scan_in [M], scan_out [M];
  logic         headA_soc,  headB_soc;

  for (genvar m = 0; m < M; m++) begin : g_mac
    localparam int NODE = (m < NODES) ? m : m - NODES;
    localparam int CMP  = (m < NODES) ? m + NODES : m - NODES;
    mac_top u_mac (
      .clk, .rst_n,
      .rx_data(rx_data[m]), .rx_soc(rx_soc[m]), .tx_data(tx_data[m]), .tx_soc(tx_soc[m]),
      .ext_addr_match(match[m]),
      .sar_send_req(send_req[m]), .sar_ack(ack[m]), .sar_tx_data(sar_tx[m]),
      .sar_rx_data(sar_rx[m]), .sar_status(status[m]),
      .cmp_set_req_in(set_out[CMP]), .cmp_inc_req_in(inc_out[CMP]),
      .cmp_set_req_out(set_out[m]), .cmp_inc_req_out(inc_out[m]),
      .cfg_we(cfg_we[m]), .cfg_sel(1'b0), .cfg_wdata(cfg_wdata[m]),
      .queued(queued[m]), .rq_cnt(rq_cnt[m]), .cd_cnt(cd_cnt[m]), .mid_init_done(init_done[m]),
      .scan_mode, .scan_in(scan_in[m]), .scan_out(scan_out[m])
    );
    assign scan_in[m] = scan_loop ? scan_out[m] : scan_bit;
    cam_model #(.ADDR0(node_addr(NODE)), .ADDR1(node_addr(NODE))) u_cam (
      .clk, .rx_data(rx_data[m]), .rx_soc(rx_soc[m]), .match(match[m])
    );
    sar_model u_sar (
      .clk, .rst_n, .sar_send_req(send_req[m]), .sar_ack(ack[m]), .sar_tx_data(sar_tx[m]),
      .sar_rx_data(sar_rx[m]), .sar_status(status[m])
    );
    // bus wiring: bus A runs node 0 -> NODES-1, bus B runs NODES-1 -> 0
    if (m == 0) begin : g_ha
      assign rx_data[m] = headA_data; assign rx_soc[m] = headA_soc;
    end else if (m < NODES) begin : g_a
      assign rx_data[m] = tx_data[m-1]; assign rx_soc[m] = tx_soc[m-1];
    end else if (m == M - 1) begin : g_hb
      assign rx_data[m] = headB_data; assign rx_soc[m] = headB_soc;
    end else begin : g_b
      assign rx_data[m] = tx_data[m+1]; assign rx_soc[m] = tx_soc[m+1];
    end
  end

  // ---------------- bus heads ----------------
  logic [423:0] injA[$], injB[$];   // cells packed, byte 0 in the high bits

  function automatic logic [423:0] pk(input cell_t c);
    logic [423:0] v;
    for (int i = 0; i < 53; i++) v[423 - 8*i -: 8] = c[i];
    return v;
  endfunction

  function automatic cell_t upk(input logic [423:0] v);
    cell_t c;
    for (int i = 0; i < 53; i++) c[i] = v[423 - 8*i -: 8];
    return c;
  endfunction
  bit    running = 1;

  int head_gap = 0;     // idle clocks after every cell (DS3 pacing phase)
  int n_ds3_cells = 0;  // cells generated by the heads while paced
  task automatic head(input bit is_a);
    cell_t c;
    forever begin
      if (is_a && injA.size() > 0 && ($urandom % 4 == 0)) c = upk(injA.pop_front());
      else if (!is_a && injB.size() > 0 && ($urandom % 4 == 0)) c = upk(injB.pop_front());
      else begin
        c = make_cell(8'h00, add_crc(make_seg(2'b00, 10'h0, 64'h0, 0)));
        for (int i = 1; i < 53; i++) c[i] = 8'h00;
      end
      for (int i = 0; i < 53; i++) begin
        @(negedge clk);
        if (is_a) begin headA_soc = (i == 0); headA_data = c[i]; end
        else      begin headB_soc = (i == 0); headB_data = c[i]; end
      end
      if (head_gap > 0) begin
        n_ds3_cells++;
        repeat (head_gap) begin
          @(negedge clk);
          if (is_a) begin headA_soc = 0; headA_data = 8'h00; end
          else      begin headB_soc = 0; headB_data = 8'h00; end
        end
      end else if ($urandom % 10 == 0) begin
        @(negedge clk);
        if (is_a) begin headA_soc = 0; headA_data = 8'h00; end
        else      begin headB_soc = 0; headB_data = 8'h00; end
      end
    end
  endtask

  // ---------------- bus end checkers ----------------
  int n_bad_end = 0, n_busy_end = 0;
  for (genvar e = 0; e < 2; e++) begin : g_end
    localparam int LAST = (e == 0) ? NODES - 1 : NODES;
    cell_t c;
    int p = 99;
    always @(posedge clk) begin
      if (tx_soc[LAST]) p = 0;
      if (p < 53) begin
        c[p] = tx_data[LAST];
        p++;
        if (p == 53 && c[0][ACF_BUSY]) begin
          seg_t s;
          for (int i = 0; i < 48; i++) s[i] = c[5 + i];
          n_busy_end++;
          if (!({c[1], c[2], c[3], c[4]} == NCI_QA_CL && {s[46][1:0], s[47]} == ref_crc10(s)))
            begin n_bad_end++; if (n_bad_end < 4) $display("busy cell with bad NCI or CRC at bus end e=%0d acf=%h nci=%h%h%h%h seg0=%h%h crc=%h ref=%h", e, c[0], c[1], c[2], c[3], c[4], s[0], s[1], {s[46][1:0], s[47]}, ref_crc10(s)); end
        end
      end
    end
  end

  // ---------------- traffic ----------------
  logic [383:0] expect_q [M][$];   // segments each MAC's SAR must accept
  int n_injected_bad = 0;
  int n_segments = 0;
  int n_com_sent = 0;

  function automatic logic [383:0] pack_seg(input seg_t s);
    logic [383:0] v;
    for (int i = 0; i < 48; i++) v[383 - 8*i -: 8] = s[i];
    return v;
  endfunction

  task automatic send_msg(input int src, input int dst, input int nseg, input int mid);
    int mac_s, mac_d;
    mac_s = (dst > src) ? src : src + NODES;
    mac_d = (dst > src) ? dst : dst + NODES;
    for (int k = 0; k < nseg; k++) begin
      logic [1:0] st;
      seg_t s;
      if (nseg == 1)          st = ST_SSM;
      else if (k == 0)        st = ST_BOM;
      else if (k == nseg - 1) st = ST_EOM;
      else                    st = ST_COM;
      if (st == ST_COM || st == ST_EOM) n_com_sent++;
      s = make_seg(st, 10'(mid), node_addr(dst), $urandom);
      s[0][5:2] = 4'(k);
      g_mac_send(mac_s, pack_seg(s));
      expect_q[mac_d].push_back(pack_seg(add_crc(s)));
      n_segments++;
    end
  endtask

  task automatic g_mac_send(input int m, input logic [383:0] v);
    case (m)
      0: g_mac[0].u_sar.send_q.push_back(v);
      1: g_mac[1].u_sar.send_q.push_back(v);
      2: g_mac[2].u_sar.send_q.push_back(v);
      3: g_mac[3].u_sar.send_q.push_back(v);
      4: g_mac[4].u_sar.send_q.push_back(v);
      default: g_mac[5].u_sar.send_q.push_back(v);
    endcase
  endtask

  function automatic int sent_left();
    return g_mac[0].u_sar.send_q.size() + g_mac[1].u_sar.send_q.size() +
           g_mac[2].u_sar.send_q.size() + g_mac[3].u_sar.send_q.size() +
           g_mac[4].u_sar.send_q.size() + g_mac[5].u_sar.send_q.size();
  endfunction

  // gather the accepted segments of every SAR and tick them off
  int n_accepted = 0, n_unexpected = 0;
  task automatic collect(input int m, ref logic [383:0] q[$]);
    while (q.size() > 0) begin
      logic [383:0] v;
      int idx;
      v = q.pop_front();
      idx = -1;
      foreach (expect_q[m][i]) if (expect_q[m][i] == v && idx < 0) idx = i;
      if (idx >= 0) begin expect_q[m].delete(idx); n_accepted++; end
      else n_unexpected++;
    end
  endtask

  always @(posedge clk) begin
    collect(0, g_mac[0].u_sar.rx_q); collect(1, g_mac[1].u_sar.rx_q);
    collect(2, g_mac[2].u_sar.rx_q); collect(3, g_mac[3].u_sar.rx_q);
    collect(4, g_mac[4].u_sar.rx_q); collect(5, g_mac[5].u_sar.rx_q);
  end

  // ---------------- mechanism counters ----------------
  int n_queue = 0, n_send = 0, n_relay = 0, n_ask = 0, n_mark = 0, n_rq_inc = 0;
  int n_cd_pass = 0, n_bwb_release = 0, n_timeout = 0, n_cfg = 0;
  logic q_d [M], inc_d [M], set_d [M];
  logic [9:0] rq_d [M];
  for (genvar m = 0; m < M; m++) begin : g_cnt
    always @(posedge clk) if (rst_n && !scan_mode) begin
      if (queued[m] && !q_d[m]) n_queue++;
      if (ack[m]) n_send++;
      if (inc_out[m] != inc_d[m]) n_relay++;
      if (set_out[m] != set_d[m]) n_ask++;
      if (rq_cnt[m] > rq_d[m]) n_rq_inc++;
      if (g_mac[m].u_mac.u_rcv.mon_dec_cd) n_cd_pass++;
      if (g_mac[m].u_mac.u_rcv.mon_ld_bwb && g_mac[m].u_mac.u_dqdb.queued &&
          g_mac[m].u_mac.u_dqdb.cd_zero && g_mac[m].u_mac.u_dqdb.bwb_zero) n_bwb_release++;
      if (g_mac[m].u_mac.u_mid.u_timeout.we) n_timeout++;
      if (g_mac[m].u_mac.u_send.tap_soc && g_mac[m].u_mac.u_send.mark_req) n_mark++;
      q_d[m] <= queued[m]; inc_d[m] <= inc_out[m]; set_d[m] <= set_out[m]; rq_d[m] <= rq_cnt[m];
    end
  end

  // ---------------- scan path ----------------
  // Chain length: DQDB block 56 (counters 10+10+8, link FSMs 7+7, SAR FSM 3,
  // QUEUE FSM 2, bandwidth balancing constant 8 + load flag 1), receive block
  // 43 (CRC 10, position 6, Monitor 8, Receive 7, Send-To-SAR 12), send block
  // 39 (CRC 10, FIFO pointers 12, Send FSM 8, output side 8, tx_soc 1), MID
  // table 57 (zero fill 11, update 16, timeout period counter 8, timeout
  // state 22).
  localparam int SCAN_LEN = 56 + 43 + 39 + 57;
  int n_scan = 0;

  // One shift: returns each chain's last bit before the shift.
  task automatic shift1(input logic b, output logic o [M]);
    @(negedge clk);
    o = scan_out;
    scan_bit = b;
    @(posedge clk);
    n_scan++;
  endtask

  task automatic scan_test();
    logic o [M];
    logic pat [SCAN_LEN];
    logic [9:0] a, b;
    int found [M];
    scan_mode = 1'b1;
    // length: flush with zeros, then follow a single one through the chain
    repeat (SCAN_LEN + 20) shift1(1'b0, o);
    for (int m = 0; m < M; m++) found[m] = -1;
    for (int j = 0; j < SCAN_LEN + 20; j++) begin
      shift1(j == 0, o);
      for (int m = 0; m < M; m++) if (o[m] && found[m] < 0) found[m] = j;
    end
    for (int m = 0; m < M; m++)
      chk(found[m] == SCAN_LEN, $sformatf("MAC %0d scan length %0d, expected %0d", m, found[m], SCAN_LEN));
    // random pattern in, and out again after a full length
    for (int j = 0; j < SCAN_LEN; j++) pat[j] = 1'($urandom);
    for (int j = 0; j < SCAN_LEN; j++) shift1(pat[j], o);
    for (int m = 0; m < M; m++) found[m] = -1;
    for (int j = 0; j < SCAN_LEN; j++) begin
      shift1(1'b0, o);
      for (int m = 0; m < M; m++) if (o[m] != pat[j] && found[m] < 0) found[m] = j;
    end
    for (int m = 0; m < M; m++)
      chk(found[m] < 0, $sformatf("MAC %0d scan pattern differs at bit %0d", m, found[m]));
    // load the request and count down counters through the chain
    a = 10'($urandom); b = 10'($urandom);
    for (int j = 0; j < SCAN_LEN; j++) pat[j] = 1'b0;
    for (int k = 0; k < 10; k++) begin
      pat[SCAN_LEN - 1 - k]  = a[k];
      pat[SCAN_LEN - 11 - k] = b[k];
    end
    for (int j = 0; j < SCAN_LEN; j++) shift1(pat[j], o);
    #1;
    for (int m = 0; m < M; m++)
      chk(rq_cnt[m] == a && cd_cnt[m] == b,
          $sformatf("MAC %0d scan load rq=%0d cd=%0d, expected %0d %0d", m, rq_cnt[m], cd_cnt[m], a, b));
    // a full circular scan leaves every state element as it was
    scan_loop = 1'b1;
    repeat (SCAN_LEN) shift1(1'b0, o);
    #1;
    scan_loop = 1'b0;
    for (int m = 0; m < M; m++)
      chk(rq_cnt[m] == a && cd_cnt[m] == b, $sformatf("MAC %0d circular scan changed the counters", m));
    // transparent: with the mode low, scan_in has no effect and the loaded
    // state stays (no cells arrive)
    scan_mode = 1'b0;
    repeat (20) begin @(negedge clk); scan_bit = 1'($urandom); end
    for (int m = 0; m < M; m++)
      chk(rq_cnt[m] == a && cd_cnt[m] == b, $sformatf("MAC %0d state lost after scan", m));
    scan_bit = 1'b0;
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #80000000;
    failures++;
    $display("watchdog: cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    int mid;
    int refused_after;
    headA_soc = 0; headA_data = 0; headB_soc = 0; headB_data = 0;
    for (int m = 0; m < M; m++) begin cfg_we[m] = 0; cfg_wdata[m] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    scan_test();
    // restart from reset for the network test
    @(negedge clk); rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    fork
      head(1);
      head(0);
    join_none
    // reconfigure the bandwidth balancing constant of node 1's bus A MAC
    @(negedge clk); cfg_we[1] = 1; cfg_wdata[1] = 8'd2; n_cfg++;
    @(negedge clk); cfg_we[1] = 0;
    wait (init_done[0] && init_done[M-1]);
    // foreign cells: bad CRC and bad NCI to node 2 on bus A, node 0 on bus B,
    // and BOMs to an unknown address
    begin
      cell_t c;
      seg_t s;
      s = add_crc(make_seg(ST_BOM, 10'd1000, node_addr(2), 7)); s[30] ^= 8'h01;
      c = make_cell(8'h80, s); injA.push_back(pk(c)); n_injected_bad++;
      s = add_crc(make_seg(ST_BOM, 10'd1001, node_addr(2), 8));
      c = make_cell(8'h80, s); c[2] = 8'h00; injA.push_back(pk(c)); n_injected_bad++;
      s = add_crc(make_seg(ST_SSM, 10'd1002, node_addr(0), 9)); s[47] ^= 8'h40;
      c = make_cell(8'h80, s); injB.push_back(pk(c)); n_injected_bad++;
      s = add_crc(make_seg(ST_BOM, 10'd1003, 64'h1234, 10));
      c = make_cell(8'h80, s); injA.push_back(pk(c)); injB.push_back(pk(c));
    end
    // messages between every pair of nodes, in both directions
    mid = 1;
    for (int r = 0; r < 2; r++)
      for (int src = 0; src < NODES; src++)
        for (int dst = 0; dst < NODES; dst++)
          if (src != dst) begin
            send_msg(src, dst, (r == 0) ? 11 : 1 + $urandom % 4, mid);
            mid++;
          end
    // wait for the traffic to drain
    while (sent_left() > 0) @(posedge clk);
    repeat (400) @(posedge clk);
    chk(injA.size() == 0 && injB.size() == 0, "foreign cells not all sent");
    // DS3 pacing: a DS3 physical layer delivers 12 cells per 125 us, one cell
    // every ~202 clocks of 19.44 MHz, so the heads now leave 149 idle clocks
    // after each cell while every node sends a 3-segment message to the next
    head_gap = 149;
    for (int src = 0; src < NODES; src++) begin
      send_msg(src, (src + 1) % NODES, 3, mid);
      mid++;
    end
    while (sent_left() > 0) @(posedge clk);
    repeat (600) @(posedge clk);
    head_gap = 0;
    chk(n_ds3_cells > 0, "no cells generated at DS3 pacing");
    // idle until every MID entry has had time to decay (at most three
    // sweeps of 1024 cells), then send a COM with an old MID to node 1
    while (n_timeout < 4 || cyc < 3 * 1024 * 54 + 200000) @(posedge clk);
    begin
      cell_t c;
      seg_t s;
      s = add_crc(make_seg(ST_COM, 10'd1, 64'h0, 11));   // node 0 -> node 1 used MID 1
      c = make_cell(8'h80, s); injA.push_back(pk(c));
    end
    while (injA.size() > 0) @(posedge clk);
    repeat (200) @(posedge clk);
    running = 0;

    // ---------------- results ----------------
    for (int m = 0; m < M; m++)
      chk(expect_q[m].size() == 0, $sformatf("MAC %0d: %0d segments not delivered", m, expect_q[m].size()));
    chk(n_unexpected == 0, $sformatf("%0d unexpected segments accepted", n_unexpected));
    chk(n_accepted == n_segments, $sformatf("accepted %0d of %0d", n_accepted, n_segments));
    chk(n_bad_end == n_injected_bad, $sformatf("bad cells at bus ends %0d, injected %0d", n_bad_end, n_injected_bad));
    refused_after = g_mac[2].u_sar.n_refused + g_mac[3].u_sar.n_refused;
    chk(refused_after >= 3, $sformatf("bad cells refused at destination: %0d", refused_after));
    $display("segments=%0d accepted=%0d COM/EOM sent=%0d busy cells at ends=%0d DS3-paced cells=%0d", n_segments, n_accepted, n_com_sent, n_busy_end, n_ds3_cells);
    $display("queue=%0d send=%0d relay=%0d ask=%0d mark=%0d rq_inc=%0d cd_pass=%0d bwb_release=%0d timeouts=%0d cfg=%0d scan shifts=%0d",
             n_queue, n_send, n_relay, n_ask, n_mark, n_rq_inc, n_cd_pass, n_bwb_release, n_timeout, n_cfg, n_scan);
    chk(n_queue > 0,       "no queueing");
    chk(n_send > 0,        "no send");
    chk(n_relay > 0,       "no request relayed to the complementary MAC");
    chk(n_ask > 0,         "no request bit asked of the complementary MAC");
    chk(n_mark > 0,        "no request bit set in a cell");
    chk(n_rq_inc > 0,      "no request counter increment");
    chk(n_cd_pass > 0,     "no empty cell passed by the count down");
    chk(n_bwb_release > 0, "no bandwidth balancing release");
    chk(n_timeout > 0,     "no MID timeout");
    chk(n_com_sent > 0,    "no COM/EOM");
    chk(n_scan > 0,        "no scan shift");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
