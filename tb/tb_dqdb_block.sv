// tb_dqdb_block: the testbench plays the Monitor FSM, the SAR and the
// complementary MAC, one 53-clock cell at a time, and checks the request,
// count down and bandwidth balancing counters, the queued state and the
// queue-control toggles against a model of the DQDB rules.
module tb_dqdb_block;
  import mac_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic rx_soc = 0;
  logic [7:0] rx_acf = 0;
  logic mon_dec_rq = 0, mon_dec_cd = 0, mon_ld_bwb = 0, mon_dec_bwb = 0, dqdb_lock = 0;
  logic send_start = 0, sar_send_req = 0;
  logic cmp_set_req_in = 0, cmp_inc_req_in = 0;
  logic cmp_set_req_out, cmp_inc_req_out;
  logic bwb_we = 0;
  logic [7:0] bwb_wdata = 0;
  logic queued, rq_zero, cd_zero, bwb_zero, mark_req;
  logic [9:0] rq_cnt, cd_cnt;
  int checks = 0, failures = 0;
  int m_rq, m_cd, m_bwb, m_const;
  logic m_queued, m_pend, m_set_out, m_inc_out;
  int n_inc = 0, n_queue = 0, n_mark = 0, n_relay = 0;

  dqdb_block #(.BWB_W(8), .BWB_DEFAULT(8'd3)) dut (.*);

  always #5 clk = ~clk;
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

  initial begin
    m_rq = 0; m_cd = 0; m_bwb = 3; m_const = 3; m_queued = 0; m_pend = 0;
    m_set_out = 0; m_inc_out = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    for (int n = 0; n < 1500; n++) begin
      logic r;
      r = ($urandom % 3) == 0;
      for (int t = 0; t < 53; t++) begin
        @(negedge clk);
        rx_soc = (t == 0);
        rx_acf = (t == 0) ? {1'($urandom), 6'b0, r} : 8'h00;
        dqdb_lock = (t <= 2);
        {mon_dec_rq, mon_dec_cd, mon_ld_bwb, mon_dec_bwb, send_start, bwb_we} = '0;
        if (t == 0) begin
          if (r) begin m_inc_out = ~m_inc_out; n_relay++; end
        end
        if (t == 1) begin
          chk(mark_req == (!r && m_pend), "mark_req");
          if (!r && m_pend) begin m_pend = 0; n_mark++; end
        end
        if (t == 2) begin
          mon_dec_rq = $urandom % 2; mon_dec_cd = $urandom % 2;
          mon_ld_bwb = $urandom % 3 == 0; mon_dec_bwb = !mon_ld_bwb && ($urandom % 2);
          if (mon_dec_rq && m_rq > 0) m_rq--;
          if (mon_dec_cd && m_cd > 0) m_cd--;
          if (mon_ld_bwb) m_bwb = m_const;
          if (mon_dec_bwb && m_bwb > 0) m_bwb--;
        end
        if (t == 8 && n % 97 == 5) begin
          bwb_we = 1; bwb_wdata = 8'(1 + $urandom % 5); m_const = bwb_wdata; m_bwb = m_const;
        end
        if (t == 10 && ($urandom % 2)) begin
          cmp_inc_req_in = ~cmp_inc_req_in; m_rq++; n_inc++;
        end
        if (t == 20 && !m_queued && !sar_send_req && ($urandom % 3 == 0)) begin
          sar_send_req = 1;
        end
        if (t == 22 && sar_send_req && !m_queued) begin
          m_queued = 1; m_cd = m_rq; m_rq = 0; m_set_out = ~m_set_out; n_queue++;
        end
        if (t == 30 && !m_pend && ($urandom % 2)) begin
          cmp_set_req_in = ~cmp_set_req_in; m_pend = 1;
        end
        if (t == 40 && m_queued && ($urandom % 2)) begin
          send_start = 1; m_queued = 0;
        end
        if (t == 41 && !m_queued) sar_send_req = 0;
        if (t == 50) begin
          chk(rq_cnt == 10'(m_rq), $sformatf("rq %0d model %0d", rq_cnt, m_rq));
          chk(cd_cnt == 10'(m_cd), $sformatf("cd %0d model %0d", cd_cnt, m_cd));
          chk(queued == m_queued, "queued");
          chk(rq_zero == (m_rq == 0) && cd_zero == (m_cd == 0), "zero flags");
          chk(bwb_zero == (m_bwb == 0), $sformatf("bwb_zero, model %0d", m_bwb));
          chk(cmp_set_req_out == m_set_out, "set request toggle");
          chk(cmp_inc_req_out == m_inc_out, "increment toggle");
        end
      end
    end
    chk(n_inc > 0 && n_queue > 0 && n_mark > 0 && n_relay > 0, "all events seen");
    $display("increments=%0d queued=%0d marks=%0d relays=%0d", n_inc, n_queue, n_mark, n_relay);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
