// tb_from_sar_fifo: words written are read back as bytes, most significant
// first, on both read ports; a CRC load replaces the low ten bits of the
// last two bytes written.
module tb_from_sar_fifo;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic wr = 0, ld_crc = 0, rd = 0, crc_rd = 0;
  logic [31:0] wdata = 0;
  logic [9:0] crc = 0;
  logic [7:0] rdata, crc_data;
  int checks = 0, failures = 0;
  logic [7:0] exp_q[$];
  logic [7:0] exp_c[$];

  from_sar_fifo #(.DEPTH(16)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ncell = 0; ncell < 20; ncell++) begin
      @(negedge clk);
      exp_q.delete(); exp_c.delete();
      // 12 words, one every 4 clocks; read both ports one byte per clock,
      // starting a few clocks behind the writes
      for (int cyc = 0; cyc < 60; cyc++) begin
        wr = (cyc % 4 == 0) && (cyc < 48);
        wdata = $urandom;
        rd = (cyc >= 6) && exp_q.size() > 0;
        crc_rd = (cyc >= 2) && exp_c.size() > 0;
        ld_crc = 0;
        if (rd) begin
          checks++;
          if (rdata != exp_q[0]) begin failures++; $display("rd %h exp %h", rdata, exp_q[0]); end
        end
        if (crc_rd) begin
          checks++;
          if (crc_data != exp_c[0]) begin failures++; $display("crc port %h exp %h", crc_data, exp_c[0]); end
        end
        if (cyc == 50) begin
          // CRC into the last two bytes written, still unread on the main port
          ld_crc = 1; crc = 10'($urandom);
          exp_q[exp_q.size()-2][1:0] = crc[9:8];
          exp_q[exp_q.size()-1]      = crc[7:0];
        end
        @(posedge clk);
        if (rd) void'(exp_q.pop_front());
        if (crc_rd) void'(exp_c.pop_front());
        if (wr) for (int b = 3; b >= 0; b--) begin
          exp_q.push_back(wdata[8*b +: 8]);
          exp_c.push_back(wdata[8*b +: 8]);
        end
        @(negedge clk);
      end
      wr = 0; rd = 0; crc_rd = 0; ld_crc = 0;
      // drain the rest on the main port
      while (exp_q.size() > 0) begin
        rd = 1;
        checks++;
        if (rdata != exp_q[0]) begin failures++; $display("drain %h exp %h", rdata, exp_q[0]); end
        @(posedge clk); void'(exp_q.pop_front());
        @(negedge clk);
      end
      rd = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
