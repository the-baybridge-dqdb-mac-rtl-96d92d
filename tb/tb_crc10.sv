// tb_crc10: the CRC of random segments must equal the reference CRC, an
// intact segment must leave a zero remainder, a corrupted one must not.
module tb_crc10;
  import tb_cell_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic clr = 0, en = 0;
  logic [7:0] din = 0;
  logic [9:0] crc;
  logic ok;
  int checks = 0, failures = 0;

  crc10 dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic feed(input seg_t s);
    @(negedge clk); clr = 1; en = 0;
    @(negedge clk); clr = 0;
    for (int i = 0; i < 48; i++) begin
      en = 1; din = s[i];
      @(negedge clk);
    end
    en = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      seg_t s, sc;
      int bi, bb;
      s  = make_seg(2'($urandom), 10'($urandom), {$urandom, $urandom}, $urandom);
      sc = add_crc(s);
      feed(s);
      checks++;
      if (crc != ref_crc10(s)) begin failures++; $display("crc %h ref %h", crc, ref_crc10(s)); end
      feed(sc);
      checks++;
      if (!ok) begin failures++; $display("intact segment not ok"); end
      bi = $urandom % 48; bb = $urandom % 8;
      sc[bi][bb] = ~sc[bi][bb];
      feed(sc);
      checks++;
      if (ok) begin failures++; $display("corrupted segment ok"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
