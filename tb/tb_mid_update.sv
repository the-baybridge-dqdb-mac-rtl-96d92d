// tb_mid_update: cells with random MIDs; an address-matched busy BOM must
// write the current time stamp to its MID, and `mid_valid` must then follow
// a model of the table for every later cell. Also checks that empty BOMs,
// unmatched BOMs, SSMs and COMs write nothing.
module tb_mid_update;
  import mac_pkg::*;
  import tb_cell_pkg::*;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic en = 0;
  logic [7:0] rx_data = 0;
  pos_t pos = 0;
  logic in_cell = 0, ext_addr_match = 0;
  logic [1:0] ts = 2'd1;
  logic [9:0] addr;
  logic re, we, mid_valid;
  logic [1:0] wdata, rdata;
  logic [1:0] model [1024];
  int checks = 0, failures = 0, writes = 0;

  mid_update #(.MATCH_POS(16)) dut (.*);
  // the testbench owns the SRAM port while tb_own is high
  logic tb_own = 1, tb_we = 0, tb_re = 0;
  logic [9:0] tb_addr = 0;
  mid_sram #(.WORDS(1024), .DW(2)) u_sram (
    .clk, .addr(tb_own ? tb_addr : addr), .we(tb_own ? tb_we : we),
    .wdata(tb_own ? 2'b00 : wdata), .re(tb_own ? tb_re : re), .rdata);

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill the SRAM with zeros through its port, as mid_table does
    for (int i = 0; i < 1024; i++) begin
      tb_addr = 10'(i); tb_we = 1;
      @(posedge clk); #1;
      model[i] = '0;
    end
    tb_we = 0; tb_own = 0;
    rst_n = 1; en = 1;
    for (int n = 0; n < 600; n++) begin
      logic [1:0] st;
      logic [9:0] mid;
      logic busy, match;
      cell_t c;
      st = 2'($urandom); mid = 10'($urandom % 24); busy = ($urandom % 4) != 0; match = $urandom % 2;
      if (n % 50 == 0) ts = 2'(1 + $urandom % 3);
      c = make_cell({busy, 7'b0}, add_crc(make_seg(st, mid, 64'h0, $urandom)));
      for (int i = 0; i < 53; i++) begin
        @(negedge clk);
        rx_data = c[i]; pos = pos_t'(i); in_cell = 1;
        ext_addr_match = (i >= 16) ? match : 1'b0;
        if (i == 12) begin
          // the entry was read at byte 7; compare with the model
          checks++;
          if (mid_valid != (model[mid] != 0)) begin
            failures++; $display("cell %0d mid %0d valid %0b model %0d", n, mid, mid_valid, model[mid]);
          end
        end
      end
      if (busy && st == 2'b10 && match) begin model[mid] = ts; writes++; end
      @(negedge clk); in_cell = 0;
      repeat ($urandom % 3) @(negedge clk);
    end
    // every entry against the model, by reading through the port
    en = 0; tb_own = 1;
    for (int i = 0; i < 24; i++) begin
      tb_addr = 10'(i); tb_re = 1;
      @(posedge clk); #1;
      checks++;
      if (rdata != model[i]) begin failures++; $display("entry %0d = %0d, model %0d", i, rdata, model[i]); end
    end
    checks++;
    if (writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
