// tb_mid_table: the whole MID table block with a 16-entry table. After the
// zero fill, random cells go through it; a model of update (read at the
// MID, write for matched busy BOMs) and timeout (one entry per cell with the
// period constant, time stamp 1-2-3) must predict `mid_valid` for every
// cell. Counts validations by BOM, valid COM/EOM cells and timeouts.
module tb_mid_table;
  import mac_pkg::*;
  import tb_cell_pkg::*;
  localparam int WORDS = 16;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic [7:0] rx_data = 0;
  pos_t pos = 0;
  logic in_cell = 0, ext_addr_match = 0;
  logic tmo_we = 0;
  logic [7:0] tmo_wdata = 0;
  logic mid_valid, init_done;
  int checks = 0, failures = 0;
  int model [WORDS];
  int m_period, m_const, m_addr, m_ts;
  int n_bom = 0, n_valid = 0, n_timeout = 0;

  mid_table #(.WORDS(WORDS), .MATCH_POS(16), .TMO_POS(30), .TMO_DEFAULT(8'd0)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < WORDS; i++) model[i] = 0;
    m_period = 0; m_const = 0; m_addr = 0; m_ts = 1;
    repeat (WORDS + 1) @(posedge clk);
    checks++;
    if (!init_done) begin failures++; $display("zero fill not done after %0d clocks", WORDS + 1); end
    for (int n = 0; n < 1500; n++) begin
      logic [1:0] st;
      logic [9:0] mid;
      logic busy, match;
      cell_t c;
      if (n == 700) begin
        @(negedge clk); tmo_we = 1; tmo_wdata = 8'd1; m_const = 1;
        @(negedge clk); tmo_we = 0;
      end
      st = 2'($urandom); mid = 10'($urandom % WORDS); busy = ($urandom % 4) != 0;
      match = ($urandom % 3) == 0;
      c = make_cell({busy, 7'b0}, add_crc(make_seg(st, mid, 64'h0, $urandom)));
      for (int i = 0; i < 53; i++) begin
        @(negedge clk);
        rx_data = c[i]; pos = pos_t'(i); in_cell = 1;
        ext_addr_match = (i >= 16) ? match : 1'b0;
        if (i == 12) begin
          checks++;
          if (mid_valid != (model[mid] != 0)) begin
            failures++; $display("cell %0d mid %0d valid %0b model %0d", n, mid, mid_valid, model[mid]);
          end
          if (mid_valid && (st == 2'b00 || st == 2'b01)) n_valid++;
        end
      end
      if (busy && st == 2'b10 && match) begin model[mid] = m_ts; n_bom++; end
      if (m_period != 0) m_period--;
      else begin
        m_period = m_const;
        if (model[m_addr] != 0 && (m_ts - model[m_addr] + 3) % 3 == 2) begin
          model[m_addr] = 0; n_timeout++;
        end
        if (m_addr == WORDS - 1) m_ts = (m_ts == 3) ? 1 : m_ts + 1;
        m_addr = (m_addr + 1) % WORDS;
      end
    end
    checks += 3;
    if (n_bom == 0)     begin failures++; $display("no BOM validation"); end
    if (n_valid == 0)   begin failures++; $display("no valid COM/EOM"); end
    if (n_timeout == 0) begin failures++; $display("no timeout"); end
    $display("bom=%0d valid_com_eom=%0d timeouts=%0d", n_bom, n_valid, n_timeout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
