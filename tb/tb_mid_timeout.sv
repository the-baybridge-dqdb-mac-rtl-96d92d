// tb_mid_timeout: with a small table, a model of the timeout algorithm
// (period counter, address counter, time stamp cycling 1-2-3) must predict
// every SRAM write and the time stamp after each wake-up.
module tb_mid_timeout;
  localparam int WORDS = 8;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic en = 0, wake = 0, tmo_we = 0;
  logic [7:0] tmo_wdata = 0;
  logic [1:0] ts;
  logic [2:0] addr;
  logic re, we;
  logic [1:0] wdata, rdata;
  logic [1:0] mem [WORDS];
  logic [1:0] model [WORDS];
  int checks = 0, failures = 0, timeouts = 0;
  int m_period, m_const, m_addr, m_ts;

  mid_timeout #(.WORDS(WORDS), .TMO_DEFAULT(8'd0)) dut (.*);

  // SRAM model: synchronous read
  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end

  always #5 clk = ~clk;
  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nxt(input int t);
    return (t == 3) ? 1 : t + 1;
  endfunction

  initial begin
    for (int i = 0; i < WORDS; i++) begin mem[i] = 2'(1 + i % 3); model[i] = mem[i]; end
    repeat (2) @(posedge clk);
    rst_n = 1; en = 1;
    m_period = 0; m_const = 0; m_addr = 0; m_ts = 1;
    for (int n = 0; n < 400; n++) begin
      if (n == 150) begin
        @(negedge clk); tmo_we = 1; tmo_wdata = 8'd2; m_const = 2;
        @(negedge clk); tmo_we = 0;
      end
      // refresh some entries with the current time stamp, like BOM updates
      if ($urandom % 5 == 0) begin
        int a;
        a = $urandom % WORDS;
        mem[a] = 2'(m_ts); model[a] = 2'(m_ts);
      end
      @(negedge clk); wake = 1;
      @(negedge clk); wake = 0;
      // model of one wake-up
      if (m_period != 0) m_period--;
      else begin
        m_period = m_const;
        if (model[m_addr] != 0 && (m_ts - model[m_addr] + 3) % 3 == 2) begin
          model[m_addr] = 0; timeouts++;
        end
        if (m_addr == WORDS - 1) m_ts = nxt(m_ts);
        m_addr = (m_addr + 1) % WORDS;
      end
      repeat (6) @(negedge clk);
      checks++;
      if (ts != 2'(m_ts)) begin failures++; $display("wake %0d ts %0d model %0d", n, ts, m_ts); end
      for (int i = 0; i < WORDS; i++) begin
        checks++;
        if (mem[i] != model[i]) begin failures++; $display("wake %0d entry %0d = %0d model %0d", n, i, mem[i], model[i]); end
      end
    end
    checks++;
    if (timeouts == 0) begin failures++; $display("no timeout happened"); end
    $display("timeouts=%0d", timeouts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
