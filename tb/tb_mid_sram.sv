// tb_mid_sram: random writes and reads against an array model; read data
// appears the clock after the read and holds until the next read.
module tb_mid_sram;
  logic clk = 0;
  logic [9:0] addr = 0;
  logic we = 0, re = 0;
  logic [1:0] wdata = 0, rdata;
  logic [1:0] model [1024];
  logic [1:0] exp;
  int checks = 0, failures = 0;

  mid_sram #(.WORDS(1024), .DW(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); addr = 10'(i); we = 1; wdata = 2'(i * 7);
      model[i] = 2'(i * 7);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = 10'($urandom); we = $urandom % 2; re = !we; wdata = 2'($urandom);
      if (re) exp = model[addr];
      if (we) model[addr] = wdata;
      @(posedge clk); #1;
      if (re) begin
        checks++;
        if (rdata != exp) begin failures++; $display("addr %0d rd %0d exp %0d", addr, rdata, exp); end
      end else begin
        checks++;
        if (rdata != exp) begin failures++; $display("rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
