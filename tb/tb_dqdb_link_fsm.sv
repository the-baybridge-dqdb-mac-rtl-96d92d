// tb_dqdb_link_fsm: toggles on the input line must each produce one pending
// event three clocks later, held while `hold` is high or `take` is low, and
// cleared by take.
module tb_dqdb_link_fsm;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic tgl_in = 0, take = 0, hold = 0;
  logic pend;
  int checks = 0, failures = 0;

  dqdb_link_fsm dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic exp, input string what);
    checks++;
    if (pend !== exp) begin
      failures++;
      $display("%0t %s: pend=%0b expected %0b", $time, what, pend, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 50; ev++) begin
      int hold_cycles;
      @(negedge clk);
      tgl_in = ~tgl_in;
      // visible after three clock edges
      @(negedge clk); chk(0, "1 clock");
      @(negedge clk); chk(0, "2 clocks");
      @(negedge clk); chk(1, "3 clocks");
      hold_cycles = $urandom % 4;
      for (int h = 0; h < hold_cycles; h++) begin
        if ($urandom % 2) begin take = 0; hold = 1'($urandom); end
        else begin take = 1; hold = 1; end
        @(negedge clk); chk(1, "held");
      end
      take = 1; hold = 0;
      @(negedge clk); chk(0, "taken");
      take = 0;
      repeat ($urandom % 5) begin @(negedge clk); chk(0, "idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
