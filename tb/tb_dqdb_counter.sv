// tb_dqdb_counter: random clear/load/inc/dec against a model, including the
// saturation at zero and at all ones and the zero flag.
module tb_dqdb_counter;
  localparam int W = 4;
  logic clk = 0, rst_n = 0;
  logic scan_mode = 1'b0, scan_in = 1'b0, scan_out;   // scan path held off here; tested in tb_mac_top
  logic clr, ld, inc, dec;
  logic [W-1:0] ld_val, cnt;
  logic zero;
  int checks = 0, failures = 0;
  int model;

  dqdb_counter #(.W(W)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {clr, ld, inc, dec, ld_val} = '0;
    model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom % 20) == 0;
      ld  = ($urandom % 10) == 0;
      ld_val = W'($urandom);
      inc = ($urandom % 2) == 0;
      dec = ($urandom % 2) == 0;
      @(posedge clk);
      if (clr) model = 0;
      else if (ld) model = ld_val;
      else if (inc && !dec && model < (1 << W) - 1) model++;
      else if (dec && !inc && model > 0) model--;
      #1;
      checks++;
      if (cnt != W'(model) || zero != (model == 0)) begin
        failures++;
        $display("mismatch at %0d: cnt=%0d model=%0d", i, cnt, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
