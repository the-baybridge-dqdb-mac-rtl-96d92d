// tb_receive_fifo: the tap shows the input TX_TAP+1 clocks later, the word
// port shows the bytes that entered DEPTH-3..DEPTH clocks ago, oldest in the
// high byte.
module tb_receive_fifo;
  localparam int D = 12, T = 3;
  logic clk = 0, rst_n = 0;
  logic [7:0] din = 0;
  logic sin = 0;
  logic [7:0] tap_byte;
  logic tap_soc;
  logic [31:0] word;
  int checks = 0, failures = 0;
  logic [7:0] hist[$];
  logic       shist[$];

  receive_fifo #(.DEPTH(D), .TX_TAP(T)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      din = $urandom; sin = ($urandom % 7) == 0;
      hist.push_front(din); shist.push_front(sin);
      @(posedge clk); #1;
      // hist[0] is the byte that just entered stage 0
      if (hist.size() > D) begin
        checks++;
        if (tap_byte != hist[T] || tap_soc != shist[T]) begin
          failures++; $display("tap %h exp %h", tap_byte, hist[T]);
        end
        checks++;
        if (word != {hist[D-1], hist[D-2], hist[D-3], hist[D-4]}) begin
          failures++; $display("word %h", word);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
