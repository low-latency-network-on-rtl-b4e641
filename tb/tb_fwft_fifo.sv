// tb_fwft_fifo: random push/pop traffic against a queue model; checks the
// head word, empty and full every cycle, including push and pop together.
module tb_fwft_fifo;
  localparam int W = 8, DEPTH = 6;
  logic clk = 0, rst = 1;
  logic push, pop, empty, full;
  logic [W-1:0] din, dout;
  logic [W-1:0] q[$];
  int checks = 0, failures = 0;

  fwft_fifo #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .push, .din, .pop, .dout, .empty, .full);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 4000; c++) begin
      // bias towards filling in the first half, emptying in the second
      int pp;
      pp = (c % 400 < 200) ? 70 : 30;
      push = ($urandom_range(0, 99) < pp) && (q.size() < DEPTH || pop);
      pop  = ($urandom_range(0, 99) < 100 - pp) && (q.size() > 0);
      push = push && (q.size() < DEPTH || pop);
      din  = W'($urandom);
      #1;
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == DEPTH)) begin
        failures++; $display("flags: empty %b full %b size %0d", empty, full, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (dout !== q[0]) begin failures++; $display("head %h exp %h", dout, q[0]); end
      end
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
