// tb_vc_buffer: random writes and reads on all VCs against per-VC queue
// models; checks nonempty, the head flags and the registered read data.
module tb_vc_buffer;
  localparam int V = 4, B = 4, FPAY = 32;
  logic clk = 0, rst = 1;
  logic wr_en, rd_en;
  logic [V-1:0] wr_vc, rd_vc, nonempty, head_hdr, head_tail;
  logic [FPAY+1:0] wr_data, rd_data, exp_q;
  logic exp_v;
  logic [FPAY+1:0] q [V][$];
  int checks = 0, failures = 0;

  vc_buffer #(.V(V), .B(B), .FPAY(FPAY)) dut (.clk, .rst, .wr_en, .wr_vc, .wr_data, .rd_en, .rd_vc,
                                             .rd_data, .nonempty, .head_hdr, .head_tail);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int wv, rv;
    wr_en = 0; rd_en = 0; wr_vc = 1; rd_vc = 1; wr_data = 0; exp_v = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 5000; c++) begin
      // check flags of the current state
      for (int v = 0; v < V; v++) begin
        checks++;
        if (nonempty[v] !== (q[v].size() > 0)) begin failures++; $display("nonempty %0d", v); end
        if (q[v].size() > 0) begin
          checks++;
          if (head_hdr[v] !== q[v][0][FPAY+1] || head_tail[v] !== q[v][0][FPAY]) begin
            failures++; $display("flags vc %0d", v);
          end
        end
      end
      wv = $urandom_range(0, V - 1);
      rv = $urandom_range(0, V - 1);
      rd_en = (q[rv].size() > 0) && ($urandom_range(0, 99) < ((c % 1000 < 500) ? 35 : 65));
      wr_en = (q[wv].size() < B || (rd_en && rv == wv)) && ($urandom_range(0, 99) < 55);
      wr_vc = V'(1) << wv; rd_vc = V'(1) << rv;
      wr_data = {2'($urandom), 32'($urandom)};
      if (rd_en) exp_q = q[rv][0];
      @(posedge clk); #1;
      if (rd_en) begin
        void'(q[rv].pop_front());
        checks++;
        if (rd_data !== exp_q) begin failures++; $display("read vc %0d: %h exp %h", rv, rd_data, exp_q); end
      end
      if (wr_en) q[wv].push_back(wr_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
