// tb_dp_ram: random writes and registered reads against an array model,
// checking the one-cycle read latency and that rd_data holds when not read.
module tb_dp_ram;
  localparam int DW = 34, DEPTH = 16;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [3:0] wr_addr, rd_addr;
  logic [DW-1:0] wr_data, rd_data, model [DEPTH], exp_q;
  logic exp_v;
  int checks = 0, failures = 0;

  dp_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .wr_en, .wr_addr, .wr_data, .rd_en, .rd_addr, .rd_data);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 1; rd_en = 0; exp_v = 0;
    for (int a = 0; a < DEPTH; a++) begin
      wr_addr = 4'(a); wr_data = {2'b0, 32'($urandom)}; model[a] = wr_data;
      @(posedge clk); #1;
    end
    for (int c = 0; c < 2000; c++) begin
      wr_en = $urandom_range(0, 1); wr_addr = 4'($urandom); wr_data = {2'($urandom), 32'($urandom)};
      rd_en = $urandom_range(0, 1); rd_addr = 4'($urandom);
      if (wr_en && rd_en && wr_addr == rd_addr) rd_addr = rd_addr + 1'b1;
      if (rd_en) begin exp_q = model[rd_addr]; exp_v = 1; end
      @(posedge clk);
      if (wr_en) model[wr_addr] = wr_data;
      #1;
      if (exp_v) begin
        checks++;
        if (rd_data !== exp_q) begin failures++; $display("read %h exp %h", rd_data, exp_q); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
