// tb_rr_arbiter: random requests and update pulses against a reference
// round-robin model (first requester after the last winner, circularly).
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst = 1;
  logic [N-1:0] req, grant;
  logic update;
  int checks = 0, failures = 0;
  int last;

  rr_arbiter #(.N(N)) dut (.clk, .rst, .req, .update, .grant);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model(input logic [N-1:0] r, input int l);
    for (int k = 1; k <= N; k++) begin
      int idx = (l + k) % N;
      if (r[idx]) return N'(1) << idx;
    end
    return '0;
  endfunction

  initial begin
    req = '0; update = 0; last = N - 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // fairness: all request, update each cycle -> strict rotation 0,1,2,..
    for (int c = 0; c < 2 * N; c++) begin
      req = '1; update = 1;
      #1;
      checks++;
      if (grant !== N'(1) << (c % N)) begin
        failures++; $display("rotation cycle %0d grant %b", c, grant);
      end
      @(posedge clk); #1;
      last = c % N;
    end
    for (int c = 0; c < 2000; c++) begin
      req = N'($urandom); update = $urandom_range(0, 1);
      #1;
      checks++;
      if (grant !== model(req, last)) begin
        failures++; $display("req %b last %0d grant %b exp %b", req, last, grant, model(req, last));
      end
      if (update && req != 0)
        for (int i = 0; i < N; i++) if (grant[i]) last = i;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
