// tb_ovc_status: random traffic on one output port obeying the router's
// rules (headers take the offered candidate, flits only use OVCs with
// credits, credits come back later). A model of credits and assigned bits
// checks full, nearly-full, that the candidate is a free OVC, the registered
// avail flag, and that avail never promises an OVC that is not free.
module tb_ovc_status;
  localparam int V = 4, B = 4;
  logic clk = 0, rst = 1;
  logic [V-1:0] credit_in, dec, alloc, release_vc, full, nfull, cand;
  logic avail;
  int cr [V], owed [V];
  bit asg [V];
  bit exp_avail;
  int checks = 0, failures = 0, takes = 0, avail_low = 0;

  ovc_status #(.V(V), .B(B)) dut (.clk, .rst, .credit_in, .dec, .alloc, .release_vc,
                                  .full, .nfull, .cand, .avail);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nfree;
    logic [V-1:0] freev;
    credit_in = 0; dec = 0; alloc = 0; release_vc = 0;
    for (int v = 0; v < V; v++) begin cr[v] = B; owed[v] = 0; asg[v] = 0; end
    exp_avail = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 6000; c++) begin
      nfree = 0; freev = '0;
      for (int v = 0; v < V; v++) begin
        freev[v] = !asg[v] && cr[v] > 0;
        nfree += int'(freev[v]);
        checks++;
        if (full[v] !== (cr[v] == 0) || nfull[v] !== (cr[v] == 1)) begin
          failures++; $display("cycle %0d vc %0d status full %b nfull %b credit %0d", c, v, full[v], nfull[v], cr[v]);
        end
      end
      checks++;
      if (nfree > 0 ? !($onehot(cand) && (cand & ~freev) == 0) : cand != 0) begin
        failures++; $display("cand %b free %b", cand, freev);
      end
      checks++;
      if (avail !== exp_avail) begin failures++; $display("cycle %0d avail %b exp %b", c, avail, exp_avail); end
      if (avail && nfree == 0) begin failures++; $display("avail with no free OVC"); end
      if (!avail) avail_low++;
      // one flit per cycle at most leaves an output port
      dec = 0; alloc = 0; release_vc = 0;
      if ($urandom_range(0, 99) < 70) begin
        int v = $urandom_range(0, V - 1);
        if (avail && $urandom_range(0, 2) == 0) begin
          alloc = cand; dec = cand;
          if ($urandom_range(0, 9) == 0) release_vc = cand;   // one-flit packet
          takes++;
        end else if (asg[v] && cr[v] > 0) begin
          dec[v] = 1'b1;
          if ($urandom_range(0, 3) == 0) release_vc[v] = 1'b1;
        end
      end
      credit_in = 0;
      for (int v = 0; v < V; v++)
        if (owed[v] > 0 && $urandom_range(0, 99) < 30) begin credit_in[v] = 1'b1; end
      exp_avail = (nfree >= 2) || (nfree == 1 && alloc == 0);
      @(posedge clk); #1;
      for (int v = 0; v < V; v++) begin
        if (dec[v]) begin cr[v]--; owed[v]++; end
        if (credit_in[v]) begin cr[v]++; owed[v]--; end
        if (alloc[v]) asg[v] = 1;
        if (release_vc[v]) asg[v] = 0;
      end
    end
    checks++;
    if (takes == 0 || avail_low == 0) begin failures++; $display("coverage: takes %0d avail low %0d", takes, avail_low); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
