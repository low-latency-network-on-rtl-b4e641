// tb_sw_alloc: random masked requests (never to the requester's own port).
// Checks the separable input-first rules: the candidate IVC is one requesting
// IVC, every output that some candidate asks for is granted to exactly one of
// those inputs, grants reach only candidates, out_sel/out_gnt agree. A
// fairness test then keeps four inputs asking for one output and checks that
// each wins once in every four cycles.
module tb_sw_alloc;
  import noc_pkg::*;
  localparam int V = 4;
  logic clk = 0, rst = 1;
  logic [P-1:0][V-1:0] req, ivc_cand, ivc_grant;
  logic [P-1:0][V-1:0][PW-1:0] dest;
  logic [P-1:0] in_granted, out_valid;
  logic [P-1:0][P-1:0] out_gnt;
  logic [P-1:0][PW-1:0] out_sel;
  int checks = 0, failures = 0;

  sw_alloc #(.V(V)) dut (.clk, .rst, .req, .dest, .ivc_cand, .ivc_grant, .in_granted,
                         .out_gnt, .out_sel, .out_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rules();
    int wp [P];
    for (int i = 0; i < P; i++) begin
      checks++;
      if (req[i] == 0 ? ivc_cand[i] != 0 : !($onehot(ivc_cand[i]) && (ivc_cand[i] & ~req[i]) == 0)) begin
        failures++; $display("input %0d cand %b req %b", i, ivc_cand[i], req[i]);
      end
      wp[i] = -1;
      for (int v = 0; v < V; v++) if (ivc_cand[i][v]) wp[i] = int'(dest[i][v]);
      checks++;
      if (ivc_grant[i] !== (in_granted[i] ? ivc_cand[i] : '0)) begin failures++; $display("ivc_grant %0d", i); end
    end
    for (int o = 0; o < P; o++) begin
      int asked = 0, got = 0;
      for (int i = 0; i < P; i++) begin
        if (wp[i] == o) asked++;
        if (out_gnt[o][i]) begin
          got++;
          checks++;
          if (wp[i] != o || out_sel[o] != PW'(i)) begin failures++; $display("out %0d granted to %0d wrongly", o, i); end
        end
      end
      checks++;
      if (got != (asked > 0 ? 1 : 0) || out_valid[o] !== (asked > 0)) begin
        failures++; $display("out %0d asked %0d granted %0d", o, asked, got);
      end
    end
    for (int i = 0; i < P; i++) begin
      int n = 0;
      for (int o = 0; o < P; o++) n += int'(out_gnt[o][i]);
      checks++;
      if (in_granted[i] !== (n == 1) || n > 1) begin failures++; $display("input %0d granted %0d times", i, n); end
    end
  endtask

  initial begin
    int wins [P];
    req = '0; dest = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      for (int i = 0; i < P; i++)
        for (int v = 0; v < V; v++) begin
          int d;
          req[i][v] = $urandom_range(0, 99) < 40;
          do d = $urandom_range(0, P - 1); while (d == i);
          dest[i][v] = PW'(d);
        end
      #1 check_rules();
      @(posedge clk); #1;
    end
    // fairness: inputs 1..4 all want output 0 through every VC
    for (int i = 0; i < P; i++) wins[i] = 0;
    req = '0;
    for (int i = 1; i < P; i++) for (int v = 0; v < V; v++) begin req[i][v] = 1; dest[i][v] = LOCAL; end
    for (int c = 0; c < 40; c++) begin
      #1 check_rules();
      for (int i = 0; i < P; i++) if (in_granted[i]) wins[i]++;
      @(posedge clk); #1;
    end
    for (int i = 1; i < P; i++) begin
      checks++;
      if (wins[i] != 10) begin failures++; $display("input %0d won %0d of 40", i, wins[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
