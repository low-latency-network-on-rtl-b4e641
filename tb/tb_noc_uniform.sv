// tb_noc_uniform: the latency/throughput experiment of the design's
// evaluation: a 5x5 mesh under uniform random traffic with 5-flit packets,
// swept over injection rates, once with 4 VCs per port and once with 2 (4
// flits per VC, 32-bit payload). Prints the accepted throughput and mean
// packet latency per rate, checks every packet, and checks that the 4-VC
// mesh saturates no lower than the 2-VC one.
module tb_noc_uniform;
  logic clk = 0, rst = 1;
  logic done4, done2;
  int c4, f4, s4, c2, f2, s2;
  int checks, failures;

  always #5 clk = ~clk;

  uniform_bench #(.NX(5), .NY(5), .V(4)) u_v4 (.clk, .rst, .done(done4), .checks(c4), .failures(f4), .sat_permille(s4));
  uniform_bench #(.NX(5), .NY(5), .V(2)) u_v2 (.clk, .rst, .done(done2), .checks(c2), .failures(f2), .sat_permille(s2));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c2, f4 + f2 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    wait (done4 && done2);
    checks = c4 + c2 + 1;
    failures = f4 + f2;
    $display("saturation throughput: 4 VCs %0d.%03d, 2 VCs %0d.%03d flits/node/cycle",
             s4 / 1000, s4 % 1000, s2 / 1000, s2 % 1000);
    if (s4 < s2) begin failures++; $display("4 VCs saturate below 2 VCs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
