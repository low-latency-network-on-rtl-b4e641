// tb_input_port: directed test of one input port of the router at (2,2).
//
// Drives the OVC status inputs and the allocator's answers by hand and checks
// the request masking rules one by one: a header is masked while its output
// port has no free OVC; an assigned IVC is masked while its OVC is full, and
// while it is nearly full right after a grant; a granted header takes the
// offered candidate OVC. Also checks the outgoing flit (VC field replaced by
// the OVC, look-ahead field replaced by the next router's port), the credit
// returned upstream, release of the OVC on the tail, and two packets queued
// behind each other in one VC (one of them a one-flit packet).
module tb_input_port;
  import noc_pkg::*;
  localparam int V = 4, B = 4, FPAY = 32, FW = FPAY + 2 + V;

  logic clk = 0, rst = 1;
  logic [FW-1:0] flit_in, xbar_flit;
  logic flit_in_wr, granted, grant_hdr, grant_tail;
  logic [V-1:0] credit_out, ivc_req, ivc_cand, grant_ovc;
  logic [V-1:0][PW-1:0] ivc_dest;
  logic [P-1:0][V-1:0] ovc_full, ovc_nfull, cand_ovc;
  logic [P-1:0] ovc_avail;
  int checks = 0, failures = 0;

  input_port #(.V(V), .B(B), .FPAY(FPAY)) dut (
    .clk, .rst, .cur_x(4'd2), .cur_y(4'd2), .flit_in, .flit_in_wr, .credit_out,
    .ovc_full, .ovc_nfull, .cand_ovc, .ovc_avail, .ivc_req, .ivc_dest, .ivc_cand, .granted,
    .grant_ovc, .grant_hdr, .grant_tail, .xbar_flit);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h expected %h", what, got, exp); end
  endtask

  function automatic logic [FPAY-1:0] hdr_pay(logic [PW-1:0] lk, int dx, int dy);
    logic [FPAY-1:0] p = 32'hABC00000;
    p[HDR_LK_LSB +: PW] = lk;
    p[HDR_DSTX_LSB +: CW] = CW'(dx);
    p[HDR_DSTY_LSB +: CW] = CW'(dy);
    return p;
  endfunction

  task automatic write_flit(int vc, bit hdr, bit tail, logic [FPAY-1:0] pay);
    flit_in = {hdr, tail, V'(1) << vc, pay};
    flit_in_wr = 1;
    tick();
    flit_in_wr = 0;
  endtask

  // grant IVC vc for one cycle; check the update signals on the way
  task automatic grant(int vc, logic [V-1:0] exp_ovc, bit exp_hdr, bit exp_tail);
    ivc_cand = V'(1) << vc; granted = 1;
    #1;
    expect_eq("grant_ovc", 64'(grant_ovc), 64'(exp_ovc));
    expect_eq("grant_hdr", 64'(grant_hdr), 64'(exp_hdr));
    expect_eq("grant_tail", 64'(grant_tail), 64'(exp_tail));
    tick();
    ivc_cand = 0; granted = 0;
    expect_eq("credit_out", 64'(credit_out), 64'(V'(1) << vc));
  endtask

  logic [FPAY-1:0] p1h, exp_pay;

  initial begin
    flit_in = 0; flit_in_wr = 0; ivc_cand = 0; granted = 0;
    ovc_full = 0; ovc_nfull = 0; cand_ovc = 0; ovc_avail = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // Packet 1 on VC1: (2,2) -> (4,2), leaves EAST, next router also EAST
    p1h = hdr_pay(EAST, 4, 2);
    write_flit(1, 1, 0, p1h);
    write_flit(1, 0, 0, 32'h1111_0001);
    write_flit(1, 0, 0, 32'h1111_0002);
    write_flit(1, 0, 1, 32'h1111_0003);
    expect_eq("header masked, no free OVC", 64'(ivc_req), 0);
    expect_eq("dest", 64'(ivc_dest[1]), 64'(EAST));
    ovc_avail[EAST] = 1; cand_ovc[EAST] = 4'b0100; #1;
    expect_eq("header requests", 64'(ivc_req), 64'b0010);
    grant(1, 4'b0100, 1, 0);
    exp_pay = p1h; exp_pay[HDR_LK_LSB +: PW] = EAST;
    expect_eq("header out", 64'(xbar_flit), 64'({2'b10, 4'b0100, exp_pay}));
    expect_eq("assigned body requests", 64'(ivc_req), 64'b0010);
    ovc_avail[EAST] = 0;                 // no longer matters once assigned
    cand_ovc[EAST] = 4'b0001;
    ovc_full[EAST] = 4'b0100;
    tick();
    expect_eq("masked: OVC full", 64'(ivc_req), 0);
    ovc_full[EAST] = 0; ovc_nfull[EAST] = 4'b0100;
    tick();
    expect_eq("nearly full, not granted last cycle", 64'(ivc_req), 64'b0010);
    grant(1, 4'b0100, 0, 0);
    expect_eq("body 1 out", 64'(xbar_flit), 64'({2'b00, 4'b0100, 32'h1111_0001}));
    expect_eq("masked: nearly full after grant", 64'(ivc_req), 0);
    tick();
    expect_eq("nearly full, one cycle later", 64'(ivc_req), 64'b0010);
    ovc_nfull[EAST] = 0;
    grant(1, 4'b0100, 0, 0);
    expect_eq("body 2 out", 64'(xbar_flit), 64'({2'b00, 4'b0100, 32'h1111_0002}));
    grant(1, 4'b0100, 0, 1);
    expect_eq("tail out", 64'(xbar_flit), 64'({2'b01, 4'b0100, 32'h1111_0003}));
    expect_eq("VC empty", 64'(ivc_req), 0);
    expect_eq("OVC released", 64'(dut.assigned), 0);

    // Packets 2 and 3 queued in VC3: (2,0) via NORTH then NORTH; (2,1) via NORTH then LOCAL
    write_flit(3, 1, 0, hdr_pay(NORTH, 2, 0));
    write_flit(3, 0, 1, 32'h2222_0001);
    write_flit(3, 1, 1, hdr_pay(NORTH, 2, 1));
    expect_eq("masked, NORTH has no OVC", 64'(ivc_req), 0);
    ovc_avail[NORTH] = 1; cand_ovc[NORTH] = 4'b1000; #1;
    expect_eq("pkt2 header requests", 64'(ivc_req), 64'b1000);
    expect_eq("pkt2 dest", 64'(ivc_dest[3]), 64'(NORTH));
    grant(3, 4'b1000, 1, 0);
    exp_pay = hdr_pay(NORTH, 2, 0);
    expect_eq("pkt2 header out", 64'(xbar_flit), 64'({2'b10, 4'b1000, exp_pay}));
    cand_ovc[NORTH] = 4'b0010;           // the OVC status moves on to another candidate
    grant(3, 4'b1000, 0, 1);
    ovc_avail[NORTH] = 0; #1;
    expect_eq("pkt3 header masked", 64'(ivc_req), 0);
    ovc_avail[NORTH] = 1; #1;
    expect_eq("pkt3 header requests", 64'(ivc_req), 64'b1000);
    grant(3, 4'b0010, 1, 1);
    exp_pay = hdr_pay(NORTH, 2, 1); exp_pay[HDR_LK_LSB +: PW] = LOCAL;
    expect_eq("pkt3 one-flit out", 64'(xbar_flit), 64'({2'b11, 4'b0010, exp_pay}));
    expect_eq("all empty", 64'(dut.nonempty), 0);
    expect_eq("nothing assigned", 64'(dut.assigned), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
