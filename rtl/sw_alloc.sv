// sw_alloc: separable input-first switch allocator for a 5-port mesh router.
//
// Stage 1: in each input port a V:1 round-robin arbiter picks one of the
// masked IVC requests (the "candidate IVC"), and a V:1 multiplexer picks that
// IVC's output port. Stage 2: in each output port a (P-1):1 round-robin
// arbiter picks one of the input ports asking for it; an input port never asks
// for its own output (no U-turns), so input o is left out of output o's
// arbiter. Because the input ports only send requests that can certainly be
// served (enough credits, or a free OVC for a header), every grant moves a
// flit and no request needs a priority class. Combinational from req/dest to
// the grants; the arbiters' priority pointers move at the clock edge, the
// stage-1 pointer only when its input port wins stage 2 (this design's choice).
//
// Outputs: ivc_cand (stage-1 winner per input), ivc_grant (final grant per
// IVC, one-hot or zero per input), in_granted, and per output port out_gnt
// (one-hot input), out_sel (binary input index) and out_valid.
module sw_alloc
  import noc_pkg::*;
#(
  parameter int V = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [P-1:0][V-1:0]          req,
  input  logic [P-1:0][V-1:0][PW-1:0]  dest,
  output logic [P-1:0][V-1:0]          ivc_cand,
  output logic [P-1:0][V-1:0]          ivc_grant,
  output logic [P-1:0]                 in_granted,
  output logic [P-1:0][P-1:0]          out_gnt,    // [output][input]
  output logic [P-1:0][PW-1:0]         out_sel,
  output logic [P-1:0]                 out_valid
);

  logic [P-1:0]          in_req;
  logic [P-1:0][PW-1:0]  win_port;
  logic [P-1:0][P-1:0]   port_req;   // [output][input]

  // Stage 1: one IVC per input port
  for (genvar i = 0; i < P; i++) begin : g_in
    rr_arbiter #(.N(V)) u_arb (
      .clk    (clk),
      .rst    (rst),
      .req    (req[i]),
      .update (in_granted[i]),
      .grant  (ivc_cand[i])
    );

    always_comb begin
      win_port[i] = '0;
      for (int v = 0; v < V; v++)
        if (ivc_cand[i][v]) win_port[i] = dest[i][v];
    end
    assign in_req[i] = |req[i];
  end

  always_comb begin
    for (int o = 0; o < P; o++)
      for (int i = 0; i < P; i++)
        port_req[o][i] = in_req[i] && (win_port[i] == PW'(o)) && (i != o);
  end

  // Stage 2: one input port per output port, (P-1):1 arbiters
  for (genvar o = 0; o < P; o++) begin : g_out
    logic [P-2:0] r, g;
    for (genvar k = 0; k < P - 1; k++) begin : g_map
      localparam int I = (k < o) ? k : k + 1;
      assign r[k] = port_req[o][I];
      assign out_gnt[o][I] = g[k];
    end
    assign out_gnt[o][o] = 1'b0;

    rr_arbiter #(.N(P - 1)) u_arb (
      .clk    (clk),
      .rst    (rst),
      .req    (r),
      .update (1'b1),
      .grant  (g)
    );

    assign out_valid[o] = |g;
    always_comb begin
      out_sel[o] = '0;
      for (int i = 0; i < P; i++)
        if (out_gnt[o][i]) out_sel[o] = PW'(i);
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      in_granted[i] = 1'b0;
      for (int o = 0; o < P; o++) in_granted[i] |= out_gnt[o][i];
      ivc_grant[i] = ivc_cand[i] & {V{in_granted[i]}};
    end
  end

  for (genvar i = 0; i < P; i++) begin : g_chk
    a_no_uturn: assert property (@(posedge clk) disable iff (rst)
                                 (req[i] != '0) |-> (win_port[i] != PW'(i)));
  end

endmodule
