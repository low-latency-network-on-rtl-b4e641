// ovc_status: output-VC state of one output port.
//
// For each of the V OVCs (the VC buffers of the downstream router) it holds a
// credit counter (free slots downstream, reset to B) and an "assigned" bit
// (a packet currently owns the OVC). Every cycle it publishes:
//   full/nfull - credit == 0 / credit == 1, the two status bits that are fed
//                back to the input VCs holding these OVCs;
//   cand       - one-hot candidate OVC for the next header flit, chosen by a
//                round-robin arbiter among the free OVCs (unassigned and with
//                at least one credit);
//   avail      - registered flag: this port has a free OVC. It is computed a
//                cycle ahead by counting free OVCs: it drops when none is free
//                or when exactly one is free and a header takes it now.
// Updates at the clock edge: dec (a granted flit used the OVC) decrements the
// counter, credit_in increments it, alloc sets and release clears the assigned
// bit (a one-flit packet does both and leaves it clear). Keeping credits here,
// not in the input ports, is what lets an OVC be reassigned as soon as a tail
// has left, with its remaining credits, before the downstream VC has drained.
// The counting scheme of avail follows the published design; counting OVCs with one
// credit (rather than two) is this design's choice, made safe by the input
// ports sampling the status of a newly assigned OVC in the same cycle.
module ovc_status #(
  parameter int V = 4,
  parameter int B = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [V-1:0] credit_in,
  input  logic [V-1:0] dec,
  input  logic [V-1:0] alloc,
  input  logic [V-1:0] release_vc,
  output logic [V-1:0] full,
  output logic [V-1:0] nfull,
  output logic [V-1:0] cand,
  output logic         avail
);

  localparam int CRW = $clog2(B + 1);
  localparam int VCW = $clog2(V + 1);

  logic [CRW-1:0] credit [V];
  logic [V-1:0]   assigned;
  logic [V-1:0]   free_vc;
  logic [VCW-1:0] nfree;
  logic           take;

  always_comb begin
    nfree = '0;
    for (int v = 0; v < V; v++) begin
      full[v]    = (credit[v] == '0);
      nfull[v]   = (credit[v] == CRW'(1));
      free_vc[v] = !assigned[v] && (credit[v] != '0);
      nfree      = nfree + VCW'(free_vc[v]);
    end
  end

  assign take = |alloc;

  rr_arbiter #(.N(V)) u_cand (
    .clk    (clk),
    .rst    (rst),
    .req    (free_vc),
    .update (take),
    .grant  (cand)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      assigned <= '0;
      avail    <= 1'b1;
      for (int v = 0; v < V; v++) credit[v] <= CRW'(B);
    end else begin
      assigned <= (assigned | alloc) & ~release_vc;
      avail    <= (nfree > VCW'(1)) || ((nfree == VCW'(1)) && !take);
      for (int v = 0; v < V; v++)
        credit[v] <= credit[v] - CRW'(dec[v]) + CRW'(credit_in[v]);
    end
  end

  a_no_underflow: assert property (@(posedge clk) disable iff (rst) (dec & full & ~credit_in) == '0);
  a_alloc_free:   assert property (@(posedge clk) disable iff (rst) (alloc & ~free_vc) == '0);
  // A credit never arrives for a slot that was not used
  for (genvar v = 0; v < V; v++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (rst)
                                    credit_in[v] |-> (credit[v] != CRW'(B)) || dec[v]);
  end

endmodule
