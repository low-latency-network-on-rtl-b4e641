// router: two-stage virtual-channel wormhole router for a 2D mesh.
//
// Five ports (local, east, north, west, south), V virtual channels of B flits
// per input port, FPAY-bit payload. Flits are {hdr, tail, vc one-hot,
// payload}; flow control is credit based, one credit wire per VC.
//
// Stage 1 (one cycle): the input ports present masked requests, sw_alloc
// grants at most one flit per input and per output port, and the grant does
// VC allocation at the same time: a granted header takes the candidate OVC of
// its output port. Look-ahead routing for the next hop runs in parallel (it is
// done when the header is written). The grants are turned into one-hot update
// signals per output port (dec, alloc, release), ORed over the input ports and
// applied to ovc_status at the clock edge, where the buffer read also starts.
// Stage 2 (one cycle): the buffer output passes the crossbar onto the output
// link. A flit present on an input link in cycle c is on the output link in
// cycle c+2 when nothing blocks it.
//
// There is no separate VC allocator: each output port keeps a round-robin
// choice of one free OVC, which is enough because only one flit per cycle can
// leave an output port. Because requests that could not be served are masked
// before allocation, no grant is ever wasted and no request class needs
// priority. Reset is synchronous and active high (this design's choice).
module router
  import noc_pkg::*;
#(
  parameter int V    = 4,
  parameter int B    = 4,
  parameter int FPAY = 32,
  localparam int FW  = FPAY + 2 + V
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [CW-1:0]        cur_x,
  input  logic [CW-1:0]        cur_y,
  input  logic [P-1:0][FW-1:0] flit_in,
  input  logic [P-1:0]         flit_in_wr,
  output logic [P-1:0][V-1:0]  credit_out,
  output logic [P-1:0][FW-1:0] flit_out,
  output logic [P-1:0]         flit_out_wr,
  input  logic [P-1:0][V-1:0]  credit_in
);

  logic [P-1:0][V-1:0]         ovc_full, ovc_nfull, cand_ovc;
  logic [P-1:0]                ovc_avail;
  logic [P-1:0][V-1:0]         ivc_req, ivc_cand, ivc_grant;
  logic [P-1:0][V-1:0][PW-1:0] ivc_dest;
  logic [P-1:0]                in_granted;
  logic [P-1:0][P-1:0]         out_gnt;
  logic [P-1:0][PW-1:0]        out_sel, xsel_r;
  logic [P-1:0]                out_valid, xvalid_r;
  logic [P-1:0][V-1:0]         grant_ovc;
  logic [P-1:0]                grant_hdr, grant_tail;
  logic [P-1:0][FW-1:0]        xbar_flit;
  logic [P-1:0][V-1:0]         upd_dec, upd_alloc, upd_release;

  for (genvar i = 0; i < P; i++) begin : g_in
    input_port #(.V(V), .B(B), .FPAY(FPAY)) u_in (
      .clk        (clk),
      .rst        (rst),
      .cur_x      (cur_x),
      .cur_y      (cur_y),
      .flit_in    (flit_in[i]),
      .flit_in_wr (flit_in_wr[i]),
      .credit_out (credit_out[i]),
      .ovc_full   (ovc_full),
      .ovc_nfull  (ovc_nfull),
      .cand_ovc   (cand_ovc),
      .ovc_avail  (ovc_avail),
      .ivc_req    (ivc_req[i]),
      .ivc_dest   (ivc_dest[i]),
      .ivc_cand   (ivc_cand[i]),
      .granted    (in_granted[i]),
      .grant_ovc  (grant_ovc[i]),
      .grant_hdr  (grant_hdr[i]),
      .grant_tail (grant_tail[i]),
      .xbar_flit  (xbar_flit[i])
    );

    // At most one flit per input port per cycle, and only a requesting one
    a_one_grant: assert property (@(posedge clk) disable iff (rst)
                                  $onehot0(ivc_grant[i]) && ((ivc_grant[i] & ~ivc_req[i]) == '0));
  end

  sw_alloc #(.V(V)) u_sa (
    .clk        (clk),
    .rst        (rst),
    .req        (ivc_req),
    .dest       (ivc_dest),
    .ivc_cand   (ivc_cand),
    .ivc_grant  (ivc_grant),
    .in_granted (in_granted),
    .out_gnt    (out_gnt),
    .out_sel    (out_sel),
    .out_valid  (out_valid)
  );

  // OVC update signals: decode per (output, input), then OR over inputs
  always_comb begin
    for (int o = 0; o < P; o++) begin
      upd_dec[o]     = '0;
      upd_alloc[o]   = '0;
      upd_release[o] = '0;
      for (int i = 0; i < P; i++) begin
        if (out_gnt[o][i]) begin
          upd_dec[o]     |= grant_ovc[i];
          upd_alloc[o]   |= grant_ovc[i] & {V{grant_hdr[i]}};
          upd_release[o] |= grant_ovc[i] & {V{grant_tail[i]}};
        end
      end
    end
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    ovc_status #(.V(V), .B(B)) u_ovc (
      .clk        (clk),
      .rst        (rst),
      .credit_in  (credit_in[o]),
      .dec        (upd_dec[o]),
      .alloc      (upd_alloc[o]),
      .release_vc (upd_release[o]),
      .full       (ovc_full[o]),
      .nfull      (ovc_nfull[o]),
      .cand       (cand_ovc[o]),
      .avail      (ovc_avail[o])
    );
  end

  // Pipeline register between allocation and switch traversal
  always_ff @(posedge clk) begin
    if (rst) begin
      xsel_r   <= '0;
      xvalid_r <= '0;
    end else begin
      xsel_r   <= out_sel;
      xvalid_r <= out_valid;
    end
  end

  crossbar #(.FW(FW)) u_xbar (
    .in_flit  (xbar_flit),
    .sel      (xsel_r),
    .valid    (xvalid_r),
    .out_flit (flit_out),
    .out_wr   (flit_out_wr)
  );

endmodule
