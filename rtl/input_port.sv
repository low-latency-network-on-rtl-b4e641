// input_port: one input port of the router, with its request masking.
//
// Buffering. Incoming flits ({hdr, tail, vc one-hot, payload}) are written
// into vc_buffer, all VCs sharing one dual-port memory. When a header flit
// arrives, its output port (the look-ahead field) and the port it will need in
// the next router (from lookahead_route) are pushed into a per-VC FWFT
// "header FIFO". A VC may hold flits of several packets at once; the header
// FIFO is popped when the packet's tail is granted.
//
// OVC assignment. Each input VC (IVC) has an "assigned" bit and a one-hot
// assigned OVC. A granted header takes the candidate OVC that ovc_status offers
// for its output port; a granted tail gives it up.
//
// Request masking (the central idea of the design). Requests go to the switch
// allocator only if the grant can certainly be used:
//  * assigned IVC: two status bits of its OVC, full and nearly-full (one free
//    slot), are multiplexed from ovc_status and registered here. The request is
//    masked if full, or if nearly full and the IVC was granted last cycle
//    (the registered bits do not yet show that flit).
//  * unassigned IVC (header at the head): masked unless its output port's
//    registered "has a free OVC" flag is set.
// The status bits are sampled for the OVC the IVC will hold after the edge,
// including one it is assigned in this cycle (this design's choice, so a newly
// assigned OVC is covered from the next cycle on).
//
// Timing. A flit written at edge t can request in cycle t+1. When granted in
// cycle t+1 the buffer is read at that edge; in cycle t+2 xbar_flit carries
// the flit with its VC field set to the assigned OVC and, for a header, the
// look-ahead field set to the next router's port. credit_out pulses for one
// cycle in the cycle after the grant.
module input_port
  import noc_pkg::*;
#(
  parameter int V    = 4,
  parameter int B    = 4,
  parameter int FPAY = 32,
  localparam int FW  = FPAY + 2 + V
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic [CW-1:0]         cur_x,
  input  logic [CW-1:0]         cur_y,
  // link from upstream
  input  logic [FW-1:0]         flit_in,
  input  logic                  flit_in_wr,
  output logic [V-1:0]          credit_out,
  // OVC status of all output ports
  input  logic [P-1:0][V-1:0]   ovc_full,
  input  logic [P-1:0][V-1:0]   ovc_nfull,
  input  logic [P-1:0][V-1:0]   cand_ovc,
  input  logic [P-1:0]          ovc_avail,
  // switch allocator
  output logic [V-1:0]          ivc_req,
  output logic [V-1:0][PW-1:0]  ivc_dest,
  input  logic [V-1:0]          ivc_cand,
  input  logic                  granted,
  // update signals for the granted flit
  output logic [V-1:0]          grant_ovc,
  output logic                  grant_hdr,
  output logic                  grant_tail,
  // second stage
  output logic [FW-1:0]         xbar_flit
);

  // Incoming flit fields
  logic            in_hdr, in_tail;
  logic [V-1:0]    in_vc;
  logic [FPAY-1:0] in_pay;
  assign {in_hdr, in_tail, in_vc, in_pay} = flit_in;

  // Look-ahead route of an arriving header
  logic [PW-1:0] in_port, in_next;
  assign in_port = in_pay[HDR_LK_LSB +: PW];

  lookahead_route u_lrc (
    .cur_x     (cur_x),
    .cur_y     (cur_y),
    .out_port  (in_port),
    .dst_x     (in_pay[HDR_DSTX_LSB +: CW]),
    .dst_y     (in_pay[HDR_DSTY_LSB +: CW]),
    .next_port (in_next)
  );

  // Flit storage
  logic [V-1:0]    nonempty, head_hdr, head_tail, ivc_grant;
  logic [FPAY+1:0] rd_data;

  assign ivc_grant = ivc_cand & {V{granted}};

  vc_buffer #(.V(V), .B(B), .FPAY(FPAY)) u_buf (
    .clk       (clk),
    .rst       (rst),
    .wr_en     (flit_in_wr),
    .wr_vc     (in_vc),
    .wr_data   ({in_hdr, in_tail, in_pay}),
    .rd_en     (granted),
    .rd_vc     (ivc_cand),
    .rd_data   (rd_data),
    .nonempty  (nonempty),
    .head_hdr  (head_hdr),
    .head_tail (head_tail)
  );

  // Per-packet header information: {output port here, port in next router}
  logic [V-1:0][PW-1:0] next_port;
  for (genvar v = 0; v < V; v++) begin : g_hdr
    logic hf_empty, hf_full;
    fwft_fifo #(.W(2 * PW), .DEPTH(B)) u_hdr_fifo (
      .clk   (clk),
      .rst   (rst),
      .push  (flit_in_wr && in_vc[v] && in_hdr),
      .din   ({in_port, in_next}),
      .pop   (ivc_grant[v] && head_tail[v]),
      .dout  ({ivc_dest[v], next_port[v]}),
      .empty (hf_empty),
      .full  (hf_full)
    );
    a_hdr_known:   assert property (@(posedge clk) disable iff (rst) nonempty[v] |-> !hf_empty);
    a_hdr_no_ovf:  assert property (@(posedge clk) disable iff (rst)
                                    (flit_in_wr && in_vc[v] && in_hdr) |-> !hf_full);
  end

  // OVC assignment, registered status bits and last-grant flags
  logic [V-1:0]        assigned, full_r, nfull_r, gnt_last;
  logic [V-1:0][V-1:0] a_ovc, next_ovc;

  always_comb begin
    for (int v = 0; v < V; v++) begin
      if (ivc_grant[v] && head_hdr[v]) next_ovc[v] = cand_ovc[ivc_dest[v]];
      else                             next_ovc[v] = a_ovc[v];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      assigned <= '0;
      full_r   <= '0;
      nfull_r  <= '0;
      gnt_last <= '0;
      for (int v = 0; v < V; v++) a_ovc[v] <= '0;
    end else begin
      gnt_last <= ivc_grant;
      for (int v = 0; v < V; v++) begin
        a_ovc[v]   <= next_ovc[v];
        full_r[v]  <= |(ovc_full[ivc_dest[v]]  & next_ovc[v]);
        nfull_r[v] <= |(ovc_nfull[ivc_dest[v]] & next_ovc[v]);
        if (ivc_grant[v]) begin
          if (head_tail[v])     assigned[v] <= 1'b0;
          else if (head_hdr[v]) assigned[v] <= 1'b1;
        end
      end
    end
  end

  // Masked requests
  always_comb begin
    for (int v = 0; v < V; v++) begin
      if (assigned[v])
        ivc_req[v] = nonempty[v] && !full_r[v] && !(nfull_r[v] && gnt_last[v]);
      else
        ivc_req[v] = nonempty[v] && ovc_avail[ivc_dest[v]];
    end
  end

  // Update signals for the candidate IVC, valid when granted
  always_comb begin
    grant_ovc  = '0;
    grant_hdr  = 1'b0;
    grant_tail = 1'b0;
    for (int v = 0; v < V; v++) begin
      if (ivc_grant[v]) begin
        grant_ovc  = assigned[v] ? a_ovc[v] : cand_ovc[ivc_dest[v]];
        grant_hdr  = head_hdr[v];
        grant_tail = head_tail[v];
      end
    end
  end

  // Second stage: outgoing flit and credit
  logic [V-1:0]  st_ovc;
  logic [PW-1:0] st_next;

  always_ff @(posedge clk) begin
    if (rst) begin
      st_ovc     <= '0;
      st_next    <= '0;
      credit_out <= '0;
    end else begin
      credit_out <= ivc_grant;
      if (granted) begin
        st_ovc <= grant_ovc;
        for (int v = 0; v < V; v++)
          if (ivc_cand[v]) st_next <= next_port[v];
      end
    end
  end

  always_comb begin
    xbar_flit = {rd_data[FPAY+1:FPAY], st_ovc, rd_data[FPAY-1:0]};
    if (rd_data[FPAY+1]) xbar_flit[HDR_LK_LSB +: PW] = st_next;
  end

  for (genvar v = 0; v < V; v++) begin : g_chk
    a_unassigned_is_hdr: assert property (@(posedge clk) disable iff (rst)
                                          (nonempty[v] && !assigned[v]) |-> head_hdr[v]);
    a_assigned_not_hdr:  assert property (@(posedge clk) disable iff (rst)
                                          (nonempty[v] && assigned[v]) |-> !head_hdr[v]);
  end

endmodule
