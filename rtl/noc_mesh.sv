// noc_mesh: NX x NY 2D mesh of routers.
//
// Router (x,y) sits at index y*NX+x. Its east port links to the west port of
// (x+1,y) and its south port to the north port of (x,y+1), each link carrying
// flits one way and per-VC credits the other. The local port of every router
// is brought out: inj_* is the endpoint-to-router direction, ej_* the
// router-to-endpoint direction. An endpoint injects a header whose look-ahead
// field holds the XY route at its own router (noc_pkg::xy_route) and must not
// address itself; it keeps V credit counters (B each) for the injection link
// and returns one credit per ejected flit on ej_credit. Ports at the mesh edge
// are tied off. The default 4x4 size is the mesh the published design was synthesised in; its
// latency and throughput evaluation uses 5x5.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int NX   = 4,
  parameter int NY   = 4,
  parameter int V    = 4,
  parameter int B    = 4,
  parameter int FPAY = 32,
  localparam int FW  = FPAY + 2 + V,
  localparam int N   = NX * NY
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic [N-1:0][FW-1:0] inj_flit,
  input  logic [N-1:0]         inj_wr,
  output logic [N-1:0][V-1:0]  inj_credit,
  output logic [N-1:0][FW-1:0] ej_flit,
  output logic [N-1:0]         ej_wr,
  input  logic [N-1:0][V-1:0]  ej_credit
);

  logic [N-1:0][P-1:0][FW-1:0] r_fin, r_fout;
  logic [N-1:0][P-1:0]         r_win, r_wout;
  logic [N-1:0][P-1:0][V-1:0]  r_cin, r_cout;

  for (genvar y = 0; y < NY; y++) begin : g_y
    for (genvar x = 0; x < NX; x++) begin : g_x
      localparam int ID = y * NX + x;

      router #(.V(V), .B(B), .FPAY(FPAY)) u_router (
        .clk         (clk),
        .rst         (rst),
        .cur_x       (CW'(x)),
        .cur_y       (CW'(y)),
        .flit_in     (r_fin[ID]),
        .flit_in_wr  (r_win[ID]),
        .credit_out  (r_cout[ID]),
        .flit_out    (r_fout[ID]),
        .flit_out_wr (r_wout[ID]),
        .credit_in   (r_cin[ID])
      );

      // Local port
      assign r_fin[ID][LOCAL] = inj_flit[ID];
      assign r_win[ID][LOCAL] = inj_wr[ID];
      assign inj_credit[ID]   = r_cout[ID][LOCAL];
      assign ej_flit[ID]      = r_fout[ID][LOCAL];
      assign ej_wr[ID]        = r_wout[ID][LOCAL];
      assign r_cin[ID][LOCAL] = ej_credit[ID];

      // East / west
      if (x < NX - 1) begin : g_e
        assign r_fin[ID][EAST] = r_fout[ID+1][WEST];
        assign r_win[ID][EAST] = r_wout[ID+1][WEST];
        assign r_cin[ID][EAST] = r_cout[ID+1][WEST];
      end else begin : g_ne
        assign r_fin[ID][EAST] = '0;
        assign r_win[ID][EAST] = 1'b0;
        assign r_cin[ID][EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_fin[ID][WEST] = r_fout[ID-1][EAST];
        assign r_win[ID][WEST] = r_wout[ID-1][EAST];
        assign r_cin[ID][WEST] = r_cout[ID-1][EAST];
      end else begin : g_nw
        assign r_fin[ID][WEST] = '0;
        assign r_win[ID][WEST] = 1'b0;
        assign r_cin[ID][WEST] = '0;
      end

      // North / south (y grows southward)
      if (y > 0) begin : g_n
        assign r_fin[ID][NORTH] = r_fout[ID-NX][SOUTH];
        assign r_win[ID][NORTH] = r_wout[ID-NX][SOUTH];
        assign r_cin[ID][NORTH] = r_cout[ID-NX][SOUTH];
      end else begin : g_nn
        assign r_fin[ID][NORTH] = '0;
        assign r_win[ID][NORTH] = 1'b0;
        assign r_cin[ID][NORTH] = '0;
      end
      if (y < NY - 1) begin : g_s
        assign r_fin[ID][SOUTH] = r_fout[ID+NX][NORTH];
        assign r_win[ID][SOUTH] = r_wout[ID+NX][NORTH];
        assign r_cin[ID][SOUTH] = r_cout[ID+NX][NORTH];
      end else begin : g_ns
        assign r_fin[ID][SOUTH] = '0;
        assign r_win[ID][SOUTH] = 1'b0;
        assign r_cin[ID][SOUTH] = '0;
      end
    end
  end

endmodule
