// lookahead_route: look-ahead XY routing.
//
// A header flit arrives carrying the output port it must take in this router
// (computed one hop earlier). In parallel with allocation, this block works
// out the port the packet will take in the next router: it steps the current
// coordinates one hop in the direction of out_port and applies X-then-Y
// dimension-order routing there. The result replaces the look-ahead field of
// the header as it leaves. Purely combinational. Dimension-order routing is
// what the published design is evaluated with; the X-before-Y order is this design's choice.
module lookahead_route
  import noc_pkg::*;
(
  input  logic [CW-1:0] cur_x,
  input  logic [CW-1:0] cur_y,
  input  logic [PW-1:0] out_port,
  input  logic [CW-1:0] dst_x,
  input  logic [CW-1:0] dst_y,
  output logic [PW-1:0] next_port
);

  logic [CW-1:0] nx, ny;

  always_comb begin
    nx = cur_x;
    ny = cur_y;
    case (out_port)
      EAST:    nx = cur_x + 1'b1;
      WEST:    nx = cur_x - 1'b1;
      NORTH:   ny = cur_y - 1'b1;
      SOUTH:   ny = cur_y + 1'b1;
      default: ;
    endcase
    next_port = xy_route(nx, ny, dst_x, dst_y);
  end

endmodule
