// tb_lookahead_route: for every position in an 8x8 mesh, every destination and
// every output port that XY routing would pick, compare the next router's port
// with a reference computed by stepping coordinates independently.
module tb_lookahead_route;
  import noc_pkg::*;
  logic [CW-1:0] cur_x, cur_y, dst_x, dst_y;
  logic [PW-1:0] out_port, next_port;
  int checks = 0, failures = 0;

  lookahead_route dut (.cur_x, .cur_y, .out_port, .dst_x, .dst_y, .next_port);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // independent reference: port index from deltas at the next node
  function automatic int ref_next(int cx, int cy, int dx, int dy, int op);
    int nx = cx, ny = cy;
    if (op == 1) nx++; else if (op == 3) nx--; else if (op == 2) ny--; else if (op == 4) ny++;
    if (dx > nx) return 1;
    if (dx < nx) return 3;
    if (dy > ny) return 4;
    if (dy < ny) return 2;
    return 0;
  endfunction

  function automatic int ref_here(int cx, int cy, int dx, int dy);
    return ref_next(cx, cy, dx, dy, 0);
  endfunction

  initial begin
    for (int cx = 0; cx < 8; cx++)
      for (int cy = 0; cy < 8; cy++)
        for (int dx = 0; dx < 8; dx++)
          for (int dy = 0; dy < 8; dy++) begin
            int op;
            op = ref_here(cx, cy, dx, dy);
            if (op == 0) continue;
            cur_x = CW'(cx); cur_y = CW'(cy); dst_x = CW'(dx); dst_y = CW'(dy);
            out_port = PW'(op);
            #1;
            checks++;
            if (int'(next_port) != ref_next(cx, cy, dx, dy, op)) begin
              failures++;
              if (failures < 10) $display("(%0d,%0d)->(%0d,%0d) port %0d next %0d", cx, cy, dx, dy, op, next_port);
            end
          end
    // Y-then-X corner: packet at its column turns north/south, then local
    cur_x = 2; cur_y = 2; dst_x = 3; dst_y = 0; out_port = EAST; #1;
    checks++; if (next_port !== NORTH) failures++;
    cur_x = 3; cur_y = 1; dst_x = 3; dst_y = 0; out_port = NORTH; #1;
    checks++; if (next_port !== LOCAL) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
