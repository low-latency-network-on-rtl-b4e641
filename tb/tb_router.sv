// tb_router: one router at mesh position (2,2) with behavioural neighbours on
// all five ports.
//
// Each input link is driven by a source that keeps B credits per VC and sends
// whole packets on one VC at a time; each output link ends in a sink that
// returns credits, sometimes after a random delay, so that requests get
// masked. Sinks check every packet: flits in order and intact, no two packets
// interleaved on one VC, the header's look-ahead field rewritten to the port
// the next router will use (checked against an independent XY model) and the
// right output port. Test 1 checks the two-cycle router latency; test 2
// checks that one input streaming to one output reaches one flit per cycle;
// test 3 is random all-to-all traffic with back-pressure.
module tb_router;
  import noc_pkg::*;

  localparam int V = 4, B = 4, FPAY = 32, FW = FPAY + 2 + V;
  localparam logic [CW-1:0] CX = 2, CY = 2;

  logic clk = 0, rst = 1;
  logic [P-1:0][FW-1:0] flit_in, flit_out;
  logic [P-1:0] flit_in_wr, flit_out_wr;
  logic [P-1:0][V-1:0] credit_out, credit_in;

  router #(.V(V), .B(B), .FPAY(FPAY)) dut (
    .clk, .rst, .cur_x(CX), .cur_y(CY), .flit_in, .flit_in_wr, .credit_out,
    .flit_out, .flit_out_wr, .credit_in);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int in_p, out_p, len; logic [CW-1:0] dx, dy; longint t_inj; } pkt_t;
  pkt_t pkts [int];
  int next_id = 0;
  int srcq [P][$];
  int cur_id [P], cur_idx [P], cur_vc [P], cred [P][V];
  int rx_id [P][V], rx_idx [P][V];
  int pend [P][V];              // credits held back by each sink
  int delay_pct = 0;            // chance per cycle that a sink holds its credits
  int delivered = 0;
  longint first_out [P], last_out [P];
  longint hdr_lat = -1;
  int flits_out [P];

  function automatic logic [15:0] chk16(int id, int idx);
    return 16'(id * 977 + idx * 31 + 5);
  endfunction

  // independent reference of the next router's XY port
  function automatic int ref_next(int op, int dx, int dy);
    int nx = 2, ny = 2;
    if (op == 1) nx = 3; else if (op == 3) nx = 1; else if (op == 2) ny = 1; else if (op == 4) ny = 3;
    if (dx > nx) return 1;
    if (dx < nx) return 3;
    if (dy > ny) return 4;
    if (dy < ny) return 2;
    return 0;
  endfunction

  // destination coordinates consistent with leaving by out_p from (2,2)
  function automatic void new_packet(int in_p, int out_p, int len);
    pkt_t p;
    p.in_p = in_p; p.out_p = out_p; p.len = len; p.t_inj = -1;
    case (out_p)
      1: begin p.dx = CW'($urandom_range(3, 5)); p.dy = CW'($urandom_range(0, 5)); end
      3: begin p.dx = CW'($urandom_range(0, 1)); p.dy = CW'($urandom_range(0, 5)); end
      2: begin p.dx = 2; p.dy = CW'($urandom_range(0, 1)); end
      4: begin p.dx = 2; p.dy = CW'($urandom_range(3, 5)); end
      default: begin p.dx = 2; p.dy = 2; end
    endcase
    pkts[next_id] = p;
    srcq[in_p].push_back(next_id);
    next_id = (next_id + 1) % 4096;
  endfunction

  function automatic logic [FW-1:0] make_flit(int id, int idx, int vc);
    logic [FPAY-1:0] pay;
    pkt_t p = pkts[id];
    if (idx == 0) begin
      pay = '0;
      pay[HDR_LK_LSB +: PW]   = PW'(p.out_p);
      pay[HDR_DSTX_LSB +: CW] = p.dx;
      pay[HDR_DSTY_LSB +: CW] = p.dy;
      pay[31:20] = 12'(id);
    end else pay = {12'(id), 4'(idx), chk16(id, idx)};
    return {idx == 0, idx == p.len - 1, V'(1) << vc, pay};
  endfunction

  task automatic receive(int o);
    logic hdr, tail;
    logic [V-1:0] vc1;
    logic [FPAY-1:0] pay;
    int vc, id;
    {hdr, tail, vc1, pay} = flit_out[o];
    vc = 0;
    for (int v = 0; v < V; v++) if (vc1[v]) vc = v;
    checks++;
    if (!$onehot(vc1)) begin failures++; $display("out %0d bad vc", o); return; end
    pend[o][vc]++;
    flits_out[o]++;
    if (first_out[o] < 0) first_out[o] = cycle;
    last_out[o] = cycle;
    if (hdr) begin
      id = int'(pay[31:20]);
      checks++;
      if (rx_id[o][vc] != -1 || !pkts.exists(id) || pkts[id].out_p != o ||
          int'(pay[HDR_LK_LSB +: PW]) != ref_next(o, int'(pkts[id].dx), int'(pkts[id].dy))) begin
        failures++; $display("out %0d vc %0d: bad header, id %0d lk %0d", o, vc, id, pay[HDR_LK_LSB +: PW]);
        return;
      end
      rx_id[o][vc] = id; rx_idx[o][vc] = 1;
      hdr_lat = cycle - pkts[id].t_inj;
      if (tail) begin pkts.delete(id); delivered++; rx_id[o][vc] = -1; end
    end else begin
      id = rx_id[o][vc];
      checks++;
      if (id == -1 || pay != {12'(id), 4'(rx_idx[o][vc]), chk16(id, rx_idx[o][vc])}) begin
        failures++; $display("out %0d vc %0d: bad body %h", o, vc, pay); return;
      end
      rx_idx[o][vc]++;
      if (tail) begin
        checks++;
        if (rx_idx[o][vc] != pkts[id].len) begin failures++; $display("short packet"); end
        pkts.delete(id); delivered++; rx_id[o][vc] = -1;
      end
    end
  endtask

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      for (int o = 0; o < P; o++) begin
        if (flit_out_wr[o]) receive(o);
        credit_in[o] = '0;
        for (int v = 0; v < V; v++)
          if (pend[o][v] > 0 && $urandom_range(0, 99) >= delay_pct) begin
            credit_in[o][v] = 1'b1; pend[o][v]--;
          end
      end
      for (int i = 0; i < P; i++) begin
        for (int v = 0; v < V; v++) if (credit_out[i][v]) cred[i][v]++;
        flit_in_wr[i] = 1'b0;
        if (cur_id[i] == -1 && srcq[i].size() > 0)
          for (int k = 0; k < V; k++) begin
            int v = (k + int'(cycle)) % V;
            if (cred[i][v] > 0 && cur_id[i] == -1) begin
              cur_id[i] = srcq[i].pop_front(); cur_idx[i] = 0; cur_vc[i] = v;
            end
          end
        if (cur_id[i] != -1 && cred[i][cur_vc[i]] > 0) begin
          if (cur_idx[i] == 0) pkts[cur_id[i]].t_inj = cycle;
          flit_in[i] = make_flit(cur_id[i], cur_idx[i], cur_vc[i]);
          flit_in_wr[i] = 1'b1;
          cred[i][cur_vc[i]]--;
          cur_idx[i]++;
          if (cur_idx[i] == pkts[cur_id[i]].len) cur_id[i] = -1;
        end
      end
    end
  end

  task automatic wait_idle(int max_cycles);
    for (int c = 0; c < max_cycles && pkts.size() > 0; c++) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (pkts.size() != 0) begin failures++; $display("%0d packets lost", pkts.size()); end
  endtask

  initial begin
    flit_in = '0; flit_in_wr = '0; credit_in = '0;
    for (int p = 0; p < P; p++) begin
      cur_id[p] = -1; first_out[p] = -1; flits_out[p] = 0;
      for (int v = 0; v < V; v++) begin cred[p][v] = B; rx_id[p][v] = -1; pend[p][v] = 0; end
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // Test 1: latency through an idle router is 2 cycles
    new_packet(WEST, EAST, 3);
    wait_idle(100);
    checks++;
    if (hdr_lat != 2) begin failures++; $display("router latency %0d, expected 2", hdr_lat); end
    else $display("router latency %0d cycles", hdr_lat);

    // Test 2: one input streaming to one output, credits returned at once
    flits_out[SOUTH] = 0; first_out[SOUTH] = -1;
    for (int k = 0; k < 40; k++) new_packet(NORTH, SOUTH, 5);
    wait_idle(1000);
    begin
      real rate;
      rate = real'(flits_out[SOUTH]) / real'(last_out[SOUTH] - first_out[SOUTH] + 1);
      $display("streaming throughput %0.3f flits/cycle", rate);
      checks++;
      if (flits_out[SOUTH] != 200 || rate < 0.95) begin failures++; $display("throughput too low"); end
    end

    // Test 3: random traffic on every port, credits sometimes held back
    delay_pct = 60;
    for (int c = 0; c < 3000; c++) begin
      @(posedge clk);
      for (int i = 0; i < P; i++)
        if ($urandom_range(0, 99) < 15) begin
          int o;
          do o = $urandom_range(0, P - 1); while (o == i);
          new_packet(i, o, $urandom_range(1, 6));
        end
    end
    delay_pct = 0;
    wait_idle(20000);
    $display("delivered %0d packets", delivered);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
