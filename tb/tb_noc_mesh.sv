// tb_noc_mesh: end-to-end test of the mesh at its default size (4x4 routers,
// 4 VCs of 4 flits, 32-bit payload).
//
// Every node has a behavioural endpoint written here: it queues packets of
// PKT_LEN flits, injects them one at a time on a VC with credits, returns a
// credit for every flit it receives and checks each received packet (right
// destination, flits in order, payload intact, right length). Phase 1 sends
// single packets through an empty network and checks the zero-load latency of
// the header, 2 cycles per router. Phase 2 drives uniform random traffic near
// saturation, then lets the network drain and checks that every packet
// arrived. Probes inside the routers count how often each mechanism acted:
// header requests masked for lack of a free OVC, requests masked by the full
// and by the nearly-full status bit, input ports losing the second stage of
// switch allocation, and OVCs reassigned while the downstream VC still held
// flits of the previous packet. A mechanism that never acts is a failure.
module tb_noc_mesh;
  import noc_pkg::*;

  localparam int NX = 4, NY = 4, V = 4, B = 4, FPAY = 32;
  localparam int N = NX * NY, FW = FPAY + 2 + V;
  localparam int PKT_LEN = 5;

  logic clk = 0, rst = 1;
  logic [N-1:0][FW-1:0] inj_flit, ej_flit;
  logic [N-1:0] inj_wr, ej_wr;
  logic [N-1:0][V-1:0] inj_credit, ej_credit;

  noc_mesh dut (.clk, .rst, .inj_flit, .inj_wr, .inj_credit, .ej_flit, .ej_wr, .ej_credit);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- packet bookkeeping ----------------
  typedef struct {
    int src, dst, len;
    longint t_create, t_inject;
  } pkt_t;
  pkt_t pkts [int];            // outstanding, by id
  int next_id = 0;
  int delivered = 0, created = 0;
  longint lat_sum = 0;

  int srcq [N][$];             // ids waiting at each source
  int cur_id [N], cur_idx [N], cur_vc [N];
  int cred [N][V];
  int rx_id [N][V], rx_idx [N][V];
  logic [N-1:0][V-1:0] ej_credit_n;

  function automatic logic [15:0] chk16(int id, int idx);
    return 16'((id * 40503 + idx * 2654435 + 17) >>> 3);
  endfunction

  function automatic logic [FW-1:0] make_flit(int id, int idx, int vc);
    logic [FPAY-1:0] pay;
    logic hdr, tail;
    pkt_t p = pkts[id];
    hdr  = (idx == 0);
    tail = (idx == p.len - 1);
    if (hdr) begin
      pay = '0;
      pay[HDR_LK_LSB   +: PW] = xy_route(CW'(p.src % NX), CW'(p.src / NX), CW'(p.dst % NX), CW'(p.dst / NX));
      pay[HDR_DSTX_LSB +: CW] = CW'(p.dst % NX);
      pay[HDR_DSTY_LSB +: CW] = CW'(p.dst / NX);
      pay[HDR_SRCX_LSB +: CW] = CW'(p.src % NX);
      pay[HDR_SRCY_LSB +: CW] = CW'(p.src / NX);
      pay[31:20] = 12'(id);
    end else begin
      pay = {12'(id), 4'(idx), chk16(id, idx)};
    end
    return {hdr, tail, V'(1) << vc, pay};
  endfunction

  function automatic void new_packet(int s, int d);
    pkt_t p;
    p.src = s; p.dst = d; p.len = PKT_LEN; p.t_create = cycle; p.t_inject = -1;
    pkts[next_id] = p;
    srcq[s].push_back(next_id);
    next_id = (next_id + 1) % 4096;
    created++;
  endfunction

  // ---------------- endpoints ----------------
  int zero_load_checks = 0;
  bit zero_load_phase = 1;

  task automatic receive(int n);
    logic [FW-1:0] f;
    logic hdr, tail;
    logic [V-1:0] vc1;
    int vc, id;
    logic [FPAY-1:0] pay;
    f = ej_flit[n];
    {hdr, tail, vc1, pay} = f;
    vc = -1;
    for (int v = 0; v < V; v++) if (vc1[v]) vc = v;
    checks++;
    if (!$onehot(vc1)) begin failures++; $display("node %0d: bad vc %b", n, vc1); return; end
    ej_credit_n[n][vc] = 1'b1;
    if (hdr) begin
      id = int'(pay[31:20]);
      checks++;
      if (rx_id[n][vc] != -1 || !pkts.exists(id) || pkts[id].dst != n ||
          pay[HDR_DSTX_LSB +: CW] != CW'(n % NX) || pay[HDR_DSTY_LSB +: CW] != CW'(n / NX) ||
          pay[HDR_LK_LSB +: PW] != PW'(LOCAL)) begin
        failures++; $display("node %0d vc %0d: unexpected header id %0d", n, vc, id); return;
      end
      if (zero_load_phase) begin
        int hops = (pkts[id].src % NX > n % NX ? pkts[id].src % NX - n % NX : n % NX - pkts[id].src % NX)
                 + (pkts[id].src / NX > n / NX ? pkts[id].src / NX - n / NX : n / NX - pkts[id].src / NX);
        checks++; zero_load_checks++;
        if (cycle - pkts[id].t_inject != longint'(2 * (hops + 1))) begin
          failures++;
          $display("zero-load latency %0d->%0d: %0d cycles, expected %0d", pkts[id].src, n,
                   cycle - pkts[id].t_inject, 2 * (hops + 1));
        end
      end
      rx_id[n][vc] = id; rx_idx[n][vc] = 1;
      if (tail) begin failures++; $display("one-flit packet not expected"); end
    end else begin
      id = rx_id[n][vc];
      checks++;
      if (id == -1 || pay != {12'(id), 4'(rx_idx[n][vc]), chk16(id, rx_idx[n][vc])}) begin
        failures++; $display("node %0d vc %0d: bad body flit %h (packet %0d idx %0d)", n, vc, pay, id, rx_idx[n][vc]);
        return;
      end
      rx_idx[n][vc]++;
      if (tail) begin
        checks++;
        if (rx_idx[n][vc] != pkts[id].len) begin failures++; $display("packet %0d short", id); end
        lat_sum += cycle - pkts[id].t_create;
        pkts.delete(id);
        delivered++;
        rx_id[n][vc] = -1;
      end
    end
  endtask

  // Runs once per cycle just after the clock edge: observe outputs, return
  // credits, drive the next injected flits.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      ej_credit_n = '0;
      for (int n = 0; n < N; n++) begin
        for (int v = 0; v < V; v++) if (inj_credit[n][v]) cred[n][v]++;
        if (ej_wr[n]) receive(n);
      end
      ej_credit = ej_credit_n;
      for (int n = 0; n < N; n++) begin
        inj_wr[n] = 1'b0;
        if (cur_id[n] == -1 && srcq[n].size() > 0) begin
          // new packet: pick a VC with credit, rotating start point
          for (int k = 0; k < V; k++) begin
            int v = (n + k + int'(cycle)) % V;
            if (cred[n][v] > 0 && cur_id[n] == -1) begin
              cur_id[n] = srcq[n].pop_front(); cur_idx[n] = 0; cur_vc[n] = v;
            end
          end
        end
        if (cur_id[n] != -1 && cred[n][cur_vc[n]] > 0) begin
          if (cur_idx[n] == 0) pkts[cur_id[n]].t_inject = cycle;
          inj_flit[n] = make_flit(cur_id[n], cur_idx[n], cur_vc[n]);
          inj_wr[n] = 1'b1;
          cred[n][cur_vc[n]]--;
          cur_idx[n]++;
          if (cur_idx[n] == pkts[cur_id[n]].len) cur_id[n] = -1;
        end
      end
    end
  end

  // ---------------- mechanism probes ----------------
  int m_noavail [N][P], m_full [N][P], m_nfull [N][P], m_lost [N][P], m_realloc [N][P];

  for (genvar gy = 0; gy < NY; gy++) begin : g_py
    for (genvar gx = 0; gx < NX; gx++) begin : g_px
      for (genvar gp = 0; gp < P; gp++) begin : g_pp
        localparam int ID = gy * NX + gx;
        always @(negedge clk) if (!rst) begin
          for (int v = 0; v < V; v++) begin
            if (dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.nonempty[v]) begin
              if (!dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.assigned[v]) begin
                if (!dut.g_y[gy].g_x[gx].u_router.ovc_avail[dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.ivc_dest[v]])
                  m_noavail[ID][gp]++;
              end else if (dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.full_r[v]) begin
                m_full[ID][gp]++;
              end else if (dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.nfull_r[v] &&
                           dut.g_y[gy].g_x[gx].u_router.g_in[gp].u_in.gnt_last[v]) begin
                m_nfull[ID][gp]++;
              end
            end
            if (dut.g_y[gy].g_x[gx].u_router.g_out[gp].u_ovc.alloc[v] &&
                dut.g_y[gy].g_x[gx].u_router.g_out[gp].u_ovc.credit[v] != B)
              m_realloc[ID][gp]++;
          end
          if (dut.g_y[gy].g_x[gx].u_router.u_sa.in_req[gp] && !dut.g_y[gy].g_x[gx].u_router.in_granted[gp])
            m_lost[ID][gp]++;
        end
      end
    end
  end

  function automatic longint total(ref int a [N][P]);
    longint s = 0;
    for (int n = 0; n < N; n++) for (int p = 0; p < P; p++) s += a[n][p];
    return s;
  endfunction

  // ---------------- stimulus ----------------
  initial begin
    inj_flit = '0; inj_wr = '0; ej_credit = '0;
    for (int n = 0; n < N; n++) begin
      cur_id[n] = -1;
      for (int v = 0; v < V; v++) begin cred[n][v] = B; rx_id[n][v] = -1; end
      for (int p = 0; p < P; p++) begin
        m_noavail[n][p] = 0; m_full[n][p] = 0; m_nfull[n][p] = 0; m_lost[n][p] = 0; m_realloc[n][p] = 0;
      end
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // Phase 1: isolated packets, zero-load latency
    for (int k = 0; k < 24; k++) begin
      int s, d;
      s = $urandom_range(0, N - 1);
      do d = $urandom_range(0, N - 1); while (d == s);
      if (k == 0) begin s = 0; d = N - 1; end      // corner to corner
      new_packet(s, d);
      repeat (40) @(posedge clk);
    end
    checks++;
    if (delivered != 24) begin failures++; $display("phase 1 delivered %0d of 24", delivered); end
    zero_load_phase = 0;

    // Phase 2: uniform random traffic, then drain
    for (int c = 0; c < 4000; c++) begin
      @(posedge clk);
      for (int n = 0; n < N; n++)
        if ($urandom_range(0, 999) < 90) begin
          int d;
          do d = $urandom_range(0, N - 1); while (d == n);
          new_packet(n, d);
        end
    end
    for (int c = 0; c < 20000 && pkts.size() > 0; c++) @(posedge clk);
    checks++;
    if (pkts.size() != 0) begin failures++; $display("%0d packets never arrived", pkts.size()); end

    $display("packets: created %0d delivered %0d, mean latency %0d cycles", created, delivered,
             delivered ? lat_sum / delivered : 0);
    $display("mechanisms: header masked (no free OVC) %0d, masked full %0d, masked nearly-full %0d, SA conflicts %0d, OVC reassigned non-empty %0d",
             total(m_noavail), total(m_full), total(m_nfull), total(m_lost), total(m_realloc));
    checks++; if (total(m_noavail) == 0) begin failures++; $display("no header masked for lack of free OVC"); end
    checks++; if (total(m_full) == 0)    begin failures++; $display("no request masked by full status"); end
    checks++; if (total(m_nfull) == 0)   begin failures++; $display("no request masked by nearly-full status"); end
    checks++; if (total(m_lost) == 0)    begin failures++; $display("no switch allocation conflict"); end
    checks++; if (total(m_realloc) == 0) begin failures++; $display("no OVC reassigned before its VC drained"); end
    checks++; if (zero_load_checks != 24) begin failures++; $display("zero-load checks %0d", zero_load_checks); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
