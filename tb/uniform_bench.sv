// uniform_bench: a mesh with an endpoint at every node, swept through a list
// of injection rates under uniform random traffic.
//
// For each rate (flits per node per cycle) the endpoints create PKT_LEN-flit
// packets to random other nodes with probability rate/PKT_LEN per cycle, for
// WARM warm-up cycles and MEAS measured cycles, after which creation stops and
// the network drains. Packets created in the measured window give the mean
// latency (creation to tail delivery, source queueing included) and the
// delivered flits give the accepted throughput. Every packet is checked on
// arrival (destination, order, payload, length) and all must arrive. One line
// per rate is printed. `done` rises when the sweep ends; checks and failures
// are counted for the enclosing testbench.
module uniform_bench
  import noc_pkg::*;
#(
  parameter int NX = 5,
  parameter int NY = 5,
  parameter int V  = 4,
  parameter int B  = 4,
  parameter int WARM = 500,
  parameter int MEAS = 2000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   sat_permille     // accepted throughput at the highest rate
);
  localparam int FPAY = 32, N = NX * NY, FW = FPAY + 2 + V, PKT_LEN = 5;
  localparam int NRATES = 6;
  localparam int RATES [NRATES] = '{50, 150, 250, 350, 450, 600};  // per mille flits/node/cycle

  logic [N-1:0][FW-1:0] inj_flit, ej_flit;
  logic [N-1:0] inj_wr, ej_wr;
  logic [N-1:0][V-1:0] inj_credit, ej_credit;

  noc_mesh #(.NX(NX), .NY(NY), .V(V), .B(B), .FPAY(FPAY)) u_mesh (
    .clk, .rst, .inj_flit, .inj_wr, .inj_credit, .ej_flit, .ej_wr, .ej_credit);

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int src, dst; longint t_create; bit measured; } pkt_t;
  pkt_t pkts [int];
  int next_id = 0;
  int srcq [N][$];
  int cur_id [N], cur_idx [N], cur_vc [N], cred [N][V], rx_id [N][V], rx_idx [N][V];
  logic [N-1:0][V-1:0] ej_credit_n;
  bit measuring = 0;
  longint lat_sum, lat_n, flits_meas;

  function automatic logic [15:0] chk16(int id, int idx);
    return 16'(id * 40503 + idx * 7 + 3);
  endfunction

  function automatic logic [FW-1:0] make_flit(int id, int idx, int vc);
    logic [FPAY-1:0] pay;
    pkt_t p = pkts[id];
    if (idx == 0) begin
      pay = '0;
      pay[HDR_LK_LSB   +: PW] = xy_route(CW'(p.src % NX), CW'(p.src / NX), CW'(p.dst % NX), CW'(p.dst / NX));
      pay[HDR_DSTX_LSB +: CW] = CW'(p.dst % NX);
      pay[HDR_DSTY_LSB +: CW] = CW'(p.dst / NX);
      pay[31:20] = 12'(id);
    end else pay = {12'(id), 4'(idx), chk16(id, idx)};
    return {idx == 0, idx == PKT_LEN - 1, V'(1) << vc, pay};
  endfunction

  task automatic receive(int n);
    logic hdr, tail;
    logic [V-1:0] vc1;
    logic [FPAY-1:0] pay;
    int vc, id;
    {hdr, tail, vc1, pay} = ej_flit[n];
    vc = 0;
    for (int v = 0; v < V; v++) if (vc1[v]) vc = v;
    checks++;
    if (!$onehot(vc1)) begin failures++; return; end
    ej_credit_n[n][vc] = 1'b1;
    if (measuring) flits_meas++;
    if (hdr) begin
      id = int'(pay[31:20]);
      checks++;
      if (rx_id[n][vc] != -1 || !pkts.exists(id) || pkts[id].dst != n) begin
        failures++; $display("node %0d: unexpected header %0d", n, id); return;
      end
      rx_id[n][vc] = id; rx_idx[n][vc] = 1;
    end else begin
      id = rx_id[n][vc];
      checks++;
      if (id == -1 || pay != {12'(id), 4'(rx_idx[n][vc]), chk16(id, rx_idx[n][vc])}) begin
        failures++; $display("node %0d: bad body flit", n); return;
      end
      rx_idx[n][vc]++;
      if (tail) begin
        checks++;
        if (rx_idx[n][vc] != PKT_LEN) failures++;
        if (pkts[id].measured) begin lat_sum += cycle - pkts[id].t_create; lat_n++; end
        pkts.delete(id);
        rx_id[n][vc] = -1;
      end
    end
  endtask

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
        if (cur_id[n] == -1 && srcq[n].size() > 0)
          for (int k = 0; k < V; k++) begin
            int v;
            v = (n + k + int'(cycle)) % V;
            if (cred[n][v] > 0 && cur_id[n] == -1) begin
              cur_id[n] = srcq[n].pop_front(); cur_idx[n] = 0; cur_vc[n] = v;
            end
          end
        if (cur_id[n] != -1 && cred[n][cur_vc[n]] > 0) begin
          inj_flit[n] = make_flit(cur_id[n], cur_idx[n], cur_vc[n]);
          inj_wr[n] = 1'b1;
          cred[n][cur_vc[n]]--;
          cur_idx[n]++;
          if (cur_idx[n] == PKT_LEN) cur_id[n] = -1;
        end
      end
    end
  end

  initial begin
    done = 0; checks = 0; failures = 0; sat_permille = 0;
    inj_flit = '0; inj_wr = '0; ej_credit = '0;
    for (int n = 0; n < N; n++) begin
      cur_id[n] = -1;
      for (int v = 0; v < V; v++) begin cred[n][v] = B; rx_id[n][v] = -1; end
    end
    @(negedge rst);
    for (int r = 0; r < NRATES; r++) begin
      longint acc;
      lat_sum = 0; lat_n = 0; flits_meas = 0;
      for (int c = 0; c < WARM + MEAS; c++) begin
        @(posedge clk);
        measuring = (c >= WARM);
        for (int n = 0; n < N; n++)
          if ($urandom_range(0, 999 * PKT_LEN) < RATES[r]) begin
            pkt_t p;
            int d;
            do d = $urandom_range(0, N - 1); while (d == n);
            p.src = n; p.dst = d; p.t_create = cycle; p.measured = measuring;
            if (pkts.exists(next_id)) begin failures++; $display("packet id space exhausted"); end
            pkts[next_id] = p;
            srcq[n].push_back(next_id);
            next_id = (next_id + 1) % 4096;
          end
      end
      measuring = 0;
      acc = flits_meas * 1000 / (N * MEAS);
      for (int c = 0; c < 100000 && pkts.size() > 0; c++) @(posedge clk);
      checks++;
      if (pkts.size() != 0) begin failures++; $display("%0d packets lost", pkts.size()); end
      $display("%0dx%0d mesh, %0d VCs: offered %0d.%03d accepted %0d.%03d flits/node/cycle, mean latency %0d cycles (%0d packets)",
               NX, NY, V, RATES[r] / 1000, RATES[r] % 1000, acc / 1000, acc % 1000,
               lat_n ? lat_sum / lat_n : 0, lat_n);
      // below saturation the network accepts what is offered
      if (r == 0) begin
        checks++;
        if (acc < RATES[0] * 8 / 10 || acc > RATES[0] * 12 / 10) begin
          failures++; $display("low-load throughput off: %0d", acc);
        end
      end
      if (r == NRATES - 1) sat_permille = int'(acc);
    end
    done = 1;
  end
endmodule
