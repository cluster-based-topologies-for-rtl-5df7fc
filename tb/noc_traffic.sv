// noc_traffic -- traffic generator, memory model and checker for one 64-node
// clustered 3D network (TOPO 0 = CIT, 1 = CMIT), used by the network and top
// testbenches.
//
// One node per 2x2 cluster acts as a processor (16 in all), the other 48 as
// memories. Processors issue read requests (1 flit) and write requests
// (1 + burst flits, burst 1-8), at most 8 outstanding each; a memory answers
// a read with 1 + burst flits and a write with 1 flit. Three phases are run:
// uniform (random memory), non-uniform (70% of requests to a memory of the
// processor's own cluster) and hotspot (four hotspot memories at (x,y,z) =
// (2,2,1), (3,3,2), (2,3,3), (3,2,4), 1-based, getting 80% of the requests
// between them, 20% each). Nodes apply random back-pressure.
// Checks: each packet reaches the node named in its header, whole, in
// order, not interleaved; every request is answered; nothing is lost. It
// counts how often each mechanism was used and counts a failure for any that
// never was: delivery inside a cluster, across a layer, over the bus to the
// next layer (single hop) and across several layers (multi hop), upward and
// downward bus traffic, back-pressure from a node, a stalled source, and a
// transfer stage letting a packet overtake a blocked one.
// `done` rises when all phases are over; checks/failures are then final.
// The run is cut short, with a failure, if no packet is delivered for 5000
// bus cycles while some are in flight (a hang) or after 200 failures.
module noc_traffic
  import noc_pkg::*;
#(
  parameter int    TOPO = 0,             // 0 = CIT, 1 = CMIT
  parameter int    REQS = 100,           // requests per processor per phase
  parameter string NAME = "CIT"
) (
  input  logic  clk,
  input  logic  rclk   [4],
  input  logic  rrst_n [4],
  output logic  tx_v   [64],
  input  logic  tx_r   [64],
  output flit_t tx_f   [64],
  input  logic  rx_v   [64],
  output logic  rx_r   [64],
  input  flit_t rx_f   [64],
  input  logic  nb     [16],
  output logic  done,
  output int    checks,
  output int    failures
);
  localparam int NODES = 64;

  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL (%s): %s", NAME, msg);
  endfunction

  // ---- node geometry ----
  function automatic int n_z(int n); return n / 16; endfunction
  function automatic int n_x(int n);                 // node column 0..3
    return TOPO == 0 ? ((n / 4) % 2) * 2 + (n % 2) : n % 4;
  endfunction
  function automatic int n_y(int n);                 // node row 0..3
    return TOPO == 0 ? ((n / 8) % 2) * 2 + ((n % 4) / 2) : (n / 4) % 4;
  endfunction
  function automatic int n_cl(int n);                // cluster, global
    return n_z(n) * 4 + (n_y(n) / 2) * 2 + n_x(n) / 2;
  endfunction
  function automatic bit is_proc(int n);
    return (n_x(n) % 2 == 0) && (n_y(n) % 2 == 0);
  endfunction
  // node from 1-based (x, y, z)
  function automatic int n_at(int x, int y, int z);
    for (int n = 0; n < NODES; n++)
      if (n_x(n) == x - 1 && n_y(n) == y - 1 && n_z(n) == z - 1) return n;
    return 0;
  endfunction

  typedef enum int {RD_REQ = 0, WR_REQ = 1, RD_RSP = 2, WR_RSP = 3} kind_e;

  flit_t  exp_pkt [int][$];
  int     exp_dst [int];
  longint t_issue [int];
  int     next_id = 1;
  int     sent = 0, recv = 0;
  flit_t  src_q [NODES][$];
  int     outstanding [NODES];
  int     cur_id [NODES], cur_idx [NODES];
  longint lat_sum = 0;
  int     lat_n = 0;

  int c_cluster = 0, c_mesh = 0, c_bus_sh = 0, c_bus_mh = 0, c_up = 0, c_dn = 0;
  int c_rx_stall = 0, c_tx_stall = 0, c_nb = 0;

  function automatic flit_t mk(int src, int dst, int id, kind_e k, int blen, int idx, int len);
    logic [PAYLOAD_W-1:0] pl;
    pl = {src[5:0], id[12:0], k[1:0], blen[2:0]};
    if (idx != 0) return {idx == len - 1, 1'b0, idx[5:0], pl};
    if (TOPO == 0)
      return make_flit(len == 1, 1'b1, LAYER_W'(n_z(dst)), CX_W'(n_x(dst) / 2),
                       CY_W'(n_y(dst) / 2), IP_W'((n_y(dst) % 2) * 2 + n_x(dst) % 2), pl);
    return make_flit_cmit(len == 1, 1'b1, LAYER_W'(n_z(dst)), MX_W'(n_x(dst)),
                          MY_W'(n_y(dst)), pl);
  endfunction

  function automatic void send(int src, int dst, kind_e k, int blen, int req_id);
    int len, id;
    flit_t f;
    len = (k == RD_REQ || k == WR_REQ) ? ((k == RD_REQ) ? 1 : 2 + blen) : ((k == RD_RSP) ? 2 + blen : 1);
    id  = (k == RD_RSP || k == WR_RSP) ? req_id : next_id;
    if (k == RD_REQ || k == WR_REQ) next_id = (next_id % 8000) + 1;
    for (int i = 0; i < len; i++) begin
      f = mk(src, dst, id, k, blen, i, len);
      src_q[src].push_back(f);
      exp_pkt[id * 4 + int'(k)].push_back(f);
    end
    exp_dst[id * 4 + int'(k)] = dst;
    sent++;
    if (n_cl(src) == n_cl(dst)) c_cluster++;
    else if (n_z(src) == n_z(dst)) c_mesh++;
    else begin
      if (n_z(dst) - n_z(src) == 1 || n_z(src) - n_z(dst) == 1) c_bus_sh++;
      else c_bus_mh++;
      if (n_z(dst) > n_z(src)) c_up++; else c_dn++;
    end
    if (k == RD_REQ || k == WR_REQ) t_issue[id] = $time;
  endfunction

  initial begin checks = 0; failures = 0; done = 0; end

  always_comb
    for (int n = 0; n < NODES; n++) begin
      tx_v[n] = src_q[n].size() > 0;
      tx_f[n] = tx_v[n] ? src_q[n][0] : '0;
    end
  initial
    for (int n = 0; n < NODES; n++) begin
      cur_id[n] = -1;
      outstanding[n] = 0;
    end

  // One process per layer serves the 16 nodes of that layer on its clock.
  for (genvar z = 0; z < 4; z++) begin : g_layer
    logic rdy [16];
    initial for (int i = 0; i < 16; i++) rdy[i] = 1'b1;
    for (genvar i = 0; i < 16; i++) begin : g_rdy
      assign rx_r[z * 16 + i] = rdy[i];
    end
    always @(posedge rclk[z]) begin
      if (rrst_n[z]) for (int n = z * 16; n < z * 16 + 16; n++) begin
        if (tx_v[n] && tx_r[n]) void'(src_q[n].pop_front());
        if (tx_v[n] && !tx_r[n]) c_tx_stall++;
        if (rx_v[n] && !rx_r[n]) c_rx_stall++;
        if (rx_v[n] && rx_r[n]) begin
          flit_t f;
          int key, src, id;
          kind_e k;
          f = rx_f[n];
          checks++;
          if (is_bom(f)) begin
            if (cur_id[n] != -1) fail($sformatf("node %0d: packets interleaved", n));
            cur_id[n]  = int'(f[17:5]) * 4 + int'(f[4:3]);
            cur_idx[n] = 0;
            if (!exp_dst.exists(cur_id[n]) || exp_dst[cur_id[n]] != n)
              fail($sformatf("node %0d: packet %0d misrouted", n, cur_id[n]));
          end
          key = cur_id[n];
          if (key < 0 || !exp_pkt.exists(key) || cur_idx[n] >= exp_pkt[key].size() ||
              exp_pkt[key][cur_idx[n]] != f)
            fail($sformatf("node %0d: flit mismatch pkt %0d idx %0d", n, key, cur_idx[n]));
          cur_idx[n]++;
          if (is_eom(f) && key >= 0) begin
            src = int'(f[23:18]);
            id  = int'(f[17:5]);
            k   = kind_e'(f[4:3]);
            if (exp_pkt.exists(key)) begin exp_pkt.delete(key); exp_dst.delete(key); end
            cur_id[n] = -1;
            recv++;
            if (k == RD_REQ) send(n, src, RD_RSP, int'(f[2:0]), id);
            else if (k == WR_REQ) send(n, src, WR_RSP, 0, id);
            else begin
              if (t_issue.exists(id)) begin
                lat_sum += ($time - t_issue[id]) / 10;
                lat_n++;
                t_issue.delete(id);
              end
              outstanding[n]--;
            end
          end
        end
        rdy[n % 16] <= ($urandom % 8 != 0);
      end
    end
  end

  always @(posedge clk) for (int r = 0; r < 16; r++) c_nb += int'(nb[r]);

  int idle = 0, last_recv = 0;
  bit abort = 0;
  always @(posedge clk) begin
    idle      <= (recv != last_recv || recv == sent) ? 0 : idle + 1;
    last_recv <= recv;
    if (idle > 5000 || failures > 200) abort <= 1'b1;
  end

  function automatic int pick_mem(int p, int phase);
    int d;
    if (phase == 1 && ($urandom % 100) < 70) begin
      do d = $urandom % NODES; while (n_cl(d) != n_cl(p) || is_proc(d));
      return d;
    end
    if (phase == 2 && ($urandom % 100) < 80) begin
      case ($urandom % 4)
        0: d = n_at(2, 2, 1);
        1: d = n_at(3, 3, 2);
        2: d = n_at(2, 3, 3);
        default: d = n_at(3, 2, 4);
      endcase
      if (!is_proc(d)) return d;
    end
    do d = $urandom % NODES; while (is_proc(d));
    return d;
  endfunction

  task automatic run_phase(int phase, string name);
    int issued [NODES];
    int fin;
    lat_sum = 0; lat_n = 0;
    foreach (issued[i]) issued[i] = 0;
    do begin
      fin = 1;
      for (int p = 0; p < NODES; p++) begin
        if (is_proc(p) && issued[p] < REQS) begin
          fin = 0;
          if (outstanding[p] < 8 && src_q[p].size() < 8) begin
            outstanding[p]++;
            issued[p]++;
            send(p, pick_mem(p, phase), kind_e'($urandom % 2), $urandom % 8, 0);
          end
        end
      end
      @(posedge clk);
    end while (fin == 0);
    wait (recv == sent);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_pkt.size() != 0) fail($sformatf("%s: packets lost", name));
    $display("%s %s: %0d packets so far, mean request-to-response latency %0d bus cycles",
             NAME, name, recv, (lat_n != 0) ? lat_sum / longint'(lat_n) : 0);
  endtask

  initial begin
    wait (rrst_n[0] === 1'b1);
    repeat (4) @(posedge clk);
    fork
      begin
        run_phase(0, "uniform");
        run_phase(1, "non-uniform (70% local)");
        run_phase(2, "hotspot (4 nodes, 20% each)");
      end
      wait (abort);
    join_any
    disable fork;
    if (abort) begin
      fail($sformatf("%s: run stopped, %0d of %0d packets delivered", NAME, recv, sent));
      done = 1;
    end else begin
    for (int p = 0; p < NODES; p++) begin
      checks++;
      if (outstanding[p] != 0) fail($sformatf("processor %0d missing responses", p));
    end
    $display("%s mechanisms: cluster=%0d layer=%0d bus_single_hop=%0d bus_multi_hop=%0d up=%0d down=%0d",
             NAME, c_cluster, c_mesh, c_bus_sh, c_bus_mh, c_up, c_dn);
    $display("%s            rx_backpressure=%0d tx_stall=%0d nonblocking_overtake=%0d",
             NAME, c_rx_stall, c_tx_stall, c_nb);
    checks += 9;
    if (c_cluster == 0)  fail("no intra-cluster delivery");
    if (c_mesh == 0)     fail("no intra-layer delivery between clusters");
    if (c_bus_sh == 0)   fail("no single-hop bus packet");
    if (c_bus_mh == 0)   fail("no multi-hop bus packet");
    if (c_up == 0)       fail("no upward bus packet");
    if (c_dn == 0)       fail("no downward bus packet");
    if (c_rx_stall == 0) fail("no back-pressure from a node");
    if (c_tx_stall == 0) fail("no source stall");
    if (c_nb == 0)       fail("no non-blocking overtake");
    done = 1;
    end
  end
endmodule
