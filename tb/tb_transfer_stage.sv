// tb_transfer_stage -- self-checking test of one transfer stage (layer 1 of
// 4) between modelled neighbour stages.
// The models above and below send packets into the stage under credit flow
// control (one credit counter per receive buffer, SH and MH) and receive the
// stage's output into model buffers of 6 flits per path, which they drain at
// random, returning credits. The host side (its own clock) sends packets to
// layers 0, 2 and 3 and accepts packets with random back-pressure.
// Checks: every packet leaves on the right side (layer 1 -> host, layer 0 ->
// down, layers 2/3 -> up), whole, in order, not interleaved; the path the
// receiving model derives from the header never overflows (credits honoured);
// nothing is lost; on an idle stage a flit from above bound for layer 0 is
// sent down two bus cycles after it arrives.
module tb_transfer_stage;
  import noc_pkg::*;

  localparam int LAYER = 1, CAP = 6;

  logic clk = 0, rst_n = 0, rclk = 0, rrst_n = 0;
  always #5 clk = ~clk;
  always #6 rclk = ~rclk;

  logic  hin_v, hin_r, hout_v, hout_r;
  flit_t hin_f, hout_f;
  logic  ut_v, ut_sc, ut_mc, ur_v, ur_sc, ur_mc;
  logic  dt_v, dt_sc, dt_mc, dr_v, dr_sc, dr_mc;
  flit_t ut_f, ur_f, dt_f, dr_f;
  logic  nb_up, nb_dn;

  transfer_stage #(.LAYERS(4), .LAYER(LAYER)) dut (
    .clk, .rst_n, .rclk, .rrst_n,
    .host_in_valid(hin_v), .host_in_ready(hin_r), .host_in_flit(hin_f),
    .host_out_valid(hout_v), .host_out_ready(hout_r), .host_out_flit(hout_f),
    .up_tx_valid(ut_v), .up_tx_flit(ut_f), .up_tx_sh_cred(ut_sc), .up_tx_mh_cred(ut_mc),
    .up_rx_valid(ur_v), .up_rx_flit(ur_f), .up_rx_sh_cred(ur_sc), .up_rx_mh_cred(ur_mc),
    .dn_tx_valid(dt_v), .dn_tx_flit(dt_f), .dn_tx_sh_cred(dt_sc), .dn_tx_mh_cred(dt_mc),
    .dn_rx_valid(dr_v), .dn_rx_flit(dr_f), .dn_rx_sh_cred(dr_sc), .dn_rx_mh_cred(dr_mc),
    .nb_up, .nb_dn);

  int checks = 0, failures = 0;
  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endfunction

  // ports: 0 = up side, 1 = down side, 2 = host
  flit_t exp_pkt [int][$];
  int    exp_port [int];
  int    next_id = 0, sent = 0, recv = 0;
  flit_t src_q [3][$];
  int    cur_id [3] = '{-1, -1, -1};
  int    cur_idx [3];
  int    occ [2][2];                 // model receive buffers [side][sh=1/mh=0]
  int    cred [2][2];                // credits for sending into the stage
  bit    drain = 1;

  function automatic flit_t mk(int id, int idx, int len, int dst);
    logic [PAYLOAD_W-1:0] pl;
    pl = PAYLOAD_W'({id[13:0], idx[3:0], len[3:0]});
    if (idx == 0) return make_flit(len == 1, 1'b1, LAYER_W'(dst), '0, '0, '0, pl);
    return make_flit(idx == len - 1, 1'b0, '0, '0, '0, '0, pl);
  endfunction

  task automatic gen(int src, int dst, int len);
    flit_t f;
    for (int i = 0; i < len; i++) begin
      f = mk(next_id, i, len, dst);
      src_q[src].push_back(f);
      exp_pkt[next_id].push_back(f);
    end
    exp_port[next_id] = (dst == LAYER) ? 2 : (dst > LAYER) ? 0 : 1;
    next_id++; sent++;
  endtask

  function automatic void sink(int port, flit_t f);
    int id;
    checks++;
    if (is_bom(f)) begin
      if (cur_id[port] != -1) fail($sformatf("port %0d: interleaved", port));
      cur_id[port] = int'(f[21:8]);
      cur_idx[port] = 0;
      if (!exp_port.exists(cur_id[port]) || exp_port[cur_id[port]] != port)
        fail($sformatf("port %0d: packet %0d on wrong side", port, cur_id[port]));
    end
    id = cur_id[port];
    if (id < 0 || !exp_pkt.exists(id) || cur_idx[port] >= exp_pkt[id].size() ||
        exp_pkt[id][cur_idx[port]] != f)
      fail($sformatf("port %0d: flit mismatch pkt %0d", port, id));
    cur_idx[port]++;
    if (is_eom(f)) begin
      if (id >= 0 && exp_pkt.exists(id)) begin exp_pkt.delete(id); exp_port.delete(id); end
      cur_id[port] = -1;
      recv++;
    end
  endfunction

  // neighbour-stage models (bus clock)
  logic  tx_v [2];
  flit_t tx_f [2];
  logic  rx_path_sh [2];             // path of packet being received by model
  logic  snd_sh [2];                 // path of packet being sent into the stage
  initial begin
    for (int s = 0; s < 2; s++) begin
      cred[s][0] = CAP; cred[s][1] = CAP; occ[s][0] = 0; occ[s][1] = 0;
      tx_v[s] = 0; tx_f[s] = '0; rx_path_sh[s] = 0; snd_sh[s] = 0;
    end
  end
  assign ur_v = tx_v[0]; assign ur_f = tx_f[0];
  assign dr_v = tx_v[1]; assign dr_f = tx_f[1];

  always @(posedge clk) if (rst_n) begin
    logic  ov [2];
    flit_t of [2];
    int    nl [2];
    ov[0] = ut_v; of[0] = ut_f; nl[0] = LAYER + 1;
    ov[1] = dt_v; of[1] = dt_f; nl[1] = LAYER - 1;
    // credits returned by the stage
    if (ur_sc) cred[0][1]++;
    if (ur_mc) cred[0][0]++;
    if (dr_sc) cred[1][1]++;
    if (dr_mc) cred[1][0]++;
    for (int s = 0; s < 2; s++) begin
      // receive from the stage
      if (ov[s]) begin
        if (is_bom(of[s])) rx_path_sh[s] = (int'(hdr_layer(of[s])) == nl[s]);
        occ[s][rx_path_sh[s]]++;
        checks++;
        if (occ[s][rx_path_sh[s]] > CAP) fail($sformatf("side %0d: buffer overflow", s));
        sink(s, of[s]);
      end
      // send into the stage
      tx_v[s] <= 1'b0;
      if (src_q[s].size() > 0) begin
        flit_t f;
        logic  p;
        f = src_q[s][0];
        p = is_bom(f) ? (int'(hdr_layer(f)) == LAYER) : snd_sh[s];
        if (cred[s][p] > 0 && ($urandom % 4 != 0)) begin
          cred[s][p]--;
          snd_sh[s] = p;
          tx_v[s] <= 1'b1;
          tx_f[s] <= f;
          void'(src_q[s].pop_front());
        end
      end
    end
    // drain the model buffers, returning credits
    ut_sc <= 0; ut_mc <= 0; dt_sc <= 0; dt_mc <= 0;
    if (drain) begin
      if (occ[0][1] > 0 && $urandom % 2 == 1) begin occ[0][1]--; ut_sc <= 1; end
      if (occ[0][0] > 0 && $urandom % 2 == 1) begin occ[0][0]--; ut_mc <= 1; end
      if (occ[1][1] > 0 && $urandom % 2 == 1) begin occ[1][1]--; dt_sc <= 1; end
      if (occ[1][0] > 0 && $urandom % 2 == 1) begin occ[1][0]--; dt_mc <= 1; end
    end
  end

  // host side (router clock)
  always_comb begin
    hin_v = src_q[2].size() > 0;
    hin_f = hin_v ? src_q[2][0] : '0;
  end
  initial hout_r = 1;
  always @(posedge rclk) if (rrst_n) begin
    if (hin_v && hin_r) void'(src_q[2].pop_front());
    if (hout_v && hout_r) sink(2, hout_f);
    hout_r <= ($urandom % 4 != 0);
  end

  int nbc = 0;
  always @(posedge clk) nbc += int'(nb_up) + int'(nb_dn);

  initial begin
    ut_sc = 0; ut_mc = 0; dt_sc = 0; dt_mc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; rrst_n = 1;
    repeat (3) @(posedge clk);
    // idle forwarding latency: above -> below
    @(negedge clk);
    gen(0, 0, 1);
    begin
      int t;
      t = 0;
      @(posedge clk);             // model drives the flit at this edge
      while (!dt_v && t < 20) begin @(posedge clk); #1; t++; end
      checks++;
      if (t != 2) fail($sformatf("forwarding latency %0d cycles, expected 2", t));
    end
    repeat (10) @(posedge clk);
    // random traffic on all three inputs
    for (int n = 0; n < 1500; n++) begin
      int s, d;
      s = $urandom % 3;
      case (s)
        0: d = ($urandom % 2) ? 1 : 0;                 // from above
        1: d = 1 + $urandom % 3;                       // from below
        default: begin d = $urandom % 3; if (d >= 1) d++; end  // from host: 0,2,3
      endcase
      wait (src_q[s].size() < 12);
      gen(s, d, 1 + $urandom % 4);
      if (n % 3 == 2) @(posedge clk);
    end
    wait (recv == sent);
    repeat (30) @(posedge clk);
    checks++;
    if (exp_pkt.size() != 0) fail("packets lost");
    $display("packets=%0d non-blocking overtakes=%0d", recv, nbc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
