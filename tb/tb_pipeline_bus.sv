// tb_pipeline_bus -- self-checking test of a 4-layer pipeline bus.
// Every layer's router side runs on its own clock (periods 10, 7, 13, 9 ns;
// bus 10 ns), exercising the bi-synchronous host FIFOs.
// Phase 1: random traffic, each layer sends packets of 1-4 flits to random
// other layers while the receivers apply random back-pressure. Checks that
// every packet reaches its destination layer whole, in flit order and not
// interleaved with another packet, and that none is lost.
// Phase 2: layers 0, 1 and 2 flood layer 3 with 2-flit packets. With
// weight-based arbitration each source should get a third of the packets
// arriving at layer 3 (plain round-robin would give 1/4, 1/4, 1/2), and the
// last segment should stay busy (>= 0.9 flit per bus cycle).
// Phase 3: a packet from layer 0 to layer 3 is sent on an idle bus; its
// latency must stay within a fixed bound.
module tb_pipeline_bus;
  import noc_pkg::*;

  localparam int L = 4;
  localparam int PER [L] = '{10, 7, 13, 9};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rclk [L], rrst_n [L];
  for (genvar l = 0; l < L; l++) begin : g_clk
    initial begin
      rclk[l] = 0;
      forever #(PER[l] / 2.0) rclk[l] = ~rclk[l];
    end
  end

  logic  hin_v [L], hin_r [L], hout_v [L], hout_r [L], nb_up [L], nb_dn [L];
  flit_t hin_f [L], hout_f [L];

  pipeline_bus #(.LAYERS(L)) dut (
    .clk, .rst_n, .rclk, .rrst_n,
    .host_in_valid(hin_v), .host_in_ready(hin_r), .host_in_flit(hin_f),
    .host_out_valid(hout_v), .host_out_ready(hout_r), .host_out_flit(hout_f),
    .nb_up, .nb_dn);

  int checks = 0, failures = 0;
  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  flit_t exp_pkt [int][$];
  int    exp_dst [int];
  int    next_id = 0, sent = 0, recv = 0;
  flit_t src_q [L][$];
  int    cur_id [L];
  int    cur_idx [L];
  bit    bp_on = 1;                     // random back-pressure at sinks
  int    from_cnt [L];                  // packets received at layer 3 per source
  bit    count_on = 0;
  int    flits_l3 = 0;
  int    nb_total = 0;
  longint t_recv_last [L];

  function automatic flit_t mk(int src, int id, int idx, int len, int dst);
    logic [PAYLOAD_W-1:0] pl;
    pl = {src[1:0], id[13:0], idx[3:0], len[3:0]};
    if (idx == 0) return make_flit(len == 1, 1'b1, LAYER_W'(dst), '0, '0, '0, pl);
    return make_flit(idx == len - 1, 1'b0, '0, '0, '0, '0, pl);
  endfunction

  task automatic gen_pkt(int src, int dst, int len);
    flit_t f;
    for (int i = 0; i < len; i++) begin
      f = mk(src, next_id, i, len, dst);
      src_q[src].push_back(f);
      exp_pkt[next_id].push_back(f);
    end
    exp_dst[next_id] = dst;
    next_id = (next_id + 1) % 16384;
    sent++;
  endtask

  for (genvar l = 0; l < L; l++) begin : g_port
    always_comb begin
      hin_v[l] = src_q[l].size() > 0;
      hin_f[l] = hin_v[l] ? src_q[l][0] : '0;
    end
    initial begin
      hout_r[l] = 1'b1;
      cur_id[l] = -1;
    end
    always @(posedge rclk[l]) begin
      if (rrst_n[l]) begin
        if (hin_v[l] && hin_r[l]) void'(src_q[l].pop_front());
        if (hout_v[l] && hout_r[l]) begin
          flit_t f;
          int id;
          f = hout_f[l];
          checks++;
          if (is_bom(f)) begin
            if (cur_id[l] != -1) fail($sformatf("layer %0d: packets interleaved", l));
            cur_id[l]  = int'(f[21:8]);
            cur_idx[l] = 0;
            if (!exp_dst.exists(cur_id[l]) || exp_dst[cur_id[l]] != l)
              fail($sformatf("layer %0d: packet %0d misrouted", l, cur_id[l]));
          end
          id = cur_id[l];
          if (id < 0 || !exp_pkt.exists(id) || cur_idx[l] >= exp_pkt[id].size() ||
              exp_pkt[id][cur_idx[l]] != f)
            fail($sformatf("layer %0d: flit mismatch pkt %0d idx %0d", l, id, cur_idx[l]));
          cur_idx[l]++;
          if (l == 3 && count_on) flits_l3++;
          if (is_eom(f)) begin
            if (l == 3 && count_on) from_cnt[int'(f[23:22])]++;
            if (id >= 0 && exp_pkt.exists(id)) begin exp_pkt.delete(id); exp_dst.delete(id); end
            cur_id[l] = -1;
            recv++;
            t_recv_last[l] = $time;
          end
        end
        hout_r[l] <= bp_on ? ($urandom % 4 != 0) : 1'b1;
      end
    end
  end

  always @(posedge clk) for (int l = 0; l < L; l++) nb_total += int'(nb_up[l]) + int'(nb_dn[l]);

  initial begin
    for (int l = 0; l < L; l++) rrst_n[l] = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < L; l++) rrst_n[l] = 1;
    repeat (4) @(posedge clk);

    // ---- phase 1: random traffic ----
    for (int n = 0; n < 1200; n++) begin
      int s, d;
      s = $urandom % L;
      d = $urandom % (L - 1);
      if (d >= s) d++;
      wait (src_q[s].size() < 16);
      gen_pkt(s, d, 1 + $urandom % 4);
      if (n % 4 == 3) @(posedge clk);
    end
    wait (recv == sent);
    repeat (50) @(posedge clk);
    checks++;
    if (exp_pkt.size() != 0) fail("phase 1: packets lost");
    $display("phase 1: %0d packets delivered, non-blocking overtakes %0d", recv, nb_total);

    // ---- phase 2: fairness towards layer 3 ----
    bp_on = 0;
    repeat (10) @(posedge clk);
    fork
      begin
        for (int c = 0; c < 3000; c++) begin
          for (int s = 0; s < 3; s++) if (src_q[s].size() < 8) gen_pkt(s, 3, 2);
          @(posedge clk);
          if (c == 1000) count_on = 1;
        end
        count_on = 0;
      end
    join
    begin
      int tot;
      real share;
      tot = from_cnt[0] + from_cnt[1] + from_cnt[2];
      $display("phase 2: packets at layer 3 from layers 0/1/2 = %0d/%0d/%0d, %0d flits in 2000 bus cycles",
               from_cnt[0], from_cnt[1], from_cnt[2], flits_l3);
      for (int s = 0; s < 3; s++) begin
        share = real'(from_cnt[s]) / real'(tot);
        checks++;
        if (share < 0.29 || share > 0.38)
          fail($sformatf("phase 2: unfair share %f for layer %0d", share, s));
      end
      checks++;
      if (flits_l3 < 1800) fail("phase 2: last segment not saturated");
    end
    wait (recv == sent);
    repeat (50) @(posedge clk);

    // ---- phase 3: idle latency layer 0 -> 3 ----
    begin
      longint t0;
      @(posedge rclk[0]); #1;
      t0 = $time;
      gen_pkt(0, 3, 1);
      wait (recv == sent);
      checks++;
      $display("phase 3: latency layer 0 -> 3 = %0d ns", t_recv_last[3] - t0);
      if (t_recv_last[3] - t0 > 150) fail("phase 3: idle latency too long");
    end
    checks++;
    if (nb_total == 0) fail("non-blocking selection never used");
    checks++;
    if (exp_pkt.size() != 0) fail("packets lost at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
