// tb_cmit_cluster_router -- self-checking test of the 5-port CMIT cluster
// router at layer 1. Router ports 0-3 send packets for other layers, the bus
// port sends packets for this layer, all of random length (1-5 flits);
// outputs apply random back-pressure. The reference: a packet for another
// layer goes to the bus (port 4), a packet for this layer to the mesh router
// at local index (y mod 2)*2 + (x mod 2). Checks: each packet leaves on that output, whole,
// in order and not interleaved with another packet (wormhole); nothing is
// lost; an idle router forwards a flit in two cycles; when three router
// ports compete for the bus, each gets a third of the packets (round robin).
module tb_cmit_cluster_router;
  import noc_pkg::*;

  localparam int P = CMIT_CL_PORTS;
  localparam int MZ = 1, MX = 1, MY = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_v [P], in_r [P], out_v [P], out_r [P];
  flit_t in_f [P], out_f [P];

  cmit_cluster_router #(.MY_Z(MZ)) dut (
    .clk, .rst_n, .in_valid(in_v), .in_ready(in_r), .in_flit(in_f),
    .out_valid(out_v), .out_ready(out_r), .out_flit(out_f));

  int checks = 0, failures = 0;
  function automatic void fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endfunction

  flit_t exp_pkt [int][$];
  int    exp_out [int];
  int    src_of  [int];
  int    next_id = 0, sent = 0, recv = 0;
  flit_t src_q [P][$];
  int    cur_id [P], cur_idx [P];
  bit    bp = 1;
  int    won [P];
  bit    count_won = 0;

  function automatic int ref_route(int z, int x, int y, int ip);
    if (z != MZ) return 4;
    return (y % 2) * 2 + (x % 2);
  endfunction

  task automatic gen(int src, int z, int cx, int cy, int ip, int len);
    flit_t f;
    logic [PAYLOAD_W-1:0] pl;
    for (int i = 0; i < len; i++) begin
      pl = PAYLOAD_W'({src[3:0], next_id[13:0], i[3:0]});
      f = (i == 0) ? make_flit_cmit(len == 1, 1'b1, LAYER_W'(z), MX_W'(cx), MY_W'(cy), pl)
                   : make_flit(i == len - 1, 1'b0, '0, '0, '0, '0, pl);
      src_q[src].push_back(f);
      exp_pkt[next_id].push_back(f);
    end
    exp_out[next_id] = ref_route(z, cx, cy, ip);
    src_of[next_id]  = src;
    next_id++; sent++;
  endtask

  for (genvar p = 0; p < P; p++) begin : g_p
    always_comb begin
      in_v[p] = src_q[p].size() > 0;
      in_f[p] = in_v[p] ? src_q[p][0] : '0;
    end
    initial begin cur_id[p] = -1; out_r[p] = 1; won[p] = 0; end
    always @(posedge clk) if (rst_n) begin
      if (in_v[p] && in_r[p]) void'(src_q[p].pop_front());
      if (out_v[p] && out_r[p]) begin
        flit_t f;
        int id;
        f = out_f[p];
        checks++;
        if (is_bom(f)) begin
          if (cur_id[p] != -1) fail($sformatf("out %0d: interleaved", p));
          cur_id[p] = int'(f[17:4]);
          cur_idx[p] = 0;
          if (!exp_out.exists(cur_id[p]) || exp_out[cur_id[p]] != p)
            fail($sformatf("out %0d: packet %0d misrouted", p, cur_id[p]));
        end
        id = cur_id[p];
        if (id < 0 || !exp_pkt.exists(id) || cur_idx[p] >= exp_pkt[id].size() ||
            exp_pkt[id][cur_idx[p]] != f)
          fail($sformatf("out %0d: flit mismatch pkt %0d", p, id));
        cur_idx[p]++;
        if (is_eom(f)) begin
          if (count_won && id >= 0 && src_of.exists(id)) won[src_of[id]]++;
          if (id >= 0 && exp_pkt.exists(id)) begin
            exp_pkt.delete(id); exp_out.delete(id); src_of.delete(id);
          end
          cur_id[p] = -1;
          recv++;
        end
      end
      out_r[p] <= bp ? ($urandom % 3 != 0) : 1'b1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // idle latency: input accepted at edge t, seen at output after edge t+1,
    // taken by the next stage at edge t+2
    bp = 0;
    @(negedge clk);
    gen(4, MZ, 3, 2, 0, 1);
    @(posedge clk); #1;                 // accepted into the input FIFO
    @(posedge clk); #1;
    checks++;
    if (!(out_v[1] && is_bom(out_f[1]))) fail("idle router latency is not 2 cycles");
    repeat (5) @(posedge clk);
    bp = 1;
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      int s;
      s = $urandom % P;
      wait (src_q[s].size() < 12);
      if (s == 4) gen(s, MZ, $urandom % 4, $urandom % 4, 0, 1 + $urandom % 5);
      else gen(s, (MZ + 1 + $urandom % 3) % 4, $urandom % 4, $urandom % 4, 0, 1 + $urandom % 5);
      if (n % 5 == 4) @(posedge clk);
    end
    wait (recv == sent);
    repeat (20) @(posedge clk);
    checks++;
    if (exp_pkt.size() != 0) fail("packets lost");
    // fairness: three inputs flood the bus output with 2-flit packets
    bp = 0;
    count_won = 1;
    for (int c = 0; c < 600; c++) begin
      if (src_q[0].size() < 4) gen(0, 3, 0, 0, 0, 2);
      if (src_q[1].size() < 4) gen(1, 0, 1, 0, 0, 2);
      if (src_q[3].size() < 4) gen(3, 2, 1, 1, 0, 2);
      @(posedge clk);
    end
    wait (recv == sent);
    count_won = 0;
    $display("bus shares: %0d %0d %0d", won[0], won[1], won[3]);
    checks++;
    if (won[0] < 90 || won[1] < 90 || won[3] < 90 ||
        won[0] - won[1] > 2 || won[1] - won[0] > 2 || won[3] - won[0] > 2 || won[0] - won[3] > 2)
      fail("round-robin shares unequal");
    $display("packets=%0d", recv);
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
