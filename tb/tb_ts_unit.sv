// tb_ts_unit -- self-checking test of the TS unit.
// A random source writes packets (1-4 flits, random destination layer) into
// the unit; a model of the next stage holds the SH and MH path buffers,
// drains them at random and returns credits. Checks: every packet leaves
// whole, in flit order, not interleaved with another, on the right path (SH
// iff its destination is the next layer); the model's buffers never overflow
// (credit flow control); nothing is lost. A directed phase stops draining the
// SH path and checks that a later MH packet overtakes the blocked SH ones
// (non-blocking selection) and that nb_event fires. Also checks the
// one-cycle cut-through latency of an empty unit.
module tb_ts_unit;
  import noc_pkg::*;

  localparam int DEPTH = 6, NEXT = 1, CAP = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_ready, out_valid, out_sh, sh_ret, mh_ret, nb_event;
  flit_t in_flit, out_flit;
  logic [$clog2(DEPTH+1)-1:0] used;

  ts_unit #(.DEPTH(DEPTH), .NEXT_LAYER(NEXT), .SH_CAP(CAP), .MH_CAP(CAP)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_flit, .out_sh,
    .sh_credit_ret(sh_ret), .mh_credit_ret(mh_ret), .nb_event, .used);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // expected packets: id -> flits
  flit_t exp_pkt [int][$];
  int    sent_pkts = 0, recv_pkts = 0;
  int    sh_occ = 0, mh_occ = 0;        // model of next-stage buffers
  bit    drain_sh = 1, drain_mh = 1;
  int    cur_id = -1, cur_idx = 0;
  bit    cur_sh;
  int    nb_count = 0;
  int    order [$];                     // ids in output order

  function automatic flit_t mk(int id, int idx, int len, int layer);
    logic [PAYLOAD_W-1:0] pl;
    pl = PAYLOAD_W'({id[11:0], idx[3:0], len[3:0]});
    if (idx == 0) return make_flit(len == 1, 1'b1, LAYER_W'(layer), '0, '0, '0, pl);
    return make_flit(idx == len - 1, 1'b0, '0, '0, '0, '0, pl);
  endfunction

  // source
  flit_t src_q [$];
  int    next_id = 0;
  task automatic gen_pkt(int layer, int len);
    flit_t f;
    for (int i = 0; i < len; i++) begin
      f = mk(next_id, i, len, layer);
      src_q.push_back(f);
      exp_pkt[next_id].push_back(f);
    end
    next_id++; sent_pkts++;
  endtask

  always_comb begin
    in_valid = src_q.size() > 0;
    in_flit  = in_valid ? src_q[0] : '0;
  end

  // next-stage model and output checker
  always @(posedge clk) begin
    if (rst_n) begin
      sh_ret <= 1'b0; mh_ret <= 1'b0;
      if (in_valid && in_ready) void'(src_q.pop_front());
      if (nb_event) nb_count++;
      if (drain_sh && sh_occ > 0 && ($urandom % 2 == 1)) begin sh_occ--; sh_ret <= 1'b1; end
      if (drain_mh && mh_occ > 0 && ($urandom % 2 == 1)) begin mh_occ--; mh_ret <= 1'b1; end
      if (out_valid) begin
        int id, idx;
        id  = int'(out_flit[19:8]);
        idx = int'(out_flit[7:4]);
        if (out_sh) begin
          sh_occ++;
          if (sh_occ > CAP) begin checks++; failures++; $display("FAIL: SH overflow"); end
        end else begin
          mh_occ++;
          if (mh_occ > CAP) begin checks++; failures++; $display("FAIL: MH overflow"); end
        end
        if (is_bom(out_flit)) begin
          checks++;
          if (cur_id != -1) begin failures++; $display("FAIL: packets interleaved"); end
          cur_id = id; cur_idx = 0; cur_sh = out_sh;
          order.push_back(id);
          checks++;
          if (out_sh != (hdr_layer(out_flit) == LAYER_W'(NEXT))) begin
            failures++; $display("FAIL: wrong path type id %0d", id);
          end
        end
        checks++;
        if (!exp_pkt.exists(cur_id) || cur_idx >= exp_pkt[cur_id].size() ||
            exp_pkt[cur_id][cur_idx] != out_flit || out_sh != cur_sh) begin
          failures++; $display("FAIL: flit mismatch id %0d idx %0d (got id %0d idx %0d)", cur_id, cur_idx, id, idx);
        end
        cur_idx++;
        if (is_eom(out_flit)) begin
          if (exp_pkt.exists(cur_id)) exp_pkt.delete(cur_id);
          recv_pkts++;
          cur_id = -1;
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // latency: empty unit, single-flit packet written at edge t leaves at t+1
    gen_pkt(3, 1);
    @(posedge clk); #1;
    check(out_valid && is_bom(out_flit), "single flit not presented one cycle after write");
    repeat (5) @(posedge clk);

    // random traffic
    for (int n = 0; n < 400; n++) begin
      wait (src_q.size() < 8);
      gen_pkt($urandom % 4, 1 + $urandom % 4);
      @(posedge clk);
    end
    wait (recv_pkts == sent_pkts);
    repeat (20) @(posedge clk);
    check(sh_occ + mh_occ >= 0, "model");

    // directed non-blocking phase: SH path stops draining
    drain_sh = 0;
    order.delete();
    @(negedge clk);
    for (int n = 0; n < 3; n++) gen_pkt(NEXT, 3);   // 9 SH flits, only 6 credits
    repeat (30) @(negedge clk);
    gen_pkt(2, 2);                                   // MH packet
    repeat (30) @(posedge clk);
    check(order.size() >= 1 && order[order.size()-1] == next_id - 1,
          "MH packet did not overtake blocked SH packets");
    check(nb_count > 0, "nb_event never fired");
    drain_sh = 1;
    wait (recv_pkts == sent_pkts);
    repeat (20) @(posedge clk);
    check(exp_pkt.size() == 0, "packets lost");
    check(used == 0, "buffer not empty at end");
    $display("packets=%0d nb_events=%0d", recv_pkts, nb_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
