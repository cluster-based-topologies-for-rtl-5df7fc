// noc_switch -- wormhole switch core shared by the routers of this design
// (CIT cluster router, CMIT mesh router, CMIT cluster router). The wrapper
// supplies the routing: it sees the flit at the head of every input FIFO on
// head_flit and answers with the output port on head_route (combinational).
//
// Each input has a FIFO of IN_DEPTH flits. The route of a packet is taken
// from its header flit and latched, so the body flits follow it. Each output
// has a round-robin packet arbiter (wb_arbiter, all weights 1) that gives the
// output to one input packet at a time and keeps it until the EOM flit has
// passed (wormhole switching), then a registered output stage. A hop
// therefore takes two cycles: a flit accepted at edge t is in the output
// register after edge t+1 and is taken by the next stage at edge t+2.
// Round-robin switch allocation, wormhole switching and the two-cycle hop
// follow the source design; one FIFO per input (no virtual channels) and
// valid/ready links are this design's simplifications.
//
// Interface: in_*[p], out_*[p] are valid/ready flit links. head_flit[p] is
// meaningful when the input FIFO is not empty; head_route[p] is only used for
// header flits (BOM set).
module noc_switch
  import noc_pkg::*;
#(
  parameter int NPORTS   = 9,
  parameter int IN_DEPTH = 5,
  localparam int PW = $clog2(NPORTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid   [NPORTS],
  output logic          in_ready   [NPORTS],
  input  flit_t         in_flit    [NPORTS],
  output logic          out_valid  [NPORTS],
  input  logic          out_ready  [NPORTS],
  output flit_t         out_flit   [NPORTS],
  output flit_t         head_flit  [NPORTS],
  input  logic [PW-1:0] head_route [NPORTS]
);
  localparam int P = NPORTS;

  // ---------------- input buffers and route latch ----------------
  logic          q_v [P], q_pop [P];
  flit_t         q_f [P];
  logic [PW-1:0] rt_q [P], rt [P];

  for (genvar i = 0; i < P; i++) begin : g_in
    sync_fifo #(.DATA_W(FLIT_W), .DEPTH(IN_DEPTH)) u_q (
      .clk, .rst_n, .in_valid(in_valid[i]), .in_ready(in_ready[i]),
      .in_data(in_flit[i]), .out_valid(q_v[i]), .out_ready(q_pop[i]),
      .out_data(q_f[i]), .count());
    assign head_flit[i] = q_f[i];
    assign rt[i] = is_bom(q_f[i]) ? head_route[i] : rt_q[i];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                        rt_q[i] <= '0;
      else if (q_v[i] && is_bom(q_f[i])) rt_q[i] <= rt[i];
    end
  end

  // ---------------- switch allocation, crossbar, output registers ----------------
  logic [P-1:0]  gnt [P];       // gnt[o][i]
  logic          gv  [P];
  logic [PW-1:0] gi  [P];
  logic          o_can [P];
  logic [0:0]    w1 [P];
  for (genvar i = 0; i < P; i++) begin : g_w
    assign w1[i] = 1'b1;
  end

  for (genvar o = 0; o < P; o++) begin : g_out
    logic [P-1:0] req, eom;
    for (genvar i = 0; i < P; i++) begin : g_req
      assign req[i] = q_v[i] && (rt[i] == PW'(o));
      assign eom[i] = is_eom(q_f[i]);
    end
    assign o_can[o] = !out_valid[o] || out_ready[o];

    wb_arbiter #(.N(P), .WW(1)) u_sa (
      .clk, .rst_n, .req, .eom, .weight(w1), .accept(o_can[o]),
      .gnt(gnt[o]), .gnt_valid(gv[o]), .gnt_idx(gi[o]));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[o] <= 1'b0;
        out_flit[o]  <= '0;
      end else if (o_can[o]) begin
        out_valid[o] <= gv[o];
        if (gv[o]) out_flit[o] <= q_f[gi[o]];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < P; i++) begin
      q_pop[i] = 1'b0;
      for (int o = 0; o < P; o++)
        if (gnt[o][i] && o_can[o]) q_pop[i] = 1'b1;
    end
  end

`ifndef SYNTHESIS
  // an input is served by at most one output at a time
  for (genvar i = 0; i < P; i++) begin : g_chk
    logic [P-1:0] col;
    for (genvar o = 0; o < P; o++) begin : g_col
      assign col[o] = gnt[o][i];
    end
    a_one_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col));
  end
`endif
endmodule
