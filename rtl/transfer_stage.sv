// transfer_stage -- one stage of the pipeline bus, attached to one layer.
// The vertical channel is cut into segments by these stages; each segment is
// a pair of opposite unidirectional point-to-point links, so every segment
// and both directions can carry data in the same cycle and no central bus
// arbiter is needed.
//
// Data paths (names follow the source design):
//  D1  flits arriving from the stage above are split by the destination
//      layer in their header: for this layer -> SH buffer (to the host),
//      otherwise -> MH buffer (to be forwarded down).
//  D2  the same for flits arriving from the stage below.
//  D3  flits from the router (through the host input FIFO) go up or down
//      depending on whether the destination layer is above or below.
//  M1  weight-based arbiter feeding the upward TS unit from the MH buffer
//      of D2 (weight = number of layers below) and from D3 (weight 1).
//  M2  the same for the downward TS unit (weight = number of layers above).
//  M3  weight-based arbiter writing the host output FIFO from the two SH
//      buffers, so the two pipelines never write it at once.
// Each direction ends in a ts_unit, which holds the packets for the next
// stage and picks one that can proceed (non-blocking scheme). Segments use
// credit flow control: for each direction and each of the two receive
// buffers (SH, MH) the receiver returns one credit pulse per freed slot; the
// sender's credit counts are the SH/MH stress values of the next stage.
// The host FIFOs are bi-synchronous, so the router side (rclk) can run from
// the layer's own clock while the bus runs from clk.
// The split into SH and MH receive buffers in front of the multiplexers, the
// single bus clock, the weight values at the bus ends and the FIFO depths
// are this design's choices where the source is silent; the 6-flit buffer
// depth follows it.
//
// Interface: host_in_*/host_out_* are valid/ready in the rclk domain.
// *_tx_* are flits sent to a neighbour (valid, no ready: credit controlled),
// *_tx_*_cred are credits coming back from it; *_rx_* are flits received
// from a neighbour and *_rx_*_cred the credits returned to it.
// Timing: a flit received from a neighbour can be sent on to the next
// neighbour two clk cycles later (receive buffer, TS unit).
module transfer_stage
  import noc_pkg::*;
#(
  parameter int LAYERS     = 4,
  parameter int LAYER      = 0,   // this stage's layer (0 = bottom)
  parameter int BUF_DEPTH  = 6,   // flits per transfer-stage buffer
  parameter int HOST_DEPTH = 8    // host FIFO depth (power of two)
) (
  input  logic  clk,
  input  logic  rst_n,
  // router side (layer clock)
  input  logic  rclk,
  input  logic  rrst_n,
  input  logic  host_in_valid,
  output logic  host_in_ready,
  input  flit_t host_in_flit,
  output logic  host_out_valid,
  input  logic  host_out_ready,
  output flit_t host_out_flit,
  // segment to the stage above
  output logic  up_tx_valid,
  output flit_t up_tx_flit,
  input  logic  up_tx_sh_cred,
  input  logic  up_tx_mh_cred,
  input  logic  up_rx_valid,
  input  flit_t up_rx_flit,
  output logic  up_rx_sh_cred,
  output logic  up_rx_mh_cred,
  // segment to the stage below
  output logic  dn_tx_valid,
  output flit_t dn_tx_flit,
  input  logic  dn_tx_sh_cred,
  input  logic  dn_tx_mh_cred,
  input  logic  dn_rx_valid,
  input  flit_t dn_rx_flit,
  output logic  dn_rx_sh_cred,
  output logic  dn_rx_mh_cred,
  // observation
  output logic  nb_up,
  output logic  nb_dn
);
  localparam int WW     = $clog2(LAYERS + 1);
  localparam int BELOW  = LAYER;                // layers below this one
  localparam int ABOVE  = LAYERS - 1 - LAYER;   // layers above this one

  // ---------------- D1 / D2: receive and split ----------------
  logic up_rx_sh_q, dn_rx_sh_q;          // path of the packet being received
  wire  up_rx_to_sh = is_bom(up_rx_flit) ? (int'(hdr_layer(up_rx_flit)) == LAYER) : up_rx_sh_q;
  wire  dn_rx_to_sh = is_bom(dn_rx_flit) ? (int'(hdr_layer(dn_rx_flit)) == LAYER) : dn_rx_sh_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_rx_sh_q <= 1'b0;
      dn_rx_sh_q <= 1'b0;
    end else begin
      if (up_rx_valid && is_bom(up_rx_flit)) up_rx_sh_q <= up_rx_to_sh;
      if (dn_rx_valid && is_bom(dn_rx_flit)) dn_rx_sh_q <= dn_rx_to_sh;
    end
  end

  // receive buffers: [0] = from above, [1] = from below
  logic  sh_v [2], sh_r [2], mh_v [2], mh_r [2];
  flit_t sh_f [2], mh_f [2];
  logic  sh_inr [2], mh_inr [2];

  sync_fifo #(.DATA_W(FLIT_W), .DEPTH(BUF_DEPTH)) u_sh_from_up (
    .clk, .rst_n, .in_valid(up_rx_valid && up_rx_to_sh), .in_ready(sh_inr[0]),
    .in_data(up_rx_flit), .out_valid(sh_v[0]), .out_ready(sh_r[0]), .out_data(sh_f[0]),
    .count());
  sync_fifo #(.DATA_W(FLIT_W), .DEPTH(BUF_DEPTH)) u_mh_from_up (
    .clk, .rst_n, .in_valid(up_rx_valid && !up_rx_to_sh), .in_ready(mh_inr[0]),
    .in_data(up_rx_flit), .out_valid(mh_v[0]), .out_ready(mh_r[0]), .out_data(mh_f[0]),
    .count());
  sync_fifo #(.DATA_W(FLIT_W), .DEPTH(BUF_DEPTH)) u_sh_from_dn (
    .clk, .rst_n, .in_valid(dn_rx_valid && dn_rx_to_sh), .in_ready(sh_inr[1]),
    .in_data(dn_rx_flit), .out_valid(sh_v[1]), .out_ready(sh_r[1]), .out_data(sh_f[1]),
    .count());
  sync_fifo #(.DATA_W(FLIT_W), .DEPTH(BUF_DEPTH)) u_mh_from_dn (
    .clk, .rst_n, .in_valid(dn_rx_valid && !dn_rx_to_sh), .in_ready(mh_inr[1]),
    .in_data(dn_rx_flit), .out_valid(mh_v[1]), .out_ready(mh_r[1]), .out_data(mh_f[1]),
    .count());

  // a freed slot returns a credit to the neighbour that filled it
  assign up_rx_sh_cred = sh_v[0] && sh_r[0];
  assign up_rx_mh_cred = mh_v[0] && mh_r[0];
  assign dn_rx_sh_cred = sh_v[1] && sh_r[1];
  assign dn_rx_mh_cred = mh_v[1] && mh_r[1];

  // ---------------- host input FIFO and D3 ----------------
  logic  hin_full, hin_empty, hin_pop;
  flit_t hin_f;
  bisync_fifo #(.DATA_W(FLIT_W), .DEPTH(HOST_DEPTH)) u_host_in (
    .write_clk(rclk), .write_rst_n(rrst_n), .write_req(host_in_valid),
    .write_data(host_in_flit), .full(hin_full),
    .read_clk(clk), .read_rst_n(rst_n), .read_req(hin_pop),
    .read_data(hin_f), .empty(hin_empty));
  assign host_in_ready = !hin_full;

  logic hin_up_q;
  wire  hin_up = is_bom(hin_f) ? (int'(hdr_layer(hin_f)) > LAYER) : hin_up_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       hin_up_q <= 1'b0;
    else if (hin_pop && is_bom(hin_f)) hin_up_q <= hin_up;
  end

  // ---------------- M1 / M2 and the TS units ----------------
  logic [WW-1:0] w_m1 [2], w_m2 [2], w_m3 [2];
  assign w_m1[0] = WW'(BELOW); assign w_m1[1] = WW'(1);
  assign w_m2[0] = WW'(ABOVE); assign w_m2[1] = WW'(1);
  assign w_m3[0] = WW'(ABOVE); assign w_m3[1] = WW'(BELOW);

  logic [1:0] m1_gnt, m2_gnt, m3_gnt;
  logic       m1_gv, m2_gv, m3_gv;
  logic       m1_gi, m2_gi, m3_gi;
  logic       tsu_inr, tsd_inr;
  flit_t      tsu_in, tsd_in;

  wire [1:0] m1_req = {!hin_empty &&  hin_up, mh_v[1]};
  wire [1:0] m2_req = {!hin_empty && !hin_up, mh_v[0]};
  wire [1:0] m1_eom = {is_eom(hin_f), is_eom(mh_f[1])};
  wire [1:0] m2_eom = {is_eom(hin_f), is_eom(mh_f[0])};

  wb_arbiter #(.N(2), .WW(WW)) u_m1 (
    .clk, .rst_n, .req(m1_req), .eom(m1_eom), .weight(w_m1), .accept(tsu_inr),
    .gnt(m1_gnt), .gnt_valid(m1_gv), .gnt_idx(m1_gi));
  wb_arbiter #(.N(2), .WW(WW)) u_m2 (
    .clk, .rst_n, .req(m2_req), .eom(m2_eom), .weight(w_m2), .accept(tsd_inr),
    .gnt(m2_gnt), .gnt_valid(m2_gv), .gnt_idx(m2_gi));

  assign tsu_in = m1_gi ? hin_f : mh_f[1];
  assign tsd_in = m2_gi ? hin_f : mh_f[0];
  assign mh_r[1] = m1_gnt[0] && tsu_inr;
  assign mh_r[0] = m2_gnt[0] && tsd_inr;
  assign hin_pop = (m1_gnt[1] && tsu_inr) || (m2_gnt[1] && tsd_inr);


  ts_unit #(.DEPTH(BUF_DEPTH), .NEXT_LAYER(LAYER + 1), .SH_CAP(BUF_DEPTH),
            .MH_CAP(BUF_DEPTH)) u_ts_up (
    .clk, .rst_n, .in_valid(m1_gv), .in_ready(tsu_inr), .in_flit(tsu_in),
    .out_valid(up_tx_valid), .out_flit(up_tx_flit), .out_sh(),
    .sh_credit_ret(up_tx_sh_cred), .mh_credit_ret(up_tx_mh_cred),
    .nb_event(nb_up), .used());
  ts_unit #(.DEPTH(BUF_DEPTH), .NEXT_LAYER(LAYER - 1), .SH_CAP(BUF_DEPTH),
            .MH_CAP(BUF_DEPTH)) u_ts_dn (
    .clk, .rst_n, .in_valid(m2_gv), .in_ready(tsd_inr), .in_flit(tsd_in),
    .out_valid(dn_tx_valid), .out_flit(dn_tx_flit), .out_sh(),
    .sh_credit_ret(dn_tx_sh_cred), .mh_credit_ret(dn_tx_mh_cred),
    .nb_event(nb_dn), .used());

  // ---------------- M3 and host output FIFO ----------------
  logic hout_full, hout_empty;
  flit_t m3_f;
  wb_arbiter #(.N(2), .WW(WW)) u_m3 (
    .clk, .rst_n, .req({sh_v[1], sh_v[0]}), .eom({is_eom(sh_f[1]), is_eom(sh_f[0])}),
    .weight(w_m3), .accept(!hout_full), .gnt(m3_gnt), .gnt_valid(m3_gv), .gnt_idx(m3_gi));
  assign m3_f    = m3_gi ? sh_f[1] : sh_f[0];
  assign sh_r[0] = m3_gnt[0] && !hout_full;
  assign sh_r[1] = m3_gnt[1] && !hout_full;

  bisync_fifo #(.DATA_W(FLIT_W), .DEPTH(HOST_DEPTH)) u_host_out (
    .write_clk(clk), .write_rst_n(rst_n), .write_req(m3_gv), .write_data(m3_f),
    .full(hout_full),
    .read_clk(rclk), .read_rst_n(rrst_n), .read_req(host_out_ready),
    .read_data(host_out_flit), .empty(hout_empty));
  assign host_out_valid = !hout_empty;

`ifndef SYNTHESIS
  // credit flow control: a neighbour never sends into a full buffer
  a_no_ovf_up: assert property (@(posedge clk) disable iff (!rst_n)
      up_rx_valid |-> (up_rx_to_sh ? sh_inr[0] : mh_inr[0]));
  a_no_ovf_dn: assert property (@(posedge clk) disable iff (!rst_n)
      dn_rx_valid |-> (dn_rx_to_sh ? sh_inr[1] : mh_inr[1]));
  // the router only hands the bus packets for other layers
  a_not_local: assert property (@(posedge clk) disable iff (!rst_n)
      (!hin_empty && is_bom(hin_f)) |-> int'(hdr_layer(hin_f)) != LAYER);
`endif
endmodule
