// pipeline_bus -- one vertical channel of the 3D NoC built as a
// bidirectional pipeline: LAYERS transfer stages, one per layer, chained by
// segments. Each segment has an upward and a downward link, each a flit bus
// plus a valid bit, and two credit wires per link going back (one for the
// receiver's SH buffer, one for its MH buffer). All segments and both
// directions work in parallel, so several layers can send at the same time
// with no central arbiter; arbitration is local to each stage.
// The structure (one stage per layer, segments of two opposite
// point-to-point links, credit flow control) follows the source design.
// The bottom stage's downward port and the top stage's upward port are left
// unconnected (valid and credits tied low).
//
// Interface: per layer L a router-side valid/ready port pair in that layer's
// clock rclk[L]; the segments run on clk. Flits are noc_pkg flits; the bus
// reads only EOM, BOM and the destination layer field.
// Timing: a single-flit packet crossing k segments takes about 2k+1 clk
// cycles between the stages plus the two host FIFO synchronisers.
module pipeline_bus
  import noc_pkg::*;
#(
  parameter int LAYERS     = 4,
  parameter int BUF_DEPTH  = 6,
  parameter int HOST_DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rclk           [LAYERS],
  input  logic  rrst_n         [LAYERS],
  input  logic  host_in_valid  [LAYERS],
  output logic  host_in_ready  [LAYERS],
  input  flit_t host_in_flit   [LAYERS],
  output logic  host_out_valid [LAYERS],
  input  logic  host_out_ready [LAYERS],
  output flit_t host_out_flit  [LAYERS],
  output logic  nb_up          [LAYERS],
  output logic  nb_dn          [LAYERS]
);
  // segment k joins stage k (below) and stage k+1 (above); index LAYERS-1
  // and the "below stage 0" side are the open ends.
  logic  u_v  [LAYERS];  flit_t u_f [LAYERS];   // upward link leaving stage k
  logic  d_v  [LAYERS];  flit_t d_f [LAYERS];   // downward link leaving stage k
  logic  u_sc [LAYERS], u_mc [LAYERS];          // credits for u_* (from stage k+1)
  logic  d_sc [LAYERS], d_mc [LAYERS];          // credits for d_* (from stage k-1)

  for (genvar k = 0; k < LAYERS; k++) begin : g_stage
    logic  up_rx_v, dn_rx_v, up_tx_sc, up_tx_mc, dn_tx_sc, dn_tx_mc;
    flit_t up_rx_f, dn_rx_f;
    logic  up_rx_sc, up_rx_mc, dn_rx_sc, dn_rx_mc;

    if (k < LAYERS - 1) begin : g_above
      assign up_rx_v  = d_v[k+1];
      assign up_rx_f  = d_f[k+1];
      assign up_tx_sc = u_sc[k];
      assign up_tx_mc = u_mc[k];
    end else begin : g_top
      assign up_rx_v  = 1'b0;
      assign up_rx_f  = '0;
      assign up_tx_sc = 1'b0;
      assign up_tx_mc = 1'b0;
    end
    if (k > 0) begin : g_below
      assign dn_rx_v  = u_v[k-1];
      assign dn_rx_f  = u_f[k-1];
      assign dn_tx_sc = d_sc[k];
      assign dn_tx_mc = d_mc[k];
    end else begin : g_bottom
      assign dn_rx_v  = 1'b0;
      assign dn_rx_f  = '0;
      assign dn_tx_sc = 1'b0;
      assign dn_tx_mc = 1'b0;
    end

    // credits this stage returns travel to the neighbour that sent the flit
    if (k < LAYERS - 1) begin : g_cred_up
      assign d_sc[k+1] = up_rx_sc;
      assign d_mc[k+1] = up_rx_mc;
    end
    if (k > 0) begin : g_cred_dn
      assign u_sc[k-1] = dn_rx_sc;
      assign u_mc[k-1] = dn_rx_mc;
    end

    transfer_stage #(.LAYERS(LAYERS), .LAYER(k), .BUF_DEPTH(BUF_DEPTH),
                     .HOST_DEPTH(HOST_DEPTH)) u_ts (
      .clk, .rst_n, .rclk(rclk[k]), .rrst_n(rrst_n[k]),
      .host_in_valid(host_in_valid[k]), .host_in_ready(host_in_ready[k]),
      .host_in_flit(host_in_flit[k]),
      .host_out_valid(host_out_valid[k]), .host_out_ready(host_out_ready[k]),
      .host_out_flit(host_out_flit[k]),
      .up_tx_valid(u_v[k]), .up_tx_flit(u_f[k]),
      .up_tx_sh_cred(up_tx_sc), .up_tx_mh_cred(up_tx_mc),
      .up_rx_valid(up_rx_v), .up_rx_flit(up_rx_f),
      .up_rx_sh_cred(up_rx_sc), .up_rx_mh_cred(up_rx_mc),
      .dn_tx_valid(d_v[k]), .dn_tx_flit(d_f[k]),
      .dn_tx_sh_cred(dn_tx_sc), .dn_tx_mh_cred(dn_tx_mc),
      .dn_rx_valid(dn_rx_v), .dn_rx_flit(dn_rx_f),
      .dn_rx_sh_cred(dn_rx_sc), .dn_rx_mh_cred(dn_rx_mc),
      .nb_up(nb_up[k]), .nb_dn(nb_dn[k]));
  end

  // open ends: nothing may leave the bus at the top or bottom
  assign u_sc[LAYERS-1] = 1'b0;
  assign u_mc[LAYERS-1] = 1'b0;
  assign d_sc[0]        = 1'b0;
  assign d_mc[0]        = 1'b0;

`ifndef SYNTHESIS
  a_top_closed: assert property (@(posedge clk) disable iff (!rst_n) !u_v[LAYERS-1]);
  a_bot_closed: assert property (@(posedge clk) disable iff (!rst_n) !d_v[0]);
`endif
endmodule
