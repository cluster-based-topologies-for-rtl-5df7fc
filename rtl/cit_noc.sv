// cit_noc -- 3D network-on-chip with the Concentrated Inter-layer Topology
// (CIT) and pipeline-bus vertical channels: the top of this design.
//
// Default size is the 64-node 4x4x4 system: four layers, each holding 16
// nodes (processors or memories) grouped four to a cluster, so each layer is
// a 2x2 mesh of 9-port cluster routers. Every cluster column (the clusters
// at the same x,y on all layers) shares one vertical channel, a pipeline bus
// with one transfer stage per layer. The whole stack therefore has 16
// routers and 4 vertical channels where a plain 3D mesh with one channel per
// node column would have 64 routers and 16 channels. Topology, cluster size,
// router port set, XYZ dimension-order routing and the bus structure follow
// the source design.
//
// Node n is addressed as (layer, cluster x, cluster y, ip) with index
// n = ((z*CL_Y + cy)*CL_X + cx)*4 + ip; its header flit carries exactly these
// fields (noc_pkg). Each node port is a valid/ready flit interface in both
// directions. The routers of layer z and the router side of that layer's
// transfer stages run on rclk[z]; the bus segments run on clk. Packets
// between two nodes of one cluster cross a single router; packets between
// layers travel X, then Y inside the source layer, then ride the bus of the
// destination cluster column and leave through the destination router.
// Mesh ports at the layer edge are tied off (no packet is ever routed there).
//
// Per-stage observation: nb_event pulses when a transfer stage lets a packet
// overtake one blocked at the next stage.
module cit_noc
  import noc_pkg::*;
#(
  parameter int LAYERS     = 4,
  parameter int CL_X       = 2,   // cluster columns per layer
  parameter int CL_Y       = 2,   // cluster rows per layer
  parameter int IN_DEPTH   = 5,   // router input buffer, flits
  parameter int BUF_DEPTH  = 6,   // transfer-stage buffers, flits
  parameter int HOST_DEPTH = 8,   // transfer-stage host FIFOs, flits
  localparam int NPC    = 4,                      // nodes per cluster
  localparam int NBUS   = CL_X * CL_Y,            // vertical channels
  localparam int NR     = LAYERS * NBUS,          // cluster routers
  localparam int NODES  = NR * NPC
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rclk         [LAYERS],
  input  logic  rrst_n       [LAYERS],
  input  logic  node_tx_valid [NODES],
  output logic  node_tx_ready [NODES],
  input  flit_t node_tx_flit  [NODES],
  output logic  node_rx_valid [NODES],
  input  logic  node_rx_ready [NODES],
  output flit_t node_rx_flit  [NODES],
  output logic  nb_event      [NR]
);
  localparam int P = CIT_PORTS;

  logic  ri_v [NR][P], ri_r [NR][P], ro_v [NR][P], ro_r [NR][P];
  flit_t ri_f [NR][P], ro_f [NR][P];

  // bus host ports, indexed [bus][layer]
  logic  bi_v [NBUS][LAYERS], bi_r [NBUS][LAYERS], bo_v [NBUS][LAYERS], bo_r [NBUS][LAYERS];
  flit_t bi_f [NBUS][LAYERS], bo_f [NBUS][LAYERS];
  logic  nbu  [NBUS][LAYERS], nbd [NBUS][LAYERS];

  for (genvar z = 0; z < LAYERS; z++) begin : g_z
    for (genvar cy = 0; cy < CL_Y; cy++) begin : g_y
      for (genvar cx = 0; cx < CL_X; cx++) begin : g_x
        localparam int R = (z * CL_Y + cy) * CL_X + cx;
        localparam int B = cy * CL_X + cx;

        cit_router #(.MY_Z(z), .MY_CX(cx), .MY_CY(cy), .IN_DEPTH(IN_DEPTH)) u_rt (
          .clk(rclk[z]), .rst_n(rrst_n[z]),
          .in_valid(ri_v[R]), .in_ready(ri_r[R]), .in_flit(ri_f[R]),
          .out_valid(ro_v[R]), .out_ready(ro_r[R]), .out_flit(ro_f[R]));

        // local nodes
        for (genvar ip = 0; ip < NPC; ip++) begin : g_ip
          localparam int N = R * NPC + ip;
          assign ri_v[R][P_IP0+ip]  = node_tx_valid[N];
          assign ri_f[R][P_IP0+ip]  = node_tx_flit[N];
          assign node_tx_ready[N]   = ri_r[R][P_IP0+ip];
          assign node_rx_valid[N]   = ro_v[R][P_IP0+ip];
          assign node_rx_flit[N]    = ro_f[R][P_IP0+ip];
          assign ro_r[R][P_IP0+ip]  = node_rx_ready[N];
        end

        // vertical channel
        assign bi_v[B][z]        = ro_v[R][P_BUS];
        assign bi_f[B][z]        = ro_f[R][P_BUS];
        assign ro_r[R][P_BUS]    = bi_r[B][z];
        assign ri_v[R][P_BUS]    = bo_v[B][z];
        assign ri_f[R][P_BUS]    = bo_f[B][z];
        assign bo_r[B][z]        = ri_r[R][P_BUS];
        assign nb_event[R]       = nbu[B][z] | nbd[B][z];

        // X neighbours
        if (cx < CL_X - 1) begin : g_xp
          assign ri_v[R][P_XP] = ro_v[R+1][P_XM];
          assign ri_f[R][P_XP] = ro_f[R+1][P_XM];
          assign ro_r[R+1][P_XM] = ri_r[R][P_XP];
        end else begin : g_xp_edge
          assign ri_v[R][P_XP] = 1'b0;
          assign ri_f[R][P_XP] = '0;
          assign ro_r[R][P_XP] = 1'b1;
        end
        if (cx > 0) begin : g_xm
          assign ri_v[R][P_XM] = ro_v[R-1][P_XP];
          assign ri_f[R][P_XM] = ro_f[R-1][P_XP];
          assign ro_r[R-1][P_XP] = ri_r[R][P_XM];
        end else begin : g_xm_edge
          assign ri_v[R][P_XM] = 1'b0;
          assign ri_f[R][P_XM] = '0;
          assign ro_r[R][P_XM] = 1'b1;
        end
        // Y neighbours
        if (cy < CL_Y - 1) begin : g_yp
          assign ri_v[R][P_YP] = ro_v[R+CL_X][P_YM];
          assign ri_f[R][P_YP] = ro_f[R+CL_X][P_YM];
          assign ro_r[R+CL_X][P_YM] = ri_r[R][P_YP];
        end else begin : g_yp_edge
          assign ri_v[R][P_YP] = 1'b0;
          assign ri_f[R][P_YP] = '0;
          assign ro_r[R][P_YP] = 1'b1;
        end
        if (cy > 0) begin : g_ym
          assign ri_v[R][P_YM] = ro_v[R-CL_X][P_YP];
          assign ri_f[R][P_YM] = ro_f[R-CL_X][P_YP];
          assign ro_r[R-CL_X][P_YP] = ri_r[R][P_YM];
        end else begin : g_ym_edge
          assign ri_v[R][P_YM] = 1'b0;
          assign ri_f[R][P_YM] = '0;
          assign ro_r[R][P_YM] = 1'b1;
        end
      end
    end
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    pipeline_bus #(.LAYERS(LAYERS), .BUF_DEPTH(BUF_DEPTH), .HOST_DEPTH(HOST_DEPTH)) u_bus (
      .clk, .rst_n, .rclk, .rrst_n,
      .host_in_valid(bi_v[b]), .host_in_ready(bi_r[b]), .host_in_flit(bi_f[b]),
      .host_out_valid(bo_v[b]), .host_out_ready(bo_r[b]), .host_out_flit(bo_f[b]),
      .nb_up(nbu[b]), .nb_dn(nbd[b]));
  end

  // the header fields of noc_pkg must be wide enough for this size
  initial begin
    assert (LAYERS <= (1 << LAYER_W) && CL_X <= (1 << CX_W) && CL_Y <= (1 << CY_W) &&
            NPC <= (1 << IP_W))
      else $error("cit_noc: network size does not fit the noc_pkg header fields");
  end
endmodule
