// cmit_noc -- 3D network-on-chip with the Clustered Mesh Inter-layer
// Topology (CMIT) and pipeline-bus vertical channels.
//
// Each layer keeps a full MESH_X x MESH_Y mesh, one 6-port router per node,
// but the routers of each 2x2 group share a 5-port cluster router and,
// through it, one vertical channel. The default 4x4x4 stack has 64 routers,
// 16 cluster routers and 4 pipeline buses, against 16 channels for a plain
// 3D mesh with one per node column. Topology, router port sets, XYZ
// dimension-order routing and the bus follow the source design.
//
// Node n = (z*MESH_Y + y)*MESH_X + x; its header carries layer, x and y
// (noc_pkg make_flit_cmit). A packet for another layer goes X, then Y in the
// source layer to the router above/below its destination, then to that
// router's cluster router, up or down the cluster's bus, and back through the
// destination layer's cluster router to the destination router.
// Each layer's routers and cluster routers run on rclk[z]; the bus segments
// on clk. Mesh ports at the layer edge are tied off.
module cmit_noc
  import noc_pkg::*;
#(
  parameter int LAYERS     = 4,
  parameter int MESH_X     = 4,
  parameter int MESH_Y     = 4,
  parameter int IN_DEPTH   = 5,
  parameter int BUF_DEPTH  = 6,
  parameter int HOST_DEPTH = 8,
  localparam int PER_L  = MESH_X * MESH_Y,
  localparam int NODES  = LAYERS * PER_L,
  localparam int NBUS   = (MESH_X / 2) * (MESH_Y / 2),
  localparam int NCL    = LAYERS * NBUS
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rclk          [LAYERS],
  input  logic  rrst_n        [LAYERS],
  input  logic  node_tx_valid [NODES],
  output logic  node_tx_ready [NODES],
  input  flit_t node_tx_flit  [NODES],
  output logic  node_rx_valid [NODES],
  input  logic  node_rx_ready [NODES],
  output flit_t node_rx_flit  [NODES],
  output logic  nb_event      [NCL]
);
  localparam int P  = CMIT_PORTS;
  localparam int PC = CMIT_CL_PORTS;

  logic  ri_v [NODES][P], ri_r [NODES][P], ro_v [NODES][P], ro_r [NODES][P];
  flit_t ri_f [NODES][P], ro_f [NODES][P];
  logic  ci_v [NCL][PC], ci_r [NCL][PC], co_v [NCL][PC], co_r [NCL][PC];
  flit_t ci_f [NCL][PC], co_f [NCL][PC];
  logic  bi_v [NBUS][LAYERS], bi_r [NBUS][LAYERS], bo_v [NBUS][LAYERS], bo_r [NBUS][LAYERS];
  flit_t bi_f [NBUS][LAYERS], bo_f [NBUS][LAYERS];
  logic  nbu  [NBUS][LAYERS], nbd [NBUS][LAYERS];

  for (genvar z = 0; z < LAYERS; z++) begin : g_z
    // mesh routers
    for (genvar y = 0; y < MESH_Y; y++) begin : g_y
      for (genvar x = 0; x < MESH_X; x++) begin : g_x
        localparam int R  = (z * MESH_Y + y) * MESH_X + x;
        localparam int C  = z * NBUS + (y / 2) * (MESH_X / 2) + x / 2;
        localparam int LP = (y % 2) * 2 + (x % 2);

        cmit_router #(.MY_Z(z), .MY_X(x), .MY_Y(y), .IN_DEPTH(IN_DEPTH)) u_rt (
          .clk(rclk[z]), .rst_n(rrst_n[z]),
          .in_valid(ri_v[R]), .in_ready(ri_r[R]), .in_flit(ri_f[R]),
          .out_valid(ro_v[R]), .out_ready(ro_r[R]), .out_flit(ro_f[R]));

        assign ri_v[R][M_NODE] = node_tx_valid[R];
        assign ri_f[R][M_NODE] = node_tx_flit[R];
        assign node_tx_ready[R] = ri_r[R][M_NODE];
        assign node_rx_valid[R] = ro_v[R][M_NODE];
        assign node_rx_flit[R]  = ro_f[R][M_NODE];
        assign ro_r[R][M_NODE]  = node_rx_ready[R];

        // to / from the cluster router
        assign ci_v[C][LP]   = ro_v[R][M_CL];
        assign ci_f[C][LP]   = ro_f[R][M_CL];
        assign ro_r[R][M_CL] = ci_r[C][LP];
        assign ri_v[R][M_CL] = co_v[C][LP];
        assign ri_f[R][M_CL] = co_f[C][LP];
        assign co_r[C][LP]   = ri_r[R][M_CL];

        if (x < MESH_X - 1) begin : g_xp
          assign ri_v[R][M_XP] = ro_v[R+1][M_XM];
          assign ri_f[R][M_XP] = ro_f[R+1][M_XM];
          assign ro_r[R+1][M_XM] = ri_r[R][M_XP];
        end else begin : g_xp_edge
          assign ri_v[R][M_XP] = 1'b0;
          assign ri_f[R][M_XP] = '0;
          assign ro_r[R][M_XP] = 1'b1;
        end
        if (x > 0) begin : g_xm
          assign ri_v[R][M_XM] = ro_v[R-1][M_XP];
          assign ri_f[R][M_XM] = ro_f[R-1][M_XP];
          assign ro_r[R-1][M_XP] = ri_r[R][M_XM];
        end else begin : g_xm_edge
          assign ri_v[R][M_XM] = 1'b0;
          assign ri_f[R][M_XM] = '0;
          assign ro_r[R][M_XM] = 1'b1;
        end
        if (y < MESH_Y - 1) begin : g_yp
          assign ri_v[R][M_YP] = ro_v[R+MESH_X][M_YM];
          assign ri_f[R][M_YP] = ro_f[R+MESH_X][M_YM];
          assign ro_r[R+MESH_X][M_YM] = ri_r[R][M_YP];
        end else begin : g_yp_edge
          assign ri_v[R][M_YP] = 1'b0;
          assign ri_f[R][M_YP] = '0;
          assign ro_r[R][M_YP] = 1'b1;
        end
        if (y > 0) begin : g_ym
          assign ri_v[R][M_YM] = ro_v[R-MESH_X][M_YP];
          assign ri_f[R][M_YM] = ro_f[R-MESH_X][M_YP];
          assign ro_r[R-MESH_X][M_YP] = ri_r[R][M_YM];
        end else begin : g_ym_edge
          assign ri_v[R][M_YM] = 1'b0;
          assign ri_f[R][M_YM] = '0;
          assign ro_r[R][M_YM] = 1'b1;
        end
      end
    end

    // cluster routers
    for (genvar b = 0; b < NBUS; b++) begin : g_cl
      localparam int C = z * NBUS + b;
      cmit_cluster_router #(.MY_Z(z), .IN_DEPTH(IN_DEPTH)) u_cr (
        .clk(rclk[z]), .rst_n(rrst_n[z]),
        .in_valid(ci_v[C]), .in_ready(ci_r[C]), .in_flit(ci_f[C]),
        .out_valid(co_v[C]), .out_ready(co_r[C]), .out_flit(co_f[C]));
      assign bi_v[b][z]   = co_v[C][4];
      assign bi_f[b][z]   = co_f[C][4];
      assign co_r[C][4]   = bi_r[b][z];
      assign ci_v[C][4]   = bo_v[b][z];
      assign ci_f[C][4]   = bo_f[b][z];
      assign bo_r[b][z]   = ci_r[C][4];
      assign nb_event[C]  = nbu[b][z] | nbd[b][z];
    end
  end

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    pipeline_bus #(.LAYERS(LAYERS), .BUF_DEPTH(BUF_DEPTH), .HOST_DEPTH(HOST_DEPTH)) u_bus (
      .clk, .rst_n, .rclk, .rrst_n,
      .host_in_valid(bi_v[b]), .host_in_ready(bi_r[b]), .host_in_flit(bi_f[b]),
      .host_out_valid(bo_v[b]), .host_out_ready(bo_r[b]), .host_out_flit(bo_f[b]),
      .nb_up(nbu[b]), .nb_dn(nbd[b]));
  end

  initial begin
    assert (LAYERS <= (1 << LAYER_W) && MESH_X <= (1 << MX_W) && MESH_Y <= (1 << MY_W) &&
            MESH_X % 2 == 0 && MESH_Y % 2 == 0)
      else $error("cmit_noc: network size does not fit the noc_pkg header fields");
  end
endmodule
