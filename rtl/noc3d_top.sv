// noc3d_top -- both clustered 3D networks of this design side by side: the
// CIT network (cluster routers shared by four nodes) and the CMIT network
// (a full mesh per layer whose 2x2 router groups share a vertical channel),
// each 64 nodes in a 4x4x4 stack with pipeline-bus vertical channels. They
// share the bus clock and the per-layer clocks but are otherwise
// independent, each with its own node ports (see cit_noc and cmit_noc for
// node numbering and header formats).
module noc3d_top
  import noc_pkg::*;
#(
  parameter int LAYERS = 4,
  localparam int NODES = LAYERS * 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  rclk              [LAYERS],
  input  logic  rrst_n            [LAYERS],
  // CIT network
  input  logic  cit_tx_valid      [NODES],
  output logic  cit_tx_ready      [NODES],
  input  flit_t cit_tx_flit       [NODES],
  output logic  cit_rx_valid      [NODES],
  input  logic  cit_rx_ready      [NODES],
  output flit_t cit_rx_flit       [NODES],
  output logic  cit_nb_event      [LAYERS*4],
  // CMIT network
  input  logic  cmit_tx_valid     [NODES],
  output logic  cmit_tx_ready     [NODES],
  input  flit_t cmit_tx_flit      [NODES],
  output logic  cmit_rx_valid     [NODES],
  input  logic  cmit_rx_ready     [NODES],
  output flit_t cmit_rx_flit      [NODES],
  output logic  cmit_nb_event     [LAYERS*4]
);
  cit_noc #(.LAYERS(LAYERS)) u_cit (
    .clk, .rst_n, .rclk, .rrst_n,
    .node_tx_valid(cit_tx_valid), .node_tx_ready(cit_tx_ready), .node_tx_flit(cit_tx_flit),
    .node_rx_valid(cit_rx_valid), .node_rx_ready(cit_rx_ready), .node_rx_flit(cit_rx_flit),
    .nb_event(cit_nb_event));

  cmit_noc #(.LAYERS(LAYERS)) u_cmit (
    .clk, .rst_n, .rclk, .rrst_n,
    .node_tx_valid(cmit_tx_valid), .node_tx_ready(cmit_tx_ready), .node_tx_flit(cmit_tx_flit),
    .node_rx_valid(cmit_rx_valid), .node_rx_ready(cmit_rx_ready), .node_rx_flit(cmit_rx_flit),
    .nb_event(cmit_nb_event));
endmodule
