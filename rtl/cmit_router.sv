// cmit_router -- mesh router of the Clustered Mesh Inter-layer Topology
// (CMIT). Every node has its own router, as in a plain mesh, but routers do
// not have their own vertical channel: each group of 2x2 routers shares one,
// reached through the group's cluster router.
//
// Ports (noc_pkg::cmit_port_e): four mesh neighbours, the cluster router and
// the local node: six in all, as in the source design. Routing is
// dimension-order: X to the destination column, then Y to the destination
// row, then to the cluster router if the destination is on another layer,
// else to the local node. After the bus, the packet re-enters the mesh at
// the destination router itself, because the source already moved it to
// the destination's x,y. Switching, buffering and timing come from
// noc_switch (wormhole, round robin, 5-flit input FIFOs, no virtual
// channels, two cycles per hop, valid/ready links).
module cmit_router
  import noc_pkg::*;
#(
  parameter int MY_Z     = 0,   // layer
  parameter int MY_X     = 0,   // column in the layer mesh
  parameter int MY_Y     = 0,   // row in the layer mesh
  parameter int IN_DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [CMIT_PORTS],
  output logic  in_ready  [CMIT_PORTS],
  input  flit_t in_flit   [CMIT_PORTS],
  output logic  out_valid [CMIT_PORTS],
  input  logic  out_ready [CMIT_PORTS],
  output flit_t out_flit  [CMIT_PORTS]
);
  localparam int P  = CMIT_PORTS;
  localparam int PW = $clog2(P);

  function automatic logic [PW-1:0] route(flit_t f);
    if (int'(hdr_mx(f)) > MY_X)          return PW'(M_XP);
    else if (int'(hdr_mx(f)) < MY_X)     return PW'(M_XM);
    else if (int'(hdr_my(f)) > MY_Y)     return PW'(M_YP);
    else if (int'(hdr_my(f)) < MY_Y)     return PW'(M_YM);
    else if (int'(hdr_layer(f)) != MY_Z) return PW'(M_CL);
    else return PW'(M_NODE);
  endfunction

  flit_t         head [P];
  logic [PW-1:0] rt   [P];
  always_comb
    for (int i = 0; i < P; i++) rt[i] = route(head[i]);

  noc_switch #(.NPORTS(P), .IN_DEPTH(IN_DEPTH)) u_sw (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .head_flit(head), .head_route(rt));
endmodule
