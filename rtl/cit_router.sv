// cit_router -- cluster router of the Concentrated Inter-layer Topology (CIT).
// One router serves a cluster of four IP cores/memories, so a 4x4 layer
// needs only a 2x2 mesh of these routers and one vertical channel per
// cluster column.
//
// Ports (noc_pkg::cit_port_e): four mesh neighbours (x+, x-, y+, y-), the
// vertical bus (a pipeline-bus transfer stage) and four local IP ports:
// nine in all. Routing is dimension-order: first along X to the destination
// cluster column, then along Y, then onto the bus if the destination is on
// another layer, and finally to the local port given by the IP field. The
// port set and the XYZ dimension order follow the source design.
// Switching, buffering and timing come from noc_switch: wormhole, round-robin
// per output, IN_DEPTH-flit input FIFOs (5, the per-VC depth of the
// evaluated routers, but a single FIFO per input: the two virtual channels
// of the evaluated routers are left out), two cycles per hop, valid/ready
// links.
//
// Interface: in_*[p] / out_*[p] valid/ready per port p.
module cit_router
  import noc_pkg::*;
#(
  parameter int MY_Z     = 0,   // layer of this router
  parameter int MY_CX    = 0,   // cluster column
  parameter int MY_CY    = 0,   // cluster row
  parameter int IN_DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [CIT_PORTS],
  output logic  in_ready  [CIT_PORTS],
  input  flit_t in_flit   [CIT_PORTS],
  output logic  out_valid [CIT_PORTS],
  input  logic  out_ready [CIT_PORTS],
  output flit_t out_flit  [CIT_PORTS]
);
  localparam int P  = CIT_PORTS;
  localparam int PW = $clog2(P);

  function automatic logic [PW-1:0] route(flit_t f);
    if (int'(hdr_cx(f)) > MY_CX)         return PW'(P_XP);
    else if (int'(hdr_cx(f)) < MY_CX)    return PW'(P_XM);
    else if (int'(hdr_cy(f)) > MY_CY)    return PW'(P_YP);
    else if (int'(hdr_cy(f)) < MY_CY)    return PW'(P_YM);
    else if (int'(hdr_layer(f)) != MY_Z) return PW'(P_BUS);
    else return PW'(P_IP0) + PW'(hdr_ip(f));
  endfunction

  flit_t         head [P];
  logic [PW-1:0] rt   [P];
  always_comb
    for (int i = 0; i < P; i++) rt[i] = route(head[i]);

  noc_switch #(.NPORTS(P), .IN_DEPTH(IN_DEPTH)) u_sw (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .head_flit(head), .head_route(rt));
endmodule
