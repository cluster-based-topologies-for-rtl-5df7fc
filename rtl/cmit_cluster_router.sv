// cmit_cluster_router -- cluster router of the CMIT network. It joins the
// four mesh routers of a 2x2 cluster to the cluster's vertical channel and
// does nothing else: routing inside a layer is done by the mesh routers.
//
// Ports 0-3 go to the cluster's routers, numbered by their position in the
// cluster (y mod 2)*2 + (x mod 2); port 4 goes to the pipeline-bus transfer
// stage. A packet from a router always goes to the bus (routers send here
// only packets for other layers); a packet from the bus goes to the router
// whose x,y match its destination. Five ports follow the source design
// ("four for local routers and one for the vertical channel interface");
// the port numbering is this design's. Switching and timing come from
// noc_switch (wormhole, round robin, 5-flit input FIFOs, two cycles per hop).
module cmit_cluster_router
  import noc_pkg::*;
#(
  parameter int MY_Z     = 0,
  parameter int IN_DEPTH = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid  [CMIT_CL_PORTS],
  output logic  in_ready  [CMIT_CL_PORTS],
  input  flit_t in_flit   [CMIT_CL_PORTS],
  output logic  out_valid [CMIT_CL_PORTS],
  input  logic  out_ready [CMIT_CL_PORTS],
  output flit_t out_flit  [CMIT_CL_PORTS]
);
  localparam int P   = CMIT_CL_PORTS;
  localparam int PW  = $clog2(P);
  localparam int BUS = 4;

  function automatic logic [PW-1:0] route(flit_t f);
    if (int'(hdr_layer(f)) != MY_Z) return PW'(BUS);
    return PW'({hdr_my(f)[0], hdr_mx(f)[0]});
  endfunction

  flit_t         head [P];
  logic [PW-1:0] rt   [P];
  always_comb
    for (int i = 0; i < P; i++) rt[i] = route(head[i]);

  noc_switch #(.NPORTS(P), .IN_DEPTH(IN_DEPTH)) u_sw (
    .clk, .rst_n, .in_valid, .in_ready, .in_flit, .out_valid, .out_ready, .out_flit,
    .head_flit(head), .head_route(rt));

`ifndef SYNTHESIS
  // routers only hand over packets for other layers
  for (genvar i = 0; i < BUS; i++) begin : g_chk
    a_other_layer: assert property (@(posedge clk) disable iff (!rst_n)
        (in_valid[i] && in_ready[i] && is_bom(in_flit[i])) |-> int'(hdr_layer(in_flit[i])) != MY_Z);
  end
`endif
endmodule
