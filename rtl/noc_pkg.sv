// noc_pkg -- types, sizes and header helpers shared by the clustered 3D NoC.
//
// Flit format (follows the CIT packet format): every flit is FLIT_W bits.
// The top bit is EOM (last flit of a packet), the next one is BOM (first
// flit). In a header flit (BOM=1) the destination cluster address follows,
// made of the layer number (Z) and the cluster column/row inside the layer,
// then the address of the IP core/memory inside the cluster. All remaining
// bits are payload. Single-flit packets carry both BOM and EOM.
// The layer field sits at a fixed place so that each pipeline-bus transfer
// stage can read it without knowing the rest of the layout.
// The CMIT network uses the same flit with a single destination address
// (layer, then the node's x and y in the layer's mesh) in the same bits, as
// its packets only need the address of the destination node.
// Marking every flit with EOM/BOM (not only the header) is this design's
// choice, it lets wormhole switches find the tail flit.
package noc_pkg;

  parameter int FLIT_W   = 32;   // flit / link width in bits
  parameter int LAYER_W  = 2;    // destination layer field (4 layers)
  parameter int CX_W     = 1;    // cluster column inside a layer (2 columns)
  parameter int CY_W     = 1;    // cluster row inside a layer (2 rows)
  parameter int IP_W     = 2;    // IP core/memory index inside a cluster (4)

  localparam int EOM_BIT   = FLIT_W - 1;
  localparam int BOM_BIT   = FLIT_W - 2;
  localparam int LAYER_LSB = FLIT_W - 2 - LAYER_W;
  localparam int CX_LSB    = LAYER_LSB - CX_W;
  localparam int CY_LSB    = CX_LSB - CY_W;
  localparam int IP_LSB    = CY_LSB - IP_W;
  localparam int PAYLOAD_W = IP_LSB;   // payload bits left in a header flit

  // CMIT header: layer, then node x / y inside the layer mesh
  parameter int MX_W = 2;        // node column (4 columns)
  parameter int MY_W = 2;        // node row (4 rows)
  localparam int MX_LSB = LAYER_LSB - MX_W;
  localparam int MY_LSB = MX_LSB - MY_W;

  typedef logic [FLIT_W-1:0] flit_t;

  function automatic logic is_eom(flit_t f);
    return f[EOM_BIT];
  endfunction

  function automatic logic is_bom(flit_t f);
    return f[BOM_BIT];
  endfunction

  function automatic logic [LAYER_W-1:0] hdr_layer(flit_t f);
    return f[LAYER_LSB +: LAYER_W];
  endfunction

  function automatic logic [CX_W-1:0] hdr_cx(flit_t f);
    return f[CX_LSB +: CX_W];
  endfunction

  function automatic logic [CY_W-1:0] hdr_cy(flit_t f);
    return f[CY_LSB +: CY_W];
  endfunction

  function automatic logic [IP_W-1:0] hdr_ip(flit_t f);
    return f[IP_LSB +: IP_W];
  endfunction

  function automatic logic [MX_W-1:0] hdr_mx(flit_t f);
    return f[MX_LSB +: MX_W];
  endfunction

  function automatic logic [MY_W-1:0] hdr_my(flit_t f);
    return f[MY_LSB +: MY_W];
  endfunction

  // Build a CMIT flit (the address replaces the cluster/IP fields).
  function automatic flit_t make_flit_cmit(logic eom, logic bom,
                                           logic [LAYER_W-1:0] layer,
                                           logic [MX_W-1:0] x,
                                           logic [MY_W-1:0] y,
                                           logic [MY_LSB-1:0] payload);
    return {eom, bom, layer, x, y, payload};
  endfunction

  // Build a flit: header fields are only meaningful when bom=1.
  function automatic flit_t make_flit(logic eom, logic bom,
                                      logic [LAYER_W-1:0] layer,
                                      logic [CX_W-1:0] cx,
                                      logic [CY_W-1:0] cy,
                                      logic [IP_W-1:0] ip,
                                      logic [PAYLOAD_W-1:0] payload);
    return {eom, bom, layer, cx, cy, ip, payload};
  endfunction

  // Port numbering of the CIT cluster router (9 ports).
  typedef enum logic [3:0] {
    P_XP  = 4'd0,   // neighbour at x+1
    P_XM  = 4'd1,   // neighbour at x-1
    P_YP  = 4'd2,   // neighbour at y+1
    P_YM  = 4'd3,   // neighbour at y-1
    P_BUS = 4'd4,   // vertical channel (pipeline-bus transfer stage)
    P_IP0 = 4'd5,   // local IP core/memory 0..3
    P_IP1 = 4'd6,
    P_IP2 = 4'd7,
    P_IP3 = 4'd8
  } cit_port_e;

  localparam int CIT_PORTS = 9;

  // Port numbering of the CMIT mesh router (6 ports).
  typedef enum logic [2:0] {
    M_XP   = 3'd0,  // neighbour at x+1
    M_XM   = 3'd1,  // neighbour at x-1
    M_YP   = 3'd2,  // neighbour at y+1
    M_YM   = 3'd3,  // neighbour at y-1
    M_CL   = 3'd4,  // cluster router (vertical channel access)
    M_NODE = 3'd5   // local IP core/memory
  } cmit_port_e;

  localparam int CMIT_PORTS    = 6;
  localparam int CMIT_CL_PORTS = 5;   // 4 local routers + bus

endpackage
