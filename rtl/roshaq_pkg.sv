// roshaq_pkg: types and constants shared by the shared-queue (RoShaQ) router.
//
// The router has five ports, one towards the local processor and one towards
// each of the four mesh neighbours; the port count and the use of North, East,
// South and West follow the router description. Packets are wormhole packets of
// one or more flits. A flit is {head, tail, data}; the head flit carries the
// destination coordinates and the bandwidth the packet asks for (b_p in the
// weighted XY routing rule). The field layout and widths are this design's own
// choice: dst_x in data[3:0], dst_y in data[7:4], b_p in data[11:8].
// North is the direction of decreasing y, East of increasing x.
package roshaq_pkg;

  localparam int NPORTS  = 5;   // Local, North, East, South, West
  localparam int DATA_W  = 32;  // flit payload width
  localparam int COORD_W = 4;   // mesh coordinate width (up to 16 x 16)
  localparam int BW_W    = 4;   // bandwidth value width for wXY routing
  localparam int PORT_W  = 3;   // width of a port number

  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,
    P_EAST  = 3'd2,
    P_SOUTH = 3'd3,
    P_WEST  = 3'd4
  } port_e;

  typedef struct packed {
    logic              head;
    logic              tail;
    logic [DATA_W-1:0] data;
  } flit_t;

  localparam int FLIT_W = $bits(flit_t);

  // Head-flit field accessors, applied to the data field of a head flit.
  function automatic logic [COORD_W-1:0] hdr_dst_x(logic [DATA_W-1:0] d);
    return d[COORD_W-1:0];
  endfunction

  function automatic logic [COORD_W-1:0] hdr_dst_y(logic [DATA_W-1:0] d);
    return d[2*COORD_W-1:COORD_W];
  endfunction

  function automatic logic [BW_W-1:0] hdr_bw_req(logic [DATA_W-1:0] d);
    return d[2*COORD_W+BW_W-1:2*COORD_W];
  endfunction

endpackage
