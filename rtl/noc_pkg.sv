// noc_pkg: types and constants shared by the multicast router and the mesh.
//
// The network is a 4x4 mesh of five-port routers with four virtual channels
// (VCs) per port, four flits of buffering per VC and 128-bit flits; packets are
// eight flits long. A flit carries a valid bit, a type field, the VC it
// travels on and, in a head flit, a 16-bit destination bit-string (one bit per
// node, bit n = node n) followed by payload. In body and tail flits the
// destination field is ordinary payload and passes through unchanged.
// These numbers and the field order follow the design description; the
// field widths of type (3 bits) and VCID (2 bits) and the type codes are this
// design's own choice.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X. North is the +y direction,
// east is +x. Routing is dimension-order (X first, then Y); at a branch point
// a multicast packet is copied onto several output ports and each copy's
// destination field keeps only the nodes reached through that port.
package noc_pkg;

  localparam int MESH_X     = 4;
  localparam int MESH_Y     = 4;
  localparam int NUM_NODES  = MESH_X * MESH_Y;   // width of the bit-string
  localparam int NUM_PORTS  = 5;
  localparam int MAX_VC     = 4;                 // VCs per port
  localparam int VC_DEPTH   = 4;                 // flits per VC buffer
  localparam int FLIT_W     = 128;
  localparam int PKT_FLITS  = 8;
  localparam int VCID_W     = $clog2(MAX_VC);
  localparam int TYPE_W     = 3;
  localparam int PAYLOAD_W  = FLIT_W - 1 - TYPE_W - VCID_W - NUM_NODES;

  // Port numbering, in the order of the output-port encoding register.
  localparam int P_NORTH = 0;
  localparam int P_SOUTH = 1;
  localparam int P_EAST  = 2;
  localparam int P_WEST  = 3;
  localparam int P_LOCAL = 4;

  typedef enum logic [TYPE_W-1:0] {
    FT_HEAD  = 3'd0,   // original head flit
    FT_BODY  = 3'd1,
    FT_TAIL  = 3'd2,   // original tail flit
    FT_VHEAD = 3'd3,   // virtual head: starts a fragment
    FT_VTAIL = 3'd4    // virtual tail: ends a fragment
  } flit_type_e;

  typedef logic [NUM_NODES-1:0] dest_t;
  typedef logic [$clog2(MESH_X)-1:0] xcoord_t;
  typedef logic [$clog2(MESH_Y)-1:0] ycoord_t;
  typedef logic [NUM_PORTS-1:0] portset_t;

  typedef struct packed {
    logic                 valid;
    flit_type_e           ftype;
    logic [VCID_W-1:0]    vcid;
    dest_t                dest;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // Credit returned upstream when a flit leaves an input buffer.
  typedef struct packed {
    logic              valid;
    logic [VCID_W-1:0] vc;
  } credit_t;

  function automatic logic is_head(flit_type_e t);
    return (t == FT_HEAD) || (t == FT_VHEAD);
  endfunction

  function automatic logic is_tail(flit_type_e t);
    return (t == FT_TAIL) || (t == FT_VTAIL);
  endfunction

  // Destinations that a router at (x, y) reaches through output port p under
  // XY routing.
  function automatic dest_t port_mask(int p, int x, int y);
    dest_t m;
    m = '0;
    for (int n = 0; n < NUM_NODES; n++) begin
      int dx, dy;
      dx = n % MESH_X;
      dy = n / MESH_X;
      case (p)
        P_EAST:  m[n] = (dx > x);
        P_WEST:  m[n] = (dx < x);
        P_NORTH: m[n] = (dx == x) && (dy > y);
        P_SOUTH: m[n] = (dx == x) && (dy < y);
        default: m[n] = (dx == x) && (dy == y);
      endcase
    end
    return m;
  endfunction

  // All five masks of a router at (x, y), built from column and row
  // selections: node bit y*MESH_X + x, so a set of columns repeats in every
  // row and a set of rows covers MESH_X consecutive bits per row.
  typedef logic [NUM_PORTS-1:0][NUM_NODES-1:0] port_masks_t;

  function automatic port_masks_t port_masks(int x, int y);
    port_masks_t       m;
    logic [MESH_X-1:0] c_east, c_west, c_here;
    logic [MESH_Y-1:0] r_north, r_south, r_here;
    dest_t             col_here;
    c_here  = MESH_X'(1) << x;
    c_east  = ~((c_here << 1) - 1'b1);       // columns > x
    c_west  = c_here - 1'b1;                 // columns < x
    r_here  = MESH_Y'(1) << y;
    r_north = ~((r_here << 1) - 1'b1);
    r_south = r_here - 1'b1;
    col_here = {MESH_Y{c_here}};
    m[P_EAST] = {MESH_Y{c_east}};
    m[P_WEST] = {MESH_Y{c_west}};
    m[P_NORTH] = '0; m[P_SOUTH] = '0; m[P_LOCAL] = '0;
    for (int r = 0; r < MESH_Y; r++) begin
      m[P_NORTH][r*MESH_X +: MESH_X] = {MESH_X{r_north[r]}};
      m[P_SOUTH][r*MESH_X +: MESH_X] = {MESH_X{r_south[r]}};
      m[P_LOCAL][r*MESH_X +: MESH_X] = {MESH_X{r_here[r]}};
    end
    m[P_NORTH] &= col_here;
    m[P_SOUTH] &= col_here;
    m[P_LOCAL] &= col_here;
    return m;
  endfunction

endpackage
