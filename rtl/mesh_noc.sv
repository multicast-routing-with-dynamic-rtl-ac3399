// mesh_noc: MESH_X x MESH_Y mesh of multicast routers (4x4 by default).
//
// Router (x, y) serves node n = y*MESH_X + x. Its north port links to the
// south port of (x, y+1) and its east port to the west port of (x+1, y), in
// both directions (flits one way, credits the other). Ports at the mesh edge
// are tied off: XY routing never sends a flit there. Each node's local port
// is brought out for a network interface, which injects flits on
// inj_flit[n] (respecting the credits on inj_credit[n]) and receives flits on
// ej_flit[n], returning one credit on ej_credit[n] per flit it takes.
// The interface also reassembles fragmented packets; it is not part of this
// module. ev_frag / ev_vhead report, per node, the input ports that sent a
// virtual tail / virtual head in the current cycle.
module mesh_noc
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   inj_flit   [NUM_NODES],
  output credit_t inj_credit [NUM_NODES],
  output flit_t   ej_flit    [NUM_NODES],
  input  credit_t ej_credit  [NUM_NODES],
  output logic [NUM_PORTS-1:0] ev_frag  [NUM_NODES],
  output logic [NUM_PORTS-1:0] ev_vhead [NUM_NODES]
);
  flit_t   r_in   [NUM_NODES][NUM_PORTS];
  flit_t   r_out  [NUM_NODES][NUM_PORTS];
  credit_t r_cin  [NUM_NODES][NUM_PORTS];
  credit_t r_cout [NUM_NODES][NUM_PORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int N = y * MESH_X + x;

      mc_router #(.DEPTH(DEPTH), .NUM_VC(NUM_VC)) u_router (
        .clk, .rst_n,
        .x          (xcoord_t'(x)),
        .y          (ycoord_t'(y)),
        .link_in    (r_in[N]),
        .credit_out (r_cout[N]),
        .link_out   (r_out[N]),
        .credit_in  (r_cin[N]),
        .ev_frag    (ev_frag[N]),
        .ev_vhead   (ev_vhead[N])
      );

      // local port
      assign r_in[N][P_LOCAL]  = inj_flit[N];
      assign inj_credit[N]     = r_cout[N][P_LOCAL];
      assign ej_flit[N]        = r_out[N][P_LOCAL];
      assign r_cin[N][P_LOCAL] = ej_credit[N];

      // north / south neighbours
      if (y < MESH_Y - 1) begin : g_n
        assign r_in[N][P_NORTH]  = r_out[N + MESH_X][P_SOUTH];
        assign r_cin[N][P_NORTH] = r_cout[N + MESH_X][P_SOUTH];
      end else begin : g_nt
        assign r_in[N][P_NORTH]  = '0;
        assign r_cin[N][P_NORTH] = '0;
      end
      if (y > 0) begin : g_s
        assign r_in[N][P_SOUTH]  = r_out[N - MESH_X][P_NORTH];
        assign r_cin[N][P_SOUTH] = r_cout[N - MESH_X][P_NORTH];
      end else begin : g_st
        assign r_in[N][P_SOUTH]  = '0;
        assign r_cin[N][P_SOUTH] = '0;
      end
      // east / west neighbours
      if (x < MESH_X - 1) begin : g_e
        assign r_in[N][P_EAST]  = r_out[N + 1][P_WEST];
        assign r_cin[N][P_EAST] = r_cout[N + 1][P_WEST];
      end else begin : g_et
        assign r_in[N][P_EAST]  = '0;
        assign r_cin[N][P_EAST] = '0;
      end
      if (x > 0) begin : g_w
        assign r_in[N][P_WEST]  = r_out[N - 1][P_EAST];
        assign r_cin[N][P_WEST] = r_cout[N - 1][P_EAST];
      end else begin : g_wt
        assign r_in[N][P_WEST]  = '0;
        assign r_cin[N][P_WEST] = '0;
      end
    end
  end

endmodule
