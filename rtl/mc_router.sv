// mc_router: five-port (N, S, E, W, Local) wormhole router with tree-based
// multicast and dynamic packet fragmentation.
//
// Unicast and multicast packets share one four-stage pipeline per hop:
//   BW/RC  the flit in the input link register is written into its input VC;
//          a head's destination bit-string is routed (XY) to an output-port
//          encoding, which the VC latches. More than one port = multicast.
//   SA/VA  per input VC, one VC state unit per requested port asks for the
//          switch (and for an output VC if it starts a packet or fragment);
//          P:1, V:1 and output-port round-robin arbiters pick the winners.
//   ST     the granted flits cross the crossbar into the output registers.
//   LT     the flit travels the link into the next router's input register.
// Body and tail flits skip VA and reuse the output VC of their VC state.
//
// A multicast packet is copied at branch points: each copy is sent by its
// own VC state unit, and a buffered flit is freed only after every branch has
// sent it. When a branch has sent every flit it can and more is not arriving,
// its last flit goes out as a virtual tail and its output VC is released,
// which breaks the hold-and-wait cycle of contending multicast packets. When
// new flits arrive, that branch starts a new fragment with a virtual head
// copied from the head flit buffer, destination field restricted to the
// branch.
//
// Interface per port p: link_in[p]/credit_out[p] connect to the upstream
// neighbour, link_out[p]/credit_in[p] to the downstream one. Flow control is
// credit based, DEPTH credits per VC. ev_frag[p]/ev_vhead[p] pulse when
// input port p sends a virtual tail / virtual head.
// x and y are the router's coordinates in the mesh, tied to constants by the
// mesh, so that all routers are the same circuit.
module mc_router
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC
) (
  input  logic     clk,
  input  logic     rst_n,
  input  xcoord_t  x,
  input  ycoord_t  y,
  input  flit_t    link_in    [NUM_PORTS],
  output credit_t  credit_out [NUM_PORTS],
  output flit_t    link_out   [NUM_PORTS],
  input  credit_t  credit_in  [NUM_PORTS],
  output logic [NUM_PORTS-1:0] ev_frag,
  output logic [NUM_PORTS-1:0] ev_vhead
);
  logic [NUM_PORTS-1:0] port_free;
  logic [VCID_W-1:0]    free_vc   [NUM_PORTS];
  logic [NUM_VC-1:0]    credit_ok [NUM_PORTS];

  logic [NUM_PORTS-1:0] req, req_nva, req_last, in_grant;
  logic [2:0]           req_port  [NUM_PORTS];
  logic [VCID_W-1:0]    req_vc    [NUM_PORTS];
  logic [VCID_W-1:0]    in_gvc    [NUM_PORTS];

  logic [NUM_PORTS-1:0] out_grant, out_va, out_last;
  logic [VCID_W-1:0]    out_vc    [NUM_PORTS];

  flit_t    st_flit [NUM_PORTS];
  portset_t st_port [NUM_PORTS];
  flit_t    xb_flit [NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    input_unit #(.DEPTH(DEPTH), .NUM_VC(NUM_VC)) u_in (
      .clk, .rst_n, .x, .y,
      .link_in     (link_in[p]),
      .credit_out  (credit_out[p]),
      .port_free   (port_free),
      .credit_ok   (credit_ok),
      .req         (req[p]),
      .req_port    (req_port[p]),
      .req_need_va (req_nva[p]),
      .req_last    (req_last[p]),
      .req_vc      (req_vc[p]),
      .grant       (in_grant[p]),
      .grant_vc    (in_gvc[p]),
      .st_flit     (st_flit[p]),
      .st_port     (st_port[p]),
      .ev_frag     (ev_frag[p]),
      .ev_vhead    (ev_vhead[p])
    );

    output_unit #(.DEPTH(DEPTH), .NUM_VC(NUM_VC)) u_out (
      .clk, .rst_n,
      .grant      (out_grant[p]),
      .grant_vc   (out_vc[p]),
      .grant_va   (out_va[p]),
      .grant_last (out_last[p]),
      .credit_in  (credit_in[p]),
      .xbar_flit  (xb_flit[p]),
      .link_out   (link_out[p]),
      .port_free  (port_free[p]),
      .free_vc    (free_vc[p]),
      .credit_ok  (credit_ok[p])
    );
  end

  sw_vc_alloc u_alloc (
    .clk, .rst_n,
    .req         (req),
    .req_port    (req_port),
    .req_need_va (req_nva),
    .req_last    (req_last),
    .req_vc      (req_vc),
    .free_vc     (free_vc),
    .in_grant    (in_grant),
    .in_grant_vc (in_gvc),
    .out_grant   (out_grant),
    .out_vc      (out_vc),
    .out_va      (out_va),
    .out_last    (out_last)
  );

  crossbar u_xbar (
    .in_flit  (st_flit),
    .in_port  (st_port),
    .out_flit (xb_flit)
  );

endmodule
