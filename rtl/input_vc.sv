// input_vc: one virtual channel of an input port, with multicast support and
// dynamic packet fragmentation.
//
// Holds a DEPTH-flit FIFO buffer, a head flit buffer (a copy of the packet's
// head flit), the latched output-port encoding and multicast flag from the
// routing computation, and one vc_state_unit per output port. Each unit whose
// port is in the encoding sends the packet's flits to its port on its own;
// a P:1 round-robin arbiter picks one unit's request per cycle. The oldest
// buffered flit is deleted, and a credit returned upstream, only when every
// port in the encoding has sent it.
//
// The flit offered with the request (out_flit) is formed here:
//   * a head flit, original or virtual, gets its destination field cut down
//     to the nodes reached through the requested port;
//   * a virtual head is the head flit buffer's copy with type FT_VHEAD;
//   * a flit that fragments the packet is sent with type FT_VTAIL;
//   * VCID is the output VC: the one granted now (VA) or the held one.
// All of this follows the design description; the head flit buffer being
// written on every head arrival and the encoding being held until the next
// head are as described there.
//
// Timing: a flit written in cycle t (wr) can be requested in cycle t+1.
// Request, grant and the resulting state updates are in the same cycle
// (SA/VA stage); the output flit is registered by the input unit.
// The upstream router must not start a new packet on this VC before all
// flits of the previous one have been deleted (credit count back to DEPTH).
module input_vc
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC,
  localparam int CW    = $clog2(DEPTH + 1),
  localparam int AW    = $clog2(DEPTH > 1 ? DEPTH : 2)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  xcoord_t           x,           // this router's position
  input  ycoord_t           y,
  // buffer write (BW/RC)
  input  logic              wr,
  input  flit_t             wr_flit,
  input  logic              port_wr,     // a flit enters the input port
  input  portset_t          rc_ports,
  input  logic              rc_multicast,
  // output-side status
  input  logic [NUM_PORTS-1:0] port_free,
  input  logic [NUM_VC-1:0]    credit_ok [NUM_PORTS],
  // request to the V:1 arbiter / switch allocator
  output logic              req,
  output logic [2:0]        req_port,
  output logic              req_need_va,
  output logic              req_last,
  output logic [VCID_W-1:0] req_vc,      // held output VC (ACTIVE units)
  output flit_t             out_flit,
  input  logic              grant,
  input  logic [VCID_W-1:0] grant_vc,
  // buffer status
  output logic              del,
  output logic [CW-1:0]     occ,
  // event flags for observation
  output logic              ev_frag,
  output logic              ev_vhead
);
  port_masks_t   pmask;

  flit_t         fbuf [DEPTH];
  flit_t         head_buf;
  portset_t      route;
  logic          mcast;
  logic [AW-1:0] rd, wp;

  logic [NUM_PORTS-1:0] u_req, u_need_va, u_vhead, u_frag, u_last, u_sends;
  logic [NUM_PORTS-1:0] u_start, u_grant, pgnt;
  logic [VCID_W-1:0]    u_out_vc [NUM_PORTS];
  logic [CW-1:0]        u_ptr    [NUM_PORTS];
  flit_type_e           u_type   [NUM_PORTS];
  logic [2:0]           pidx;

  function automatic logic [AW-1:0] wrap(int i);
    return AW'((i >= DEPTH) ? i - DEPTH : i);
  endfunction

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_state
    assign u_start[p] = wr && is_head(wr_flit.ftype) && rc_ports[p];
    assign u_type[p]  = fbuf[wrap(int'(rd) + int'(u_ptr[p]))].ftype;
    assign u_grant[p] = grant && pgnt[p];

    vc_state_unit #(.DEPTH(DEPTH), .NUM_VC(NUM_VC)) u_vcs (
      .clk, .rst_n,
      .start     (u_start[p]),
      .occ       (occ),
      .cur_type  (u_type[p]),
      .multicast (mcast),
      .arriving  (port_wr),
      .port_free (port_free[p]),
      .credit_ok (credit_ok[p]),
      .grant     (u_grant[p]),
      .grant_vc  (grant_vc),
      .del       (del),
      .req       (u_req[p]),
      .need_va   (u_need_va[p]),
      .vhead     (u_vhead[p]),
      .frag      (u_frag[p]),
      .last      (u_last[p]),
      .out_vc    (u_out_vc[p]),
      .ptr       (u_ptr[p]),
      .sends_buf (u_sends[p])
    );
  end

  // P:1 arbiter over the VC state units.
  rr_arbiter #(.N(NUM_PORTS)) u_parb (
    .clk, .rst_n, .req(u_req), .upd(grant), .gnt(pgnt), .gnt_idx(pidx)
  );

  assign req         = |u_req;
  assign req_port    = pidx;
  assign req_need_va = u_need_va[pidx];
  assign req_last    = u_last[pidx];
  assign req_vc      = u_out_vc[pidx];

  always_comb begin
    if (u_vhead[pidx]) begin
      out_flit       = head_buf;
      out_flit.ftype = FT_VHEAD;
    end else begin
      out_flit = fbuf[wrap(int'(rd) + int'(u_ptr[pidx]))];
    end
    pmask = port_masks(int'(x), int'(y));
    if (is_head(out_flit.ftype))
      out_flit.dest = out_flit.dest & pmask[pidx];
    if (u_frag[pidx])
      out_flit.ftype = FT_VTAIL;
    out_flit.vcid  = u_need_va[pidx] ? grant_vc : u_out_vc[pidx];
    out_flit.valid = 1'b1;
  end

  assign ev_frag  = grant && u_frag[pidx];
  assign ev_vhead = grant && u_vhead[pidx];

  // The oldest flit goes once every port of the route has sent it.
  always_comb begin
    del = (occ != '0) && (route != '0);
    for (int p = 0; p < NUM_PORTS; p++)
      if (route[p] && (u_ptr[p] + CW'(u_sends[p]) == '0))
        del = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd    <= '0;
      wp    <= '0;
      occ   <= '0;
      route <= '0;
      mcast <= 1'b0;
    end else begin
      occ <= occ + CW'(wr) - CW'(del);
      if (del) rd <= wrap(int'(rd) + 1);
      if (wr)  wp <= wrap(int'(wp) + 1);
      if (wr && is_head(wr_flit.ftype)) begin
        route <= rc_ports;
        mcast <= rc_multicast;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr) fbuf[wp] <= wr_flit;
    if (wr && is_head(wr_flit.ftype)) head_buf <= wr_flit;
  end

  assert property (@(posedge clk) disable iff (!rst_n) wr |-> (int'(occ) < DEPTH || del));
  assert property (@(posedge clk) disable iff (!rst_n)
                   (wr && is_head(wr_flit.ftype)) |-> (occ == '0));

endmodule
