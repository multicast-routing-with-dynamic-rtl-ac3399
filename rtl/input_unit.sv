// input_unit: one input port of the multicast router.
//
// Pipeline position (head flit): the link delivers a flit into in_reg at the
// end of line traversal (LT) of the upstream router; in the next cycle
// (BW/RC) the flit is written into the input VC named by its VCID field and,
// if it is a head, the routing computation unit produces the output-port
// encoding that the VC latches. In SA/VA the input VCs raise requests, a V:1
// round-robin arbiter keeps one per port, and the switch allocator answers
// in the same cycle. The granted flit is stored in the switch-traversal (ST)
// register together with its one-hot output port; the crossbar reads it in
// the next cycle. Whenever an input VC deletes a flit, a credit naming that
// VC is sent upstream from a register (one cycle later).
//
// The stage order follows the design description; the link and ST registers
// and the one-cycle credit path are this design's choices.
module input_unit
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  xcoord_t           x,
  input  ycoord_t           y,
  input  flit_t             link_in,
  output credit_t           credit_out,
  input  logic [NUM_PORTS-1:0] port_free,
  input  logic [NUM_VC-1:0]    credit_ok [NUM_PORTS],
  // to / from the switch allocator
  output logic              req,
  output logic [2:0]        req_port,
  output logic              req_need_va,
  output logic              req_last,
  output logic [VCID_W-1:0] req_vc,
  input  logic              grant,
  input  logic [VCID_W-1:0] grant_vc,
  // ST register, read by the crossbar
  output flit_t             st_flit,
  output portset_t          st_port,
  // events
  output logic              ev_frag,
  output logic              ev_vhead
);
  localparam int CW = $clog2(DEPTH + 1);

  flit_t    in_reg;
  portset_t rc_ports;
  logic     rc_mc;
  dest_t    rc_pdest [NUM_PORTS];

  logic [NUM_VC-1:0] v_req, v_nva, v_last, v_del, v_gnt, vgnt, v_frag, v_vh;
  logic [2:0]        v_port [NUM_VC];
  logic [VCID_W-1:0] v_vc   [NUM_VC];
  flit_t             v_flit [NUM_VC];
  logic [CW-1:0]     v_occ  [NUM_VC];
  logic [$clog2(NUM_VC > 1 ? NUM_VC : 2)-1:0] vidx;

  route_comp u_rc (
    .x, .y, .dest(in_reg.dest), .ports(rc_ports), .port_dest(rc_pdest), .multicast(rc_mc)
  );

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    assign v_gnt[v] = grant && vgnt[v];
    input_vc #(.DEPTH(DEPTH), .NUM_VC(NUM_VC)) u_ivc (
      .clk, .rst_n, .x, .y,
      .wr          (in_reg.valid && (int'(in_reg.vcid) == v)),
      .wr_flit     (in_reg),
      .port_wr     (in_reg.valid),
      .rc_ports    (rc_ports),
      .rc_multicast(rc_mc),
      .port_free   (port_free),
      .credit_ok   (credit_ok),
      .req         (v_req[v]),
      .req_port    (v_port[v]),
      .req_need_va (v_nva[v]),
      .req_last    (v_last[v]),
      .req_vc      (v_vc[v]),
      .out_flit    (v_flit[v]),
      .grant       (v_gnt[v]),
      .grant_vc    (grant_vc),
      .del         (v_del[v]),
      .occ         (v_occ[v]),
      .ev_frag     (v_frag[v]),
      .ev_vhead    (v_vh[v])
    );
  end

  // V:1 arbiter over the input VCs.
  rr_arbiter #(.N(NUM_VC)) u_varb (
    .clk, .rst_n, .req(v_req), .upd(grant), .gnt(vgnt), .gnt_idx(vidx)
  );

  assign req         = |v_req;
  assign req_port    = v_port[vidx];
  assign req_need_va = v_nva[vidx];
  assign req_last    = v_last[vidx];
  assign req_vc      = v_vc[vidx];
  assign ev_frag     = |v_frag;
  assign ev_vhead    = |v_vh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_reg     <= '0;
      st_flit    <= '0;
      st_port    <= '0;
      credit_out <= '0;
    end else begin
      in_reg  <= link_in;
      st_flit <= grant ? v_flit[vidx] : '0;
      st_port <= grant ? portset_t'(1) << req_port : '0;
      credit_out.valid <= |v_del;
      credit_out.vc    <= '0;
      for (int v = 0; v < NUM_VC; v++)
        if (v_del[v]) credit_out.vc <= VCID_W'(v);
    end
  end

  // At most one flit leaves the port per cycle, so at most one credit.
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(v_del));

endmodule
