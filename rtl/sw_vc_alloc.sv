// sw_vc_alloc: switch and VC allocation (SA/VA stage).
//
// Every input port offers at most one request (already chosen by its P:1 and
// V:1 arbiters), naming an output port, whether it needs a VC (head or
// virtual head) and, if not, the output VC it holds. For every output port a
// round-robin arbiter picks one requesting input. VC allocation is done as
// the design description states: the SA winner that needs a VC is simply
// given a free VC of the requested port (the lowest-numbered one). Inputs
// only raise a VA request when the port has a free VC and a flit request
// only when its VC has a credit, so a switch grant never fails VA here.
//
// Combinational request-to-grant path; arbiter priorities move on a grant.
module sw_vc_alloc
  import noc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_PORTS-1:0] req,
  input  logic [2:0]        req_port    [NUM_PORTS],
  input  logic [NUM_PORTS-1:0] req_need_va,
  input  logic [NUM_PORTS-1:0] req_last,
  input  logic [VCID_W-1:0] req_vc      [NUM_PORTS],
  input  logic [VCID_W-1:0] free_vc     [NUM_PORTS],
  // per input port
  output logic [NUM_PORTS-1:0] in_grant,
  output logic [VCID_W-1:0] in_grant_vc [NUM_PORTS],
  // per output port
  output logic [NUM_PORTS-1:0] out_grant,
  output logic [VCID_W-1:0] out_vc      [NUM_PORTS],
  output logic [NUM_PORTS-1:0] out_va,
  output logic [NUM_PORTS-1:0] out_last
);
  logic [NUM_PORTS-1:0] oreq [NUM_PORTS];   // [output][input]
  logic [NUM_PORTS-1:0] ognt [NUM_PORTS];
  logic [2:0]           oidx [NUM_PORTS];

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
      assign oreq[o][i] = req[i] && (int'(req_port[i]) == o);
    end
    rr_arbiter #(.N(NUM_PORTS)) u_oarb (
      .clk, .rst_n, .req(oreq[o]), .upd(1'b1), .gnt(ognt[o]), .gnt_idx(oidx[o])
    );
  end

  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_grant[o] = |ognt[o];
      out_va[o]    = req_need_va[oidx[o]];
      out_last[o]  = req_last[oidx[o]];
      out_vc[o]    = req_need_va[oidx[o]] ? free_vc[o] : req_vc[oidx[o]];
    end
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_grant[i]    = 1'b0;
      in_grant_vc[i] = free_vc[req_port[i] < 3'(NUM_PORTS) ? req_port[i] : 3'd0];
      for (int o = 0; o < NUM_PORTS; o++)
        if (ognt[o][i]) in_grant[i] = 1'b1;
    end
  end

endmodule
