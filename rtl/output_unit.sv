// output_unit: output-VC state, credit counters and output link register of
// one router output port.
//
// For each of the NUM_VC output VCs it keeps a hold flag and a credit counter
// (free slots in the matching downstream input VC, DEPTH after reset).
// An output VC can be allocated (VA) when it is not held and all its credits
// are back, so that the downstream input VC is empty when a new packet or
// fragment starts in it. It is held from the VA grant of a head or virtual
// head until the grant of a tail or virtual tail; releasing it at the virtual
// tail is what lets another packet use the VC after a fragmentation.
// free_vc names the lowest-numbered allocatable VC; port_free says one exists.
//
// Each grant costs one credit of the flit's VC in the same cycle; a credit
// from downstream adds one in the next cycle. The flit from the crossbar is
// registered into link_out (end of ST); LT follows on the wire.
//
// Holding and releasing output VCs follow the design description; the
// credit-based flow control and the "all credits back" rule for reuse are
// this design's choices.
module output_unit
  import noc_pkg::*;
#(
  parameter int DEPTH  = VC_DEPTH,
  parameter int NUM_VC = MAX_VC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              grant,
  input  logic [VCID_W-1:0] grant_vc,
  input  logic              grant_va,    // grant allocates grant_vc
  input  logic              grant_last,  // grant releases grant_vc
  input  credit_t           credit_in,
  input  flit_t             xbar_flit,
  output flit_t             link_out,
  output logic              port_free,
  output logic [VCID_W-1:0] free_vc,
  output logic [NUM_VC-1:0] credit_ok
);
  localparam int CW = $clog2(DEPTH + 1);

  logic [NUM_VC-1:0] held;
  logic [CW-1:0]     cred [NUM_VC];
  logic [NUM_VC-1:0] dec, inc;     // credit spent / returned this cycle

  always_comb begin
    port_free = 1'b0;
    free_vc   = '0;
    for (int v = NUM_VC - 1; v >= 0; v--) begin
      dec[v]       = grant && (int'(grant_vc) == v);
      inc[v]       = credit_in.valid && (int'(credit_in.vc) == v);
      credit_ok[v] = (cred[v] != '0);
      if (!held[v] && (cred[v] == CW'(DEPTH))) begin
        port_free = 1'b1;
        free_vc   = VCID_W'(v);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held     <= '0;
      link_out <= '0;
      for (int v = 0; v < NUM_VC; v++) cred[v] <= CW'(DEPTH);
    end else begin
      link_out <= xbar_flit;
      for (int v = 0; v < NUM_VC; v++) begin
        cred[v] <= cred[v] - CW'(dec[v]) + CW'(inc[v]);
        if (dec[v] && grant_va)   held[v] <= 1'b1;
        if (dec[v] && grant_last) held[v] <= 1'b0;
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   grant |-> credit_ok[grant_vc]);
  assert property (@(posedge clk) disable iff (!rst_n)
                   (grant && grant_va) |-> (!held[grant_vc] && cred[grant_vc] == CW'(DEPTH)));

endmodule
