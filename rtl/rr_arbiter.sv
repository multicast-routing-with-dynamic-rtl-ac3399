// rr_arbiter: N-input round-robin arbiter.
//
// Used for the three arbitration levels of the router: the P:1 arbiter that
// picks one VC-state request inside an input VC, the V:1 arbiter that picks
// one input VC per input port, and the per-output-port switch arbiter. The
// design description names these arbiters but not their policy; round robin
// is this design's choice.
//
// Interface: req is a request vector, gnt the one-hot grant (combinational,
// same cycle). When upd is high the priority moves to the input just after
// the granted one at the next clock edge, so an input that keeps requesting
// is served at least once every N grants.
module rr_arbiter #(
  parameter int N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         upd,
  output logic [N-1:0] gnt,
  output logic [$clog2(N > 1 ? N : 2)-1:0] gnt_idx
);
  localparam int IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] prio;  // index with highest priority

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int k = N - 1; k >= 0; k--) begin
      if (req[(int'(prio) + k) % N]) begin
        gnt     = '0;
        gnt[(int'(prio) + k) % N] = 1'b1;
        gnt_idx = IW'((int'(prio) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      prio <= '0;
    else if (upd && (req != '0))
      prio <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
