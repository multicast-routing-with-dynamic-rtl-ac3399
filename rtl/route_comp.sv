// route_comp: routing computation unit for tree-based multicast XY routing.
//
// The destination field of a head flit is a bit-string with one bit per node
// of the 4x4 mesh. Each destination is routed dimension-order (X then Y); the
// unit returns the output-port encoding, one bit per port (N, S, E, W, L),
// set when at least one destination leaves through that port. More than one
// bit set marks a multidestination (multicast) packet. It also returns, per
// port, the destinations that port serves, which become the destination field
// of the copy sent there. The encoding and the XY routing follow the design
// description; computing per-port subsets with direction masks is this
// design's own way of doing it.
//
// Purely combinational; the input unit latches the result when the head
// flit is written (BW/RC stage). The router's coordinates are inputs, so
// every router of the mesh is the same circuit.
module route_comp
  import noc_pkg::*;
(
  input  xcoord_t  x,          // this router's position
  input  ycoord_t  y,
  input  dest_t    dest,
  output portset_t ports,
  output dest_t    port_dest [NUM_PORTS],
  output logic     multicast
);
  port_masks_t pmask;

  always_comb begin
    pmask = port_masks(int'(x), int'(y));
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_dest[p] = dest & pmask[p];
      ports[p]     = |port_dest[p];
    end
    multicast = ($countones(ports) > 1);
  end
endmodule
