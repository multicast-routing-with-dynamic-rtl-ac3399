// tb_route_comp: random destination bit-strings at three router positions,
// checked against XY routing worked out here from node coordinates: each
// destination's port, the per-port destination subsets, the port encoding
// and the multicast flag.
module tb_route_comp;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  dest_t    dest;
  portset_t ports [3];
  dest_t    pd    [3][NUM_PORTS];
  logic     mc    [3];

  route_comp dut0 (.x(2'd0), .y(2'd0), .dest, .ports(ports[0]), .port_dest(pd[0]), .multicast(mc[0]));
  route_comp dut1 (.x(2'd1), .y(2'd2), .dest, .ports(ports[1]), .port_dest(pd[1]), .multicast(mc[1]));
  route_comp dut2 (.x(2'd3), .y(2'd3), .dest, .ports(ports[2]), .port_dest(pd[2]), .multicast(mc[2]));

  function automatic int xy_port(int n, int x, int y);
    int nx = n % 4, ny = n / 4;
    if (nx != x) return (nx > x) ? 2 : 3;   // east : west
    if (ny != y) return (ny > y) ? 0 : 1;   // north : south
    return 4;                               // local
  endfunction

  initial begin
    int xs [3] = '{0, 1, 3};
    int ys [3] = '{0, 2, 3};
    for (int t = 0; t < 3000; t++) begin
      dest = (t < 16) ? dest_t'(1) << t : dest_t'($urandom);
      #1;
      for (int r = 0; r < 3; r++) begin
        dest_t    sub [NUM_PORTS];
        portset_t ep = '0;
        for (int p = 0; p < NUM_PORTS; p++) sub[p] = '0;
        for (int n = 0; n < 16; n++)
          if (dest[n]) sub[xy_port(n, xs[r], ys[r])][n] = 1'b1;
        for (int p = 0; p < NUM_PORTS; p++) begin
          ep[p] = (sub[p] != 0);
          checks++;
          if (pd[r][p] !== sub[p]) begin
            failures++;
            $display("FAIL router %0d port %0d dest %h: %h want %h", r, p, dest, pd[r][p], sub[p]);
          end
        end
        checks += 2;
        if (ports[r] !== ep) begin failures++; $display("FAIL ports %b want %b", ports[r], ep); end
        if (mc[r] !== ($countones(ep) > 1)) begin failures++; $display("FAIL multicast flag"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
