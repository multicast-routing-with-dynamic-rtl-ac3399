// tb_input_vc: one input VC of the router at (1,1) (node 5) fed with a
// series of 8-flit packets, unicast and multicast, with random gaps between
// flits; output ports randomly have or lack a free VC and credits, and
// requests are granted at random. For each output port the test rebuilds
// the stream it was sent and checks it: only ports on the XY route of the
// packet, each flit once and in order, head destination fields reduced to
// that port's nodes, fragments closed by a tail or virtual tail before the
// next head, virtual heads repeating the head payload, VCID equal to the VC
// granted at VA. Every written flit must be deleted exactly once, and the
// gaps must cause at least one fragmentation.
module tb_input_vc;
  import noc_pkg::*;
  localparam int CW = $clog2(VC_DEPTH + 1);
  localparam int NPKT = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr, port_wr, rc_multicast, req, req_need_va, req_last, grant, del, ev_frag, ev_vhead;
  flit_t wr_flit, out_flit;
  portset_t rc_ports;
  logic [NUM_PORTS-1:0] port_free;
  logic [MAX_VC-1:0] credit_ok [NUM_PORTS];
  logic [2:0] req_port;
  logic [VCID_W-1:0] req_vc, grant_vc;
  logic [CW-1:0] occ;
  dest_t rc_pd [NUM_PORTS];

  xcoord_t x = 2'd1;
  ycoord_t y = 2'd1;
  route_comp u_rc (.x, .y, .dest(wr_flit.dest), .ports(rc_ports), .port_dest(rc_pd),
                                   .multicast(rc_multicast));
  assign port_wr = wr;
  input_vc dut (.*);

  int checks = 0, failures = 0;
  int n_wr = 0, n_del = 0, n_frag = 0, n_vh = 0;
  dest_t pk_dest [NPKT];
  logic [PAYLOAD_W-1:0] pk_hpay [NPKT];
  int exp_idx [NPKT][NUM_PORTS];
  int held_vc [NUM_PORTS];
  bit open_f  [NUM_PORTS];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic int ref_port(int n);
    int nx = n % 4, ny = n / 4;
    if (nx > 1) return P_EAST;
    if (nx < 1) return P_WEST;
    if (ny > 1) return P_NORTH;
    if (ny < 1) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic dest_t sub(dest_t d, int p);
    dest_t r = '0;
    for (int n = 0; n < 16; n++) r[n] = d[n] && ref_port(n) == p;
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // writer
  initial begin
    wr = 0; wr_flit = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin held_vc[p] = -1; open_f[p] = 0; end
    repeat (3) @(posedge clk);
    for (int k = 0; k < NPKT; k++) begin
      dest_t d;
      d = (k % 3 == 0) ? dest_t'(1) << $urandom_range(15) : dest_t'($urandom);
      if (d == 0) d = 16'h0200;
      pk_dest[k] = d;
      for (int p = 0; p < NUM_PORTS; p++) exp_idx[k][p] = 0;
      for (int i = 0; i < PKT_FLITS; i++) begin
        flit_t f;
        f.valid = 1; f.vcid = '0;
        f.ftype = (i == 0) ? FT_HEAD : (i == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
        f.dest  = (i == 0) ? d : dest_t'($urandom);
        f.payload = {$urandom, $urandom, $urandom, $urandom};
        f.payload[15:0] = {8'(k), 8'(i)};
        if (i == 0) pk_hpay[k] = f.payload;
        // wait for space (a head needs an empty VC) and a random gap
        @(negedge clk);
        while ((i == 0 ? occ != 0 : occ >= VC_DEPTH) || $urandom_range(2) == 0) @(negedge clk);
        wr = 1; wr_flit = f; n_wr++;
        @(negedge clk);
        wr = 0; wr_flit.valid = 0;
      end
    end
  end

  // output side
  always @(negedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_free[p] = $urandom_range(1);
      credit_ok[p] = MAX_VC'($urandom);
    end
    grant_vc = VCID_W'($urandom);
    #1;
    grant = req && $urandom_range(3) != 0;
  end

  always @(posedge clk) begin
    if (rst_n && del) n_del++;
    if (rst_n && grant) begin
      int p, id, idx;
      flit_t f;
      f = out_flit; p = int'(req_port);
      id = int'(f.payload[15:8]); idx = int'(f.payload[7:0]);
      chk(f.valid, "invalid flit granted");
      chk(sub(pk_dest[id], p) != 0, $sformatf("packet %0d sent to port %0d", id, p));
      if (req_need_va) begin
        chk(f.vcid == grant_vc, "VCID is not the granted VC");
        held_vc[p] = int'(grant_vc);
        chk(port_free[p], "VA request without a free VC");
      end else begin
        chk(int'(f.vcid) == held_vc[p] && int'(req_vc) == held_vc[p], "VCID is not the held VC");
        chk(credit_ok[p][held_vc[p]], "request without credit");
      end
      chk(req_need_va == is_head(f.ftype), "VA request for a non-head flit");
      if (is_head(f.ftype)) begin
        chk(!open_f[p], "head inside an open fragment");
        open_f[p] = 1;
        chk(f.dest == sub(pk_dest[id], p), "head destination not reduced to the port");
      end
      if (f.ftype == FT_VHEAD) begin
        n_vh++;
        chk(f.payload == pk_hpay[id] && exp_idx[id][p] > 0, "virtual head");
      end else begin
        chk(idx == exp_idx[id][p], $sformatf("packet %0d port %0d flit %0d want %0d",
                                             id, p, idx, exp_idx[id][p]));
        exp_idx[id][p]++;
      end
      chk(req_last == is_tail(f.ftype), "release flag does not match the flit type");
      if (is_tail(f.ftype)) open_f[p] = 0;
      if (f.ftype == FT_VTAIL) n_frag++;
      chk(ev_frag == (f.ftype == FT_VTAIL) && ev_vhead == (f.ftype == FT_VHEAD), "event flags");
    end
  end

  initial begin
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (n_wr == NPKT * PKT_FLITS);
    repeat (300) @(posedge clk);
    chk(n_del == n_wr, $sformatf("%0d flits deleted of %0d written", n_del, n_wr));
    for (int k = 0; k < NPKT; k++)
      for (int p = 0; p < NUM_PORTS; p++)
        chk(exp_idx[k][p] == ((sub(pk_dest[k], p) != 0) ? PKT_FLITS : 0),
            $sformatf("packet %0d port %0d sent %0d flits", k, p, exp_idx[k][p]));
    chk(n_frag > 0 && n_vh > 0, "no fragmentation happened");
    $display("fragments %0d, virtual heads %0d", n_frag, n_vh);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
