// router_env: test environment around one mc_router.
//
// Every input port has a source that sends queued flits on VC 0 under credit
// flow control, starting a packet only when all credits of the VC are back.
// Every output port has a sink that always accepts and returns a credit in the
// next cycle. The sink checks what arrives against the packet table written
// by send_packet(): each packet must reach exactly the ports its destination
// bit-string routes to under XY routing (worked out here from coordinates,
// not with the design's functions), with its eight flits each once and in
// order, head destination fields cut down to the port's nodes, and every
// fragment opened by a head or virtual head and closed by a tail or virtual
// tail on the same VC. Virtual heads must repeat the packet's head payload.
//
// Payload bits [15:8] carry the packet number, [7:0] the flit index.
module router_env
  import noc_pkg::*;
#(
  parameter int X      = 1,
  parameter int Y      = 1,
  parameter int NUM_VC = 4
) (
  input logic clk,
  input logic rst_n
);
  localparam int MAXP = 64;

  flit_t   link_in    [NUM_PORTS];
  credit_t credit_out [NUM_PORTS];
  flit_t   link_out   [NUM_PORTS];
  credit_t credit_in  [NUM_PORTS];
  logic [NUM_PORTS-1:0] ev_frag, ev_vhead;

  mc_router #(.NUM_VC(NUM_VC)) dut (
    .clk, .rst_n, .x(xcoord_t'(X)), .y(ycoord_t'(Y)), .link_in, .credit_out, .link_out, .credit_in, .ev_frag, .ev_vhead
  );

  int checks = 0, failures = 0;
  int n_vtail = 0, n_vhead = 0, n_flits = 0;
  int cyc = 0;

  flit_t q [NUM_PORTS][$];
  int    cred [NUM_PORTS];

  dest_t pk_dest   [MAXP];
  int    pk_exp    [MAXP][NUM_PORTS];
  int    pk_inj    [MAXP];
  int    pk_first  [MAXP][NUM_PORTS];
  int    pk_last   [MAXP][NUM_PORTS];
  logic [PAYLOAD_W-1:0] pk_hpay [MAXP];
  int    n_pk = 0;
  logic  frag_open [NUM_PORTS][MAX_VC];

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [router X=%0d Y=%0d] %s", X, Y, msg);
    end
  endfunction

  // Output port of node n under XY routing from this router.
  function automatic int ref_port(int n);
    int nx, ny;
    nx = n % MESH_X; ny = n / MESH_X;
    if (nx > X) return P_EAST;
    if (nx < X) return P_WEST;
    if (ny > Y) return P_NORTH;
    if (ny < Y) return P_SOUTH;
    return P_LOCAL;
  endfunction

  function automatic dest_t ref_sub(dest_t d, int p);
    dest_t r = '0;
    for (int n = 0; n < NUM_NODES; n++) r[n] = d[n] && (ref_port(n) == p);
    return r;
  endfunction

  function automatic int route_ports(dest_t d);
    int c = 0;
    for (int p = 0; p < NUM_PORTS; p++) if (ref_sub(d, p) != '0) c++;
    return c;
  endfunction

  // Queue an 8-flit packet on input port ip; returns its number.
  function automatic int send_packet(int ip, dest_t d);
    int id = n_pk++;
    pk_dest[id] = d;
    pk_inj[id]  = -1;
    for (int p = 0; p < NUM_PORTS; p++) begin
      pk_exp[id][p] = 0; pk_first[id][p] = -1; pk_last[id][p] = -1;
    end
    for (int i = 0; i < PKT_FLITS; i++) begin
      flit_t f;
      f.valid   = 1'b1;
      f.ftype   = (i == 0) ? FT_HEAD : (i == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
      f.vcid    = '0;
      f.dest    = (i == 0) ? d : dest_t'($urandom);
      f.payload = {$urandom, $urandom, $urandom, $urandom};
      f.payload[15:0] = {8'(id), 8'(i)};
      if (i == 0) pk_hpay[id] = f.payload;
      q[ip].push_back(f);
    end
    return id;
  endfunction

  // sources
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        link_in[p] <= '0;
        cred[p]    <= VC_DEPTH;
      end
    end else begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        automatic int c = cred[p] + ((credit_out[p].valid && credit_out[p].vc == '0) ? 1 : 0);
        link_in[p] <= '0;
        if (q[p].size() > 0 &&
            (is_head(q[p][0].ftype) ? (c == VC_DEPTH) : (c > 0))) begin
          automatic flit_t f = q[p].pop_front();
          link_in[p] <= f;
          c--;
        end
        cred[p] <= c;
      end
    end
  end

  // sinks and checker
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        credit_in[p] <= '0;
        for (int v = 0; v < MAX_VC; v++) frag_open[p][v] = 1'b0;
      end
    end else begin
      cyc++;
      for (int p = 0; p < NUM_PORTS; p++)
        if (link_in[p].valid && link_in[p].ftype == FT_HEAD)
          pk_inj[link_in[p].payload[15:8]] = cyc;
      for (int p = 0; p < NUM_PORTS; p++) begin
        automatic flit_t f = link_out[p];
        credit_in[p] <= '0;
        if (f.valid) begin
          automatic int id  = int'(f.payload[15:8]);
          automatic int idx = int'(f.payload[7:0]);
          credit_in[p] <= '{valid: 1'b1, vc: f.vcid};
          n_flits++;
          chk(id < n_pk, $sformatf("unknown packet %0d on port %0d", id, p));
          chk(ref_sub(pk_dest[id], p) != '0,
              $sformatf("packet %0d on port %0d outside its route", id, p));
          chk(int'(f.vcid) < NUM_VC, "VCID out of range");
          if (is_head(f.ftype)) begin
            chk(!frag_open[p][f.vcid], $sformatf("head inside open fragment, port %0d", p));
            frag_open[p][f.vcid] = 1'b1;
            chk(f.dest == ref_sub(pk_dest[id], p),
                $sformatf("packet %0d port %0d dest %h, want %h", id, p, f.dest,
                          ref_sub(pk_dest[id], p)));
            if (pk_first[id][p] < 0) pk_first[id][p] = cyc;
          end else begin
            chk(frag_open[p][f.vcid], $sformatf("flit outside a fragment, port %0d", p));
          end
          if (f.ftype == FT_VHEAD) begin
            n_vhead++;
            chk(f.payload == pk_hpay[id], "virtual head payload differs from head");
            chk(pk_exp[id][p] > 0, "virtual head before the original head");
          end else begin
            chk(idx == pk_exp[id][p],
                $sformatf("packet %0d port %0d flit %0d, want %0d", id, p, idx, pk_exp[id][p]));
            chk((idx == 0) == (f.ftype == FT_HEAD), "head type / index mismatch");
            chk((idx == PKT_FLITS - 1) == (f.ftype == FT_TAIL), "tail type / index mismatch");
            pk_exp[id][p]++;
          end
          if (f.ftype == FT_VTAIL) n_vtail++;
          if (is_tail(f.ftype)) frag_open[p][f.vcid] = 1'b0;
          if (f.ftype == FT_TAIL) pk_last[id][p] = cyc;
        end
      end
    end
  end

  // All queued packets delivered everywhere?
  function automatic bit all_done();
    for (int id = 0; id < n_pk; id++)
      for (int p = 0; p < NUM_PORTS; p++)
        if (ref_sub(pk_dest[id], p) != '0 && pk_exp[id][p] != PKT_FLITS) return 0;
    return 1;
  endfunction

  function automatic void final_check();
    for (int id = 0; id < n_pk; id++)
      for (int p = 0; p < NUM_PORTS; p++)
        if (ref_sub(pk_dest[id], p) != '0)
          chk(pk_exp[id][p] == PKT_FLITS,
              $sformatf("packet %0d port %0d got %0d flits", id, p, pk_exp[id][p]));
  endfunction

endmodule
