// tb_input_unit: one input port of the router at (1,1), fed over its link
// with packets on two VCs at once (flits of the two interleaved), under
// credit flow control driven by the unit's own credit output. Grants,
// free-VC and credit status are random. Checks:
//   * the first head can request two cycles after it is on the link
//     (link register, then buffer write with routing computation);
//   * the ST register holds the granted flit with a one-hot port, one cycle
//     after the grant;
//   * per output port, each packet's flits appear once, in order, with
//     fragments (tracked per input VC, since the output VCs granted here
//     are random) well formed and virtual heads repeating the head payload;
//   * every flit sent returns exactly one credit, on its own VC.
module tb_input_unit;
  import noc_pkg::*;
  localparam int NPKT = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t link_in, st_flit;
  credit_t credit_out;
  logic [NUM_PORTS-1:0] port_free;
  logic [MAX_VC-1:0] credit_ok [NUM_PORTS];
  logic req, req_need_va, req_last, grant, ev_frag, ev_vhead;
  logic [2:0] req_port;
  logic [VCID_W-1:0] req_vc, grant_vc;
  portset_t st_port;

  xcoord_t x = 2'd1;
  ycoord_t y = 2'd1;
  input_unit dut (.*);

  int checks = 0, failures = 0;
  int cred [2];
  int sent_vc [2], cred_vc [2];
  dest_t pk_dest [NPKT];
  logic [PAYLOAD_W-1:0] pk_hpay [NPKT];
  int exp_idx [NPKT][NUM_PORTS];
  bit open_f [NUM_PORTS][MAX_VC];
  int n_frag = 0;
  bit exp_st = 0;
  flit_t exp_flit;
  int exp_port;
  bit started = 0;
  bit timing_done = 0;   // all ports free until the first-head timing check

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  function automatic dest_t sub(dest_t d, int p);
    dest_t r = '0;
    for (int n = 0; n < 16; n++) begin
      int nx = n % 4, ny = n / 4, q;
      q = (nx > 1) ? P_EAST : (nx < 1) ? P_WEST : (ny > 1) ? P_NORTH : (ny < 1) ? P_SOUTH : P_LOCAL;
      r[n] = d[n] && q == p;
    end
    return r;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // sources: packet k goes on VC k % 2
  initial begin
    int nxt [2], idx [2];
    link_in = '0;
    cred[0] = VC_DEPTH; cred[1] = VC_DEPTH;
    for (int v = 0; v < 2; v++) begin nxt[v] = v; idx[v] = 0; sent_vc[v] = 0; cred_vc[v] = 0; end
    for (int k = 0; k < NPKT; k++) begin
      pk_dest[k] = (k % 4 == 0) ? dest_t'(1) << $urandom_range(15) : dest_t'($urandom) | 16'h0001;
      for (int p = 0; p < NUM_PORTS; p++) exp_idx[k][p] = 0;
    end
    for (int p = 0; p < NUM_PORTS; p++) for (int v = 0; v < MAX_VC; v++) open_f[p][v] = 0;
    repeat (3) @(posedge clk);
    // directed: first head, link-to-request timing
    @(negedge clk);
    while (nxt[0] < NPKT || nxt[1] < NPKT) begin
      int v;
      v = int'($urandom_range(1));
      if (nxt[v] >= NPKT) v = 1 - v;
      link_in = '0;
      if ((idx[v] == 0 ? cred[v] == VC_DEPTH : cred[v] > 0) && (!started || $urandom_range(3) != 0)) begin
        flit_t f;
        int k;
        k = nxt[v];
        f.valid = 1; f.vcid = VCID_W'(v);
        f.ftype = (idx[v] == 0) ? FT_HEAD : (idx[v] == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
        f.dest  = (idx[v] == 0) ? pk_dest[k] : dest_t'($urandom);
        f.payload = {$urandom, $urandom, $urandom, $urandom};
        f.payload[15:0] = {8'(k), 8'(idx[v])};
        if (idx[v] == 0) pk_hpay[k] = f.payload;
        link_in = f; cred[v]--; sent_vc[v]++;
        if (!started) begin
          started = 1;
          @(posedge clk); #1;
          chk(!req, "request before the flit is buffered");
          link_in = '0;
          @(posedge clk); #1;
          chk(req && req_need_va, "head not requesting two cycles after the link");
          timing_done = 1;
          @(negedge clk);
        end
        idx[v]++;
        if (idx[v] == PKT_FLITS) begin idx[v] = 0; nxt[v] += 2; end
      end
      @(negedge clk);
    end
    link_in = '0;
  end

  always @(posedge clk) if (rst_n && credit_out.valid) begin
    cred[credit_out.vc]++;
    cred_vc[credit_out.vc]++;
  end

  always @(negedge clk) begin
    for (int p = 0; p < NUM_PORTS; p++) begin
      port_free[p] = !timing_done || $urandom_range(3) != 0;
      credit_ok[p] = MAX_VC'($urandom) | MAX_VC'($urandom);
    end
    grant_vc = VCID_W'($urandom);
    #1;
    grant = req && started && $urandom_range(3) != 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (exp_st) begin
        chk(st_flit == exp_flit && st_port == portset_t'(1) << exp_port, "ST register content");
      end else begin
        chk(st_port == '0 && !st_flit.valid, "ST register not empty without a grant");
      end
      exp_st = 0;
      if (grant) begin
        int p, id, idx, iv;
        flit_t f;
        p = int'(req_port);
        f = dut.v_flit[dut.vidx];
        exp_st = 1; exp_flit = f; exp_port = p;
        id = int'(f.payload[15:8]); idx = int'(f.payload[7:0]);
        chk(sub(pk_dest[id], p) != 0, "flit sent off its route");
        iv = int'(dut.vidx);
        if (is_head(f.ftype)) begin
          chk(!open_f[p][iv], "head inside an open fragment");
          open_f[p][iv] = 1;
          chk(f.dest == sub(pk_dest[id], p), "head destination");
        end else chk(open_f[p][iv], "flit outside a fragment");
        if (f.ftype == FT_VHEAD) chk(f.payload == pk_hpay[id], "virtual head payload");
        else begin
          chk(idx == exp_idx[id][p], $sformatf("packet %0d port %0d flit %0d want %0d",
                                               id, p, idx, exp_idx[id][p]));
          exp_idx[id][p]++;
        end
        if (is_tail(f.ftype)) open_f[p][iv] = 0;
        if (f.ftype == FT_VTAIL) n_frag++;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (started);
    repeat (6000) @(posedge clk);
    for (int k = 0; k < NPKT; k++)
      for (int p = 0; p < NUM_PORTS; p++)
        chk(exp_idx[k][p] == ((sub(pk_dest[k], p) != 0) ? PKT_FLITS : 0),
            $sformatf("packet %0d port %0d: %0d flits", k, p, exp_idx[k][p]));
    for (int v = 0; v < 2; v++)
      chk(sent_vc[v] == NPKT / 2 * PKT_FLITS && cred_vc[v] == sent_vc[v],
          $sformatf("VC %0d: %0d flits, %0d credits", v, sent_vc[v], cred_vc[v]));
    chk(n_frag > 0, "no fragmentation");
    $display("fragments %0d", n_frag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
