// tb_mesh_noc: end-to-end test of the 4x4 multicast mesh at its default size
// (4 VCs of 4 flits per port, 128-bit flits, 8-flit packets).
//
// Each node has a behavioural network interface: it injects 8-flit packets,
// one at a time, on a free VC of its local port under credit flow control,
// and it takes every flit that is ejected, returning the credit later (at
// once, or with a random delay in the back-pressure phase). It reassembles
// packets by their flit index: a virtual head is recognised and dropped, and
// each of the eight flits of a packet must reach each of its destinations
// exactly once, with the head's destination field reduced to that node.
//
// Phases:
//   0. one unicast packet from node 0 to node 15 on an idle network: the head
//      must take 4 cycles per router (7 routers, 28 cycles);
//   1. uniform random traffic, 10% multicast (4 to 12 destinations), 30% load;
//   2. the same with 20% multicast;
//   3. 10% multicast with slow ejection, so that credits run out.
// Counted mechanisms, each required at least once: unicast delivery,
// multicast delivery, replication,
// fragmentation (virtual tail sent), virtual heads received, ejection credit
// stall. A multicast packet that reaches two or more nodes counts as one
// replication. The average number of virtual heads received per multicast packet
// is printed.
module tb_mesh_noc;
  import noc_pkg::*;

  localparam int MAXPK = 4096;
  localparam int NPK   = 20;        // packets per node per random phase

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  flit_t   inj_flit   [NUM_NODES];
  credit_t inj_credit [NUM_NODES];
  flit_t   ej_flit    [NUM_NODES];
  credit_t ej_credit  [NUM_NODES];
  logic [NUM_PORTS-1:0] ev_frag  [NUM_NODES];
  logic [NUM_PORTS-1:0] ev_vhead [NUM_NODES];

  mesh_noc dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  // packet table
  dest_t    pk_dest  [MAXPK];
  int       pk_src   [MAXPK];
  int       pk_inj   [MAXPK];
  int       pk_done  [MAXPK];
  int       pk_first [MAXPK];
  logic [PAYLOAD_W-1:0] pk_hpay [MAXPK];
  logic [7:0] rx_mask [MAXPK][NUM_NODES];
  int       n_pk = 0;

  // injection state
  int       src_q   [NUM_NODES][$];
  int       cur_pk  [NUM_NODES];
  int       cur_idx [NUM_NODES];
  int       cur_vc  [NUM_NODES];
  int       icred   [NUM_NODES][MAX_VC];

  // ejection state
  int       ecq     [NUM_NODES][$];
  bit       slow_ej = 0;
  logic     frag_open [NUM_NODES][MAX_VC];

  // statistics
  int n_uni = 0, n_mc = 0, n_vt_rx = 0, n_vh_rx = 0, n_frag = 0, n_vh_tx = 0;
  int n_repl = 0, n_stall = 0, n_ooo = 0, n_mc_rx = 0, lat_sum = 0, lat_n = 0;

  function automatic void chk(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL cyc %0d: %s", cyc, msg);
    end
  endfunction

  function automatic int new_packet(int src, dest_t d);
    int id = n_pk++;
    pk_dest[id] = d; pk_src[id] = src; pk_inj[id] = -1; pk_done[id] = 0;
    pk_first[id] = -1;
    for (int n = 0; n < NUM_NODES; n++) rx_mask[id][n] = '0;
    src_q[src].push_back(id);
    return id;
  endfunction

  function automatic dest_t rand_dest(int src, bit mc);
    dest_t d = '0;
    int k = mc ? 4 + int'($urandom_range(8)) : 1;
    while ($countones(d) < k) begin
      int n = int'($urandom_range(NUM_NODES - 1));
      if (n != src) d[n] = 1'b1;
    end
    return d;
  endfunction

  function automatic flit_t make_flit(int id, int idx, int vc);
    flit_t f;
    f.valid   = 1'b1;
    f.ftype   = (idx == 0) ? FT_HEAD : (idx == PKT_FLITS - 1) ? FT_TAIL : FT_BODY;
    f.vcid    = VCID_W'(vc);
    f.dest    = (idx == 0) ? pk_dest[id] : dest_t'(id * 7 + idx);
    f.payload = {4{32'(id * 131 + 17)}};
    f.payload[31:0] = {24'(id), 8'(idx)};
    return f;
  endfunction

  // network interfaces: injection side
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NUM_NODES; n++) begin
        inj_flit[n] <= '0;
        cur_pk[n] = -1;
        for (int v = 0; v < MAX_VC; v++) icred[n][v] = VC_DEPTH;
      end
    end else begin
      for (int n = 0; n < NUM_NODES; n++) begin
        if (inj_credit[n].valid) icred[n][inj_credit[n].vc]++;
        inj_flit[n] <= '0;
        if (cur_pk[n] < 0 && src_q[n].size() > 0) begin
          for (int v = MAX_VC - 1; v >= 0; v--)
            if (icred[n][v] == VC_DEPTH) cur_vc[n] = v;
          if (icred[n][cur_vc[n]] == VC_DEPTH) begin
            cur_pk[n]  = src_q[n].pop_front();
            cur_idx[n] = 0;
          end
        end
        if (cur_pk[n] >= 0 && icred[n][cur_vc[n]] > 0) begin
          automatic flit_t f = make_flit(cur_pk[n], cur_idx[n], cur_vc[n]);
          inj_flit[n] <= f;
          icred[n][cur_vc[n]]--;
          if (cur_idx[n] == 0) pk_hpay[cur_pk[n]] = f.payload;
          cur_idx[n]++;
          if (cur_idx[n] == PKT_FLITS) cur_pk[n] = -1;
        end
      end
    end
  end

  // network interfaces: ejection side and checker
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < NUM_NODES; n++) begin
        ej_credit[n] <= '0;
        for (int v = 0; v < MAX_VC; v++) frag_open[n][v] = 1'b0;
      end
    end else begin
      cyc++;
      for (int n = 0; n < NUM_NODES; n++)
        if (inj_flit[n].valid && inj_flit[n].ftype == FT_HEAD)
          pk_inj[inj_flit[n].payload[31:8]] = cyc;
      for (int n = 0; n < NUM_NODES; n++) begin
        automatic flit_t f = ej_flit[n];
        n_frag  += $countones(ev_frag[n]);
        n_vh_tx += $countones(ev_vhead[n]);
        ej_credit[n] <= '0;
        if (f.valid) begin
          automatic int id  = int'(f.payload[31:8]);
          automatic int idx = int'(f.payload[7:0]);
          ecq[n].push_back(int'(f.vcid));
          chk(id < n_pk && idx < PKT_FLITS, "unknown flit");
          if (id < n_pk && idx < PKT_FLITS) begin
            chk(pk_dest[id][n], $sformatf("packet %0d delivered to node %0d", id, n));
            if (is_head(f.ftype)) begin
              chk(!frag_open[n][f.vcid], "head inside an open fragment");
              frag_open[n][f.vcid] = 1'b1;
              if (f.ftype == FT_HEAD && pk_first[id] < 0) pk_first[id] = cyc;
              chk(f.dest == dest_t'(1) << n,
                  $sformatf("head dest %h at node %0d", f.dest, n));
            end else begin
              chk(frag_open[n][f.vcid], "flit outside a fragment");
            end
            if (is_tail(f.ftype)) frag_open[n][f.vcid] = 1'b0;
            if (f.ftype == FT_VTAIL) n_vt_rx++;
            if (f.ftype == FT_VHEAD) begin
              n_vh_rx++;
              chk(f.payload == pk_hpay[id], "virtual head is not a copy of the head");
            end else begin
              chk(!rx_mask[id][n][idx], $sformatf("packet %0d flit %0d twice at %0d", id, idx, n));
              chk((idx == 0) == (f.ftype == FT_HEAD), "head type / index mismatch");
              chk((idx == PKT_FLITS - 1) == (f.ftype == FT_TAIL), "tail type / index mismatch");
              if (idx > 0 && !rx_mask[id][n][idx-1]) n_ooo++;
              chk(f.payload == make_flit(id, idx, 0).payload, "payload corrupted");
              rx_mask[id][n][idx] = 1'b1;
              if (rx_mask[id][n] == 8'hff) begin
                pk_done[id]++;
                if (pk_done[id] == 2) n_repl++;
                if (pk_done[id] == $countones(pk_dest[id])) begin
                  lat_sum += cyc - pk_inj[id];
                  lat_n++;
                  if ($countones(pk_dest[id]) > 1) n_mc_rx++;
                end
              end
            end
          end
        end
        // credit return
        if (ecq[n].size() >= VC_DEPTH) n_stall++;
        if (ecq[n].size() > 0 && (!slow_ej || $urandom_range(3) == 0))
          ej_credit[n] <= '{valid: 1'b1, vc: VCID_W'(ecq[n].pop_front())};
      end
    end
  end

  function automatic bit all_done();
    for (int id = 0; id < n_pk; id++)
      if (pk_done[id] != $countones(pk_dest[id])) return 0;
    return 1;
  endfunction

  task automatic drain(int limit);
    int t = 0;
    while (!all_done() && t < limit) begin @(posedge clk); t++; end
    chk(all_done(), "traffic did not drain");
  endtask

  task automatic random_phase(int mc_pct, int load_pct);
    int made [NUM_NODES];
    for (int n = 0; n < NUM_NODES; n++) made[n] = 0;
    while (1) begin
      bit more = 0;
      for (int n = 0; n < NUM_NODES; n++) begin
        if (made[n] < NPK) begin
          more = 1;
          // load_pct % of one flit per cycle per node = load/8 packets
          if ($urandom_range(PKT_FLITS * 100 - 1) < load_pct) begin
            automatic bit mc = ($urandom_range(99) < mc_pct);
            void'(new_packet(n, rand_dest(n, mc)));
            if (mc) n_mc++; else n_uni++;
            made[n]++;
          end
        end
      end
      if (!more) break;
      @(posedge clk);
    end
    drain(4000);
  endtask

  initial begin
    repeat (15000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int id;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 0. zero-load latency through 7 routers
    id = new_packet(0, dest_t'(1) << 15);
    n_uni++;
    drain(500);
    chk(pk_first[id] - pk_inj[id] == 4 * 7,
        $sformatf("zero-load head latency %0d cycles over 7 routers, want 28",
                  pk_first[id] - pk_inj[id]));
    random_phase(10, 30);
    $display("phase 1 (10%% multicast, 30%% load): %0d packets, average latency %0d cycles",
             n_pk, lat_n ? lat_sum / lat_n : 0);
    random_phase(20, 30);
    $display("phase 2 (20%% multicast): %0d packets", n_pk);
    slow_ej = 1;
    random_phase(10, 30);
    slow_ej = 0;
    drain(4000);

    chk(n_uni > 0, "no unicast packet");
    chk(n_mc_rx > 0, "no multicast packet delivered");
    chk(n_repl > 0, "no replication at a branch router");
    chk(n_frag > 0, "no fragmentation");
    chk(n_vh_rx > 0, "no virtual head received");
    chk(n_vt_rx > 0, "no virtual tail received");
    chk(n_stall > 0, "no ejection credit stall");
    $display("packets %0d (unicast %0d, multicast %0d), branch replications %0d",
             n_pk, n_uni, n_mc, n_repl);
    $display("virtual tails sent %0d, virtual heads sent %0d, received %0d (%0d.%02d per multicast packet)",
             n_frag, n_vh_tx, n_vh_rx, n_vh_rx / (n_mc ? n_mc : 1),
             (n_vh_rx * 100 / (n_mc ? n_mc : 1)) % 100);
    $display("fragments overtaken %0d, ejection stall cycles %0d, average latency %0d",
             n_ooo, n_stall, lat_n ? lat_sum / lat_n : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
