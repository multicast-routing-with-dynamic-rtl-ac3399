// tb_mc_router: self-checking test of one multicast router.
//
// Router A (4 VCs, the default) is at (1,1) = node 5:
//   1. a unicast packet west->east: the head must appear on the output link
//      4 cycles after it appeared on the input link (BW/RC, SA/VA, ST, LT),
//      and the whole packet must follow;
//   2. a multicast packet from the west to nodes 1, 5, 7 and 9 must be copied
//      to the S, L, E and N ports with destination fields cut per port.
// Router B has one VC per port, so the two-packet deadlock of the design
// description happens: a packet from the west and one from the east both go
// to the north and the south. Without fragmentation neither finishes. The
// test requires that both complete, with at least one virtual tail and one
// virtual head, and that every output still sees well-formed fragments.
module tb_mc_router;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  router_env #(.X(1), .Y(1), .NUM_VC(4)) env_a (.clk, .rst_n);
  router_env #(.X(1), .Y(1), .NUM_VC(1)) env_b (.clk, .rst_n);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog: a router did not drain");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + env_a.checks + env_b.checks, failures + 1 + env_a.failures + env_b.failures);
    $finish;
  end

  function automatic dest_t nodes(int a, int b = -1, int c = -1, int d = -1);
    dest_t r = '0;
    r[a] = 1'b1;
    if (b >= 0) r[b] = 1'b1;
    if (c >= 0) r[c] = 1'b1;
    if (d >= 0) r[d] = 1'b1;
    return r;
  endfunction

  initial begin
    int id, lat;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. unicast latency
    id = env_a.send_packet(P_WEST, nodes(7));
    while (!env_a.all_done()) @(posedge clk);
    lat = env_a.pk_first[id][P_EAST] - env_a.pk_inj[id];
    checks++;
    if (lat != 4) begin
      failures++;
      $display("FAIL unicast head latency %0d cycles, want 4", lat);
    end
    checks++;
    if (env_a.pk_last[id][P_EAST] - env_a.pk_first[id][P_EAST] > 16) begin
      failures++;
      $display("FAIL unicast packet took %0d cycles after its head",
               env_a.pk_last[id][P_EAST] - env_a.pk_first[id][P_EAST]);
    end

    // 2. multicast replication to four ports
    id = env_a.send_packet(P_WEST, nodes(1, 5, 7, 9));
    while (!env_a.all_done()) @(posedge clk);
    repeat (10) @(posedge clk);

    // 3. the two-packet deadlock, twice
    for (int r = 0; r < 2; r++) begin
      void'(env_b.send_packet(P_WEST, nodes(9, 1)));
      repeat (1) @(posedge clk);
      void'(env_b.send_packet(P_EAST, nodes(13, 1)));
    end
    while (!env_b.all_done()) @(posedge clk);
    repeat (20) @(posedge clk);

    env_a.final_check();
    env_b.final_check();
    checks++;
    if (env_b.n_vtail == 0) begin failures++; $display("FAIL no virtual tail"); end
    checks++;
    if (env_b.n_vhead == 0) begin failures++; $display("FAIL no virtual head"); end
    checks++;
    if (env_a.n_vtail != 0) begin
      failures++; $display("FAIL fragmentation without contention");
    end
    $display("router A: %0d flits; router B: %0d flits, %0d virtual tails, %0d virtual heads",
             env_a.n_flits, env_b.n_flits, env_b.n_vtail, env_b.n_vhead);
    $display("TB_RESULT checks=%0d failures=%0d",
             checks + env_a.checks + env_b.checks, failures + env_a.failures + env_b.failures);
    $finish;
  end
endmodule
