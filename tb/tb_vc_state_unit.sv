// tb_vc_state_unit: directed sequences through the VC state machine.
//   A. unicast packet: start, VA only when the port has a free VC, the
//      granted VC is kept, body flits request only with a credit, no
//      fragmentation when the buffer runs dry, tail returns to idle.
//   B. multicast packet: the last available body flit with nothing arriving
//      is sent as a virtual tail and releases the VC; nothing is requested
//      until a new flit arrives; then a virtual head is requested (VA), sent
//      without consuming a buffered flit, and the remaining flits follow.
//   C. the same with a flit arriving in the same cycle: no fragmentation.
//   D. pointer bookkeeping when the buffer deletes its oldest flit.
module tb_vc_state_unit;
  import noc_pkg::*;
  localparam int CW = $clog2(VC_DEPTH + 1);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start, multicast, arriving, port_free, grant, del;
  logic req, need_va, vhead, frag, last, sends_buf;
  logic [CW-1:0] occ, ptr;
  flit_type_e cur_type;
  logic [MAX_VC-1:0] credit_ok;
  logic [VCID_W-1:0] grant_vc, out_vc;

  vc_state_unit dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic idle_inputs();
    start = 0; grant = 0; del = 0; arriving = 0;
  endtask

  task automatic cyc();
    @(posedge clk); #1; idle_inputs();
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    idle_inputs();
    multicast = 0; port_free = 0; occ = '0; cur_type = FT_HEAD;
    credit_ok = '1; grant_vc = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    chk(!req, "idle unit requests");

    // A. unicast
    start = 1; arriving = 1; cyc();
    occ = 1; cur_type = FT_HEAD;
    chk(need_va && !req, "SA/VA request without a free VC");
    port_free = 1; #1;
    chk(req && need_va && !vhead, "no VA request for the head");
    #1 grant = req; grant_vc = 2; #1;
    chk(sends_buf && !last && !frag, "head grant flags");
    cyc();
    chk(out_vc == 2 && ptr == 1 && !need_va, "VC not kept after VA");
    cur_type = FT_BODY; #1;
    chk(!req, "request with no flit available");
    occ = 2; credit_ok = 4'b1011; #1;
    chk(!req, "request without a credit on the held VC");
    credit_ok = '1; #1;
    chk(req && !frag && !last, "unicast body: request, no fragmentation");
    #1 grant = req; cyc();
    chk(ptr == 2, "pointer after body");
    occ = 3; cur_type = FT_TAIL; #1;
    chk(req && last && !frag, "tail ends the hold");
    #1 grant = req; cyc();
    chk(!req && !need_va, "unit not idle after tail");

    // B. multicast with fragmentation
    occ = 0; start = 1; cyc();
    multicast = 1; occ = 1; cur_type = FT_HEAD; grant_vc = 1; #1;
    chk(req && need_va, "multicast head VA request");
    #1 grant = req; cyc();
    occ = 3; cur_type = FT_BODY; #1;
    chk(req && !frag, "not the last flit: no fragmentation");
    #1 grant = req; cyc();
    chk(ptr == 2, "pointer");
    #1;
    chk(req && frag && last, "last available body flit must fragment");
    #1 grant = req; cyc();
    chk(!req && ptr == 3, "request after fragmentation without a new flit");
    cyc();
    chk(!req, "still waiting");
    occ = 4; cyc();           // a new flit is now in the buffer
    #1;
    chk(req && need_va && vhead, "virtual head VA request after new flit");
    #1 grant = req; grant_vc = 3; #1;
    chk(!sends_buf, "virtual head consumed a buffered flit");
    cyc();
    chk(out_vc == 3 && ptr == 3 && !need_va, "state after virtual head");
    cur_type = FT_TAIL; #1;
    chk(req && last && !frag, "tail after a fragment");
    #1 grant = req; cyc();
    chk(!req, "not idle after tail");

    // C. a flit arriving in the same cycle prevents fragmentation
    occ = 0; start = 1; cyc();
    occ = 1; cur_type = FT_HEAD; #1 grant = req; cyc();
    cur_type = FT_BODY; occ = 2; arriving = 1; #1;
    chk(req && !frag, "fragmented although a flit is arriving");
    arriving = 0; #1;
    chk(frag, "no fragmentation once nothing arrives");

    // D. deletion moves the pointer back
    del = 1; cyc();
    chk(ptr == 0, "pointer after deletion");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
