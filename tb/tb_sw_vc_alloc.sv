// tb_sw_vc_alloc: random request patterns. For every output port, a grant
// must go to exactly one requester when there is any (and to none
// otherwise); each input's grant must match the output grants; the VC given
// is the port's free VC for a VA request and the held VC otherwise; the
// release flag follows the winner. A reference round-robin pointer per
// output predicts which requester wins.
module tb_sw_vc_alloc;
  import noc_pkg::*;
  localparam int P = NUM_PORTS;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [P-1:0]      req, req_need_va, req_last, in_grant, out_grant, out_va, out_last;
  logic [2:0]        req_port [P];
  logic [VCID_W-1:0] req_vc [P], free_vc [P], in_grant_vc [P], out_vc [P];

  sw_vc_alloc dut (.*);

  int checks = 0, failures = 0;
  int mprio [P];

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int o = 0; o < P; o++) mprio[o] = 0;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      int win [P];
      @(negedge clk);
      for (int i = 0; i < P; i++) begin
        req[i]         = ($urandom_range(3) != 0);
        req_port[i]    = 3'($urandom_range(P - 1));
        req_need_va[i] = $urandom_range(1);
        req_last[i]    = $urandom_range(1);
        req_vc[i]      = VCID_W'($urandom);
        free_vc[i]     = VCID_W'($urandom);
      end
      #1;
      for (int o = 0; o < P; o++) begin
        win[o] = -1;
        for (int k = P - 1; k >= 0; k--) begin
          int i;
          i = (mprio[o] + k) % P;
          if (req[i] && int'(req_port[i]) == o) win[o] = i;
        end
        chk(out_grant[o] == (win[o] >= 0), $sformatf("t=%0d output %0d grant", t, o));
        if (win[o] >= 0) begin
          chk(out_va[o] == req_need_va[win[o]] && out_last[o] == req_last[win[o]],
              $sformatf("t=%0d output %0d flags", t, o));
          chk(out_vc[o] == (req_need_va[win[o]] ? free_vc[o] : req_vc[win[o]]),
              $sformatf("t=%0d output %0d vc", t, o));
        end
      end
      for (int i = 0; i < P; i++) begin
        bit g;
        g = req[i] && win[req_port[i]] == i;
        chk(in_grant[i] == g, $sformatf("t=%0d input %0d grant", t, i));
        if (g && req_need_va[i])
          chk(in_grant_vc[i] == free_vc[req_port[i]], $sformatf("t=%0d input %0d vc", t, i));
      end
      @(posedge clk);
      for (int o = 0; o < P; o++) if (win[o] >= 0) mprio[o] = (win[o] + 1) % P;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
