// tb_output_unit: random grants and credit returns against a reference model
// of the VC hold flags and credit counters. Grants are only issued as the
// router would issue them (a credit available; VA only on an allocatable
// VC), and credits only come back for flits that were sent. Checks
// port_free, free_vc (lowest allocatable VC), credit_ok, and that link_out is
// the crossbar flit one cycle later.
module tb_output_unit;
  import noc_pkg::*;
  localparam int NV = MAX_VC, D = VC_DEPTH;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              grant, grant_va, grant_last, port_free;
  logic [VCID_W-1:0] grant_vc, free_vc;
  logic [NV-1:0]     credit_ok;
  credit_t           credit_in;
  flit_t             xbar_flit, link_out, prev_x;

  output_unit dut (.*);

  int checks = 0, failures = 0;
  int  m_cred [NV];
  bit  m_held [NV];
  int  out_fl [NV];      // flits sent, credit not yet returned
  int  n_va = 0, n_rel = 0, n_zero = 0;

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
    for (int v = 0; v < NV; v++) begin m_cred[v] = D; m_held[v] = 0; out_fl[v] = 0; end
    grant = 0; grant_va = 0; grant_last = 0; grant_vc = '0; credit_in = '0; xbar_flit = '0; prev_x = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 5000; t++) begin
      bit efree; int evc; int v;
      @(negedge clk);
      // model outputs
      efree = 0; evc = 0;
      for (int k = NV - 1; k >= 0; k--)
        if (!m_held[k] && m_cred[k] == D) begin efree = 1; evc = k; end
      chk(port_free == efree && (!efree || int'(free_vc) == evc),
          $sformatf("t=%0d port_free %0d/%0d free_vc %0d/%0d", t, port_free, efree, free_vc, evc));
      for (int k = 0; k < NV; k++)
        chk(credit_ok[k] == (m_cred[k] > 0), $sformatf("credit_ok[%0d]", k));
      chk(link_out == prev_x, "link_out is not last cycle's crossbar flit");
      // stimulus
      grant = 0; grant_va = 0; grant_last = 0;
      v = int'($urandom_range(NV - 1));
      if ($urandom_range(1)) begin
        if (!m_held[v] && efree && $urandom_range(1)) begin
          grant = 1; grant_va = 1; grant_vc = VCID_W'(evc); v = evc;
        end else if (m_held[v] && m_cred[v] > 0) begin
          grant = 1; grant_vc = VCID_W'(v); grant_last = ($urandom_range(5) == 0);
        end
      end
      credit_in = '0;
      begin
        int c;
        c = int'($urandom_range(NV - 1));
        if (out_fl[c] > 0 && $urandom_range(2) == 0) begin
          credit_in = '{valid: 1'b1, vc: VCID_W'(c)};
          out_fl[c]--; m_cred[c]++;
        end
      end
      xbar_flit = flit_t'({$urandom, $urandom, $urandom, $urandom});
      prev_x = xbar_flit;
      if (grant) begin
        m_cred[v]--; out_fl[v]++;
        if (m_cred[v] == 0) n_zero++;
        if (grant_va) begin m_held[v] = 1; n_va++; end
        if (grant_last) begin m_held[v] = 0; n_rel++; end
      end
      @(posedge clk);
    end
    chk(n_va > 10 && n_rel > 10 && n_zero > 10, "stimulus did not cover allocate/release/credit-out");
    $display("allocations %0d releases %0d credit exhaustions %0d", n_va, n_rel, n_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
