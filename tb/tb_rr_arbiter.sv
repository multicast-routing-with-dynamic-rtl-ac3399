// tb_rr_arbiter: random requests against a reference round-robin model.
// The model keeps its own priority pointer: the grant goes to the first
// requester at or after the pointer, and the pointer moves past the winner
// when the update input is high. Also checks that a requester held high is
// served within N grants.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0] req, gnt;
  logic [2:0]   gnt_idx;
  logic         upd;
  int checks = 0, failures = 0;
  int mprio = 0;
  int wait_cnt = 0;

  rr_arbiter #(.N(N)) dut (.clk, .rst_n, .req, .upd, .gnt, .gnt_idx);

  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    req = '0; upd = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      logic [N-1:0] exp;
      int ei;
      @(negedge clk);
      req = N'($urandom);
      if (t >= 1000) req[2] = 1'b1;       // persistent requester
      upd = (t >= 1000) ? 1'b1 : ($urandom_range(3) != 0);
      #1;
      exp = '0; ei = 0;
      for (int k = N - 1; k >= 0; k--) begin
        int i;
        i = (mprio + k) % N;
        if (req[i]) begin exp = '0; exp[i] = 1'b1; ei = i; end
      end
      checks++;
      if (gnt !== exp || (req != 0 && int'(gnt_idx) != ei)) begin
        failures++;
        $display("FAIL t=%0d req=%b gnt=%b want %b", t, req, gnt, exp);
      end
      if (t >= 1000) begin
        wait_cnt = gnt[2] ? 0 : wait_cnt + 1;
        checks++;
        if (wait_cnt >= N) begin failures++; $display("FAIL starvation"); end
      end
      @(posedge clk);
      if (upd && req != 0) mprio = (ei + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
