// tb_crossbar: random partial permutations of inputs to outputs; each output
// must carry the flit of the input that names it, or an all-zero flit.
module tb_crossbar;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  flit_t    in_flit  [NUM_PORTS];
  portset_t in_port  [NUM_PORTS];
  flit_t    out_flit [NUM_PORTS];

  crossbar dut (.in_flit, .in_port, .out_flit);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int perm [NUM_PORTS];
      int src  [NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++) begin perm[i] = i; src[i] = -1; end
      perm.shuffle();
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i] = flit_t'({$urandom, $urandom, $urandom, $urandom});
        in_flit[i].valid = 1'b1;
        in_port[i] = '0;
        if ($urandom_range(3) != 0) begin
          in_port[i][perm[i]] = 1'b1;
          src[perm[i]] = i;
        end
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_flit[o] !== ((src[o] >= 0) ? in_flit[src[o]] : flit_t'('0))) begin
          failures++;
          $display("FAIL output %0d", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
