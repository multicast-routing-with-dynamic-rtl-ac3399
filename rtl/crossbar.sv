// crossbar: NUM_PORTS x NUM_PORTS switch (ST stage).
//
// Each input presents the flit in its ST register with a one-hot output
// port; each output takes the flit of the input that names it. The switch
// allocator grants each output to at most one input per cycle, so at most
// one input drives an output. An output with no input gets an invalid
// (all-zero) flit. Combinational; the output unit registers the result.
module crossbar
  import noc_pkg::*;
(
  input  flit_t    in_flit [NUM_PORTS],
  input  portset_t in_port [NUM_PORTS],
  output flit_t    out_flit [NUM_PORTS]
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < NUM_PORTS; i++)
        if (in_port[i][o]) out_flit[o] = in_flit[i];
    end
  end
endmodule
