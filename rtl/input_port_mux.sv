// input_port_mux: the multiplexer at the NA input port. It forwards the flit
// waiting on the incoming virtual channel named by in_ch_sel, which the
// priority scheduler drives, to the decapsulation unit. Purely combinational;
// the thesis lists it as a block of its own (with its own area figure in
// the area breakdown), and this module keeps it separate.
module input_port_mux
  import na_pkg::*;
#(
  parameter int N_VC = NUM_VC
) (
  input  flit_t [N_VC-1:0]         in_flits,   // one flit per incoming VC
  input  logic  [$clog2(N_VC)-1:0] in_ch_sel,
  output flit_t                    in_flit
);
  always_comb begin
    in_flit = '0;
    for (int c = 0; c < N_VC; c++)
      if (in_ch_sel == $clog2(N_VC)'(c)) in_flit = in_flits[c];
  end
endmodule
