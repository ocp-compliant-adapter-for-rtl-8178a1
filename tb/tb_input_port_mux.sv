// tb_input_port_mux: the input-port multiplexer forwards the flit of the VC
// named by in_ch_sel. Random flits on all eight VCs, every selection.
module tb_input_port_mux;
  import na_pkg::*;
  int checks = 0, failures = 0;
  flit_t [7:0] in_flits;
  logic [2:0]  in_ch_sel;
  flit_t       in_flit;
  input_port_mux dut (.in_flits, .in_ch_sel, .in_flit);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int r = 0; r < 50; r++) begin
      for (int v = 0; v < 8; v++) in_flits[v] = flit_t'($urandom);
      for (int s = 0; s < 8; s++) begin
        in_ch_sel = 3'(s);
        #1;
        checks++;
        if (in_flit !== in_flits[s]) begin
          failures++;
          $display("FAIL sel %0d got %05h exp %05h", s, in_flit, in_flits[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
