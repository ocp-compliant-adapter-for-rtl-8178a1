// tb_output_queue: one output queue. Loads packets of random length (last
// flit marked), applies random full, and checks that the flits come out in
// order, only when full is low, one per cycle otherwise, that ready is low
// from the cycle after load until the last flit has been put, and that the
// first flit goes out the cycle after load.
module tb_output_queue;
  import na_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic    load = 0, full = 0, put, ready;
  packet_t flit_array = '0;
  flit_t   out_flit;
  output_queue dut (.clk, .rst_n, .load, .flit_array, .full, .out_flit, .put, .ready);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ready && !put, "idle after reset");
    for (int k = 0; k < 40; k++) begin
      int n, got, cycles;
      bit randfull;
      flit_t exp[$];
      n = 1 + ($urandom % PKT_MAX);
      randfull = (k >= 5);
      exp.delete();
      got = 0;
      cycles = 0;
      flit_array = '0;
      for (int i = 0; i < PKT_MAX; i++) flit_array[i] = flit_t'($urandom) & 17'h0FFFF;
      flit_array[n-1][16] = 1'b1;
      for (int i = 0; i < n; i++) exp.push_back(flit_array[i]);
      load = 1; full = 0;
      @(negedge clk);
      load = 0;
      flit_array = '0;
      check(!ready, "not ready after load");
      if (!randfull) check(put && out_flit == exp[0], "first flit the cycle after load");
      while (got < n && cycles < 200) begin
        full = randfull ? 1'($urandom % 3 == 0) : 1'b0;
        #1;
        if (full) check(!put, "no put while full");
        if (put) begin
          check(out_flit == exp[got], $sformatf("pkt %0d flit %0d", k, got));
          got++;
        end
        check(!ready, "not ready while flits remain");
        @(negedge clk);
        cycles++;
      end
      full = 0;
      check(got == n, "all flits sent");
      #1;
      check(ready && !put, "ready after last flit");
      if (!randfull) check(cycles == n, $sformatf("one flit per cycle (%0d cycles for %0d)", cycles, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
