// tb_conn_id_table: Connection ID Table. Checks reset to zero, synchronous
// read (data one cycle after read_en, held while read_en is low), writes
// indexed by the low 4 address bits, simultaneous read and write (old data
// when both hit one entry), against a reference array.
module tb_conn_id_table;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        read_en = 0, write_en = 0;
  logic [31:0] read_addr = 0, write_addr = 0, write_data = 0, inj_id;
  conn_id_table dut (.clk, .rst_n, .read_en, .read_addr, .inj_id, .write_en, .write_addr, .write_data);
  logic [31:0] ref_mem [16];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q;
    foreach (ref_mem[i]) ref_mem[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // all entries read zero after reset
    for (int i = 0; i < 16; i++) begin
      read_en = 1; read_addr = 32'h00FFFD10 + 32'(i);
      @(negedge clk);
      check(inj_id == 32'h0, $sformatf("entry %0d zero after reset", i));
    end
    read_en = 0;
    // random traffic
    exp_q = inj_id;
    for (int k = 0; k < 200; k++) begin
      read_en    = 1'($urandom);
      write_en   = 1'($urandom);
      read_addr  = $urandom;
      write_addr = $urandom;
      write_data = $urandom;
      @(negedge clk);
      if (read_en) exp_q = ref_mem[read_addr[3:0]];
      if (write_en) ref_mem[write_addr[3:0]] = write_data;
      check(inj_id == exp_q, $sformatf("cycle %0d: inj_id %08h exp %08h", k, inj_id, exp_q));
    end
    // same entry read and written in one cycle returns old data
    write_en = 1; write_addr = 32'h5; write_data = 32'h77;
    read_en = 1; read_addr = 32'h5;
    exp_q = ref_mem[5];
    @(negedge clk);
    check(inj_id == exp_q, "read during write returns old data");
    write_en = 0;
    @(negedge clk);
    check(inj_id == 32'h77, "written data read next");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
