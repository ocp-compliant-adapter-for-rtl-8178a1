// tb_route_lookup_table: route paths of the default table for core 0 and
// core 12 of the 5x5 mesh, compared with paths worked out by hand
// (X first, then Y; N=00 E=01 S=10 W=11; first hop in bits 1:0), and the
// all-zero path for an SBA outside the mesh.
module tb_route_lookup_table;
  int checks = 0, failures = 0;
  logic [7:0]  dest_sba;
  logic [15:0] route0, route12;
  route_lookup_table #(.MY_SBA(0))  dut0  (.dest_sba, .route_path(route0));
  route_lookup_table #(.MY_SBA(12)) dut12 (.dest_sba, .route_path(route12));

  task automatic chk(logic [7:0] d, logic [15:0] e0, logic [15:0] e12);
    dest_sba = d;
    #1;
    checks += 2;
    if (route0 !== e0)   begin failures++; $display("FAIL 0->%0d got %04h exp %04h", d, route0, e0); end
    if (route12 !== e12) begin failures++; $display("FAIL 12->%0d got %04h exp %04h", d, route12, e12); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    //        dest   from 0                          from 12 (x2,y2)
    chk(8'd0,  16'h0000,                          {8'h0, 2'b00,2'b00, 2'b11,2'b11});  // 12->0: W W N N
    chk(8'd1,  16'b01,                            {10'h0, 2'b00,2'b00, 2'b11});  // W N N
    chk(8'd5,  16'b10,                            {10'h0, 2'b00, 2'b11,2'b11});  // W W N
    chk(8'd24, {8'h0, 2'b10,2'b10,2'b10,2'b10, 2'b01,2'b01,2'b01,2'b01} ,
               {8'h0, 2'b10,2'b10, 2'b01,2'b01});
    chk(8'd12, {8'h0, 2'b10,2'b10, 2'b01,2'b01},  16'h0000);
    chk(8'd7,  {10'h0, 2'b10, 2'b01, 2'b01},      {12'h0, 2'b00, 2'b00});
    chk(8'd20, {8'h0, 2'b10,2'b10,2'b10,2'b10},   {8'h0, 2'b10,2'b10, 2'b11,2'b11});
    chk(8'd30, 16'h0,                             16'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
