// tb_encap: encapsulation unit. For each request type (GS setup, GS
// teardown, BE read/write, GS read/write) it presents request_phase with a
// message, compares the packet with one built independently
// (tb_na_util_pkg), and checks the chosen VC: the Connection ID Table's
// outgoing VC for GS requests, the lowest free best-effort VC otherwise.
// With both BE VCs held the unit must wait (no packet_sent) and send as soon
// as one is released (one cycle later); a held GS VC likewise. packet_sent comes two cycles
// after request_phase when the VC is free.
module tb_encap;
  import na_pkg::*;
  import tb_na_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic        request_phase = 0;
  enc_msg_t    enc_msg = '0;
  logic [15:0] route_path = '0;
  logic [31:0] inj_id = '0;
  logic [7:0]  hold = '0;
  logic        packet_sent;
  logic [2:0]  out_ch_sel;
  packet_t     packet;
  encap dut (.clk, .rst_n, .request_phase, .enc_msg, .route_path, .inj_id, .hold,
             .packet_sent, .out_ch_sel, .packet);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // present a request, wait for packet_sent, compare
  task automatic run(ptype_e pt, logic [2:0] mcmd, logic [31:0] a, d, f, tpkt_t exp,
                     int exp_vc, int exp_lat, string what);
    int t0, n;
    enc_msg = '{ptype: pt, mcmd: mcmd, maddr: a, mdata: d, mflag: f, mdatainfo: 8'h2A};
    request_phase = 1;
    t0 = cyc;
    n = 0;
    while (!packet_sent && n < 300) begin @(negedge clk); n++; end
    check(packet_sent, {what, ": packet_sent"});
    if (exp_lat >= 0) check(cyc - t0 == exp_lat, $sformatf("%s: packet_sent after %0d cycles (exp %0d)", what, cyc - t0, exp_lat));
    check(out_ch_sel == 3'(exp_vc), $sformatf("%s: VC %0d (exp %0d)", what, out_ch_sel, exp_vc));
    for (int i = 0; i < PKT_MAX; i++) begin
      flit_t e = (i < exp.size()) ? exp[i] : '0;
      check(packet[i] == e, $sformatf("%s: flit %0d %05h exp %05h", what, i, packet[i], e));
    end
    request_phase = 0;
    @(negedge clk);
    check(!packet_sent, {what, ": packet_sent lasts one cycle"});
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    route_path = 16'h00A5;
    run(PT_SETUP_REQ, MCMD_RD, 32'h07FFFD00, 32'h4F, 32'h15,
        setup_req(16'h00A5, 32'h07FFFD00, 8'h2A, 32'h4F, 32'h15), 0, 2, "setup");
    run(PT_TEAR_REQ, MCMD_WR, 32'h07FFFD00, 32'h0, 32'h00FFFD13,
        tear_req(16'h00A5, 32'h07FFFD00, 8'h2A, 32'h00FFFD13), 0, 2, "teardown");
    route_path = 16'h0002;
    run(PT_BE_REQ, MCMD_RD, 32'h05000010, 32'h0, 32'h0,
        be_req(16'h0002, 32'h05000010, MCMD_RD, 8'h2A, 32'h0), 0, 2, "BE read");
    hold = 8'b0000_0001;
    run(PT_BE_REQ, MCMD_WR, 32'h05000014, 32'h11223344, 32'h0,
        be_req(16'h0002, 32'h05000014, MCMD_WR, 8'h2A, 32'h11223344), 1, 2, "BE write, VC0 held");
    inj_id = 32'h0000_0053;
    hold = 8'b0000_0011;
    run(PT_GS_REQ, MCMD_RD, 32'h07000100, 32'h0, 32'h00FFFD13,
        gs_req(MCMD_RD, 8'h13, 32'h07000100, 32'h0), 5, 2, "GS read");
    run(PT_GS_REQ, MCMD_WR, 32'h07000104, 32'hCAFEF00D, 32'h00FFFD13,
        gs_req(MCMD_WR, 8'h13, 32'h07000104, 32'hCAFEF00D), 5, 2, "GS write");
    // both BE VCs held: wait, then VC1 frees
    fork
      run(PT_BE_REQ, MCMD_WR, 32'h05000018, 32'h55, 32'h0,
          be_req(16'h0002, 32'h05000018, MCMD_WR, 8'h2A, 32'h55), 1, 11, "BE write waits");
      begin
        repeat (10) @(negedge clk);
        check(!packet_sent, "no packet while BE VCs held");
        hold = 8'b0000_0001;
      end
    join
    // held GS VC
    hold = 8'b0010_0000;
    fork
      run(PT_GS_REQ, MCMD_RD, 32'h07000108, 32'h0, 32'h00FFFD13,
          gs_req(MCMD_RD, 8'h13, 32'h07000108, 32'h0), 5, 7, "GS read waits");
      begin
        repeat (6) @(negedge clk);
        hold = 8'b0;
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
