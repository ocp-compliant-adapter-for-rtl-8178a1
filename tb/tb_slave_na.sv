// tb_slave_na: end-to-end test of the slave network adapter at its default
// parameters (8 VCs, this core SBA 0x00, network controller SBA 0x0C).
//
// The testbench plays three roles around the NA:
//  - the OCP master core: issues requests, holds them until SCmdAccept, and
//    records every response (it always accepts responses at once);
//  - the synchronizer: an input FIFO per VC behind the empty/get handshake,
//    and a collector per output VC behind put/full, with full under test
//    control;
//  - the network controller and the remote slave cores: it checks each
//    request packet flit by flit against packets built independently
//    (tb_na_util_pkg) and injects the matching response packets.
// Covered: BE write and read; GS setup success and failure (Connection ID
// Table written or not); GS read and write on the VC stored for the
// connection; GS teardown (entry cleared, later GS traffic falls back to VC0,
// as it does for the connection whose setup failed);
// use of the second BE VC; back-pressure from full output VCs (encapsulation
// unit waits, SCmdAccept withheld, put stalls); input scheduling by priority,
// by arrival order and by fairness tag. Each of these mechanisms is counted
// and a mechanism that never happened counts as a failure. Cycle counts
// checked: SCmdAccept 4 cycles after the request, one request per 5 cycles,
// last request flit m+4 cycles after the request, response m+1 cycles after
// the first response flit is taken, back-to-back response packets taken one
// per m+1 cycles.
module tb_slave_na;
  import na_pkg::*;
  import tb_na_util_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int checks = 0, failures = 0;

  // DUT
  logic [2:0]  MCmd = '0;
  logic [31:0] MAddr = '0, MData = '0, MFlag = '0;
  logic [1:0]  MReqInfo = '0;
  logic        SCmdAccept;
  logic [1:0]  SResp;
  logic [31:0] SData, SDataInfo;
  logic [7:0]  in_empty;
  flit_t [7:0] in_flit;
  logic [7:0]  in_get;
  flit_t [7:0] out_flit;
  logic [7:0]  out_put;
  logic [7:0]  out_full = '0;
  logic        rx_req_valid;
  rx_msg_t     rx_req;

  slave_na dut (
    .clk, .rst_n,
    .MCmd, .MAddr, .MData, .MFlag, .MReqInfo, .MRespAccept(1'b1),
    .SCmdAccept, .SResp, .SData, .SDataInfo,
    .in_empty, .in_flit, .in_get,
    .out_flit, .out_put, .out_full,
    .rx_req_valid, .rx_req
  );

  localparam logic [7:0] NC = 8'h0C;
  localparam logic [15:0] ROUTE_TO_5  = 16'h0002;  // S
  localparam logic [15:0] ROUTE_TO_7  = 16'h0025;  // E E S
  localparam logic [15:0] ROUTE_TO_NC = 16'h00A5;  // E E S S

  // ---------------- synchronizer model: input port ----------------
  tflit_t inq [8][$];
  initial begin
    in_empty = '1;
    in_flit  = '0;
  end
  always @(posedge clk) begin
    for (int v = 0; v < 8; v++) begin
      if (in_get[v] && inq[v].size() > 0) void'(inq[v].pop_front());
      in_empty[v] <= (inq[v].size() == 0);
      in_flit[v]  <= (inq[v].size() > 0) ? inq[v][0] : '0;
    end
  end

  task automatic inject(int v, tpkt_t p);
    foreach (p[i]) inq[v].push_back(p[i]);
  endtask

  // first flit taken of each received packet, and the order of VCs served
  int  rx_start_t;
  int  served_vc[$];
  bit  mid_pkt = 0;
  always @(negedge clk) begin
    for (int v = 0; v < 8; v++) if (in_get[v] && !in_empty[v]) begin
      if (!mid_pkt) begin
        rx_start_t = cyc;
        served_vc.push_back(v);
      end
      mid_pkt = !in_flit[v][16];
    end
  end

  // cycle of every flit taken from the input port
  int take_t[$];
  always @(negedge clk) if (|(in_get & ~in_empty)) take_t.push_back(cyc);

  // ---------------- synchronizer model: output port ----------------
  tflit_t oflits [8][$];
  int     done_vc[$], done_t[$];
  always @(negedge clk) begin
    for (int v = 0; v < 8; v++) if (out_put[v]) begin
      if (out_full[v]) begin
        failures++;
        $display("FAIL put while full on VC%0d", v);
      end
      oflits[v].push_back(out_flit[v]);
      if (out_flit[v][16]) begin
        done_vc.push_back(v);
        done_t.push_back(cyc);
      end
    end
  end

  // ---------------- OCP response monitor ----------------
  typedef struct packed {logic [1:0] sresp; logic [31:0] sdata, sdatainfo; int t;} resp_t;
  resp_t rsp[$];
  always @(negedge clk) if (SResp != SRESP_NULL) rsp.push_back('{SResp, SData, SDataInfo, cyc});

  // ---------------- mechanism counters ----------------
  int m_be_write, m_be_read, m_setup_ok, m_setup_fail, m_teardown, m_gs_read,
      m_gs_write, m_be_vc1, m_encap_await, m_put_stall, m_accept_withheld,
      m_prio, m_arrival_order, m_fair, m_gs_fallback, m_rv_stream;
  // a put stall: an output VC that was full is released and the waiting
  // output queue puts its flit in the very cycle the VC frees
  logic [7:0] prev_full = '0;
  always @(posedge clk) begin
    for (int v = 0; v < 8; v++) if (prev_full[v] && !out_full[v] && out_put[v]) m_put_stall++;
    prev_full <= out_full;
  end

  // ---------------- helpers ----------------
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL [%0d] %s", cyc, what);
    end
  endtask

  // Present a request (called right after a negedge), hold it until accepted.
  task automatic ocp(input logic [2:0] c, input logic [31:0] a, d, f,
                     input logic [1:0] ri, output int t_pres, output int t_acc);
    MCmd = c; MAddr = a; MData = d; MFlag = f; MReqInfo = ri;
    t_pres = cyc;
    do @(negedge clk); while (!SCmdAccept);
    t_acc = cyc;
    if (t_acc - t_pres > 4) m_encap_await++;  // encapsulation had to wait for a VC
    @(negedge clk);
    MCmd = MCMD_IDLE; MAddr = '0; MData = '0; MFlag = '0; MReqInfo = '0;
  endtask

  task automatic expect_pkt(int v, tpkt_t exp, string what, output int t_last);
    int n = 0;
    while (oflits[v].size() < exp.size() && n < 200) begin @(negedge clk); n++; end
    check(oflits[v].size() >= exp.size(), {what, ": packet arrived"});
    t_last = -1;
    if (oflits[v].size() >= exp.size()) begin
      bit same = 1;
      foreach (exp[i]) begin
        tflit_t g = oflits[v].pop_front();
        if (g !== exp[i]) begin
          same = 0;
          $display("   flit %0d got %05h exp %05h", i, g, exp[i]);
        end
      end
      check(same, {what, ": packet contents"});
      for (int k = 0; k < done_vc.size(); k++) if (done_vc[k] == v) begin
        t_last = done_t[k];
        done_vc.delete(k);
        done_t.delete(k);
        break;
      end
    end
  endtask

  task automatic expect_resp(logic [1:0] sr, logic [31:0] sd, logic [31:0] sdi,
                             string what, output int t);
    int n = 0;
    while (rsp.size() == 0 && n < 200) begin @(negedge clk); n++; end
    check(rsp.size() > 0, {what, ": response arrived"});
    t = -1;
    if (rsp.size() > 0) begin
      resp_t r = rsp.pop_front();
      t = r.t;
      check(r.sresp == sr && r.sdata == sd && r.sdatainfo == sdi,
            $sformatf("%s: SResp=%0d SData=%08h SDataInfo=%08h (exp %0d %08h %08h)",
                      what, r.sresp, r.sdata, r.sdatainfo, sr, sd, sdi));
    end
  endtask

  function automatic bit all_quiet();
    for (int v = 0; v < 8; v++) if (oflits[v].size() != 0 || inq[v].size() != 0) return 0;
    return rsp.size() == 0;
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  localparam logic [31:0] CID_A = 32'h00FFFD13;  // connection IDs = table addresses
  localparam logic [31:0] CID_B = 32'h00FFFD1A;
  localparam logic [31:0] SLAVE7 = 32'h07FFFD00;  // setup address of core 7

  initial begin
    int tp, ta, tl, tr, tp0, ta_prev;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);

    // 1. BE write to core 5, then its response
    ocp(MCMD_WR, 32'h05001230, 32'hCAFE0001, 32'h0, RI_BE, tp, ta);
    check(ta - tp == 4, $sformatf("BE write: SCmdAccept %0d cycles after request (exp 4)", ta - tp));
    expect_pkt(0, be_req(ROUTE_TO_5, 32'h05001230, MCMD_WR, 8'h00, 32'hCAFE0001), "BE write", tl);
    check(tl - tp == 6 + 4, $sformatf("BE write: last flit %0d cycles after request (exp m+4=10)", tl - tp));
    m_be_write++;
    inject(0, be_resp(32'h00001230, 8'h05, SRESP_DVA, 1'b0, 32'h0));
    expect_resp(SRESP_DVA, 32'h0, 32'h05000000, "BE write response", tr);
    check(tr - rx_start_t == 7 + 1, $sformatf("BE write response %0d cycles after first flit (exp m+1=8)", tr - rx_start_t));

    // 2. BE read from core 7
    ocp(MCMD_RD, 32'h07000040, 32'h0, 32'h0, RI_BE, tp, ta);
    expect_pkt(0, be_req(ROUTE_TO_7, 32'h07000040, MCMD_RD, 8'h00, 32'h0), "BE read", tl);
    check(tl - tp == 4 + 4, $sformatf("BE read: last flit %0d cycles after request (exp m+4=8)", tl - tp));
    m_be_read++;
    inject(1, be_resp(32'h00000040, 8'h07, SRESP_DVA, 1'b1, 32'h12345678));
    expect_resp(SRESP_DVA, 32'h12345678, 32'h07000000, "BE read response", tr);

    // 3. GS setup to core 7 succeeds: connection CID_A, out VC5, in VC3
    ocp(MCMD_RD, SLAVE7, 32'h0000004F, 32'h00000015, RI_SETUP, tp, ta);
    expect_pkt(0, setup_req(ROUTE_TO_NC, SLAVE7, 8'h00, 32'h4F, 32'h15), "GS setup request", tl);
    inject(0, setup_resp(CID_A, SRESP_DVA, SLAVE7, 32'h00000053, NC));
    expect_resp(SRESP_DVA, CID_A, SLAVE7, "GS setup response (success)", tr);
    m_setup_ok++;

    // 4. GS setup to core 5 fails: table entry 0xA stays 0
    ocp(MCMD_RD, 32'h05FFFD00, 32'h1, 32'h2, RI_SETUP, tp, ta);
    expect_pkt(0, setup_req(ROUTE_TO_NC, 32'h05FFFD00, 8'h00, 32'h1, 32'h2), "GS setup request 2", tl);
    inject(1, setup_resp(CID_B, SRESP_FAIL, 32'h05FFFD00, 32'h000000EE, NC));
    expect_resp(SRESP_FAIL, 32'h000000EE, 32'h05FFFD00, "GS setup response (failure)", tr);
    m_setup_fail++;
    // the failed connection's table entry is still empty: GS traffic on VC0
    ocp(MCMD_RD, 32'h05000100, 32'h0, CID_B, RI_USE, tp, ta);
    expect_pkt(0, gs_req(MCMD_RD, CID_B[7:0], 32'h05000100, 32'h0), "GS read on failed connection uses VC0", tl);
    m_gs_fallback++;

    // 5. GS read and write on connection CID_A -> VC5; GS responses on VC3
    ocp(MCMD_RD, 32'h07000100, 32'h0, CID_A, RI_USE, tp, ta);
    expect_pkt(5, gs_req(MCMD_RD, CID_A[7:0], 32'h07000100, 32'h0), "GS read", tl);
    check(tl - tp == 3 + 4, $sformatf("GS read: last flit %0d cycles after request (exp m+4=7)", tl - tp));
    inject(3, gs_resp(SRESP_DVA, 1'b1, 32'hA5A5_0101));
    expect_resp(SRESP_DVA, 32'hA5A5_0101, 32'h0, "GS read response", tr);
    check(tr - rx_start_t == 3 + 1, $sformatf("GS response %0d cycles after first flit (exp m+1=4)", tr - rx_start_t));
    m_gs_read++;
    ocp(MCMD_WR, 32'h07000104, 32'hDEAD_BEEF, CID_A, RI_USE, tp, ta);
    expect_pkt(5, gs_req(MCMD_WR, CID_A[7:0], 32'h07000104, 32'hDEAD_BEEF), "GS write", tl);
    inject(3, gs_resp(SRESP_DVA, 1'b0, 32'h0));
    expect_resp(SRESP_DVA, 32'h0, 32'h0, "GS write response", tr);
    m_gs_write++;

    // 6. throughput: four BE writes back to back, alternating BE VCs
    tp0 = cyc;
    ta_prev = -1;
    for (int i = 0; i < 4; i++) begin
      ocp(MCMD_WR, 32'h05000000 + 32'(i*4), 32'(i), 32'h0, RI_BE, tp, ta);
      if (ta_prev >= 0)
        check(ta - ta_prev == 5, $sformatf("back-to-back: accept spacing %0d (exp 5)", ta - ta_prev));
      ta_prev = ta;
    end
    for (int i = 0; i < 4; i++) begin
      expect_pkt(i % 2, be_req(ROUTE_TO_5, 32'h05000000 + 32'(i*4), MCMD_WR, 8'h00, 32'(i)),
                 $sformatf("back-to-back write %0d on VC%0d", i, i % 2), tl);
      if (i % 2 == 1) m_be_vc1++;
    end
    m_be_write++;

    // 7. congestion: both BE VCs full -> third request waits
    @(negedge clk);
    out_full = 8'b0000_0011;
    fork
      begin
        for (int i = 0; i < 3; i++) begin
          ocp(MCMD_WR, 32'h05000100 + 32'(i*4), 32'h100 + 32'(i), 32'h0, RI_BE, tp, ta);
          if (i == 2) begin
            check(ta - tp > 20, $sformatf("SCmdAccept withheld under congestion (%0d cycles)", ta - tp));
            if (ta - tp > 20) m_accept_withheld++;
          end
        end
      end
      begin
        repeat (40) @(negedge clk);
        check(SCmdAccept == 1'b0 && MCmd == MCMD_WR, "third request still waiting while VCs full");
        out_full = 8'b0000_0001;  // free VC1 only
      end
    join
    expect_pkt(1, be_req(ROUTE_TO_5, 32'h05000104, MCMD_WR, 8'h00, 32'h101), "congested write 1 on VC1", tl);
    expect_pkt(1, be_req(ROUTE_TO_5, 32'h05000108, MCMD_WR, 8'h00, 32'h102), "congested write 2 waits for VC1", tl);
    check(oflits[0].size() == 0, "nothing leaves the full VC0");
    @(negedge clk);
    out_full = '0;
    expect_pkt(0, be_req(ROUTE_TO_5, 32'h05000100, MCMD_WR, 8'h00, 32'h100), "congested write 0 after release", tl);

    // 8. input scheduling
    repeat (5) @(negedge clk);
    served_vc.delete();
    // 8a. same cycle, VC0 (priority 0) and VC6 (priority 3): VC6 first
    inject(0, be_resp(32'h0, 8'h05, SRESP_DVA, 1'b1, 32'h0000_0A0A));
    inject(6, gs_resp(SRESP_DVA, 1'b1, 32'h0000_0606));
    expect_resp(SRESP_DVA, 32'h0606, 32'h0, "priority: high-priority VC first", tr);
    expect_resp(SRESP_DVA, 32'h0A0A, 32'h05000000, "priority: low-priority VC second", tr);
    if (served_vc.size() == 2 && served_vc[0] == 6) m_prio++;
    // 8b. VC1 (priority 0) one cycle before VC7 (priority 3): VC1 first
    served_vc.delete();
    inject(1, be_resp(32'h0, 8'h05, SRESP_DVA, 1'b1, 32'h0000_0B0B));
    @(negedge clk);
    inject(7, gs_resp(SRESP_DVA, 1'b1, 32'h0000_0707));
    expect_resp(SRESP_DVA, 32'h0B0B, 32'h05000000, "arrival order: earlier low-priority VC first", tr);
    expect_resp(SRESP_DVA, 32'h0707, 32'h0, "arrival order: later high-priority VC second", tr);
    if (served_vc.size() == 2 && served_vc[0] == 1) m_arrival_order++;
    // 8c. VC0 served alone, then VC0 and VC1 together: VC1 (untagged) first
    inject(0, be_resp(32'h0, 8'h05, SRESP_DVA, 1'b1, 32'h0000_0C0C));
    expect_resp(SRESP_DVA, 32'h0C0C, 32'h05000000, "fairness: setup packet", tr);
    repeat (3) @(negedge clk);
    served_vc.delete();
    inject(0, be_resp(32'h0, 8'h05, SRESP_DVA, 1'b1, 32'h0000_0D00));
    inject(1, be_resp(32'h0, 8'h05, SRESP_DVA, 1'b1, 32'h0000_0D01));
    expect_resp(SRESP_DVA, 32'h0D01, 32'h05000000, "fairness: untagged VC1 before VC0", tr);
    expect_resp(SRESP_DVA, 32'h0D00, 32'h05000000, "fairness: VC0 second", tr);
    if (served_vc.size() == 2 && served_vc[0] == 1) m_fair++;

    // 8d. reverse throughput: four 3-flit GS responses queued on VC2
    repeat (3) @(negedge clk);
    take_t.delete();
    for (int i = 0; i < 4; i++) inject(2, gs_resp(SRESP_DVA, 1'b1, 32'(i)));
    for (int i = 0; i < 4; i++) expect_resp(SRESP_DVA, 32'(i), 32'h0, $sformatf("back-to-back response %0d", i), tr);
    check(take_t.size() == 12, $sformatf("back-to-back responses: %0d flits taken (exp 12)", take_t.size()));
    if (take_t.size() == 12) begin
      $display("reverse throughput: 4 packets of 3 flits taken in %0d cycles", take_t[11] - take_t[0] + 1);
      check(take_t[11] - take_t[0] + 1 == 4 * (3 + 1) - 1,
            $sformatf("back-to-back responses: one packet per m+1 cycles (%0d cycles for 4)", take_t[11] - take_t[0] + 1));
      m_rv_stream++;
    end

    // 9. teardown of CID_A: entry cleared, GS traffic then uses VC0
    ocp(MCMD_WR, SLAVE7, 32'h0, CID_A, RI_TEAR, tp, ta);
    expect_pkt(0, tear_req(ROUTE_TO_NC, SLAVE7, 8'h00, CID_A), "GS teardown request", tl);
    inject(0, tear_resp(CID_A, SRESP_DVA, NC));
    expect_resp(SRESP_DVA, CID_A, 32'h0, "GS teardown response", tr);
    m_teardown++;
    ocp(MCMD_RD, 32'h07000200, 32'h0, CID_A, RI_USE, tp, ta);
    expect_pkt(0, gs_req(MCMD_RD, CID_A[7:0], 32'h07000200, 32'h0), "GS read after teardown on VC0", tl);
    m_gs_fallback++;

    // 10. a request packet from the network is decoded and flagged
    inject(2, gs_req(MCMD_WR, 8'h13, 32'h00000010, 32'h0BAD_F00D));
    begin
      int n;
      n = 0;
      while (!rx_req_valid && n < 50) begin @(negedge clk); n++; end
      check(rx_req_valid && rx_req.ptype == PT_GS_REQ && rx_req.addr == 32'h10 &&
            rx_req.mdata == 32'h0BAD_F00D && rx_req.mflag == 32'h13,
            "incoming GS request decoded");
    end

    repeat (20) @(negedge clk);
    check(all_quiet(), "no unexpected packets or responses left");

    $display("mechanisms: be_write=%0d be_read=%0d setup_ok=%0d setup_fail=%0d teardown=%0d gs_read=%0d gs_write=%0d be_vc1=%0d encap_await=%0d put_stall=%0d accept_withheld=%0d prio=%0d arrival_order=%0d fair=%0d gs_fallback=%0d rv_stream=%0d",
             m_be_write, m_be_read, m_setup_ok, m_setup_fail, m_teardown, m_gs_read, m_gs_write,
             m_be_vc1, m_encap_await, m_put_stall, m_accept_withheld, m_prio, m_arrival_order, m_fair, m_gs_fallback, m_rv_stream);
    check(m_be_write > 0 && m_be_read > 0 && m_setup_ok > 0 && m_setup_fail > 0 &&
          m_teardown > 0 && m_gs_read > 0 && m_gs_write > 0 && m_be_vc1 > 0 &&
          m_encap_await > 0 && m_put_stall > 0 && m_accept_withheld > 0 &&
          m_prio > 0 && m_arrival_order > 0 && m_fair > 0 && m_gs_fallback > 0 && m_rv_stream > 0, "every mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
