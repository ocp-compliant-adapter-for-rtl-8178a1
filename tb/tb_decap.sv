// tb_decap: decapsulation unit with its priority scheduler. The testbench
// models the eight input VC FIFOs (a flit pushed in one cycle is visible
// from the next rising edge; a flit is removed on the rising edge where get
// is high) and builds packets of all eight types independently
// (tb_na_util_pkg), each with the rx_msg contents it must decode to.
// Best-effort packet types go on VC0/1, GS packets on VC2..7.
//  - Phase 1: 300 single packets on random VCs. The strobe
//    (response_arrived for responses, request_arrived for requests) must come
//    exactly one cycle after the last flit is taken, and rx_msg must match.
//  - Phase 2: 60 rounds with packets placed on several VCs at once. Every
//    decoded message must equal the oldest outstanding packet of some VC
//    with the same priority, and all packets must be delivered.
module tb_decap;
  import na_pkg::*;
  import tb_na_util_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NUM_VC-1:0] empty = '1, get;
  logic [2:0]        in_ch_sel;
  flit_t             head [NUM_VC];
  flit_t             in_flit;
  logic              response_arrived, request_arrived;
  rx_msg_t           rx_msg;

  assign in_flit = head[in_ch_sel];
  decap dut (.clk, .rst_n, .empty, .get, .in_ch_sel, .in_flit,
             .response_arrived, .request_arrived, .rx_msg);

  tflit_t  fifo [NUM_VC][$];
  rx_msg_t expq [NUM_VC][$];
  int      last_take;

  always @(posedge clk) begin
    for (int v = 0; v < NUM_VC; v++) begin
      if (get[v] && fifo[v].size() > 0) begin
        if (fifo[v][0][16]) last_take = $time / 10;
        void'(fifo[v].pop_front());
      end
      empty[v] <= (fifo[v].size() == 0);
      head[v]  <= (fifo[v].size() > 0) ? fifo[v][0] : '0;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t] %s", $time, what); end
  endtask

  function automatic bit wr(logic [2:0] c);
    return c == MCMD_WR || c == MCMD_WRNP || c == MCMD_WRC || c == MCMD_BCST;
  endfunction

  // random packet for VC v with its expected decode
  function automatic void gen(int v, output tpkt_t p, output rx_msg_t m);
    logic [31:0] a = $urandom, d = $urandom, f = $urandom, i = $urandom;
    logic [7:0]  s = 8'($urandom);
    logic [1:0]  r = 2'($urandom_range(1, 3));
    bit          rd = 1'($urandom);
    logic [2:0]  c = 3'($urandom_range(1, 7));
    logic [31:0] ca = {8'($urandom), NA_CTRL_PAGE, 8'($urandom)};
    int          kind = $urandom_range(0, 5);
    bit          gsq = 1'($urandom);
    if (a[23:8] == NA_CTRL_PAGE) a[8] = ~a[8];
    m = '0;
    m.pri = VC_PRIO_DEFAULT[v];
    if (v < 2) begin
      case (kind)
        0: begin
          p = setup_resp(ca, r, i, d, s);
          m.ptype = PT_SETUP_RESP; m.addr = ca; m.src_sba = s; m.sresp = r;
          m.sdatainfo = i; m.sdata = d;
        end
        1: begin
          p = tear_resp(ca, r, s);
          m.ptype = PT_TEAR_RESP; m.addr = ca; m.src_sba = s; m.sresp = r;
        end
        2: begin
          p = be_resp(a, s, r, rd, d);
          m.ptype = PT_BE_RESP; m.addr = a; m.src_sba = s; m.sresp = r; m.rd = rd; m.sdata = d;
        end
        3: begin
          p = be_req(16'h1234, a, c, s, d);
          m.ptype = PT_BE_REQ; m.addr = a; m.src_sba = s; m.mcmd = c;
          if (wr(c)) m.mdata = d;
        end
        4: begin
          p = setup_req(16'h1234, ca, s, d, f);
          m.ptype = PT_SETUP_REQ; m.addr = ca; m.src_sba = s; m.mcmd = MCMD_RD;
          m.mdata = d; m.mflag = f;
        end
        default: begin
          p = tear_req(16'h1234, ca, s, f);
          m.ptype = PT_TEAR_REQ; m.addr = ca; m.src_sba = s; m.mcmd = MCMD_WR; m.mflag = f;
        end
      endcase
    end else if (gsq) begin
      p = gs_req(c, s, a, d);
      m.ptype = PT_GS_REQ; m.mcmd = c; m.mflag = {24'h0, s}; m.addr = a;
      if (wr(c)) m.mdata = d;
    end else begin
      p = gs_resp(r, rd, d);
      m.ptype = PT_GS_RESP; m.sresp = r; m.rd = rd; m.sdata = d;
    end
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int got = 0;
  bit phase2 = 0;
  // checker for every strobe
  always @(negedge clk) if (rst_n) begin
    check(!(response_arrived && request_arrived), "one strobe at a time");
    if (response_arrived || request_arrived) begin
      bit found;
      found = 0;
      got++;
      check(response_arrived == rx_msg.ptype[0], "strobe matches packet type");
      if (!phase2) check($time / 10 == last_take + 1, "strobe one cycle after last flit");
      for (int v = 0; v < NUM_VC && !found; v++)
        if (expq[v].size() > 0 && expq[v][0] == rx_msg) begin
          found = 1;
          void'(expq[v].pop_front());
        end
      check(found, $sformatf("decoded message type %0d pri %0d matches a sent packet",
                             rx_msg.ptype, rx_msg.pri));
    end
  end

  initial begin
    tpkt_t p;
    rx_msg_t m;
    int v, n, sent;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    sent = 0;
    for (int k = 0; k < 300; k++) begin
      v = $urandom_range(0, NUM_VC - 1);
      gen(v, p, m);
      expq[v].push_back(m);
      foreach (p[j]) fifo[v].push_back(p[j]);
      sent++;
      n = 0;
      while (got < sent && n < 100) begin @(negedge clk); n++; end
      check(got == sent, "single packet delivered");
    end
    phase2 = 1;
    for (int k = 0; k < 60; k++) begin
      int cnt;
      cnt = $urandom_range(2, 12);
      for (int j = 0; j < cnt; j++) begin
        v = $urandom_range(0, NUM_VC - 1);
        gen(v, p, m);
        expq[v].push_back(m);
        foreach (p[q]) fifo[v].push_back(p[q]);
        sent++;
        if ($urandom_range(0, 2) == 0) @(negedge clk);
      end
      n = 0;
      while (got < sent && n < 1000) begin @(negedge clk); n++; end
      check(got == sent, $sformatf("round %0d: all %0d packets delivered", k, sent));
    end
    for (int q = 0; q < NUM_VC; q++) check(expq[q].size() == 0 && fifo[q].size() == 0, $sformatf("VC %0d: %0d messages, %0d flits left", q, expq[q].size(), fifo[q].size()));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
