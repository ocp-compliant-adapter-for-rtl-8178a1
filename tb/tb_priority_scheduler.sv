// tb_priority_scheduler: unit test of the incoming-VC priority scheduler.
//
// Each VC is modelled as a FIFO of flits behind empty/get; a packet is a
// number of flits whose last one ends it (the testbench raises
// packet_received itself when it takes a last flit). Checked, against the
// order worked out by hand for the default priority table (VC0/1 level 0 ...
// VC6/7 level 3): simultaneous arrivals are served highest priority first;
// an earlier low-priority arrival is served before a later high-priority one;
// a high-priority arrival during a low-priority packet waits for its end; of
// two same-level VCs arriving together, the one not served last goes first.
// Also: get only on a non-empty, selected VC; the selection is held for the
// whole packet; first get one cycle after the flit appears.
// A random phase (3000 cycles of random packets of 1..9 flits on random VCs)
// then checks, on every cycle: get only on a non-empty VC and only one;
// no switch of VC inside a packet; sel_pri equal to the selected VC's level;
// arrival order: a packet that became eligible (head of its VC, previous
// packet on that VC finished) at least 10 cycles before another is served
// first - one decision per cycle and eight VCs bound the reordering to less
// than that; and finally that every packet was served.
module tb_priority_scheduler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int checks = 0, failures = 0;

  logic [7:0] empty, get;
  logic [2:0] in_ch_sel;
  logic [1:0] sel_pri;
  logic       busy, packet_received;

  priority_scheduler dut (.clk, .rst_n, .empty, .packet_received, .get, .in_ch_sel, .sel_pri, .busy);

  // flits per VC: 1 = last flit of a packet
  bit q [8][$];
  int served[$];
  int first_get_t;
  bit mid = 0;
  int cur_vc = 0;
  // random phase: time from which each VC's head packet may be scheduled
  // (-1: no packet waiting, -2: being served)
  bit rnd = 0;
  int head_vis [8] = '{default: -1};
  always_comb begin
    for (int v = 0; v < 8; v++) empty[v] = (q[v].size() == 0);
    packet_received = 1'b0;
    for (int v = 0; v < 8; v++) if (get[v] && q[v].size() > 0 && q[v][0]) packet_received = 1'b1;
  end
  always @(posedge clk) begin
    for (int v = 0; v < 8; v++) if (get[v]) begin
      if (mid && v != cur_vc) begin
        failures++;
        $display("FAIL [%0d] switched from VC%0d to VC%0d inside a packet", cyc, cur_vc, v);
      end
      if (!mid) begin
        served.push_back(v);
        first_get_t = cyc;
        cur_vc = v;
        if (rnd) serve_check(v);
      end
      mid = !q[v][0];
      if (q[v][0] && rnd) head_vis[v] = (q[v].size() > 1) ? int'($time) + 10 : -1;
      void'(q[v].pop_front());
    end
  end
  // protocol checks
  always @(negedge clk) if (rst_n) begin
    if ((get & empty) != 0) begin failures++; $display("FAIL get on empty VC"); end
    if ($countones(get) > 1) begin failures++; $display("FAIL several gets"); end
    if (get != 0 && get != (8'b1 << in_ch_sel)) begin failures++; $display("FAIL get/in_ch_sel mismatch"); end
    if (get != 0 && sel_pri != 2'(in_ch_sel / 2)) begin failures++; $display("FAIL sel_pri %0d for VC%0d", sel_pri, in_ch_sel); end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0d] %s", cyc, what); end
  endtask

  // the packet now served on VC v must not overtake one that became
  // eligible 10 or more cycles earlier
  function automatic void serve_check(int v);
    int vb = head_vis[v];
    checks++;
    for (int o = 0; o < 8; o++)
      if (o != v && head_vis[o] >= 0 && head_vis[o] + 100 <= vb) begin
        failures++;
        $display("FAIL [%0d] VC%0d (eligible %0t) served before VC%0d (eligible %0t)",
                 cyc, v, vb, o, head_vis[o]);
      end
    head_vis[v] = -2;
  endfunction

  task automatic add(int v, int n);
    if (rnd && q[v].size() == 0) head_vis[v] = int'($time) + 5;
    for (int i = 0; i < n; i++) q[v].push_back(i == n - 1);
  endtask

  task automatic drain();
    int n = 0;
    while (n < 300) begin
      bit e = 1;
      for (int v = 0; v < 8; v++) if (q[v].size() != 0) e = 0;
      if (e && !mid) break;
      @(negedge clk); n++;
    end
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_order(int exp[$], string what);
    check(served.size() == exp.size(), $sformatf("%s: %0d packets served (exp %0d)", what, served.size(), exp.size()));
    foreach (exp[i]) if (i < served.size())
      check(served[i] == exp[i], $sformatf("%s: #%0d served VC%0d (exp VC%0d)", what, i, served[i], exp[i]));
    served.delete();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // latency: flit appears in cycle t0, get from t0+1
    t0 = cyc;
    add(2, 3);
    drain();
    check(first_get_t == t0 + 1, $sformatf("first get %0d cycles after arrival (exp 1)", first_get_t - t0));
    expect_order('{2}, "single");

    // simultaneous: VC0 (0), VC3 (1), VC6 (3), VC4 (2) -> 6, 4, 3, 0
    add(0, 4); add(3, 2); add(6, 3); add(4, 5);
    drain();
    expect_order('{6, 4, 3, 0}, "simultaneous priorities");

    // earlier low priority first: VC1 now, VC7 one cycle later
    add(1, 6);
    @(negedge clk);
    add(7, 2);
    drain();
    expect_order('{1, 7}, "arrival order");

    // high priority during a long low-priority packet waits
    add(0, 8);
    repeat (3) @(negedge clk);
    add(6, 2);
    drain();
    expect_order('{0, 6}, "no preemption");

    // fairness: VC0 served last at level 0, VC0 and VC1 together -> VC1 first
    add(0, 2);
    drain();
    served.delete();
    add(0, 2); add(1, 2);
    drain();
    expect_order('{1, 0}, "fairness 1");
    // now VC0 was served last -> VC1 first again
    add(0, 2); add(1, 2);
    drain();
    expect_order('{1, 0}, "fairness 2");
    // VC6 and VC7 together, neither served yet at level 3 after VC6 was: VC7 first
    add(6, 1); add(7, 1);
    drain();
    expect_order('{7, 6}, "fairness level 3");

    // back-to-back packets on one VC are served packet by packet
    add(5, 2); add(5, 2);
    drain();
    expect_order('{5, 5}, "two packets one VC");

    // random traffic
    rnd = 1;
    begin
      int n_pkts;
      n_pkts = 0;
      for (int c = 0; c < 3000; c++) begin
        if ($urandom_range(0, 3) == 0) begin
          int v;
          v = $urandom_range(0, 7);
          if (q[v].size() < 20) begin
            add(v, $urandom_range(1, 9));
            n_pkts++;
          end
        end
        @(negedge clk);
      end
      served.delete();
      drain();
      for (int v = 0; v < 8; v++) check(q[v].size() == 0, $sformatf("random: VC%0d drained", v));
      check(n_pkts > 500, $sformatf("random: %0d packets", n_pkts));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
