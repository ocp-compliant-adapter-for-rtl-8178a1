// decap: decapsulation unit of the NA input port.
//
// It contains the priority scheduler (which VC to read next, and get/in_ch_sel
// for the input port) and three processes:
//  - Packet Assemble: every flit taken (get high on a non-empty VC) is stored
//    in a packet array; bit 16 of the flit marks the last one and raises
//    packet_received for the scheduler.
//  - Packet Decode: on the last flit the packet (array plus the current flit)
//    is decoded. The priority of the VC tells the format: priority 0 (best
//    effort) packets start with a 4-flit header (route path, address bytes 1-0,
//    MCmd/T-S/source core, address bytes 3-2); guaranteed-service packets
//    have no routing header. MCmd = 000 marks a response. For BE packets an
//    address in NA control space (bytes 2-1 = FFFD) marks GS setup/teardown
//    traffic: a request with MCmd RD is a setup request, WR a teardown request;
//    a response with T/S = 1 is a setup response, 0 a teardown response. The
//    result is coded as in the packet type table and the OCP fields are
//    extracted into rx_msg.
//  - Signal Validation: response_arrived or request_arrived is high for one
//    cycle, in the cycle after the last flit, while rx_msg holds the decoded
//    contents (rx_msg is kept until the next packet is complete).
//
// All eight packet types are recognised, although a slave NA only acts on
// responses. Own choices: a BE response always carries both SData flits; the
// R/W bit is 1 for the answer to a read; flits beyond PKT_MAX are dropped;
// bits of a field that a packet type does not carry decode as zero.
//
// Timing: first flit taken in cycle t, last in t+m-1, strobe in t+m.
// Synchronous, active-low reset.
module decap
  import na_pkg::*;
#(
  parameter int        N_VC    = NUM_VC,
  parameter vc_prio_t  VC_PRIO = VC_PRIO_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // network interface input port
  input  logic [N_VC-1:0]         empty,
  output logic [N_VC-1:0]         get,
  output logic [$clog2(N_VC)-1:0] in_ch_sel,
  input  flit_t                   in_flit,     // flit of VC in_ch_sel
  // to the end-to-end units
  output logic                    response_arrived,
  output logic                    request_arrived,
  output rx_msg_t                 rx_msg
);
  localparam int IW = $clog2(PKT_MAX + 1);

  logic [1:0] sel_pri;
  logic       sched_busy;
  logic       flit_taken, packet_received;

  assign flit_taken      = |get;
  assign packet_received = flit_taken && in_flit[FLIT_W-1];

  priority_scheduler #(.N_VC(N_VC), .VC_PRIO(VC_PRIO)) u_sched (
    .clk, .rst_n, .empty, .packet_received,
    .get, .in_ch_sel, .sel_pri, .busy(sched_busy)
  );

  // ---- Packet Assemble ----
  packet_t        pkt;
  logic [IW-1:0]  cnt;
  packet_t        cur_pkt;

  always_comb begin
    cur_pkt = pkt;
    if (cnt < IW'(PKT_MAX)) cur_pkt[cnt] = in_flit;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pkt <= '0;
      cnt <= '0;
    end else if (flit_taken) begin
      if (cnt < IW'(PKT_MAX)) pkt[cnt] <= in_flit;
      if (in_flit[FLIT_W-1]) begin
        cnt <= '0;
        pkt <= '0;
      end else if (cnt < IW'(PKT_MAX)) begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // ---- Packet Decode ----
  function automatic logic [31:0] w32(flit_t lo, flit_t hi);
    return {hi[15:0], lo[15:0]};
  endfunction

  function automatic rx_msg_t decode(packet_t p, logic [1:0] pri);
    rx_msg_t m;
    logic    ctl;
    m     = '0;
    m.pri = pri;
    if (pri == 2'd0) begin
      // best-effort packet with routing header
      m.addr    = w32(p[1], p[3]);
      m.mcmd    = p[2][15:13];
      m.src_sba = p[2][11:4];
      ctl       = (m.addr[23:8] == NA_CTRL_PAGE);
      if (m.mcmd != MCMD_IDLE) begin
        if (ctl && m.mcmd == MCMD_RD) begin
          m.ptype = PT_SETUP_REQ;
          m.mdata = w32(p[4], p[5]);
          m.mflag = w32(p[6], p[7]);
        end else if (ctl && m.mcmd == MCMD_WR) begin
          m.ptype = PT_TEAR_REQ;
          m.mflag = w32(p[4], p[5]);
        end else begin
          m.ptype = PT_BE_REQ;
          if (is_write_cmd(m.mcmd)) m.mdata = w32(p[4], p[5]);
        end
      end else begin
        m.sresp = p[4][15:14];
        if (ctl && p[2][12]) begin
          m.ptype     = PT_SETUP_RESP;
          m.sdatainfo = w32(p[5], p[6]);
          m.sdata     = w32(p[7], p[8]);
        end else if (ctl) begin
          m.ptype = PT_TEAR_RESP;
        end else begin
          m.ptype = PT_BE_RESP;
          m.rd    = p[4][13];
          m.sdata = w32(p[5], p[6]);
        end
      end
    end else begin
      // guaranteed-service packet, no routing header
      m.mcmd = p[0][15:13];
      if (m.mcmd != MCMD_IDLE) begin
        m.ptype = PT_GS_REQ;
        m.mflag = {24'h0, p[0][12:5]};
        m.addr  = w32(p[1], p[2]);
        if (is_write_cmd(m.mcmd)) m.mdata = w32(p[3], p[4]);
      end else begin
        m.ptype = PT_GS_RESP;
        m.sresp = p[0][12:11];
        m.rd    = p[0][10];
        m.sdata = w32(p[1], p[2]);
      end
    end
    return m;
  endfunction

  rx_msg_t dec_now;
  assign dec_now = decode(cur_pkt, sel_pri);

  // ---- Signal Validation ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rx_msg           <= '0;
      response_arrived <= 1'b0;
      request_arrived  <= 1'b0;
    end else begin
      response_arrived <= 1'b0;
      request_arrived  <= 1'b0;
      if (packet_received) begin
        rx_msg           <= dec_now;
        // packet types with bit 0 set are responses
        response_arrived <= dec_now.ptype[0];
        request_arrived  <= !dec_now.ptype[0];
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) flit_taken |-> sched_busy);
endmodule
