// req_e2e: Request End-to-End Flow Control unit, the OCP slave side of the NA.
//
// Two independent state machines let the core issue a new request before the
// response to an earlier one has come back from the network:
//  - Request controller (IDLE, REQUEST_RECEIVED, PACKAGED). A non-IDLE MCmd
//    moves IDLE to REQUEST_RECEIVED, where request_phase tells the
//    encapsulation unit to packetize. When the encapsulation unit answers with
//    packet_sent the FSM goes to PACKAGED, raises SCmdAccept for one cycle and
//    returns to IDLE. SCmdAccept is therefore withheld while the output queues
//    are congested, and the core holds its request signals meanwhile (so the
//    request is not copied into registers here).
//  - Response controller (IDLE, RESPONSE_RECEIVED). The response_arrived strobe
//    from the decapsulation unit moves it to RESPONSE_RECEIVED for exactly one
//    cycle, in which SResp/SData/SDataInfo are driven:
//      setup response: SResp from the packet, SData = connection ID (the
//        Connection ID Table address) and SDataInfo = destination core; on
//        success the injection IDs are written to the Connection ID Table;
//      teardown response: SResp from the packet, SData = connection ID; on
//        success the table entry is cleared to zero;
//      BE or GS response: SResp, and SData when it answers a read.
//    Outside that cycle SResp is NULL and SData/SDataInfo are zero.
//  - Request Type: MReqInfo and MCmd select the packet type (00: BE request;
//    01 with RD: GS setup; 10: GS request; 11 with WR: GS teardown).
//  - To_Encap: setup requests go out with MCmd RD and teardown requests with
//    WR, both routed to the network controller; all other requests are routed
//    to the core named by MAddr[31:24]. The Source Core Address is this core's
//    SBA. For GS requests the Connection ID Table is read at MFlag[3:0].
//
// Own choices: reserved MReqInfo/MCmd combinations are sent as BE requests;
// success means SResp = DVA; on a failed setup SData carries the packet's
// SData field (error information) instead of the connection ID; the master is
// required to accept a response in its single cycle (MRespAccept high),
// which is checked by an assertion; MY_SBA and NC_SBA are parameters.
//
// Timing: MCmd presented in cycle 0 -> REQUEST_RECEIVED in 1; with an idle
// encapsulation unit packet_sent comes in 3, SCmdAccept in 4. response_arrived
// in cycle t -> response on the OCP bus in t+1. Synchronous, active-low reset.
module req_e2e
  import na_pkg::*;
#(
  parameter logic [7:0] MY_SBA = 8'h00,
  parameter logic [7:0] NC_SBA = 8'h0C
) (
  input  logic        clk,
  input  logic        rst_n,
  // OCP, master core -> NA
  input  ocp_req_t    ocp_req,
  input  logic        MRespAccept,
  output logic        SCmdAccept,
  output logic [1:0]  SResp,
  output logic [31:0] SData,
  output logic [31:0] SDataInfo,
  // encapsulation unit
  output logic        request_phase,
  output enc_msg_t    enc_msg,
  output logic [7:0]  dest_sba,       // to the Route Lookup Table
  input  logic        packet_sent,
  // decapsulation unit
  input  logic        response_arrived,
  input  rx_msg_t     rx_msg,
  // Connection ID Table
  output logic        cid_read_en,
  output logic [31:0] cid_read_addr,
  output logic        cid_write_en,
  output logic [31:0] cid_write_addr,
  output logic [31:0] cid_write_data
);
  typedef enum logic [1:0] {RQ_IDLE, RQ_RECEIVED, RQ_PACKAGED} rq_state_e;
  typedef enum logic       {RS_IDLE, RS_RECEIVED} rs_state_e;
  rq_state_e rq_state;
  rs_state_e rs_state;

  // ---- Request OCP controller ----
  always_ff @(posedge clk) begin
    if (!rst_n) rq_state <= RQ_IDLE;
    else begin
      unique case (rq_state)
        RQ_IDLE:     if (ocp_req.mcmd != MCMD_IDLE) rq_state <= RQ_RECEIVED;
        RQ_RECEIVED: if (packet_sent) rq_state <= RQ_PACKAGED;
        RQ_PACKAGED: rq_state <= RQ_IDLE;
        default:     rq_state <= RQ_IDLE;
      endcase
    end
  end

  assign request_phase = (rq_state == RQ_RECEIVED);
  assign SCmdAccept    = (rq_state == RQ_PACKAGED);

  // ---- Request Type ----
  ptype_e req_type;
  always_comb begin
    unique case (ocp_req.mreqinfo)
      RI_SETUP: req_type = (ocp_req.mcmd == MCMD_RD) ? PT_SETUP_REQ : PT_BE_REQ;
      RI_USE:   req_type = PT_GS_REQ;
      RI_TEAR:  req_type = (ocp_req.mcmd == MCMD_WR) ? PT_TEAR_REQ : PT_BE_REQ;
      default:  req_type = PT_BE_REQ;
    endcase
  end

  // ---- To_Encap ----
  always_comb begin
    enc_msg.ptype     = req_type;
    enc_msg.mcmd      = ocp_req.mcmd;
    enc_msg.maddr     = ocp_req.maddr;
    enc_msg.mdata     = ocp_req.mdata;
    enc_msg.mflag     = ocp_req.mflag;
    enc_msg.mdatainfo = MY_SBA;
    dest_sba          = ocp_req.maddr[31:24];
    unique case (req_type)
      PT_SETUP_REQ: begin enc_msg.mcmd = MCMD_RD; dest_sba = NC_SBA; end
      PT_TEAR_REQ:  begin enc_msg.mcmd = MCMD_WR; dest_sba = NC_SBA; end
      default: ;
    endcase
  end

  assign cid_read_en   = (rq_state == RQ_RECEIVED) && (req_type == PT_GS_REQ);
  assign cid_read_addr = ocp_req.mflag;

  // ---- Response OCP controller ----
  always_ff @(posedge clk) begin
    if (!rst_n) rs_state <= RS_IDLE;
    else begin
      unique case (rs_state)
        RS_IDLE:     if (response_arrived) rs_state <= RS_RECEIVED;
        RS_RECEIVED: rs_state <= RS_IDLE;
        default:     rs_state <= RS_IDLE;
      endcase
    end
  end

  logic ok;
  assign ok = (rx_msg.sresp == SRESP_DVA);

  always_comb begin
    SResp          = SRESP_NULL;
    SData          = '0;
    SDataInfo      = '0;
    cid_write_en   = 1'b0;
    cid_write_addr = rx_msg.addr;
    cid_write_data = '0;
    if (rs_state == RS_RECEIVED) begin
      SResp = rx_msg.sresp;
      unique case (rx_msg.ptype)
        PT_SETUP_RESP: begin
          SData          = ok ? rx_msg.addr : rx_msg.sdata;
          SDataInfo      = rx_msg.sdatainfo;
          cid_write_en   = ok;
          cid_write_data = rx_msg.sdata;
        end
        PT_TEAR_RESP: begin
          SData          = rx_msg.addr;
          cid_write_en   = ok;
          cid_write_data = '0;
        end
        PT_BE_RESP: begin
          SData     = rx_msg.rd ? rx_msg.sdata : '0;
          SDataInfo = {rx_msg.src_sba, 24'h0};
        end
        default: begin  // GS response
          SData = rx_msg.rd ? rx_msg.sdata : '0;
        end
      endcase
    end
  end

  // OCP: a request stays on the bus until it is accepted.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (rq_state == RQ_RECEIVED) |-> (ocp_req.mcmd != MCMD_IDLE));
  // The response phase lasts one cycle, so the master must accept it at once.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (SResp != SRESP_NULL) |-> MRespAccept);
  // Only response packets are handed to this unit.
  assert property (@(posedge clk) disable iff (!rst_n)
                   response_arrived |-> rx_msg.ptype[0]);
endmodule
