// tb_req_e2e: Request End-to-End Flow Control unit, checked against a small
// reference written here.
//  - Request side: 400 random requests (random MCmd, MReqInfo, address, data
//    and flag). The testbench plays the core (holds the request until
//    SCmdAccept) and the encapsulation unit (answers request_phase with a
//    one-cycle packet_sent after a random 0..5 cycle delay). It checks that
//    request_phase starts one cycle after MCmd, that SCmdAccept follows
//    packet_sent by one cycle and lasts one cycle, the packet type decoded
//    from MReqInfo/MCmd, the forced MCmd and destination for setup/teardown,
//    and the Connection ID Table read for GS requests.
//  - Response side, at the same time: 400 random response messages with
//    response_arrived strobes. It checks that the OCP response appears exactly
//    one cycle later for one cycle with the expected SResp/SData/SDataInfo,
//    and the Connection ID Table writes for setup and teardown responses.
module tb_req_e2e;
  import na_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [7:0] MY = 8'h07, NC = 8'h0C;
  ocp_req_t    ocp_req = '0;
  logic        MRespAccept = 1;
  logic        SCmdAccept;
  logic [1:0]  SResp;
  logic [31:0] SData, SDataInfo;
  logic        request_phase;
  enc_msg_t    enc_msg;
  logic [7:0]  dest_sba;
  logic        packet_sent = 0;
  logic        response_arrived = 0;
  rx_msg_t     rx_msg = '0;
  logic        cid_read_en, cid_write_en;
  logic [31:0] cid_read_addr, cid_write_addr, cid_write_data;

  req_e2e #(.MY_SBA(MY), .NC_SBA(NC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL [%0t] %s", $time, what); end
  endtask

  function automatic ptype_e ref_type(logic [1:0] ri, logic [2:0] mcmd);
    case (ri)
      2'b01:   return (mcmd == MCMD_RD) ? PT_SETUP_REQ : PT_BE_REQ;
      2'b10:   return PT_GS_REQ;
      2'b11:   return (mcmd == MCMD_WR) ? PT_TEAR_REQ : PT_BE_REQ;
      default: return PT_BE_REQ;
    endcase
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit req_done = 0, resp_done = 0;

  // request side
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      ocp_req_t r;
      ptype_e t;
      int d;
      r.mcmd     = 3'($urandom_range(1, 7));
      r.mreqinfo = 2'($urandom);
      if (k < 8) begin  // make sure every request type occurs early
        r.mreqinfo = 2'(k % 4);
        r.mcmd     = (k < 4) ? ((k % 4 == 3) ? MCMD_WR : MCMD_RD) : MCMD_WRNP;
      end
      r.maddr = $urandom;
      r.mdata = $urandom;
      r.mflag = $urandom;
      t = ref_type(r.mreqinfo, r.mcmd);
      ocp_req = r;
      check(!request_phase, "request_phase before MCmd");
      @(negedge clk);
      check(request_phase, $sformatf("req %0d: request_phase one cycle after MCmd", k));
      check(enc_msg.ptype == t, $sformatf("req %0d: type %0d exp %0d", k, enc_msg.ptype, t));
      check(enc_msg.maddr == r.maddr && enc_msg.mdata == r.mdata && enc_msg.mflag == r.mflag &&
            enc_msg.mdatainfo == MY, $sformatf("req %0d: fields", k));
      case (t)
        PT_SETUP_REQ: check(enc_msg.mcmd == MCMD_RD && dest_sba == NC, "setup: RD to NC");
        PT_TEAR_REQ:  check(enc_msg.mcmd == MCMD_WR && dest_sba == NC, "teardown: WR to NC");
        default:      check(enc_msg.mcmd == r.mcmd && dest_sba == r.maddr[31:24], "dest from MAddr");
      endcase
      check(cid_read_en == (t == PT_GS_REQ), "cid_read_en only for GS");
      if (t == PT_GS_REQ) check(cid_read_addr == r.mflag, "cid_read_addr = MFlag");
      d = $urandom_range(0, 5);
      repeat (d) begin
        check(request_phase && !SCmdAccept, "waits for packet_sent");
        @(negedge clk);
      end
      packet_sent = 1;
      @(negedge clk);
      packet_sent = 0;
      check(SCmdAccept, $sformatf("req %0d: SCmdAccept after packet_sent", k));
      check(!request_phase, "request_phase ends");
      ocp_req.mcmd = MCMD_IDLE;
      @(negedge clk);
      check(!SCmdAccept, "SCmdAccept lasts one cycle");
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    req_done = 1;
  end

  // response side
  initial begin
    repeat (3) @(negedge clk);
    for (int k = 0; k < 400; k++) begin
      rx_msg_t m;
      logic ok;
      logic [31:0] exp_data, exp_info;
      logic exp_we;
      logic [31:0] exp_wd;
      m = '0;
      m.ptype     = ptype_e'({$urandom_range(0, 3), 1'b1});
      m.sresp     = 2'($urandom_range(1, 3));
      m.rd        = 1'($urandom);
      m.addr      = $urandom;
      m.sdata     = $urandom;
      m.sdatainfo = $urandom;
      m.src_sba   = 8'($urandom);
      ok = (m.sresp == SRESP_DVA);
      exp_we = 0;
      exp_wd = 0;
      exp_info = 0;
      case (m.ptype)
        PT_SETUP_RESP: begin
          exp_data = ok ? m.addr : m.sdata;
          exp_info = m.sdatainfo;
          exp_we = ok;
          exp_wd = m.sdata;
        end
        PT_TEAR_RESP: begin exp_data = m.addr; exp_we = ok; end
        PT_BE_RESP: begin
          exp_data = m.rd ? m.sdata : 0;
          exp_info = {m.src_sba, 24'h0};
        end
        default: exp_data = m.rd ? m.sdata : 0;
      endcase
      rx_msg = m;
      response_arrived = 1;
      @(negedge clk);
      response_arrived = 0;
      check(SResp == m.sresp, $sformatf("resp %0d: SResp %0d exp %0d", k, SResp, m.sresp));
      check(SData == exp_data, $sformatf("resp %0d: SData %08h exp %08h", k, SData, exp_data));
      check(SDataInfo == exp_info, $sformatf("resp %0d: SDataInfo", k));
      check(cid_write_en == exp_we, $sformatf("resp %0d: cid_write_en", k));
      if (exp_we) check(cid_write_addr == m.addr && cid_write_data == exp_wd,
                        $sformatf("resp %0d: table write", k));
      @(negedge clk);
      check(SResp == SRESP_NULL && SData == 0 && !cid_write_en, "response lasts one cycle");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    resp_done = 1;
  end

  initial begin
    wait (req_done && resp_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
