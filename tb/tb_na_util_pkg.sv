// tb_na_util_pkg: reference packet builders for the NA testbenches.
//
// Written independently of the RTL from the packet formats: flits are 17 bits,
// bit 16 marks the last flit. Best-effort (BE) packets start with four header
// flits (route path; address bytes 1-0; MCmd[15:13] T/S[12] source SBA[11:4];
// address bytes 3-2). GS packets carry no routing header. These functions
// build what the network (or the network controller) would send, and what the
// NA is expected to send.
package tb_na_util_pkg;

  typedef logic [16:0] tflit_t;
  typedef tflit_t tpkt_t[$];

  function automatic tflit_t fl(bit last, logic [15:0] c);
    return {last, c};
  endfunction

  function automatic tpkt_t be_header(logic [15:0] route, logic [31:0] addr,
                                      logic [2:0] mcmd, bit ts, logic [7:0] src);
    tpkt_t p;
    p.push_back(fl(0, route));
    p.push_back(fl(0, addr[15:0]));
    p.push_back(fl(0, {mcmd, ts, src, 4'h0}));
    p.push_back(fl(0, addr[31:16]));
    return p;
  endfunction

  // network controller -> NA: GS setup response
  function automatic tpkt_t setup_resp(logic [31:0] conn_id, logic [1:0] sresp,
                                       logic [31:0] sdatainfo, logic [31:0] sdata,
                                       logic [7:0] nc_sba);
    tpkt_t p = be_header(16'h0, conn_id, 3'b000, 1'b1, nc_sba);
    p.push_back(fl(0, {sresp, 14'h0}));
    p.push_back(fl(0, sdatainfo[15:0]));
    p.push_back(fl(0, sdatainfo[31:16]));
    p.push_back(fl(0, sdata[15:0]));
    p.push_back(fl(1, sdata[31:16]));
    return p;
  endfunction

  function automatic tpkt_t tear_resp(logic [31:0] conn_id, logic [1:0] sresp,
                                      logic [7:0] nc_sba);
    tpkt_t p = be_header(16'h0, conn_id, 3'b000, 1'b0, nc_sba);
    p.push_back(fl(1, {sresp, 14'h0}));
    return p;
  endfunction

  function automatic tpkt_t be_resp(logic [31:0] dst_addr, logic [7:0] src,
                                    logic [1:0] sresp, bit rd, logic [31:0] sdata);
    tpkt_t p = be_header(16'h0, dst_addr, 3'b000, 1'b0, src);
    p.push_back(fl(0, {sresp, rd, 13'h0}));
    p.push_back(fl(0, sdata[15:0]));
    p.push_back(fl(1, sdata[31:16]));
    return p;
  endfunction

  function automatic tpkt_t gs_resp(logic [1:0] sresp, bit rd, logic [31:0] sdata);
    tpkt_t p;
    p.push_back(fl(0, {3'b000, sresp, rd, 10'h0}));
    p.push_back(fl(0, sdata[15:0]));
    p.push_back(fl(1, sdata[31:16]));
    return p;
  endfunction

  // requests as the NA must produce them
  function automatic tpkt_t be_req(logic [15:0] route, logic [31:0] addr,
                                   logic [2:0] mcmd, logic [7:0] src, logic [31:0] data);
    tpkt_t p = be_header(route, addr, mcmd, 1'b0, src);
    if (mcmd == 3'b001 || mcmd == 3'b101 || mcmd == 3'b110 || mcmd == 3'b111) begin
      p.push_back(fl(0, data[15:0]));
      p.push_back(fl(1, data[31:16]));
    end else begin
      p[3][16] = 1'b1;
    end
    return p;
  endfunction

  function automatic tpkt_t setup_req(logic [15:0] route, logic [31:0] addr,
                                      logic [7:0] src, logic [31:0] mdata, logic [31:0] mflag);
    tpkt_t p = be_header(route, addr, 3'b010, 1'b0, src);
    p.push_back(fl(0, mdata[15:0]));
    p.push_back(fl(0, mdata[31:16]));
    p.push_back(fl(0, mflag[15:0]));
    p.push_back(fl(1, mflag[31:16]));
    return p;
  endfunction

  function automatic tpkt_t tear_req(logic [15:0] route, logic [31:0] addr,
                                     logic [7:0] src, logic [31:0] mflag);
    tpkt_t p = be_header(route, addr, 3'b001, 1'b0, src);
    p.push_back(fl(0, mflag[15:0]));
    p.push_back(fl(1, mflag[31:16]));
    return p;
  endfunction

  function automatic tpkt_t gs_req(logic [2:0] mcmd, logic [7:0] cid, logic [31:0] addr,
                                   logic [31:0] data);
    tpkt_t p;
    bit wr = (mcmd == 3'b001 || mcmd == 3'b101 || mcmd == 3'b110 || mcmd == 3'b111);
    p.push_back(fl(0, {mcmd, cid, 5'h0}));
    p.push_back(fl(0, addr[15:0]));
    p.push_back(fl(!wr, addr[31:16]));
    if (wr) begin
      p.push_back(fl(0, data[15:0]));
      p.push_back(fl(1, data[31:16]));
    end
    return p;
  endfunction

endpackage
