// encap: encapsulation unit of the NA.
//
// It turns a request message from the ReqE2E unit into a packet of 17-bit
// flits and picks the output virtual channel (VC) it is sent on.
// FSM: INIT -> IDLE; IDLE waits for request_phase; PACKETIZE builds the packet
// and chooses the VC; if that VC's hold bit is set it goes to AWAIT, which
// waits for hold to drop; SEND raises packet_sent for one cycle with out_ch_sel
// and packet valid, then returns to IDLE. packet and out_ch_sel stay valid
// until the next PACKETIZE, so the queue control can load them later.
//
// Packet formats (flit 0 first, bit 16 = last flit):
//  BE header: route path | address bytes 1-0 |
//             {MCmd[15:13], T/S[12]=0, source SBA[11:4], 0} | address bytes 3-2
//  GS setup request:    BE header, MData lo, MData hi, MFlag lo, MFlag hi
//  GS teardown request: BE header, MFlag lo, MFlag hi
//  BE request:          BE header, plus MData lo, MData hi for a write
//  GS request: {MCmd[15:13], MFlag byte 0 [12:5], 0}, MAddr lo, MAddr hi,
//              plus MData lo, MData hi for a write
// A GS request uses the outgoing VC from the Connection ID Table (inj_id bits
// 7:4). Every other packet takes the lowest-numbered best-effort VC (priority
// 0 in the static output priority table) whose hold bit is clear; in AWAIT
// such a packet takes whichever best-effort VC frees up first.
//
// Own choices: all write-type OCP commands (WR, WRNP, WRC, BCST) carry data;
// the 8 reserved bits under MCmd and the 5 under the GS header are zero.
//
// Timing: request_phase in cycle t -> PACKETIZE t+1 -> SEND (packet_sent)
// t+2 when the VC is free. Synchronous, active-low reset.
module encap
  import na_pkg::*;
#(
  parameter int       N_VC    = NUM_VC,
  parameter vc_prio_t VC_PRIO = VC_PRIO_DEFAULT
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    request_phase,
  input  enc_msg_t                enc_msg,
  input  logic [15:0]             route_path,
  input  logic [31:0]             inj_id,
  input  logic [N_VC-1:0]         hold,
  output logic                    packet_sent,
  output logic [$clog2(N_VC)-1:0] out_ch_sel,
  output packet_t                 packet
);
  localparam int CW = $clog2(N_VC);

  typedef enum logic [2:0] {E_INIT, E_IDLE, E_PACKETIZE, E_AWAIT, E_SEND} state_e;
  state_e state;

  logic [N_VC-1:0] be_mask;
  always_comb
    for (int c = 0; c < N_VC; c++) be_mask[c] = (VC_PRIO[c] == 2'd0);

  // lowest-numbered free BE channel
  logic          be_free;
  logic [CW-1:0] be_ch;
  always_comb begin
    be_free = 1'b0;
    be_ch   = '0;
    for (int c = N_VC - 1; c >= 0; c--)
      if (be_mask[c] && !hold[c]) begin
        be_free = 1'b1;
        be_ch   = CW'(c);
      end
  end

  function automatic packet_t build(enc_msg_t m, logic [15:0] route);
    packet_t p;
    logic    wr;
    p  = '0;
    wr = is_write_cmd(m.mcmd);
    if (m.ptype == PT_GS_REQ) begin
      p[0] = mk_flit(1'b0, {m.mcmd, m.mflag[7:0], 5'b0});
      p[1] = mk_flit(1'b0, m.maddr[15:0]);
      p[2] = mk_flit(!wr, m.maddr[31:16]);
      if (wr) begin
        p[3] = mk_flit(1'b0, m.mdata[15:0]);
        p[4] = mk_flit(1'b1, m.mdata[31:16]);
      end
    end else begin
      p[0] = mk_flit(1'b0, route);
      p[1] = mk_flit(1'b0, m.maddr[15:0]);
      p[2] = mk_flit(1'b0, {m.mcmd, 1'b0, m.mdatainfo, 4'b0});
      p[3] = mk_flit(1'b0, m.maddr[31:16]);
      unique case (m.ptype)
        PT_SETUP_REQ: begin
          p[4] = mk_flit(1'b0, m.mdata[15:0]);
          p[5] = mk_flit(1'b0, m.mdata[31:16]);
          p[6] = mk_flit(1'b0, m.mflag[15:0]);
          p[7] = mk_flit(1'b1, m.mflag[31:16]);
        end
        PT_TEAR_REQ: begin
          p[4] = mk_flit(1'b0, m.mflag[15:0]);
          p[5] = mk_flit(1'b1, m.mflag[31:16]);
        end
        default: begin  // BE request
          if (wr) begin
            p[4] = mk_flit(1'b0, m.mdata[15:0]);
            p[5] = mk_flit(1'b1, m.mdata[31:16]);
          end else begin
            p[3][FLIT_W-1] = 1'b1;
          end
        end
      endcase
    end
    return p;
  endfunction

  logic          is_gs;
  logic [CW-1:0] ch_q;
  logic          ch_ok;

  always_comb begin
    if (state == E_PACKETIZE) ch_ok = is_gs ? !hold[CW'(inj_id[7:4])] : be_free;
    else                      ch_ok = is_gs ? !hold[ch_q] : be_free;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= E_INIT;
      packet <= '0;
      ch_q   <= '0;
      is_gs  <= 1'b0;
    end else begin
      unique case (state)
        E_INIT: state <= E_IDLE;
        E_IDLE: if (request_phase) begin
          state <= E_PACKETIZE;
          is_gs <= (enc_msg.ptype == PT_GS_REQ);
        end
        E_PACKETIZE: begin
          packet <= build(enc_msg, route_path);
          ch_q   <= is_gs ? CW'(inj_id[7:4]) : be_ch;
          state  <= ch_ok ? E_SEND : E_AWAIT;
        end
        E_AWAIT: if (ch_ok) begin
          if (!is_gs) ch_q <= be_ch;
          state <= E_SEND;
        end
        E_SEND: state <= E_IDLE;
        default: state <= E_INIT;
      endcase
    end
  end

  assign packet_sent = (state == E_SEND);
  assign out_ch_sel  = ch_q;

  assert property (@(posedge clk) disable iff (!rst_n) packet_sent |-> !hold[out_ch_sel]);
endmodule
