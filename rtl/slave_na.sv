// slave_na: OCP-compliant slave network adapter (NA) for a MANGO-style
// network-on-chip with guaranteed services (GS).
//
// The NA connects an OCP master core to the network. On the core side it is an
// OCP slave (basic signals plus MFlag, MReqInfo and SDataInfo as in the GS-OCP
// configuration); on the network side it has an input and an output port of
// N_VC virtual channels (VCs), each a 17-bit flit path with an empty/get
// (input) or full/put (output) handshake to the synchronizer.
//
// Request path: req_e2e (OCP request controller, request type) -> encap
// (packetize, pick VC; Connection ID Table lookup for GS requests, Route
// Lookup Table for best-effort headers) -> queue_control -> one output_queue
// per VC -> network. SCmdAccept is given once the packet is handed to a queue.
// Response path: network -> input_port_mux + decap (priority scheduler,
// reassembly, decode) -> req_e2e (OCP response controller, Connection ID
// Table writes for GS setup/teardown responses) -> core.
// Request packets arriving from the network (which a master NA would present
// to its slave core) are decoded and brought out on rx_req_valid/rx_req.
//
// The split into these blocks, their state machines and the packet formats
// follow the thesis; parameter defaults are its sizes (8 VCs, 16-entry
// Connection ID Table, 17-bit flits). The SBAs of this core and of the network
// controller are own choices (MY_SBA, NC_SBA).
//
// Timing, no congestion (own design, measured by the testbench): a request
// presented in cycle 0 is accepted (SCmdAccept) in cycle 4, so one request
// every 5 cycles; its m flits leave in cycles 5..m+4. A response packet whose
// first flit is taken in cycle 0 is on the OCP bus in cycle m+1.
// Synchronous, active-low reset.
module slave_na
  import na_pkg::*;
#(
  parameter logic [7:0] MY_SBA  = 8'h00,
  parameter logic [7:0] NC_SBA  = 8'h0C,
  parameter vc_prio_t   VC_PRIO = VC_PRIO_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  // OCP slave interface to the master core
  input  logic [2:0]          MCmd,
  input  logic [31:0]         MAddr,
  input  logic [31:0]         MData,
  input  logic [31:0]         MFlag,
  input  logic [1:0]          MReqInfo,
  input  logic                MRespAccept,
  output logic                SCmdAccept,
  output logic [1:0]          SResp,
  output logic [31:0]         SData,
  output logic [31:0]         SDataInfo,
  // network interface, input port
  input  logic [NUM_VC-1:0]   in_empty,
  input  flit_t [NUM_VC-1:0]  in_flit,
  output logic [NUM_VC-1:0]   in_get,
  // network interface, output port
  output flit_t [NUM_VC-1:0]  out_flit,
  output logic [NUM_VC-1:0]   out_put,
  input  logic [NUM_VC-1:0]   out_full,
  // decoded request packets (for a master-side controller)
  output logic                rx_req_valid,
  output rx_msg_t             rx_req
);
  localparam int CW = $clog2(NUM_VC);

  ocp_req_t ocp_req;
  assign ocp_req = '{mcmd: MCmd, maddr: MAddr, mdata: MData, mflag: MFlag, mreqinfo: MReqInfo};

  // input side
  logic [CW-1:0] in_ch_sel;
  flit_t         sel_flit;
  logic          response_arrived;
  rx_msg_t       rx_msg;

  input_port_mux #(.N_VC(NUM_VC)) u_inmux (
    .in_flits(in_flit), .in_ch_sel, .in_flit(sel_flit)
  );

  decap #(.N_VC(NUM_VC), .VC_PRIO(VC_PRIO)) u_decap (
    .clk, .rst_n,
    .empty(in_empty), .get(in_get), .in_ch_sel, .in_flit(sel_flit),
    .response_arrived, .request_arrived(rx_req_valid), .rx_msg
  );
  assign rx_req = rx_msg;

  // request path
  logic        request_phase, packet_sent;
  enc_msg_t    enc_msg;
  logic [7:0]  dest_sba;
  logic [15:0] route_path;
  logic        cid_read_en, cid_write_en;
  logic [31:0] cid_read_addr, cid_write_addr, cid_write_data, inj_id;

  req_e2e #(.MY_SBA(MY_SBA), .NC_SBA(NC_SBA)) u_req_e2e (
    .clk, .rst_n,
    .ocp_req, .MRespAccept, .SCmdAccept, .SResp, .SData, .SDataInfo,
    .request_phase, .enc_msg, .dest_sba, .packet_sent,
    .response_arrived, .rx_msg,
    .cid_read_en, .cid_read_addr, .cid_write_en, .cid_write_addr, .cid_write_data
  );

  conn_id_table u_cid (
    .clk, .rst_n,
    .read_en(cid_read_en), .read_addr(cid_read_addr), .inj_id,
    .write_en(cid_write_en), .write_addr(cid_write_addr), .write_data(cid_write_data)
  );

  route_lookup_table #(.MY_SBA(int'(MY_SBA))) u_route (
    .dest_sba, .route_path
  );

  logic [NUM_VC-1:0] hold, load, ready;
  logic [CW-1:0]     out_ch_sel;
  packet_t           packet;

  encap #(.N_VC(NUM_VC), .VC_PRIO(VC_PRIO)) u_encap (
    .clk, .rst_n,
    .request_phase, .enc_msg, .route_path, .inj_id, .hold,
    .packet_sent, .out_ch_sel, .packet
  );

  queue_control #(.N_VC(NUM_VC)) u_qctl (
    .clk, .rst_n, .packet_sent, .out_ch_sel, .ready, .hold, .load
  );

  for (genvar v = 0; v < NUM_VC; v++) begin : g_oq
    output_queue u_oq (
      .clk, .rst_n,
      .load(load[v]), .flit_array(packet), .full(out_full[v]),
      .out_flit(out_flit[v]), .put(out_put[v]), .ready(ready[v])
    );
  end
endmodule
