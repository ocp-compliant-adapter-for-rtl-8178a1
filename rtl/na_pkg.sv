// na_pkg: types and constants shared by the slave network adapter (NA).
//
// The NA bridges an OCP master core and a network-on-chip with 8 virtual
// channels (VCs). Everything that crosses the network is a 17-bit flit: bit 16
// marks the last flit of a packet, bits 15:0 carry content. This package holds
// the flit type, the eight packet types and their 3-bit codes, the OCP command
// and response codes, the GS-OCP MReqInfo codes, the static VC priority table
// and the function that builds the default source-route table of a 5x5 mesh.
//
// Taken from the thesis: the 17-bit flit, the 3-bit packet type encoding,
// the MReqInfo/MCmd request encoding, the four VC priority levels,
// the 2-bit hop encoding N=00 E=01 S=10 W=11 and the 16-bit route path.
// Own choices: which VC gets which priority level (two VCs per level, VC0/VC1
// best-effort-low), the OCP-2.0 numeric command codes, XY routing for the
// default route table, and the numbering of cores as y*MESH_W+x.
package na_pkg;

  localparam int FLIT_W   = 17;  // 1 control bit + 16 content bits
  localparam int NUM_VC   = 8;   // virtual channels per NA port
  localparam int PKT_MAX  = 9;   // longest packet: GS setup response, 4 header + 5 payload flits
  localparam int CID_ENTRIES = 16;  // Connection ID Table entries
  localparam int MESH_W   = 5;   // 16-bit route path = 8 hops = at most a 5x5 mesh

  typedef logic [FLIT_W-1:0] flit_t;
  typedef flit_t [PKT_MAX-1:0] packet_t;   // flit 0 is sent first

  // Packet type encoding; bit 0 set marks a response
  typedef enum logic [2:0] {
    PT_SETUP_REQ  = 3'b000,
    PT_SETUP_RESP = 3'b001,
    PT_TEAR_REQ   = 3'b010,
    PT_TEAR_RESP  = 3'b011,
    PT_BE_REQ     = 3'b100,
    PT_BE_RESP    = 3'b101,
    PT_GS_REQ     = 3'b110,
    PT_GS_RESP    = 3'b111
  } ptype_e;

  // OCP MCmd
  localparam logic [2:0] MCMD_IDLE = 3'b000;
  localparam logic [2:0] MCMD_WR   = 3'b001;
  localparam logic [2:0] MCMD_RD   = 3'b010;
  localparam logic [2:0] MCMD_RDEX = 3'b011;
  localparam logic [2:0] MCMD_RDL  = 3'b100;
  localparam logic [2:0] MCMD_WRNP = 3'b101;
  localparam logic [2:0] MCMD_WRC  = 3'b110;
  localparam logic [2:0] MCMD_BCST = 3'b111;

  // OCP SResp
  localparam logic [1:0] SRESP_NULL = 2'b00;
  localparam logic [1:0] SRESP_DVA  = 2'b01;
  localparam logic [1:0] SRESP_FAIL = 2'b10;
  localparam logic [1:0] SRESP_ERR  = 2'b11;

  // GS-OCP MReqInfo
  localparam logic [1:0] RI_BE    = 2'b00;
  localparam logic [1:0] RI_SETUP = 2'b01;
  localparam logic [1:0] RI_USE   = 2'b10;
  localparam logic [1:0] RI_TEAR  = 2'b11;

  // Bytes 2 and 1 of an address that targets NA control space (0xXXFFFDxx)
  localparam logic [15:0] NA_CTRL_PAGE = 16'hFFFD;

  // Static VC priority: 3 guaranteed throughput, 2 guaranteed power,
  // 1 guaranteed jitter, 0 best-effort low. Index = VC number.
  typedef logic [NUM_VC-1:0][1:0] vc_prio_t;
  localparam vc_prio_t VC_PRIO_DEFAULT = {2'd3, 2'd3, 2'd2, 2'd2, 2'd1, 2'd1, 2'd0, 2'd0};

  // A request as presented by the OCP master core (request phase group)
  typedef struct packed {
    logic [2:0]  mcmd;
    logic [31:0] maddr;
    logic [31:0] mdata;
    logic [31:0] mflag;
    logic [1:0]  mreqinfo;
  } ocp_req_t;

  // A request message handed from ReqE2E to the encapsulation unit
  typedef struct packed {
    ptype_e      ptype;
    logic [2:0]  mcmd;
    logic [31:0] maddr;
    logic [31:0] mdata;
    logic [31:0] mflag;
    logic [7:0]  mdatainfo;  // SBA of the requesting core (Source Core Address)
  } enc_msg_t;

  // Contents of a received packet after decapsulation
  typedef struct packed {
    ptype_e      ptype;
    logic [1:0]  pri;        // priority of the VC it came in on
    logic [2:0]  mcmd;
    logic [31:0] addr;       // Destination Address (BE) or MAddr (GS request)
    logic [31:0] mdata;
    logic [31:0] mflag;
    logic [7:0]  src_sba;    // Source Core Address (BE packets)
    logic [1:0]  sresp;
    logic        rd;         // R/W bit of a response: 1 = answer to a read
    logic [31:0] sdata;
    logic [31:0] sdatainfo;
  } rx_msg_t;

  function automatic logic is_write_cmd(logic [2:0] mcmd);
    return (mcmd == MCMD_WR) || (mcmd == MCMD_WRNP) ||
           (mcmd == MCMD_WRC) || (mcmd == MCMD_BCST);
  endfunction

  function automatic flit_t mk_flit(logic last, logic [15:0] content);
    return {last, content};
  endfunction

  // XY source route from core src to core dst in a w x w mesh, cores numbered
  // y*w+x with y growing southwards. Hop i occupies bits 2i+1:2i; unused hops
  // are 00.
  function automatic logic [15:0] xy_route(int src, int dst, int w);
    logic [15:0] r;
    int sx, sy, dx, dy, h;
    r = '0;
    h = 0;
    sx = src % w;  sy = src / w;
    dx = dst % w;  dy = dst / w;
    while (sx != dx && h < 8) begin
      r[2*h +: 2] = (dx > sx) ? 2'b01 : 2'b11;
      sx = (dx > sx) ? sx + 1 : sx - 1;
      h++;
    end
    while (sy != dy && h < 8) begin
      r[2*h +: 2] = (dy > sy) ? 2'b10 : 2'b00;
      sy = (dy > sy) ? sy + 1 : sy - 1;
      h++;
    end
    return r;
  endfunction

  typedef logic [MESH_W*MESH_W-1:0][15:0] route_table_t;

  function automatic route_table_t xy_route_table(int my_sba);
    route_table_t t;
    for (int d = 0; d < MESH_W*MESH_W; d++) t[d] = xy_route(my_sba, d, MESH_W);
    return t;
  endfunction

endpackage
