// conn_id_table: Connection ID Table of the NA.
//
// A 16-entry, 32-bit memory that maps a connection ID to the virtual channels
// of a guaranteed-service (GS) connection: bits 7:4 hold the outgoing VC
// (injection ID), bits 3:0 the incoming VC. In the global address map the
// entries sit at NA control offsets 0x10-0x1F, so the low 4 bits of a
// connection ID (which is the entry's address) index the table.
//
// One read port and one write port work in the same cycle, because a setup
// response from the network controller can arrive while the core issues a GS
// request. Both ports are synchronous: with read_en high at a rising edge,
// inj_id shows entry read_addr[3:0] from the next cycle on (and keeps it until
// the next read); with write_en high, write_data is stored at write_addr[3:0].
// A read of the entry written in the same cycle returns the old value (own
// choice). Reset clears every entry, which maps each connection to VC 0, a
// best-effort-low channel. Synchronous, active-low reset.
module conn_id_table
  import na_pkg::*;
#(
  parameter int ENTRIES = CID_ENTRIES
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        read_en,
  input  logic [31:0] read_addr,
  output logic [31:0] inj_id,
  input  logic        write_en,
  input  logic [31:0] write_addr,
  input  logic [31:0] write_data
);
  localparam int AW = $clog2(ENTRIES);

  logic [31:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) mem[i] <= '0;
      inj_id <= '0;
    end else begin
      if (read_en)  inj_id <= mem[read_addr[AW-1:0]];
      if (write_en) mem[write_addr[AW-1:0]] <= write_data;
    end
  end
endmodule
