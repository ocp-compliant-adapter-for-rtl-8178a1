// route_lookup_table: source-route table of the NA.
//
// Best-effort packets are source routed: their first flit holds the whole
// path, two bits per hop (N=00, E=01, S=10, W=11, first hop in bits 1:0), at
// most 8 hops, which bounds the network to a 5x5 mesh. This table returns the
// path to the core with system base address (SBA) dest_sba. It is fixed when
// the NA is instantiated (parameter ROUTES) and is not reachable from the
// network. Combinational.
//
// Own choices: the default contents are XY routes (X first, then Y) from core
// MY_SBA in a MESH_W x MESH_W mesh whose cores are numbered y*MESH_W+x with y
// growing southwards; unused hop fields are 00; an SBA outside the mesh
// returns an all-zero path.
module route_lookup_table
  import na_pkg::*;
#(
  parameter int           MY_SBA = 0,
  parameter route_table_t ROUTES = xy_route_table(MY_SBA)
) (
  input  logic [7:0]  dest_sba,
  output logic [15:0] route_path
);
  localparam int ENTRIES = MESH_W * MESH_W;

  always_comb begin
    route_path = '0;
    for (int d = 0; d < ENTRIES; d++)
      if (dest_sba == 8'(d)) route_path = ROUTES[d];
  end
endmodule
