// Table-based deterministic route computation for NUM_PORTS lookups a cycle.
//
// The table holds, for every destination node, the set of output ports that
// lie on a minimal path (several may be set). Each output port has a link
// weight. A lookup takes the candidate set of the destination and returns the
// candidate with the smallest weight (lower port number on a tie). Giving the
// X links a lower weight than the Y links turns this into X-Y dimension
// ordered routing, which avoids deadlock; that is the reset state.
//
// Reset state (this design's choice of how the table is first filled): the
// table is computed for node (MY_X, MY_Y) of a MESH_X x MESH_Y mesh, with
// every minimal direction as a candidate; weights are WEIGHT_X for east/west
// and WEIGHT_Y for north/south; the local port (0) is the only candidate for
// the node itself. A write port replaces one table entry or one weight.
// Lookups are combinational; writes take effect at the next clock edge.
module route_compute
  import garnet_pkg::*;
#(
  parameter int MESH_X   = 4,
  parameter int MESH_Y   = 4,
  parameter int MY_X     = 0,
  parameter int MY_Y     = 0,
  parameter int WEIGHT_X = 1,
  parameter int WEIGHT_Y = 2,
  parameter int WGT_W    = 4,
  parameter int LOOKUPS  = garnet_pkg::NUM_PORTS
) (
  input  logic clk,
  input  logic rst_n,
  // lookups
  input  logic [LOOKUPS-1:0][NODE_W-1:0] dest,
  output logic [LOOKUPS-1:0][PORT_W-1:0] out_port,
  // table write
  input  logic                 tbl_wr,
  input  logic [NODE_W-1:0]    tbl_dest,
  input  logic [NUM_PORTS-1:0] tbl_ports,
  input  logic                 wgt_wr,
  input  logic [PORT_W-1:0]    wgt_port,
  input  logic [WGT_W-1:0]     wgt_value
);
  localparam int NODES = MESH_X * MESH_Y;
  localparam int DW    = (NODES > 1) ? $clog2(NODES) : 1;

  logic [NUM_PORTS-1:0] table_q [NODES];
  logic [WGT_W-1:0]     weight_q [NUM_PORTS];

  function automatic logic [NUM_PORTS-1:0] minimal_dirs(int d);
    logic [NUM_PORTS-1:0] m;
    int dx, dy;
    dx = d % MESH_X;
    dy = d / MESH_X;
    m = '0;
    if (dx > MY_X) m[PORT_EAST]  = 1'b1;
    if (dx < MY_X) m[PORT_WEST]  = 1'b1;
    if (dy > MY_Y) m[PORT_NORTH] = 1'b1;
    if (dy < MY_Y) m[PORT_SOUTH] = 1'b1;
    if (m == '0)   m[PORT_LOCAL] = 1'b1;
    return m;
  endfunction

  function automatic logic [WGT_W-1:0] default_weight(int p);
    if (p == PORT_EAST || p == PORT_WEST)   return WGT_W'(WEIGHT_X);
    if (p == PORT_NORTH || p == PORT_SOUTH) return WGT_W'(WEIGHT_Y);
    return '0;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NODES; d++) table_q[d] <= minimal_dirs(d);
      for (int p = 0; p < NUM_PORTS; p++) weight_q[p] <= default_weight(p);
    end else begin
      if (tbl_wr && int'(tbl_dest) < NODES) table_q[DW'(tbl_dest)] <= tbl_ports;
      if (wgt_wr && int'(wgt_port) < NUM_PORTS) weight_q[wgt_port] <= wgt_value;
    end
  end

  always_comb begin
    for (int l = 0; l < LOOKUPS; l++) begin
      logic [NUM_PORTS-1:0] cand;
      logic [WGT_W-1:0]     best_w;
      logic                 found;
      cand = (int'(dest[l]) < NODES) ? table_q[DW'(dest[l])] : '0;
      best_w = '1;
      found = 1'b0;
      out_port[l] = '0;
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (cand[p] && (!found || weight_q[p] < best_w)) begin
          found = 1'b1;
          best_w = weight_q[p];
          out_port[l] = PORT_W'(p);
        end
      end
    end
  end
endmodule
