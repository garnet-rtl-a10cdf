// Mesh network-on-chip built from five-stage virtual-channel routers.
//
// MESH_X x MESH_Y nodes; node n sits at x = n % MESH_X, y = n / MESH_X. Each
// node has a router, whose ports 1..4 connect to the east, west, north and
// south neighbours, and a network interface on port 0. Every connection is
// a network_link pair (flits one way, credits the other) of LINK_LATENCY
// cycles. Ports on the mesh edge are left open (inputs idle, credits zero).
// Routing is X-Y dimension order: route tables start with every minimal
// direction and X links weigh less than Y links. With LINK_LATENCY = 1 a
// head flit moves one hop every 5 cycles when nothing is in its way.
//
// Ports per node: a message injection interface, an ejection flit stream,
// and the router's activity counters. One configuration bus, addressed by
// node, rewrites route tables and link weights.
//
// The router and its pipeline follow the described network; the mesh size
// and the link latency are this design's defaults.
module garnet_mesh
  import garnet_pkg::*;
#(
  parameter int               MESH_X        = 4,
  parameter int               MESH_Y        = 4,
  parameter int               LINK_LATENCY  = 1,
  parameter int               DEPTH         = garnet_pkg::BUF_DEPTH,
  parameter int               MAX_PKT_FLITS = 5,
  parameter logic [NUM_VNETS-1:0] ORDERED_VNETS = 1,
  parameter int               CNT_W         = 32,
  parameter int               N             = MESH_X * MESH_Y,
  parameter int               VNET_W        = (NUM_VNETS > 1) ? $clog2(NUM_VNETS) : 1,
  parameter int               LEN_W         = $clog2(MAX_PKT_FLITS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  // injection, per node
  input  logic [N-1:0]                                        msg_valid,
  output logic [N-1:0]                                        msg_ready,
  input  logic [N-1:0][N-1:0]                                 msg_dest_mask,
  input  logic [N-1:0][VNET_W-1:0]                            msg_vnet,
  input  logic [N-1:0][LEN_W-1:0]                             msg_len,
  input  logic [N-1:0][MAX_PKT_FLITS-1:0][FLIT_DATA_W-1:0]    msg_data,
  output logic [N-1:0]                                        msg_done,
  output logic [N-1:0]                                        pkt_sent,
  // ejection, per node
  output flit_t [N-1:0]                                       ej_flit,
  output logic  [N-1:0]                                       ej_pkt_done,
  // route table configuration
  input  logic                 cfg_tbl_wr,
  input  logic                 cfg_wgt_wr,
  input  logic [NODE_W-1:0]    cfg_node,
  input  logic [NODE_W-1:0]    cfg_tbl_dest,
  input  logic [NUM_PORTS-1:0] cfg_tbl_ports,
  input  logic [PORT_W-1:0]    cfg_wgt_port,
  input  logic [3:0]           cfg_wgt_value,
  // activity counters, per node
  input  logic                  cnt_clear,
  output logic [N-1:0][CNT_W-1:0] cnt_buf_wr,
  output logic [N-1:0][CNT_W-1:0] cnt_buf_rd,
  output logic [N-1:0][CNT_W-1:0] cnt_va,
  output logic [N-1:0][CNT_W-1:0] cnt_sa,
  output logic [N-1:0][CNT_W-1:0] cnt_xbar,
  output logic [N-1:0][CNT_W-1:0] cnt_link
);
  flit_t   [N-1:0][NUM_PORTS-1:0] r_flit_in, r_flit_out;
  credit_t [N-1:0][NUM_PORTS-1:0] r_credit_in, r_credit_out;
  flit_t   [N-1:0] ni_flit_out, ni_flit_in;
  credit_t [N-1:0] ni_credit_out, ni_credit_in;

  function automatic int neighbour(int n, int p);
    int x, y;
    x = n % MESH_X;
    y = n / MESH_X;
    case (p)
      PORT_EAST:  return (x + 1 < MESH_X) ? n + 1 : -1;
      PORT_WEST:  return (x > 0)          ? n - 1 : -1;
      PORT_NORTH: return (y + 1 < MESH_Y) ? n + MESH_X : -1;
      PORT_SOUTH: return (y > 0)          ? n - MESH_X : -1;
      default:    return -1;
    endcase
  endfunction

  function automatic int opposite(int p);
    case (p)
      PORT_EAST:  return PORT_WEST;
      PORT_WEST:  return PORT_EAST;
      PORT_NORTH: return PORT_SOUTH;
      PORT_SOUTH: return PORT_NORTH;
      default:    return PORT_LOCAL;
    endcase
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    router #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(n % MESH_X), .MY_Y(n / MESH_X),
             .DEPTH(DEPTH), .ORDERED_VNETS(ORDERED_VNETS), .CNT_W(CNT_W)) u_router (
      .clk, .rst_n,
      .flit_in(r_flit_in[n]), .credit_out(r_credit_out[n]),
      .flit_out(r_flit_out[n]), .credit_in(r_credit_in[n]),
      .cfg_tbl_wr(cfg_tbl_wr && int'(cfg_node) == n), .cfg_tbl_dest(cfg_tbl_dest),
      .cfg_tbl_ports(cfg_tbl_ports),
      .cfg_wgt_wr(cfg_wgt_wr && int'(cfg_node) == n), .cfg_wgt_port(cfg_wgt_port),
      .cfg_wgt_value(cfg_wgt_value),
      .cnt_clear(cnt_clear),
      .cnt_buf_wr(cnt_buf_wr[n]), .cnt_buf_rd(cnt_buf_rd[n]), .cnt_va(cnt_va[n]),
      .cnt_sa(cnt_sa[n]), .cnt_xbar(cnt_xbar[n]), .cnt_link(cnt_link[n]));

    network_interface #(.NODE_ID(n), .NUM_NODES(N), .MAX_PKT_FLITS(MAX_PKT_FLITS),
                        .DEPTH(DEPTH)) u_ni (
      .clk, .rst_n,
      .msg_valid(msg_valid[n]), .msg_ready(msg_ready[n]),
      .msg_dest_mask(msg_dest_mask[n]), .msg_vnet(msg_vnet[n]), .msg_len(msg_len[n]),
      .msg_data(msg_data[n]), .msg_done(msg_done[n]), .pkt_sent(pkt_sent[n]),
      .flit_out(ni_flit_out[n]), .credit_in(ni_credit_in[n]),
      .flit_in(ni_flit_in[n]), .credit_out(ni_credit_out[n]),
      .ej_flit(ej_flit[n]), .ej_pkt_done(ej_pkt_done[n]));

    // NI -> router local input
    network_link #(.LATENCY(LINK_LATENCY)) u_inj_link (
      .clk, .rst_n,
      .flit_in(ni_flit_out[n]), .flit_out(r_flit_in[n][PORT_LOCAL]),
      .credit_in(r_credit_out[n][PORT_LOCAL]), .credit_out(ni_credit_in[n]));
    // router local output -> NI
    network_link #(.LATENCY(LINK_LATENCY)) u_ej_link (
      .clk, .rst_n,
      .flit_in(r_flit_out[n][PORT_LOCAL]), .flit_out(ni_flit_in[n]),
      .credit_in(ni_credit_out[n]), .credit_out(r_credit_in[n][PORT_LOCAL]));

    for (genvar p = 1; p < NUM_PORTS; p++) begin : g_dir
      localparam int M = neighbour(n, p);
      if (M >= 0) begin : g_link
        network_link #(.LATENCY(LINK_LATENCY)) u_link (
          .clk, .rst_n,
          .flit_in(r_flit_out[n][p]), .flit_out(r_flit_in[M][opposite(p)]),
          .credit_in(r_credit_out[M][opposite(p)]), .credit_out(r_credit_in[n][p]));
      end else begin : g_edge
        assign r_flit_in[n][p]   = '0;
        assign r_credit_in[n][p] = '0;
      end
    end
  end
endmodule
