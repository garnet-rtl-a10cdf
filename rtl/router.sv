// Five-stage input-buffered virtual-channel router.
//
// Per input port an input_unit holds one private FIFO per VC; route
// computation, a separable VC allocator, a separable switch allocator and a
// crossbar complete the datapath, and an output_unit per output port tracks
// the downstream VCs and credits (credit-based flow control).
//
// Pipeline of a head flit arriving at the input in cycle t:
//   t    BW + RC  written into its VC buffer; output port looked up
//   t+1  VA       output VC allocated
//   t+2  SA       crossbar input and output won; flit read, credit taken
//   t+3  ST       crossbar traversal into the output register
//   t+4  LT       flit on `flit_out` (the link adds its own latency)
// Body and tail flits go BW, bubble, SA, ST, LT and inherit the head's
// output VC; the tail frees the input VC, and its credit (marked free) frees
// the VC in the upstream router. The credit for a flit leaves on
// `credit_out` the cycle after the flit wins SA.
// With nothing in the way a flit is on `flit_out` 4 cycles after it appears
// on `flit_in`, and each port streams one flit per cycle.
//
// Ports are numbered 0 local, 1 east, 2 west, 3 north, 4 south. The table
// and weights of route computation can be rewritten through the cfg port.
// Activity counters for power estimation are brought out.
// The structure and pipeline follow the described router; buffer depth, VC
// counts and widths are this design's defaults.
module router
  import garnet_pkg::*;
#(
  parameter int               MESH_X         = 4,
  parameter int               MESH_Y         = 4,
  parameter int               MY_X           = 0,
  parameter int               MY_Y           = 0,
  parameter int               DEPTH          = garnet_pkg::BUF_DEPTH,
  parameter logic [NUM_VNETS-1:0] ORDERED_VNETS = 1,
  parameter int               CNT_W          = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  flit_t   [NUM_PORTS-1:0] flit_in,
  output credit_t [NUM_PORTS-1:0] credit_out,
  output flit_t   [NUM_PORTS-1:0] flit_out,
  input  credit_t [NUM_PORTS-1:0] credit_in,
  // route table configuration
  input  logic                 cfg_tbl_wr,
  input  logic [NODE_W-1:0]    cfg_tbl_dest,
  input  logic [NUM_PORTS-1:0] cfg_tbl_ports,
  input  logic                 cfg_wgt_wr,
  input  logic [PORT_W-1:0]    cfg_wgt_port,
  input  logic [3:0]           cfg_wgt_value,
  // activity counters
  input  logic             cnt_clear,
  output logic [CNT_W-1:0] cnt_buf_wr,
  output logic [CNT_W-1:0] cnt_buf_rd,
  output logic [CNT_W-1:0] cnt_va,
  output logic [CNT_W-1:0] cnt_sa,
  output logic [CNT_W-1:0] cnt_xbar,
  output logic [CNT_W-1:0] cnt_link
);
  localparam int V = NUM_VCS;

  logic [TS_W-1:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  logic      [NUM_PORTS-1:0][NODE_W-1:0] rc_dest;
  logic      [NUM_PORTS-1:0][PORT_W-1:0] rc_port;
  vc_state_e [NUM_PORTS-1:0][V-1:0]             vc_state;
  logic      [NUM_PORTS-1:0][V-1:0][PORT_W-1:0] vc_route;
  logic      [NUM_PORTS-1:0][V-1:0][VC_W-1:0]   vc_outvc;
  logic      [NUM_PORTS-1:0][V-1:0][TS_W-1:0]   vc_stamp;
  logic      [NUM_PORTS-1:0][V-1:0]             vc_visible;
  logic      [NUM_PORTS-1:0][V-1:0]             va_gnt;
  logic      [NUM_PORTS-1:0][V-1:0][VC_W-1:0]   va_vc;
  logic      [NUM_PORTS-1:0][V-1:0]             va_alloc;
  logic      [NUM_PORTS-1:0][V-1:0]             sa_gnt;
  logic      [NUM_PORTS-1:0]                    sa_send;
  logic      [NUM_PORTS-1:0][VC_W-1:0]          sa_vc;
  logic      [NUM_PORTS-1:0][V-1:0]             out_free, out_credit;
  flit_t     [NUM_PORTS-1:0]                    rd_flit;
  logic      [NUM_PORTS-1:0][PORT_W-1:0]        rd_port;
  flit_t     [NUM_PORTS-1:0]                    st_flit;
  logic      [NUM_PORTS-1:0][PORT_W-1:0]        st_port;

  route_compute #(.MESH_X(MESH_X), .MESH_Y(MESH_Y), .MY_X(MY_X), .MY_Y(MY_Y),
                  .WGT_W(4), .LOOKUPS(NUM_PORTS)) u_rc (
    .clk, .rst_n, .dest(rc_dest), .out_port(rc_port),
    .tbl_wr(cfg_tbl_wr), .tbl_dest(cfg_tbl_dest), .tbl_ports(cfg_tbl_ports),
    .wgt_wr(cfg_wgt_wr), .wgt_port(cfg_wgt_port), .wgt_value(cfg_wgt_value));

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    input_unit #(.NUM_VCS_P(V), .DEPTH(DEPTH)) u_in (
      .clk, .rst_n, .now,
      .flit_in(flit_in[p]), .credit_out(credit_out[p]),
      .rc_dest(rc_dest[p]), .rc_port(rc_port[p]),
      .vc_state(vc_state[p]), .vc_route(vc_route[p]), .vc_outvc(vc_outvc[p]),
      .vc_stamp(vc_stamp[p]), .vc_visible(vc_visible[p]),
      .va_gnt(va_gnt[p]), .va_outvc(va_vc[p]),
      .sa_gnt(sa_gnt[p]), .rd_flit(rd_flit[p]), .rd_port(rd_port[p]));

    output_unit #(.NUM_VCS_P(V), .DEPTH(DEPTH)) u_out (
      .clk, .rst_n,
      .alloc(va_alloc[p]), .send(sa_send[p]), .send_vc(sa_vc[p]),
      .credit_in(credit_in[p]), .vc_free(out_free[p]), .has_credit(out_credit[p]));
  end

  vc_allocator #(.NUM_PORTS_P(NUM_PORTS), .NUM_VNETS_P(NUM_VNETS),
                 .VCS_PER_VNET_P(VCS_PER_VNET), .ORDERED_VNETS(ORDERED_VNETS)) u_va (
    .clk, .rst_n, .now,
    .in_state(vc_state), .in_route(vc_route), .in_stamp(vc_stamp),
    .out_free(out_free), .gnt(va_gnt), .gnt_vc(va_vc), .out_alloc(va_alloc));

  switch_allocator #(.NUM_PORTS_P(NUM_PORTS), .NUM_VNETS_P(NUM_VNETS),
                     .VCS_PER_VNET_P(VCS_PER_VNET), .ORDERED_VNETS(ORDERED_VNETS)) u_sa (
    .clk, .rst_n, .now,
    .in_state(vc_state), .in_route(vc_route), .in_outvc(vc_outvc),
    .in_stamp(vc_stamp), .in_visible(vc_visible), .out_credit(out_credit),
    .in_gnt(sa_gnt), .out_send(sa_send), .out_vc(sa_vc));

  // switch traversal registers: the flit that won SA this cycle
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_flit <= '0;
      st_port <= '0;
    end else begin
      st_flit <= rd_flit;
      st_port <= rd_port;
    end
  end

  crossbar #(.NUM_PORTS_P(NUM_PORTS)) u_xbar (
    .clk, .rst_n, .in_flit(st_flit), .in_port(st_port), .out_flit(flit_out));

  // activity counting
  function automatic logic [5:0] ones(logic [NUM_PORTS*V-1:0] m);
    logic [5:0] c;
    c = '0;
    for (int k = 0; k < NUM_PORTS*V; k++) c += 6'(m[k]);
    return c;
  endfunction

  logic [5:0] n_wr, n_rd, n_va, n_sa, n_xb, n_lt;
  always_comb begin
    n_wr = '0; n_sa = '0; n_xb = '0; n_lt = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      n_wr += 6'(flit_in[p].valid);
      n_sa += 6'(sa_send[p]);
      n_xb += 6'(st_flit[p].valid);
      n_lt += 6'(flit_out[p].valid);
    end
    n_rd = ones(sa_gnt);
    n_va = ones(va_gnt);
  end

  activity_counters #(.CNT_W(CNT_W), .INC_W(6)) u_cnt (
    .clk, .rst_n, .clear(cnt_clear),
    .buf_wr_inc(n_wr), .buf_rd_inc(n_rd), .va_inc(n_va), .sa_inc(n_sa),
    .xbar_inc(n_xb), .link_inc(n_lt),
    .buf_wr_cnt(cnt_buf_wr), .buf_rd_cnt(cnt_buf_rd), .va_cnt(cnt_va),
    .sa_cnt(cnt_sa), .xbar_cnt(cnt_xbar), .link_cnt(cnt_link));
endmodule
