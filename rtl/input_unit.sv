// Input port of the router: VC buffers, per-VC state and credit return.
//
// Buffer write (BW): an arriving flit is decoded by its VC id and written into
// that VC's private FIFO (vc_fifo). If it is a head flit, its destination goes
// to route computation in the same cycle (`rc_dest` out, `rc_port` back,
// combinational) and the resulting output port is stored with the VC, which
// moves from IDLE to VA (waiting for VC allocation) and records the arrival
// time stamp `now` for point-to-point ordering.
//
// VA grant: the VC takes the granted output VC and becomes ACTIVE.
// SA grant (`sa_gnt` one-hot over VCs, at most one per cycle because the
// port has a single shared crossbar input): the VC's oldest flit is popped
// and presented on `rd_flit` with its VC field replaced by the output VC;
// a tail returns the VC to IDLE. One cycle later a credit for that VC goes
// upstream, marked `free` for a tail.
//
// One packet per VC at a time is this design's rule: the upstream router may
// only reuse a VC after the tail's free credit returns.
module input_unit
  import garnet_pkg::*;
#(
  parameter int NUM_VCS_P = garnet_pkg::NUM_VCS,
  parameter int DEPTH     = garnet_pkg::BUF_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [TS_W-1:0] now,
  input  flit_t  flit_in,
  output credit_t credit_out,
  // route computation
  output logic [NODE_W-1:0] rc_dest,
  input  logic [PORT_W-1:0] rc_port,
  // VC state to the allocators
  output vc_state_e [NUM_VCS_P-1:0]            vc_state,
  output logic      [NUM_VCS_P-1:0][PORT_W-1:0] vc_route,
  output logic      [NUM_VCS_P-1:0][VC_W-1:0]   vc_outvc,
  output logic      [NUM_VCS_P-1:0][TS_W-1:0]   vc_stamp,
  output logic      [NUM_VCS_P-1:0]             vc_visible,
  // VC allocation result
  input  logic [NUM_VCS_P-1:0]             va_gnt,
  input  logic [NUM_VCS_P-1:0][VC_W-1:0]   va_outvc,
  // switch allocation result
  input  logic [NUM_VCS_P-1:0] sa_gnt,
  output flit_t               rd_flit,
  output logic [PORT_W-1:0]   rd_port
);
  flit_t heads [NUM_VCS_P];
  logic [NUM_VCS_P-1:0] wr_en;
  logic [NUM_VCS_P-1:0] empty_unused;

  assign rc_dest = flit_in.dest;

  for (genvar v = 0; v < NUM_VCS_P; v++) begin : g_vc
    assign wr_en[v] = flit_in.valid && (int'(flit_in.vc) == v);
    vc_fifo #(.DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n,
      .wr_en(wr_en[v]), .wr_flit(flit_in),
      .rd_en(sa_gnt[v]), .head(heads[v]),
      .visible(vc_visible[v]), .empty(empty_unused[v]), .count()
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vc_state[v] <= VC_IDLE;
        vc_route[v] <= '0;
        vc_outvc[v] <= '0;
        vc_stamp[v] <= '0;
      end else begin
        if (wr_en[v] && is_head(flit_in.ftype)) begin
          vc_state[v] <= VC_VA;
          vc_route[v] <= rc_port;
          vc_stamp[v] <= now;
        end else if (va_gnt[v]) begin
          vc_state[v] <= VC_ACTIVE;
          vc_outvc[v] <= va_outvc[v];
        end else if (sa_gnt[v] && is_tail(heads[v].ftype)) begin
          vc_state[v] <= VC_IDLE;
        end
      end
    end

    a_head_to_idle: assert property (@(posedge clk) disable iff (!rst_n)
      (wr_en[v] && is_head(flit_in.ftype)) |-> (vc_state[v] == VC_IDLE ||
        (sa_gnt[v] && is_tail(heads[v].ftype))))
      else $error("head flit written into a busy VC");
  end

  always_comb begin
    rd_flit = '0;
    rd_port = '0;
    for (int v = 0; v < NUM_VCS_P; v++) begin
      if (sa_gnt[v]) begin
        rd_flit       = heads[v];
        rd_flit.valid = 1'b1;
        rd_flit.vc    = vc_outvc[v];
        rd_port       = vc_route[v];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credit_out <= '0;
    else begin
      credit_out <= '0;
      for (int v = 0; v < NUM_VCS_P; v++) begin
        if (sa_gnt[v]) begin
          credit_out.valid <= 1'b1;
          credit_out.vc    <= VC_W'(v);
          credit_out.free  <= is_tail(heads[v].ftype);
        end
      end
    end
  end

  a_one_read: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(sa_gnt))
    else $error("more than one VC read in a cycle");
endmodule
