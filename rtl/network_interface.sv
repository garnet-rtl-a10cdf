// Network interface (NI) between a node and its router's local port.
//
// Inject side: a message names a set of destinations (`msg_dest_mask`, one
// bit per node), a virtual network, a length of 1..MAX_PKT_FLITS flits and
// one data word per flit. The network has no multicast, so the NI turns the
// message into one unicast packet per destination, lowest node number
// first. For each packet it waits for a free VC of the message's vnet at the
// router's local input (lowest free VC), then sends the head, body and tail
// flits, one per cycle while that VC has credits. An output_unit keeps the
// VC-free bits and credits, exactly as a router output port does.
// `msg_ready` is high while the NI is idle; a message is taken on
// msg_valid && msg_ready and `msg_done` pulses after its last packet's tail
// has left. `pkt_sent` pulses once per unicast packet sent.
//
// Eject side: every flit coming from the router is accepted, shown on
// `ej_flit` the next cycle, and credited back at the same time (marked free
// for a tail). `ej_pkt_done` pulses with the tail of each received packet.
//
// Splitting multicasts at the NI and the flit types follow the described
// network; the message format, destination order and VC choice are this
// design's own.
module network_interface
  import garnet_pkg::*;
#(
  parameter int NODE_ID       = 0,
  parameter int NUM_NODES     = 16,
  parameter int MAX_PKT_FLITS = 5,
  parameter int DEPTH         = garnet_pkg::BUF_DEPTH,
  parameter int VNET_W        = (NUM_VNETS > 1) ? $clog2(NUM_VNETS) : 1,
  parameter int LEN_W         = $clog2(MAX_PKT_FLITS + 1)
) (
  input  logic clk,
  input  logic rst_n,
  // message in
  input  logic                                     msg_valid,
  output logic                                     msg_ready,
  input  logic [NUM_NODES-1:0]                     msg_dest_mask,
  input  logic [VNET_W-1:0]                        msg_vnet,
  input  logic [LEN_W-1:0]                         msg_len,
  input  logic [MAX_PKT_FLITS-1:0][FLIT_DATA_W-1:0] msg_data,
  output logic                                     msg_done,
  output logic                                     pkt_sent,
  // to / from router local input
  output flit_t   flit_out,
  input  credit_t credit_in,
  // from / to router local output
  input  flit_t   flit_in,
  output credit_t credit_out,
  output flit_t   ej_flit,
  output logic    ej_pkt_done
);
  typedef enum logic [1:0] {NI_IDLE, NI_ALLOC, NI_SEND} ni_state_e;
  ni_state_e state;

  logic [NUM_NODES-1:0]                      dests;
  logic [VNET_W-1:0]                         vnet;
  logic [LEN_W-1:0]                          len;
  logic [MAX_PKT_FLITS-1:0][FLIT_DATA_W-1:0] data;
  logic [LEN_W-1:0]                          idx;     // next flit to send
  logic [VC_W-1:0]                           cur_vc;
  logic [NODE_W-1:0]                         cur_dest;

  logic [NUM_VCS-1:0] vc_free, has_credit, alloc;
  logic               send;
  logic               found;
  logic [VC_W-1:0]    free_vc;

  // lowest destination still to be served
  always_comb begin
    cur_dest = '0;
    for (int n = NUM_NODES-1; n >= 0; n--)
      if (dests[n]) cur_dest = NODE_W'(n);
  end

  // lowest free VC of the message's vnet
  always_comb begin
    found   = 1'b0;
    free_vc = '0;
    for (int k = VCS_PER_VNET-1; k >= 0; k--) begin
      if (vc_free[int'(vnet)*VCS_PER_VNET + k]) begin
        found   = 1'b1;
        free_vc = VC_W'(int'(vnet)*VCS_PER_VNET + k);
      end
    end
  end

  assign msg_ready = (state == NI_IDLE);
  assign send      = (state == NI_SEND) && has_credit[cur_vc];

  always_comb begin
    alloc = '0;
    if (state == NI_ALLOC && found) alloc[free_vc] = 1'b1;
  end

  output_unit #(.NUM_VCS_P(NUM_VCS), .DEPTH(DEPTH)) u_credits (
    .clk, .rst_n, .alloc(alloc), .send(send), .send_vc(cur_vc),
    .credit_in(credit_in), .vc_free(vc_free), .has_credit(has_credit));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= NI_IDLE;
      dests    <= '0;
      vnet     <= '0;
      len      <= '0;
      data     <= '0;
      idx      <= '0;
      cur_vc   <= '0;
      flit_out <= '0;
      msg_done <= 1'b0;
      pkt_sent <= 1'b0;
    end else begin
      flit_out <= '0;
      msg_done <= 1'b0;
      pkt_sent <= 1'b0;
      case (state)
        NI_IDLE: if (msg_valid) begin
          dests <= msg_dest_mask;
          vnet  <= msg_vnet;
          len   <= (msg_len == 0) ? LEN_W'(1) : msg_len;
          data  <= msg_data;
          state <= (msg_dest_mask == '0) ? NI_IDLE : NI_ALLOC;
          msg_done <= (msg_dest_mask == '0);
        end
        NI_ALLOC: if (found) begin
          cur_vc <= free_vc;
          idx    <= '0;
          state  <= NI_SEND;
        end
        NI_SEND: if (send) begin
          flit_out.valid <= 1'b1;
          flit_out.vc    <= cur_vc;
          flit_out.src   <= NODE_W'(NODE_ID);
          flit_out.dest  <= cur_dest;
          flit_out.data  <= data[idx];
          if (len == 1)               flit_out.ftype <= FLIT_HEAD_TAIL;
          else if (idx == 0)          flit_out.ftype <= FLIT_HEAD;
          else if (idx == len - 1'b1) flit_out.ftype <= FLIT_TAIL;
          else                        flit_out.ftype <= FLIT_BODY;
          idx <= idx + 1'b1;
          if (idx == len - 1'b1) begin
            pkt_sent <= 1'b1;
            dests <= dests & ~(NUM_NODES'(1) << cur_dest);
            if ((dests & ~(NUM_NODES'(1) << cur_dest)) == '0) begin
              state    <= NI_IDLE;
              msg_done <= 1'b1;
            end else begin
              state <= NI_ALLOC;
            end
          end
        end
        default: state <= NI_IDLE;
      endcase
    end
  end

  // eject side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ej_flit     <= '0;
      credit_out  <= '0;
      ej_pkt_done <= 1'b0;
    end else begin
      ej_flit           <= flit_in;
      ej_pkt_done       <= flit_in.valid && is_tail(flit_in.ftype);
      credit_out.valid  <= flit_in.valid;
      credit_out.vc     <= flit_in.vc;
      credit_out.free   <= flit_in.valid && is_tail(flit_in.ftype);
    end
  end
endmodule
