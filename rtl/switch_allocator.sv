// Separable switch allocator with round-robin arbiters and point-to-point
// ordering.
//
// A VC requests the switch when it is ACTIVE (holds an output VC), has a
// visible flit and its output VC has a credit downstream.
//   Stage 1, per input port: a round-robin arbiter over the port's VCs picks
//     one request (one shared crossbar input per port).
//   Stage 2, per output port: a round-robin arbiter over input ports grants
//     one of the inputs whose pick goes to that output.
// A stage-1 pointer moves only when its pick also wins stage 2.
// Ordering: in a vnet of ORDERED_VNETS, a VC may not request while another VC
// of the same input port and vnet, bound for the same output port, holds an
// older packet (older = larger age now - stamp, ties to the lower VC). This
// is stricter than only ordering simultaneous requests: the older packet
// keeps its turn even while it waits for a credit, so packets on the same
// route never overtake.
// Combinational from requests to grants within the SA cycle. The separable
// round-robin structure follows the described router; the stage order and
// the exact ordering rule are this design's choices.
module switch_allocator
  import garnet_pkg::*;
#(
  parameter int               NUM_PORTS_P    = garnet_pkg::NUM_PORTS,
  parameter int               NUM_VNETS_P    = garnet_pkg::NUM_VNETS,
  parameter int               VCS_PER_VNET_P = garnet_pkg::VCS_PER_VNET,
  parameter logic [NUM_VNETS_P-1:0] ORDERED_VNETS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [TS_W-1:0] now,
  input  vc_state_e [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             in_state,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][PORT_W-1:0] in_route,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][VC_W-1:0]   in_outvc,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][TS_W-1:0]   in_stamp,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             in_visible,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             out_credit,
  output logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             in_gnt,
  output logic      [NUM_PORTS_P-1:0]                                             out_send,
  output logic      [NUM_PORTS_P-1:0][VC_W-1:0]                                   out_vc
);
  localparam int V = NUM_VNETS_P * VCS_PER_VNET_P;

  logic [NUM_PORTS_P-1:0][V-1:0]            req, s1_gnt;
  logic [NUM_PORTS_P-1:0]                   s1_any;
  logic [NUM_PORTS_P-1:0][PORT_W-1:0]       s1_port;
  logic [NUM_PORTS_P-1:0][VC_W-1:0]         s1_outvc;
  logic [NUM_PORTS_P-1:0][NUM_PORTS_P-1:0]  s2_req, s2_gnt;   // [out][in]
  logic [NUM_PORTS_P-1:0]                   s2_any;
  logic [NUM_PORTS_P-1:0]                   in_won;

  function automatic int vnet_of(int vc);
    return vc / VCS_PER_VNET_P;
  endfunction

  logic [NUM_PORTS_P-1:0][V-1:0][TS_W-1:0] age;
  always_comb begin
    for (int i = 0; i < NUM_PORTS_P; i++)
      for (int v = 0; v < V; v++) age[i][v] = now - in_stamp[i][v];
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS_P; i++) begin
      for (int v = 0; v < V; v++) begin
        req[i][v] = (in_state[i][v] == VC_ACTIVE) && in_visible[i][v] &&
                    out_credit[in_route[i][v]][in_outvc[i][v]];
        if (ORDERED_VNETS[vnet_of(v)]) begin
          for (int w = 0; w < V; w++) begin
            if (w != v && in_state[i][w] != VC_IDLE && vnet_of(w) == vnet_of(v) &&
                in_route[i][w] == in_route[i][v] &&
                (age[i][w] > age[i][v] || (age[i][w] == age[i][v] && w < v)))
              req[i][v] = 1'b0;
          end
        end
      end
    end
  end

  for (genvar i = 0; i < NUM_PORTS_P; i++) begin : g_in
    rr_arbiter #(.N(V)) u_arb (
      .clk, .rst_n, .req(req[i]), .advance(in_won[i]), .gnt(s1_gnt[i]), .any(s1_any[i]));
    always_comb begin
      s1_port[i]  = '0;
      s1_outvc[i] = '0;
      for (int v = 0; v < V; v++)
        if (s1_gnt[i][v]) begin
          s1_port[i]  = in_route[i][v];
          s1_outvc[i] = in_outvc[i][v];
        end
    end
  end

  for (genvar o = 0; o < NUM_PORTS_P; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS_P; i++)
        s2_req[o][i] = s1_any[i] && int'(s1_port[i]) == o;
    end
    rr_arbiter #(.N(NUM_PORTS_P)) u_arb (
      .clk, .rst_n, .req(s2_req[o]), .advance(1'b1), .gnt(s2_gnt[o]), .any(s2_any[o]));
    always_comb begin
      out_send[o] = s2_any[o];
      out_vc[o]   = '0;
      for (int i = 0; i < NUM_PORTS_P; i++)
        if (s2_gnt[o][i]) out_vc[o] = s1_outvc[i];
    end
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS_P; i++) begin
      in_won[i] = 1'b0;
      for (int o = 0; o < NUM_PORTS_P; o++)
        if (s2_gnt[o][i]) in_won[i] = 1'b1;
      in_gnt[i] = in_won[i] ? s1_gnt[i] : '0;
    end
  end
endmodule
