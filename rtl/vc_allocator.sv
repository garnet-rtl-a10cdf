// Separable VC allocator with round-robin arbiters and point-to-point
// ordering.
//
// Requesters are the input VCs in state VA (head routed, no output VC yet);
// each requests a VC of its own virtual network (vnet = VC id / VCS_PER_VNET)
// at the output port found by route computation.
//   Stage 1, per input VC: a VCS_PER_VNET-wide round-robin arbiter picks one
//     of the free output VCs of that vnet at that port.
//   Stage 2, per output VC: a round-robin arbiter over all input VCs grants
//     one of those that picked it.
// Ordering: in a vnet marked in ORDERED_VNETS, a request is held back while
// an older head of the same vnet waits for the same output port anywhere in
// the router (older = larger age now - stamp, ties to the lower index), so
// the packet that arrived first is served first.
// Fully combinational from requests to grants within the VA cycle; only the
// arbiter pointers are registers, moving when their grant is used. The
// separable structure and round-robin arbiters follow the described router;
// the input-first stage order and the age-based ordering rule are this
// design's choices.
module vc_allocator
  import garnet_pkg::*;
#(
  parameter int               NUM_PORTS_P   = garnet_pkg::NUM_PORTS,
  parameter int               NUM_VNETS_P   = garnet_pkg::NUM_VNETS,
  parameter int               VCS_PER_VNET_P = garnet_pkg::VCS_PER_VNET,
  parameter logic [NUM_VNETS_P-1:0] ORDERED_VNETS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [TS_W-1:0] now,
  input  vc_state_e [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             in_state,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][PORT_W-1:0] in_route,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][TS_W-1:0]   in_stamp,
  input  logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             out_free,
  output logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             gnt,
  output logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0][VC_W-1:0]   gnt_vc,
  output logic      [NUM_PORTS_P-1:0][NUM_VNETS_P*VCS_PER_VNET_P-1:0]             out_alloc
);
  localparam int V  = NUM_VNETS_P * VCS_PER_VNET_P;
  localparam int NI = NUM_PORTS_P * V;

  logic [NI-1:0]                    req;      // after the ordering mask
  logic [NI-1:0][VCS_PER_VNET_P-1:0] s1_cand, s1_gnt;
  logic [NI-1:0]                    s1_any;
  logic [NI-1:0][VC_W-1:0]          s1_vc;    // chosen output VC
  logic [NUM_PORTS_P-1:0][V-1:0][NI-1:0] s2_req, s2_gnt;
  logic [NUM_PORTS_P-1:0][V-1:0]         s2_any;
  logic [NI-1:0]                    won;

  function automatic int vnet_of(int vc);
    return vc / VCS_PER_VNET_P;
  endfunction

  // ordering mask
  logic [NI-1:0][TS_W-1:0] age;
  always_comb begin
    for (int a = 0; a < NI; a++) age[a] = now - in_stamp[a / V][a % V];
  end

  always_comb begin
    for (int a = 0; a < NI; a++) begin
      req[a] = (in_state[a / V][a % V] == VC_VA);
      if (ORDERED_VNETS[vnet_of(a % V)]) begin
        for (int b = 0; b < NI; b++) begin
          if (b != a && in_state[b / V][b % V] == VC_VA &&
              vnet_of(b % V) == vnet_of(a % V) &&
              in_route[b / V][b % V] == in_route[a / V][a % V] &&
              (age[b] > age[a] || (age[b] == age[a] && b < a)))
            req[a] = 1'b0;
        end
      end
    end
  end

  // stage 1: each input VC picks a free output VC of its vnet
  for (genvar a = 0; a < NI; a++) begin : g_s1
    localparam int IP = a / V;
    localparam int IV = a % V;
    localparam int VN = IV / VCS_PER_VNET_P;
    always_comb begin
      for (int k = 0; k < VCS_PER_VNET_P; k++)
        s1_cand[a][k] = req[a] && out_free[in_route[IP][IV]][VN*VCS_PER_VNET_P + k];
    end
    rr_arbiter #(.N(VCS_PER_VNET_P)) u_arb (
      .clk, .rst_n, .req(s1_cand[a]), .advance(won[a]), .gnt(s1_gnt[a]), .any(s1_any[a]));
    always_comb begin
      s1_vc[a] = '0;
      for (int k = 0; k < VCS_PER_VNET_P; k++)
        if (s1_gnt[a][k]) s1_vc[a] = VC_W'(VN*VCS_PER_VNET_P + k);
    end
  end

  // stage 2: each output VC grants one of the input VCs that picked it
  for (genvar p = 0; p < NUM_PORTS_P; p++) begin : g_op
    for (genvar o = 0; o < V; o++) begin : g_ov
      always_comb begin
        for (int a = 0; a < NI; a++)
          s2_req[p][o][a] = s1_any[a] && int'(in_route[a / V][a % V]) == p && int'(s1_vc[a]) == o;
      end
      rr_arbiter #(.N(NI)) u_arb (
        .clk, .rst_n, .req(s2_req[p][o]), .advance(1'b1), .gnt(s2_gnt[p][o]), .any(s2_any[p][o]));
      assign out_alloc[p][o] = s2_any[p][o];
    end
  end

  always_comb begin
    for (int a = 0; a < NI; a++) begin
      won[a] = 1'b0;
      for (int p = 0; p < NUM_PORTS_P; p++)
        for (int o = 0; o < V; o++)
          if (s2_gnt[p][o][a]) won[a] = 1'b1;
      gnt[a / V][a % V]    = won[a];
      gnt_vc[a / V][a % V] = s1_vc[a];
    end
  end
endmodule
