// Switch traversal (ST): NUM_PORTS x NUM_PORTS crossbar with registered
// outputs.
//
// Each input presents one flit (from its switch-traversal register) and the
// output port it goes to. Each output takes the valid input bound for it;
// the switch allocator guarantees at most one. The result is registered, so
// a flit in ST in cycle t drives the link (LT) in cycle t+1. A multiplexer
// crossbar with output registers is this design's choice.
module crossbar
  import garnet_pkg::*;
#(
  parameter int NUM_PORTS_P = garnet_pkg::NUM_PORTS
) (
  input  logic clk,
  input  logic rst_n,
  input  flit_t [NUM_PORTS_P-1:0]             in_flit,
  input  logic  [NUM_PORTS_P-1:0][PORT_W-1:0] in_port,
  output flit_t [NUM_PORTS_P-1:0]             out_flit
);
  flit_t [NUM_PORTS_P-1:0] sel;

  always_comb begin
    for (int o = 0; o < NUM_PORTS_P; o++) begin
      sel[o] = '0;
      for (int i = 0; i < NUM_PORTS_P; i++)
        if (in_flit[i].valid && int'(in_port[i]) == o) sel[o] = in_flit[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_flit <= '0;
    else        out_flit <= sel;
  end

  for (genvar o = 0; o < NUM_PORTS_P; o++) begin : g_chk
    logic [NUM_PORTS_P-1:0] hits;
    always_comb
      for (int i = 0; i < NUM_PORTS_P; i++)
        hits[i] = in_flit[i].valid && int'(in_port[i]) == o;
    a_one_per_output: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hits))
      else $error("two flits for one crossbar output");
  end
endmodule
