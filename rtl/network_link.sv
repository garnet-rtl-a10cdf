// Link traversal (LT) between two routers, or a router and its interface.
//
// Flits go downstream and credits upstream, each through LATENCY register
// stages. A lower-bandwidth link (an off-chip link, say) is modelled not by
// narrowing it but by a longer latency, as the described network does; the
// shift register is this design's implementation of that latency.
module network_link
  import garnet_pkg::*;
#(
  parameter int LATENCY = 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  flit_t   flit_in,
  output flit_t   flit_out,
  input  credit_t credit_in,
  output credit_t credit_out
);
  flit_t   fpipe [LATENCY];
  credit_t cpipe [LATENCY];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < LATENCY; k++) begin
        fpipe[k] <= '0;
        cpipe[k] <= '0;
      end
    end else begin
      fpipe[0] <= flit_in;
      cpipe[0] <= credit_in;
      for (int k = 1; k < LATENCY; k++) begin
        fpipe[k] <= fpipe[k-1];
        cpipe[k] <= cpipe[k-1];
      end
    end
  end

  assign flit_out   = fpipe[LATENCY-1];
  assign credit_out = cpipe[LATENCY-1];
endmodule
