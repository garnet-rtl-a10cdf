// Output port of the router: credit and VC-free bookkeeping for the
// downstream input port.
//
// For each downstream VC it keeps a credit count (free buffer slots, reset to
// DEPTH) and a free bit (no packet of this router holds the VC, reset to 1).
// A VC allocation (`alloc`, one bit per VC) clears the free bit; a switch grant (`send`)
// takes one credit; a returned credit adds one, and a credit marked `free`
// (the tail left the downstream VC) sets the free bit again. All updates
// take effect at the next clock edge; the outputs are registers. The network
// interface uses the same block to inject into its router.
module output_unit
  import garnet_pkg::*;
#(
  parameter int NUM_VCS_P = garnet_pkg::NUM_VCS,
  parameter int DEPTH     = garnet_pkg::BUF_DEPTH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [NUM_VCS_P-1:0]  alloc,
  input  logic                  send,
  input  logic [VC_W-1:0]       send_vc,
  input  credit_t               credit_in,
  output logic [NUM_VCS_P-1:0]  vc_free,
  output logic [NUM_VCS_P-1:0]  has_credit
);
  localparam int CW = $clog2(DEPTH+1);
  logic [CW-1:0] credits [NUM_VCS_P];

  for (genvar v = 0; v < NUM_VCS_P; v++) begin : g_vc
    logic inc, dec;
    assign inc = credit_in.valid && (int'(credit_in.vc) == v);
    assign dec = send && (int'(send_vc) == v);
    assign has_credit[v] = (credits[v] != 0);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        credits[v] <= CW'(DEPTH);
        vc_free[v] <= 1'b1;
      end else begin
        credits[v] <= credits[v] + CW'(inc) - CW'(dec);
        if (alloc[v])                      vc_free[v] <= 1'b0;
        else if (inc && credit_in.free)   vc_free[v] <= 1'b1;
      end
    end

    a_credit_ok: assert property (@(posedge clk) disable iff (!rst_n)
      (dec |-> (credits[v] != 0 || inc)) and (inc |-> (int'(credits[v]) < DEPTH || dec)))
      else $error("credit count out of range");
    a_alloc_free: assert property (@(posedge clk) disable iff (!rst_n)
      alloc[v] |-> vc_free[v])
      else $error("allocated a busy VC");
  end
endmodule
