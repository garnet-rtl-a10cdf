// Round-robin arbiter.
//
// Grants one of N requests (one-hot `gnt`). Requests at or above the
// priority pointer are served first, lowest index first; if there are none,
// the lowest request overall wins. After a grant that was used (`advance`)
// the pointer moves just past the winner, so every requester is served
// within N grants. The lowest set bit is found as x & -x, so the grant path
// is two short carry chains and a multiplexer. Combinational from request
// to grant; the pointer (kept as a thermometer mask) is the only state.
// Used in every stage of the separable VC and switch allocators, which are
// round-robin throughout.
module rr_arbiter #(
  parameter int N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt,
  output logic         any
);
  logic [N-1:0] mask;        // ones at and above the pointer
  logic [N-1:0] req_hi, gnt_hi, gnt_lo;

  assign req_hi = req & mask;
  assign gnt_hi = req_hi & (~req_hi + 1'b1);
  assign gnt_lo = req & (~req + 1'b1);
  assign gnt    = (req_hi != '0) ? gnt_hi : gnt_lo;
  assign any    = (req != '0);

  // next mask: ones strictly above the winner
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              mask <= '1;
    else if (advance && any) mask <= ~((gnt << 1) - 1'b1);
  end
endmodule
