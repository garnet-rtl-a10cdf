// Private flit buffer of one virtual channel.
//
// A DEPTH-entry circular FIFO of flits. A flit written in cycle t (buffer
// write, BW) is stored at the clock edge ending t but is not reported as
// `visible` until cycle t+2: cycle t+1 is the bubble that the five-stage
// pipeline puts between BW and switch allocation for body and tail flits
// (and during which a head flit does VC allocation). `head` is the oldest
// stored flit; `rd_en` pops it and may only be raised while `visible`.
// Overflow and underflow are ruled out by credit flow control and are
// checked by assertions. A private buffer per VC and the bubble follow the
// described router; the circular-FIFO organisation is this design's own.
module vc_fifo
  import garnet_pkg::*;
#(
  parameter int DEPTH = garnet_pkg::BUF_DEPTH
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  wr_en,
  input  flit_t wr_flit,
  input  logic  rd_en,
  output flit_t head,
  output logic  visible,   // a flit written at least two cycles ago is waiting
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  flit_t mem [DEPTH];
  logic [AW-1:0] wptr, rptr;
  logic          wrote_last;

  assign head    = mem[rptr];
  assign empty   = (count == 0);
  assign visible = wrote_last ? (count > 1) : (count != 0);

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (int'(p) == DEPTH-1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
      count <= '0;
      wrote_last <= 1'b0;
    end else begin
      wrote_last <= wr_en;
      if (wr_en) wptr <= incr(wptr);
      if (rd_en) rptr <= incr(rptr);
      count <= count + $bits(count)'(wr_en) - $bits(count)'(rd_en);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wptr] <= wr_flit;
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) wr_en |-> (int'(count) < DEPTH || rd_en);
  endproperty
  a_no_overflow: assert property (p_no_overflow) else $error("vc_fifo overflow");
  property p_no_underflow;
    @(posedge clk) disable iff (!rst_n) rd_en |-> visible;
  endproperty
  a_no_underflow: assert property (p_no_underflow) else $error("vc_fifo read while not visible");
endmodule
