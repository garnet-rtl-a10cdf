// Activity counters of one router for power estimation.
//
// Each cycle the router reports how many events of each kind happened; the
// counters add them up and saturate at all ones. Counted events: buffer
// writes, buffer reads, VC allocations, switch allocations, crossbar
// traversals and link traversals. A power model multiplies such counts by
// per-event energies to get dynamic power. Which events are counted, and the
// counter width, are this design's choices. `clear` zeroes every counter.
module activity_counters #(
  parameter int CNT_W = 32,
  parameter int INC_W = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic [INC_W-1:0] buf_wr_inc,
  input  logic [INC_W-1:0] buf_rd_inc,
  input  logic [INC_W-1:0] va_inc,
  input  logic [INC_W-1:0] sa_inc,
  input  logic [INC_W-1:0] xbar_inc,
  input  logic [INC_W-1:0] link_inc,
  output logic [CNT_W-1:0] buf_wr_cnt,
  output logic [CNT_W-1:0] buf_rd_cnt,
  output logic [CNT_W-1:0] va_cnt,
  output logic [CNT_W-1:0] sa_cnt,
  output logic [CNT_W-1:0] xbar_cnt,
  output logic [CNT_W-1:0] link_cnt
);
  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] c, logic [INC_W-1:0] i);
    logic [CNT_W:0] s;
    s = {1'b0, c} + (CNT_W+1)'(i);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      buf_wr_cnt <= '0; buf_rd_cnt <= '0; va_cnt <= '0;
      sa_cnt <= '0; xbar_cnt <= '0; link_cnt <= '0;
    end else if (clear) begin
      buf_wr_cnt <= '0; buf_rd_cnt <= '0; va_cnt <= '0;
      sa_cnt <= '0; xbar_cnt <= '0; link_cnt <= '0;
    end else begin
      buf_wr_cnt <= sat_add(buf_wr_cnt, buf_wr_inc);
      buf_rd_cnt <= sat_add(buf_rd_cnt, buf_rd_inc);
      va_cnt     <= sat_add(va_cnt, va_inc);
      sa_cnt     <= sat_add(sa_cnt, sa_inc);
      xbar_cnt   <= sat_add(xbar_cnt, xbar_inc);
      link_cnt   <= sat_add(link_cnt, link_inc);
    end
  end
endmodule
