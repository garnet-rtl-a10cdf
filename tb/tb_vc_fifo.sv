// Self-checking test of vc_fifo: first-in first-out order, the count, and
// the one-cycle bubble between buffer write and the flit becoming visible
// to switch allocation (written in cycle t, visible from cycle t+2).
module tb_vc_fifo;
  import garnet_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  flit_t wr_flit, head;
  logic visible, empty;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  vc_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(int k);
    flit_t f;
    f = '0;
    f.valid = 1'b1;
    f.ftype = FLIT_BODY;
    f.data  = FLIT_DATA_W'(32'hA000 + k);
    return f;
  endfunction

  int model_q[$];
  int next_w = 0;

  initial begin
    wr_flit = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !visible && count == 0, "empty after reset");
    // one write: not visible the next cycle, visible the one after
    wr_en = 1; wr_flit = mk(next_w); model_q.push_back(next_w++);
    @(negedge clk); wr_en = 0;
    check(count == 1 && !visible, "bubble cycle after write");
    @(negedge clk);
    check(visible && head.data == FLIT_DATA_W'(32'hA000), "visible two cycles after write");
    // random traffic against a queue model
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic do_w, do_r;
      do_r = visible && ($urandom_range(0, 2) != 0);
      do_w = (model_q.size() - (do_r ? 1 : 0) < DEPTH) && ($urandom_range(0, 1) != 0);
      if (do_r) begin
        int exp;
        exp = model_q.pop_front();
        check(head.data == FLIT_DATA_W'(32'hA000 + exp), "FIFO order");
      end
      rd_en = do_r;
      wr_en = do_w;
      if (do_w) begin wr_flit = mk(next_w); model_q.push_back(next_w++); end
      @(negedge clk);
      check(int'(count) == model_q.size(), "count");
    end
    rd_en = 0; wr_en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
