// Self-checking test of activity_counters: random per-cycle increments are
// summed in the testbench and compared; clear zeroes every counter; a narrow
// counter saturates at all ones.
module tb_activity_counters;
  localparam int CW = 12;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [5:0] inc [6];
  logic [CW-1:0] cnt [6];
  longint model [6];
  int checks = 0, failures = 0;

  activity_counters #(.CNT_W(CW), .INC_W(6)) dut (
    .clk, .rst_n, .clear,
    .buf_wr_inc(inc[0]), .buf_rd_inc(inc[1]), .va_inc(inc[2]),
    .sa_inc(inc[3]), .xbar_inc(inc[4]), .link_inc(inc[5]),
    .buf_wr_cnt(cnt[0]), .buf_rd_cnt(cnt[1]), .va_cnt(cnt[2]),
    .sa_cnt(cnt[3]), .xbar_cnt(cnt[4]), .link_cnt(cnt[5]));
  always #5 clk = ~clk;

  task automatic compare(string what);
    for (int k = 0; k < 6; k++) begin
      longint e;
      e = (model[k] > (2**CW - 1)) ? (2**CW - 1) : model[k];
      checks++;
      if (longint'(cnt[k]) != e) begin
        failures++;
        $display("FAIL %s counter %0d: got %0d expected %0d", what, k, cnt[k], e);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < 6; k++) begin inc[k] = '0; model[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare("reset");
    for (int cyc = 0; cyc < 200; cyc++) begin
      for (int k = 0; k < 6; k++) begin
        inc[k] = 6'($urandom_range(0, 40));
        model[k] += inc[k];
      end
      @(negedge clk);
      compare("sum");
    end
    for (int k = 0; k < 6; k++) inc[k] = '0;
    clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 6; k++) model[k] = 0;
    compare("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
