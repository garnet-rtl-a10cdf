// Self-checking test of output_unit: credits per VC against a model under
// random sends and returns, VC free bits cleared by allocation and set again
// only by a credit marked free.
module tb_output_unit;
  import garnet_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic [NUM_VCS-1:0] alloc, vc_free, has_credit;
  logic send;
  logic [VC_W-1:0] send_vc;
  credit_t credit_in;
  int checks = 0, failures = 0;
  int cred [NUM_VCS];
  bit busy [NUM_VCS];

  output_unit #(.NUM_VCS_P(NUM_VCS), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    alloc = '0; send = 0; send_vc = '0; credit_in = '0;
    for (int v = 0; v < NUM_VCS; v++) begin cred[v] = DEPTH; busy[v] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 600; cyc++) begin
      int sv, cv, av;
      alloc = '0; send = 0; credit_in = '0;
      sv = $urandom_range(0, NUM_VCS-1);
      cv = $urandom_range(0, NUM_VCS-1);
      av = $urandom_range(0, NUM_VCS-1);
      if (cred[sv] > 0 && $urandom_range(0, 1)) begin send = 1; send_vc = VC_W'(sv); end
      if ((cred[cv] < DEPTH || (send && sv == cv)) && $urandom_range(0, 1)) begin
        credit_in.valid = 1; credit_in.vc = VC_W'(cv);
        credit_in.free = ($urandom_range(0, 3) == 0);
      end
      if (!busy[av] && $urandom_range(0, 3) == 0) alloc[av] = 1'b1;
      @(negedge clk);
      if (send) cred[sv]--;
      if (credit_in.valid) begin
        cred[cv]++;
        if (credit_in.free && !alloc[cv]) busy[cv] = 0;
      end
      if (alloc[av]) busy[av] = 1;
      for (int v = 0; v < NUM_VCS; v++) begin
        check(has_credit[v] == (cred[v] > 0), "has_credit");
        check(vc_free[v] == !busy[v], "vc_free");
      end
    end
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
