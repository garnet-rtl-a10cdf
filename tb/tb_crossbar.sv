// Self-checking test of crossbar: random partial permutations of inputs to
// outputs; each output must carry, one cycle later, the flit of the input
// sent to it, and be idle if none was.
module tb_crossbar;
  import garnet_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t [NUM_PORTS-1:0] in_flit, out_flit, expect_q;
  logic [NUM_PORTS-1:0][PORT_W-1:0] in_port;
  int checks = 0, failures = 0;

  crossbar #(.NUM_PORTS_P(NUM_PORTS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    in_flit = '0; in_port = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 300; cyc++) begin
      int perm [NUM_PORTS];
      for (int k = 0; k < NUM_PORTS; k++) perm[k] = k;
      perm.shuffle();
      expect_q = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i] = '0;
        in_flit[i].valid = ($urandom_range(0, 3) != 0);
        in_flit[i].data  = {4{$urandom()}};
        in_flit[i].src   = NODE_W'(i);
        in_port[i] = PORT_W'(perm[i]);
        if (in_flit[i].valid) expect_q[perm[i]] = in_flit[i];
      end
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_flit[o] != expect_q[o]) begin failures++; $display("FAIL output %0d", o); end
      end
    end
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
