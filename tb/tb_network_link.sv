// Self-checking test of network_link with a latency of 3: every flit and
// every credit must come out exactly 3 cycles after it went in, unchanged.
module tb_network_link;
  import garnet_pkg::*;
  localparam int LAT = 3;
  logic clk = 0, rst_n = 0;
  flit_t flit_in, flit_out;
  credit_t credit_in, credit_out;
  int checks = 0, failures = 0;
  flit_t fhist [$];
  credit_t chist [$];

  network_link #(.LATENCY(LAT)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    flit_in = '0; credit_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < LAT; k++) begin fhist.push_back('0); chist.push_back('0); end
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      checks++;
      if (flit_out != fhist[0] || credit_out != chist[0]) begin
        failures++;
        $display("FAIL cycle %0d", cyc);
      end
      void'(fhist.pop_front()); void'(chist.pop_front());
      flit_in = '0; credit_in = '0;
      flit_in.valid = $urandom_range(0, 1);
      flit_in.data  = {4{$urandom()}};
      flit_in.vc    = VC_W'($urandom());
      credit_in.valid = $urandom_range(0, 1);
      credit_in.vc    = VC_W'($urandom());
      fhist.push_back(flit_in); chist.push_back(credit_in);
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
