// Self-checking test of input_unit: a head flit is buffered in its VC and
// routed in the same cycle (state VA, route stored); a VA grant makes the
// VC active; an SA grant pops the flit with the output VC substituted; a
// credit for the VC follows one cycle later, marked free for the tail,
// which returns the VC to idle. Route computation is modelled by the
// testbench as dest % 5.
module tb_input_unit;
  import garnet_pkg::*;
  localparam int V = NUM_VCS;
  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now = '0;
  flit_t flit_in, rd_flit;
  credit_t credit_out;
  logic [NODE_W-1:0] rc_dest;
  logic [PORT_W-1:0] rc_port;
  vc_state_e [V-1:0] vc_state;
  logic [V-1:0][PORT_W-1:0] vc_route;
  logic [V-1:0][VC_W-1:0] vc_outvc;
  logic [V-1:0][TS_W-1:0] vc_stamp;
  logic [V-1:0] vc_visible, va_gnt, sa_gnt;
  logic [V-1:0][VC_W-1:0] va_outvc;
  logic [PORT_W-1:0] rd_port;
  int checks = 0, failures = 0;

  input_unit #(.NUM_VCS_P(V), .DEPTH(4)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1'b1;
  assign rc_port = PORT_W'(int'(rc_dest) % NUM_PORTS);

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic flit_t mk(flit_type_e t, int vc, int dest, int d);
    flit_t f;
    f = '0; f.valid = 1; f.ftype = t; f.vc = VC_W'(vc); f.dest = NODE_W'(dest);
    f.src = 6'd9; f.data = FLIT_DATA_W'(d);
    return f;
  endfunction

  // send a 3-flit packet on VC vc to dest, route it, drain it
  task automatic packet(int vc, int dest, int ovc);
    logic [TS_W-1:0] t0;
    flit_in = mk(FLIT_HEAD, vc, dest, 100); t0 = now;
    @(negedge clk);
    check(vc_state[vc] == VC_VA, "head -> VA");
    check(int'(vc_route[vc]) == dest % NUM_PORTS, "route stored");
    check(vc_stamp[vc] == t0, "arrival stamp");
    check(!vc_visible[vc], "bubble after BW");
    flit_in = mk(FLIT_BODY, vc, dest, 101);
    va_gnt[vc] = 1; va_outvc[vc] = VC_W'(ovc);
    @(negedge clk);
    va_gnt = '0;
    check(vc_state[vc] == VC_ACTIVE && int'(vc_outvc[vc]) == ovc, "VA grant -> active");
    check(vc_visible[vc], "head visible at SA stage");
    flit_in = mk(FLIT_TAIL, vc, dest, 102);
    for (int k = 0; k < 3; k++) begin
      sa_gnt[vc] = 1; #1;
      check(rd_flit.valid && rd_flit.data == FLIT_DATA_W'(100 + k), "read order");
      check(int'(rd_flit.vc) == ovc && int'(rd_port) == dest % NUM_PORTS, "output VC and port");
      @(negedge clk);
      flit_in = '0;
      sa_gnt = '0;
      check(credit_out.valid && int'(credit_out.vc) == vc, "credit returned");
      check(credit_out.free == (k == 2), "free only for tail");
      if (k < 2) @(negedge clk);
    end
    check(vc_state[vc] == VC_IDLE, "tail -> idle");
  endtask

  initial begin
    flit_in = '0; va_gnt = '0; va_outvc = '0; sa_gnt = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(credit_out.valid == 0, "no credit after reset");
    packet(2, 13, 5);
    packet(7, 4, 1);
    packet(0, 21, 3);
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
