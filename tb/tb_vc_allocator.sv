// Self-checking test of vc_allocator. Random cycles check the allocation
// rules against the inputs: grants only to waiting VCs, to a free output VC
// of the requester's vnet at its output port, never one output VC twice,
// at least one grant whenever some request can be met, and in the ordered
// vnet never a grant while an older head waits for the same port. A directed
// case checks that the older of two ordered heads wins and that round-robin
// alternates between two unordered requesters.
module tb_vc_allocator;
  import garnet_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS;
  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  vc_state_e [P-1:0][V-1:0] in_state;
  logic [P-1:0][V-1:0][PORT_W-1:0] in_route;
  logic [P-1:0][V-1:0][TS_W-1:0] in_stamp;
  logic [P-1:0][V-1:0] out_free, gnt, out_alloc;
  logic [P-1:0][V-1:0][VC_W-1:0] gnt_vc;
  int checks = 0, failures = 0;

  vc_allocator #(.ORDERED_VNETS(2'b01)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int vn(int v); return v / VCS_PER_VNET; endfunction

  task automatic check_rules();
    bit used [P][V];
    bit any_ok, any_g;
    any_ok = 0; any_g = 0;
    for (int p = 0; p < P; p++) for (int v = 0; v < V; v++) used[p][v] = 0;
    for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin
      bit blocked, can;
      int r;
      r = int'(in_route[i][v]);
      blocked = 0;
      if (vn(v) == 0)
        for (int j = 0; j < P; j++) for (int w = 0; w < V; w++)
          if ((j != i || w != v) && in_state[j][w] == VC_VA && vn(w) == 0 &&
              in_route[j][w] == in_route[i][v] &&
              (TS_W'(now - in_stamp[j][w]) > TS_W'(now - in_stamp[i][v]) ||
               (in_stamp[j][w] == in_stamp[i][v] && (j*V + w) < (i*V + v))))
            blocked = 1;
      can = 0;
      for (int k = 0; k < VCS_PER_VNET; k++) if (out_free[r][vn(v)*VCS_PER_VNET + k]) can = 1;
      if (in_state[i][v] == VC_VA && can && !blocked) any_ok = 1;
      if (gnt[i][v]) begin
        int o;
        o = int'(gnt_vc[i][v]);
        any_g = 1;
        check(in_state[i][v] == VC_VA, "grant to a waiting VC");
        check(!blocked, "ordered vnet: older head first");
        check(vn(o) == vn(v), "output VC in own vnet");
        check(out_free[r][o], "output VC was free");
        check(!used[r][o], "output VC granted once");
        check(out_alloc[r][o], "out_alloc marks the grant");
        used[r][o] = 1;
      end
    end
    check(any_ok == any_g, "grant whenever a request can be met");
  endtask

  initial begin
    in_state = '0; in_route = '0; in_stamp = '0; out_free = '0; now = 16'd1000;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: ordered vnet 0, two heads for port 3, one free VC; the older
    // (input 4, younger index) must win
    @(negedge clk);
    in_state[1][0] = VC_VA; in_route[1][0] = 3'd3; in_stamp[1][0] = 16'd990;
    in_state[4][1] = VC_VA; in_route[4][1] = 3'd3; in_stamp[4][1] = 16'd980;
    out_free[3][2] = 1'b1;
    #1;
    check(gnt[4][1] && !gnt[1][0] && gnt_vc[4][1] == 3'd2, "older ordered head wins");
    // directed: unordered vnet 1, two heads always waiting, one free VC:
    // round-robin alternates
    in_state = '0;
    in_state[0][4] = VC_VA; in_route[0][4] = 3'd1;
    in_state[2][5] = VC_VA; in_route[2][5] = 3'd1;
    out_free = '0; out_free[1][6] = 1'b1;
    begin
      int w0, w2;
      w0 = 0; w2 = 0;
      for (int k = 0; k < 8; k++) begin
        @(negedge clk);
        if (gnt[0][4]) w0++;
        if (gnt[2][5]) w2++;
      end
      check(w0 == 4 && w2 == 4, "round-robin fairness");
    end
    // random
    for (int cyc = 0; cyc < 400; cyc++) begin
      @(negedge clk);
      now = now + 16'd3;
      for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin
        in_state[i][v] = vc_state_e'(($urandom_range(0, 2) == 0) ? VC_VA : VC_IDLE);
        in_route[i][v] = PORT_W'($urandom_range(0, P-1));
        in_stamp[i][v] = now - TS_W'($urandom_range(0, 50));
        out_free[i][v] = ($urandom_range(0, 2) == 0);
      end
      #1;
      check_rules();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
