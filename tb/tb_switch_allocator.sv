// Self-checking test of switch_allocator. Random cycles check: grants only
// to active VCs with a visible flit and a downstream credit, at most one VC
// per input port and one input per output port, out_send/out_vc matching the
// grants, at least one grant whenever there is a request, and in the ordered
// vnet no grant while an older packet of the same input and route is held.
// A directed case checks round-robin between two inputs for one output.
module tb_switch_allocator;
  import garnet_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS;
  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  vc_state_e [P-1:0][V-1:0] in_state;
  logic [P-1:0][V-1:0][PORT_W-1:0] in_route;
  logic [P-1:0][V-1:0][VC_W-1:0] in_outvc;
  logic [P-1:0][V-1:0][TS_W-1:0] in_stamp;
  logic [P-1:0][V-1:0] in_visible, out_credit, in_gnt;
  logic [P-1:0] out_send;
  logic [P-1:0][VC_W-1:0] out_vc;
  int checks = 0, failures = 0;

  switch_allocator #(.ORDERED_VNETS(2'b01)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int vn(int v); return v / VCS_PER_VNET; endfunction

  task automatic check_rules();
    int per_out [P];
    bit any_req, any_g;
    any_req = 0; any_g = 0;
    for (int o = 0; o < P; o++) per_out[o] = 0;
    for (int i = 0; i < P; i++) begin
      int n;
      n = 0;
      for (int v = 0; v < V; v++) begin
        bit req, blocked;
        req = in_state[i][v] == VC_ACTIVE && in_visible[i][v] &&
              out_credit[in_route[i][v]][in_outvc[i][v]];
        blocked = 0;
        if (vn(v) == 0)
          for (int w = 0; w < V; w++)
            if (w != v && in_state[i][w] != VC_IDLE && vn(w) == 0 &&
                in_route[i][w] == in_route[i][v] &&
                (TS_W'(now - in_stamp[i][w]) > TS_W'(now - in_stamp[i][v]) ||
                 (in_stamp[i][w] == in_stamp[i][v] && w < v)))
              blocked = 1;
        if (req && !blocked) any_req = 1;
        if (in_gnt[i][v]) begin
          n++; any_g = 1;
          check(req, "grant only to a ready request");
          check(!blocked, "ordered vnet: older packet first");
          per_out[in_route[i][v]]++;
          check(out_send[in_route[i][v]] && out_vc[in_route[i][v]] == in_outvc[i][v],
                "out_send / out_vc match");
        end
      end
      check(n <= 1, "one VC per input port");
    end
    for (int o = 0; o < P; o++) begin
      check(per_out[o] <= 1, "one input per output port");
      check(out_send[o] == (per_out[o] == 1), "out_send only with a grant");
    end
    check(any_req == any_g, "grant whenever there is a request");
  endtask

  initial begin
    in_state = '0; in_route = '0; in_outvc = '0; in_stamp = '0;
    in_visible = '0; out_credit = '0; now = 16'd500;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: inputs 1 and 3 both want output 2 every cycle
    in_state[1][5] = VC_ACTIVE; in_route[1][5] = 3'd2; in_outvc[1][5] = 3'd4; in_visible[1][5] = 1;
    in_state[3][6] = VC_ACTIVE; in_route[3][6] = 3'd2; in_outvc[3][6] = 3'd5; in_visible[3][6] = 1;
    out_credit[2][4] = 1; out_credit[2][5] = 1;
    begin
      int a, b;
      a = 0; b = 0;
      for (int k = 0; k < 10; k++) begin
        @(negedge clk);
        if (in_gnt[1][5]) a++;
        if (in_gnt[3][6]) b++;
      end
      check(a == 5 && b == 5, "round-robin between inputs");
    end
    for (int cyc = 0; cyc < 500; cyc++) begin
      @(negedge clk);
      now = now + 16'd2;
      for (int i = 0; i < P; i++) for (int v = 0; v < V; v++) begin
        in_state[i][v]   = vc_state_e'($urandom_range(0, 2));
        in_route[i][v]   = PORT_W'($urandom_range(0, P-1));
        in_outvc[i][v]   = VC_W'($urandom_range(0, V-1));
        in_stamp[i][v]   = now - TS_W'($urandom_range(0, 40));
        in_visible[i][v] = $urandom_range(0, 1);
        out_credit[i][v] = ($urandom_range(0, 3) != 0);
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
