// Self-checking test of one router at node (1,1) of a 4x4 mesh.
// The testbench plays the upstream routers (it sends only with credits,
// counted from the router's credit returns) and the downstream routers
// (it returns a credit two cycles after each flit, unless held).
// Cases:
//  1. zero-load latency: a one-flit packet leaves on flit_out exactly
//     4 cycles after it entered (BW+RC, VA, SA, ST), on the X-Y port;
//  2. a 5-flit packet streams out one flit per cycle as far as the upstream
//     credits allow (the first BUF_DEPTH flits), all on the head's output VC; the downstream VC is freed only
//     by the tail credit;
//  3. credit stall: with credits held downstream only BUF_DEPTH flits leave;
//     the rest follow when credits return;
//  4. switch contention: two inputs send to one output at once; all flits
//     arrive, each packet intact on its own output VC;
//  5. point-to-point ordering in vnet 0: a one-flit packet that arrives
//     one cycle after a 5-flit packet on another VC of the same input and
//     route must not leave before that packet's tail.
module tb_router;
  import garnet_pkg::*;
  localparam int P = NUM_PORTS, V = NUM_VCS, DEPTH = BUF_DEPTH;
  logic clk = 0, rst_n = 0;
  flit_t   [P-1:0] flit_in, flit_out;
  credit_t [P-1:0] credit_in, credit_out;
  logic [31:0] c_wr, c_rd, c_va, c_sa, c_xb, c_lt;
  int checks = 0, failures = 0;
  int cycle = 0;

  router #(.MESH_X(4), .MESH_Y(4), .MY_X(1), .MY_Y(1)) dut (
    .clk, .rst_n, .flit_in, .credit_out, .flit_out, .credit_in,
    .cfg_tbl_wr(1'b0), .cfg_tbl_dest('0), .cfg_tbl_ports('0),
    .cfg_wgt_wr(1'b0), .cfg_wgt_port('0), .cfg_wgt_value('0),
    .cnt_clear(1'b0), .cnt_buf_wr(c_wr), .cnt_buf_rd(c_rd), .cnt_va(c_va),
    .cnt_sa(c_sa), .cnt_xbar(c_xb), .cnt_link(c_lt));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---- downstream model: log outputs, return credits
  typedef struct { int cyc; flit_t f; } rec_t;
  rec_t outq [P][$];
  bit hold [P];
  credit_t cpipe [P][2];
  credit_t pending [P][$];
  int stall_cycles = 0;

  always @(posedge clk) begin
    for (int p = 0; p < P; p++) begin
      credit_t c;
      if (flit_out[p].valid) begin
        rec_t r;
        r.cyc = cycle; r.f = flit_out[p];
        outq[p].push_back(r);
        c.valid = 1; c.vc = flit_out[p].vc; c.free = is_tail(flit_out[p].ftype);
        pending[p].push_back(c);
      end
      c = '0;
      if (!hold[p] && pending[p].size() > 0) c = pending[p].pop_front();
      cpipe[p][1] <= cpipe[p][0];
      cpipe[p][0] <= c;
    end
  end
  always_comb for (int p = 0; p < P; p++) credit_in[p] = cpipe[p][1];

  // ---- upstream credit tracking
  int up_cred [P][V];
  always @(posedge clk)
    for (int p = 0; p < P; p++)
      if (rst_n && credit_out[p].valid) up_cred[p][credit_out[p].vc]++;

  // count the cycles where a VC in the router waits for a credit
  always @(posedge clk)
    for (int p = 0; p < P; p++)
      for (int v = 0; v < V; v++)
        if (dut.vc_state[p][v] == VC_ACTIVE && dut.vc_visible[p][v] &&
            !dut.out_credit[dut.vc_route[p][v]][dut.vc_outvc[p][v]]) stall_cycles++;

  function automatic flit_t mk(int vc, int dest, int k, int n, int tag);
    flit_t f;
    f = '0; f.valid = 1; f.vc = VC_W'(vc); f.dest = NODE_W'(dest); f.src = 6'd63;
    f.data = FLIT_DATA_W'(tag * 256 + k);
    if (n == 1)          f.ftype = FLIT_HEAD_TAIL;
    else if (k == 0)     f.ftype = FLIT_HEAD;
    else if (k == n - 1) f.ftype = FLIT_TAIL;
    else                 f.ftype = FLIT_BODY;
    return f;
  endfunction

  // per-port sender: queues of flits, each sent when a credit is there
  flit_t sendq [P][$];
  always @(negedge clk) begin
    for (int p = 0; p < P; p++) begin
      flit_in[p] = '0;
      if (rst_n && sendq[p].size() > 0 && up_cred[p][sendq[p][0].vc] > 0) begin
        flit_in[p] = sendq[p].pop_front();
        up_cred[p][flit_in[p].vc]--;
      end
    end
  end

  task automatic queue_pkt(int p, int vc, int dest, int n, int tag);
    for (int k = 0; k < n; k++) sendq[p].push_back(mk(vc, dest, k, n, tag));
  endtask

  task automatic wait_idle(int cycles);
    repeat (cycles) @(posedge clk);
  endtask

  task automatic clear_out();
    for (int p = 0; p < P; p++) outq[p].delete();
  endtask

  initial begin
    flit_in = '0;
    for (int p = 0; p < P; p++) begin
      hold[p] = 0;
      cpipe[p][0] = '0; cpipe[p][1] = '0;
      for (int v = 0; v < V; v++) up_cred[p][v] = DEPTH;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. zero-load latency, local -> east (dest (3,1) = node 7)
    begin
      int t_in;
      queue_pkt(PORT_LOCAL, 4, 7, 1, 1);
      @(posedge clk); t_in = cycle;        // flit sampled at this edge (BW)
      wait_idle(10);
      check(outq[PORT_EAST].size() == 1, "case 1: one flit east");
      if (outq[PORT_EAST].size() == 1) begin
        check(outq[PORT_EAST][0].cyc - t_in == 4, "case 1: 4-cycle router latency");
        check(outq[PORT_EAST][0].f.vc / VCS_PER_VNET == 1, "case 1: output VC in vnet 1");
        check(outq[PORT_EAST][0].f.data == FLIT_DATA_W'(256), "case 1: data");
      end
      clear_out();
    end

    // 2. 5-flit packet west input -> north (dest (1,3) = node 13)
    begin
      queue_pkt(PORT_WEST, 6, 13, 5, 2);
      wait_idle(20);
      check(outq[PORT_NORTH].size() == 5, "case 2: five flits north");
      if (outq[PORT_NORTH].size() == 5)
        for (int k = 0; k < 5; k++) begin
          check(outq[PORT_NORTH][k].f.data == FLIT_DATA_W'(2*256 + k), "case 2: flit order");
          // the first BUF_DEPTH flits need no credit return and stream
          if (k < DEPTH)
            check(outq[PORT_NORTH][k].cyc == outq[PORT_NORTH][0].cyc + k, "case 2: one flit per cycle");
          check(outq[PORT_NORTH][k].f.vc == outq[PORT_NORTH][0].f.vc, "case 2: same output VC");
        end
      check(&dut.out_free[PORT_NORTH], "case 2: tail credit frees the VC");
      clear_out();
    end

    // 3. credit stall on the south output (dest (1,0) = node 1)
    begin
      int s0;
      s0 = stall_cycles;
      hold[PORT_SOUTH] = 1;
      queue_pkt(PORT_LOCAL, 1, 1, 8, 3);
      wait_idle(30);
      check(outq[PORT_SOUTH].size() == DEPTH, "case 3: only BUF_DEPTH flits without credits");
      check(stall_cycles > s0, "case 3: credit stall seen");
      hold[PORT_SOUTH] = 0;
      wait_idle(30);
      check(outq[PORT_SOUTH].size() == 8, "case 3: rest follows after credits");
      for (int k = 0; k < outq[PORT_SOUTH].size(); k++)
        check(outq[PORT_SOUTH][k].f.data == FLIT_DATA_W'(3*256 + k), "case 3: order");
      clear_out();
    end

    // 4. two inputs to the east output at once
    begin
      int got [2];
      queue_pkt(PORT_LOCAL, 5, 7, 4, 4);
      queue_pkt(PORT_NORTH, 7, 7, 4, 5);
      wait_idle(30);
      check(outq[PORT_EAST].size() == 8, "case 4: all flits out");
      got[0] = 0; got[1] = 0;
      for (int k = 0; k < outq[PORT_EAST].size(); k++) begin
        int tag, idx;
        tag = int'(outq[PORT_EAST][k].f.data) / 256 - 4;
        idx = int'(outq[PORT_EAST][k].f.data) % 256;
        if (tag >= 0 && tag < 2) begin
          check(idx == got[tag], "case 4: packet intact");
          got[tag]++;
        end
      end
      check(outq[PORT_EAST][0].cyc + 7 == outq[PORT_EAST][7].cyc, "case 4: output busy every cycle");
      clear_out();
    end

    // 5. ordering in vnet 0: A (5 flits, VC 1) then B (1 flit, VC 0)
    begin
      int tail_a, b_at;
      queue_pkt(PORT_EAST, 1, 4, 5, 6);     // dest (0,1) = node 4, west
      @(negedge clk);
      @(negedge clk);
      sendq[PORT_WEST].push_back(mk(0, 4, 0, 1, 7));   // not used: other input
      sendq[PORT_WEST].delete();
      sendq[PORT_EAST].push_back(mk(0, 4, 0, 1, 7));
      wait_idle(30);
      tail_a = -1; b_at = -1;
      for (int k = 0; k < outq[PORT_WEST].size(); k++) begin
        if (outq[PORT_WEST][k].f.data == FLIT_DATA_W'(6*256 + 4)) tail_a = outq[PORT_WEST][k].cyc;
        if (outq[PORT_WEST][k].f.data == FLIT_DATA_W'(7*256)) b_at = outq[PORT_WEST][k].cyc;
      end
      check(tail_a > 0 && b_at > tail_a, "case 5: ordered vnet, older packet first");
      clear_out();
    end

    check(c_wr == c_rd && c_rd == c_sa && c_sa == c_xb && c_xb == c_lt, "activity counters agree");
    check(c_lt == 1 + 5 + 8 + 8 + 6, "link traversals counted");
    $display("credit stall cycles: %0d", stall_cycles);
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
