// End-to-end test of a 2x2 mesh (all other parameters at their defaults);
// tb_garnet_mesh_full runs the same phases on the default 4x4 mesh.
// Phases:
//  1. zero-load latency: one flit from node 0 to node 3 (2 hops) must
//     reach the ejection port exactly 10 + 5*2 cycles after the message is
//     taken (NI 3, inject link 1, 2 hops of router + link, last router 4,
//     eject link 1, NI 1);
//  2. multicast: node 1 sends one 2-flit message to all other nodes, which
//     the NI splits into 3 unicast packets; every node gets exactly one;
//  3. uniform random traffic, first light then heavy: one-flit packets on
//     the ordered vnet 0 and 5-flit packets on vnet 1; every packet must
//     arrive once, intact, at its destination, and vnet 0 packets between
//     a source and a destination must arrive in the order sent; then a
//     hotspot phase in which every node sends to the last node;
//  4. route reconfiguration: with Y links made lighter than X links in every
//     router, a packet from node 0 to node 3 must go through node 2, not 1.
// Mechanisms counted (each must occur): VC allocation waits, credit stalls,
// switch allocation losses, ordering holds in vnet 0, multicast splits and
// the route change. Average packet latency per load is printed.
module tb_garnet_mesh;
  import garnet_pkg::*;
  localparam int MX = 2, MY = 2, N = MX * MY, MAXF = 5;
  localparam int HOPS = (MX - 1) + (MY - 1);         // node 0 to node N-1
  localparam int MC_SRC = (N > 5) ? 5 : 1;          // multicast source
  logic clk = 0, rst_n = 0;
  logic [N-1:0] msg_valid, msg_ready, msg_done, pkt_sent, ej_pkt_done;
  logic [N-1:0][N-1:0] msg_dest_mask;
  logic [N-1:0][0:0] msg_vnet;
  logic [N-1:0][2:0] msg_len;
  logic [N-1:0][MAXF-1:0][FLIT_DATA_W-1:0] msg_data;
  flit_t [N-1:0] ej_flit;
  logic cfg_tbl_wr = 0, cfg_wgt_wr = 0;
  logic [NODE_W-1:0] cfg_node = '0, cfg_tbl_dest = '0;
  logic [NUM_PORTS-1:0] cfg_tbl_ports = '0;
  logic [PORT_W-1:0] cfg_wgt_port = '0;
  logic [3:0] cfg_wgt_value = '0;
  logic cnt_clear = 0;
  logic [N-1:0][31:0] cnt_buf_wr, cnt_buf_rd, cnt_va, cnt_sa, cnt_xbar, cnt_link;

  garnet_mesh #(.MESH_X(MX), .MESH_Y(MY)) dut (.*);

  always #5 clk = ~clk;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int checks = 0, failures = 0;
  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // ---------------- mechanism counters (probing router internals)
  longint va_wait = 0, credit_stall = 0, sa_lost = 0, order_hold = 0;
  for (genvar n = 0; n < N; n++) begin : g_probe
    always @(posedge clk) if (rst_n) begin
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NUM_VCS; v++) begin
          automatic logic act, vis, cr;
          act = dut.g_node[n].u_router.vc_state[p][v] == VC_ACTIVE;
          vis = dut.g_node[n].u_router.vc_visible[p][v];
          cr  = dut.g_node[n].u_router.out_credit[dut.g_node[n].u_router.vc_route[p][v]]
                                                  [dut.g_node[n].u_router.vc_outvc[p][v]];
          if (dut.g_node[n].u_router.vc_state[p][v] == VC_VA && !dut.g_node[n].u_router.va_gnt[p][v])
            va_wait++;
          if (act && vis && !cr) credit_stall++;
          if (act && vis && cr && !dut.g_node[n].u_router.sa_gnt[p][v]) sa_lost++;
          if (act && vis && cr && !dut.g_node[n].u_router.u_sa.req[p][v]) order_hold++;
          if (dut.g_node[n].u_router.vc_state[p][v] == VC_VA &&
              !dut.g_node[n].u_router.u_va.req[p * NUM_VCS + v]) order_hold++;
        end
    end
  end

  // ---------------- data encoding of every flit
  function automatic logic [FLIT_DATA_W-1:0] enc(int src, int dst, int seq, int idx, int t, int vnet);
    logic [FLIT_DATA_W-1:0] d;
    d = '0;
    d[15:0] = 16'(idx); d[31:16] = 16'(seq); d[39:32] = 8'(src); d[47:40] = 8'(dst);
    d[79:48] = 32'(t); d[80] = 1'(vnet);
    return d;
  endfunction

  // ---------------- receive side scoreboard
  int rx_pkts = 0, rx_flits = 0, rx_per_node [N];
  longint lat_sum = 0; int lat_n = 0;
  int exp_idx [N][NUM_VCS];
  int last_seq [N][N];        // vnet 0, [src][dst]
  int first_ej_cycle = -1;
  for (genvar n = 0; n < N; n++) begin : g_rx
    always @(posedge clk) if (rst_n && ej_flit[n].valid) begin
      automatic flit_t f = ej_flit[n];
      automatic int src = int'(f.data[39:32]), dst = int'(f.data[47:40]);
      automatic int idx = int'(f.data[15:0]), seq = int'(f.data[31:16]);
      automatic int vn = int'(f.data[80]);
      rx_flits++;
      check((dst == n || dst == 255) && int'(f.dest) == n, "flit at its destination");
      check(int'(f.src) == src, "source field");
      check(idx == exp_idx[n][f.vc], "flit order within packet");
      check(int'(f.vc) / VCS_PER_VNET == vn, "VC in the packet's vnet");
      exp_idx[n][f.vc] = idx + 1;
      if (first_ej_cycle < 0) first_ej_cycle = cycle;
      if (is_tail(f.ftype)) begin
        exp_idx[n][f.vc] = 0;
        rx_pkts++;
        rx_per_node[n]++;
        lat_sum += longint'(cycle - int'(f.data[79:48]));
        lat_n++;
        if (vn == 0 && seq >= 0) begin
          check(seq == last_seq[src][dst] + 1, "vnet 0 point-to-point order");
          last_seq[src][dst] = seq;
        end
      end
    end
  end

  // ---------------- injection
  int tx_pkts = 0, n_msgs = 0, n_split = 0;
  int next_seq [N][N];
  always @(posedge clk) if (rst_n) for (int n = 0; n < N; n++) if (pkt_sent[n]) tx_pkts++;

  task automatic put_msg(int n, logic [N-1:0] mask, int vnet, int len, int seq);
    msg_dest_mask[n] = mask; msg_vnet[n] = 1'(vnet); msg_len[n] = 3'(len);
    for (int k = 0; k < MAXF; k++) begin
      int d;
      d = 0;
      for (int j = 0; j < N; j++) if (mask[j]) d = j;
      msg_data[n][k] = enc(n, ($countones(mask) == 1) ? d : 255, seq, k, cycle, vnet);
    end
    msg_valid[n] = 1;
    n_msgs++;
  endtask

  task automatic random_traffic(int cycles, int rate_permille);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      msg_valid = '0;
      for (int n = 0; n < N; n++) begin
        if (msg_ready[n] && $urandom_range(0, 999) < rate_permille) begin
          int d, vnet;
          d = $urandom_range(0, N-2);
          if (d >= n) d++;
          vnet = $urandom_range(0, 1);
          put_msg(n, N'(1) << d, vnet, (vnet != 0) ? 5 : 1, (vnet == 0) ? next_seq[n][d] : 0);
          if (vnet == 0) next_seq[n][d]++;
        end
      end
    end
    @(negedge clk);
    msg_valid = '0;
  endtask

  // every node sends to node `hot`, both vnets, for `cycles` cycles
  task automatic hotspot(int cycles, int hot);
    for (int c = 0; c < cycles; c++) begin
      @(negedge clk);
      msg_valid = '0;
      for (int n = 0; n < N; n++) begin
        if (n != hot && msg_ready[n]) begin
          int vnet;
          vnet = $urandom_range(0, 1);
          put_msg(n, N'(1) << hot, vnet, (vnet != 0) ? 5 : 1, (vnet == 0) ? next_seq[n][hot] : 0);
          if (vnet == 0) next_seq[n][hot]++;
        end
      end
    end
    @(negedge clk);
    msg_valid = '0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while ((rx_pkts != tx_pkts || msg_ready != '1) && guard < 5000) begin
      @(negedge clk); guard++;
    end
    repeat (20) @(negedge clk);
  endtask

  initial begin
    msg_valid = '0; msg_dest_mask = '0; msg_vnet = '0; msg_len = '0; msg_data = '0;
    for (int a = 0; a < N; a++) begin
      rx_per_node[a] = 0;
      for (int b = 0; b < NUM_VCS; b++) exp_idx[a][b] = 0;
      for (int b = 0; b < N; b++) begin last_seq[a][b] = -1; next_seq[a][b] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    // 1. zero-load latency 0 -> N-1 on vnet 1
    begin
      int t_acc;
      put_msg(0, N'(1) << (N - 1), 1, 1, 0);
      @(posedge clk); t_acc = cycle;
      @(negedge clk); msg_valid = '0;
      wait (first_ej_cycle >= 0);
      check(first_ej_cycle - t_acc == 10 + 5 * HOPS, $sformatf("zero-load latency %0d", first_ej_cycle - t_acc));
      drain();
    end

    // 2. multicast from node MC_SRC to everyone else
    begin
      int rx_before [N];
      int tx0;
      tx0 = tx_pkts;
      for (int n = 0; n < N; n++) rx_before[n] = rx_per_node[n];
      @(negedge clk);
      put_msg(MC_SRC, ~(N'(1) << MC_SRC), 1, 2, 0);
      @(negedge clk); msg_valid = '0;
      drain();
      for (int n = 0; n < N; n++)
        check(rx_per_node[n] - rx_before[n] == ((n == MC_SRC) ? 0 : 1), "multicast: one copy per node");
      n_split = tx_pkts - tx0;
      check(n_split == N - 1, "multicast split into unicasts");
    end

    // 3. uniform random traffic, light then heavy
    begin
      longint s0; int n0;
      s0 = lat_sum; n0 = lat_n;
      random_traffic(1500, 20);
      drain();
      if (lat_n > n0) $display("light load: %0d packets, average latency %0d cycles",
                               lat_n - n0, (lat_sum - s0) / (lat_n - n0));
      s0 = lat_sum; n0 = lat_n;
      random_traffic(1500, 300);
      drain();
      if (lat_n > n0) $display("heavy load: %0d packets, average latency %0d cycles",
                               lat_n - n0, (lat_sum - s0) / (lat_n - n0));
      hotspot(400, N - 1);
      drain();
      check(rx_pkts == tx_pkts, "every packet delivered");
    end

    // 4. Y-X routing by weights: 0 -> (1,1) must pass (0,1), not (1,0)
    begin
      logic [31:0] w1, w4;
      @(negedge clk);
      for (int n = 0; n < N; n++) begin
        cfg_node = NODE_W'(n); cfg_wgt_wr = 1; cfg_wgt_value = 4'd6;
        cfg_wgt_port = PORT_W'(PORT_EAST); @(negedge clk);
        cfg_wgt_port = PORT_W'(PORT_WEST); @(negedge clk);
      end
      cfg_wgt_wr = 0;
      w1 = cnt_buf_wr[1]; w4 = cnt_buf_wr[MX];
      put_msg(0, N'(1) << (MX + 1), 1, 1, 0);
      @(negedge clk); msg_valid = '0;
      drain();
      check(cnt_buf_wr[MX] == w4 + 1 && cnt_buf_wr[1] == w1, "route change by link weights");
    end

    $display("mechanisms: va_wait=%0d credit_stall=%0d sa_lost=%0d order_hold=%0d multicast_split=%0d",
             va_wait, credit_stall, sa_lost, order_hold, n_split);
    check(va_wait > 0, "VC allocation wait happened");
    check(credit_stall > 0, "credit stall happened");
    check(sa_lost > 0, "switch allocation loss happened");
    check(order_hold > 0, "ordering hold happened");
    check(rx_flits > 0 && rx_pkts == tx_pkts, "totals");
    $display("packets sent %0d received %0d, flits %0d", tx_pkts, rx_pkts, rx_flits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
