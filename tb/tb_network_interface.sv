// Self-checking test of network_interface at node 5 of 16.
// The testbench plays the router: it takes injected flits and returns a
// credit for each four cycles later, marked free for a tail.
//  - A 3-flit multicast to nodes {12, 2, 9} must leave as three unicast
//    packets to 2, 9, 12 in that order, each head/body/tail with the
//    message's data, on a VC of the message's vnet, with msg_done at the end.
//  - A one-flit message to 7 destinations in vnet 0 (4 VCs) must wait for
//    VCs to be freed and still deliver all 7 packets.
//  - Ejection: flits from the router appear on ej_flit one cycle later with
//    a credit for their VC, free for a tail; ej_pkt_done marks the tail.
module tb_network_interface;
  import garnet_pkg::*;
  localparam int NN = 16, MAXF = 5;
  logic clk = 0, rst_n = 0;
  logic msg_valid, msg_ready, msg_done, pkt_sent, ej_pkt_done;
  logic [NN-1:0] msg_dest_mask;
  logic [0:0] msg_vnet;
  logic [2:0] msg_len;
  logic [MAXF-1:0][FLIT_DATA_W-1:0] msg_data;
  flit_t flit_out, flit_in, ej_flit;
  credit_t credit_in, credit_out;
  int checks = 0, failures = 0, cycle = 0;
  int n_done = 0, n_pkts = 0;

  network_interface #(.NODE_ID(5), .NUM_NODES(NN), .MAX_PKT_FLITS(MAXF)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  flit_t got [$];
  credit_t cq [$];
  credit_t cd [4];
  always @(posedge clk) begin
    credit_t c;
    c = '0;
    if (flit_out.valid) begin
      got.push_back(flit_out);
      c.valid = 1; c.vc = flit_out.vc; c.free = is_tail(flit_out.ftype);
    end
    cd[3] <= cd[2]; cd[2] <= cd[1]; cd[1] <= cd[0]; cd[0] <= c;
    if (rst_n && msg_done) n_done++;
    if (rst_n && pkt_sent) n_pkts++;
  end
  assign credit_in = cd[3];

  task automatic send_msg(logic [NN-1:0] mask, int vnet, int len, int tag);
    msg_dest_mask = mask; msg_vnet = 1'(vnet); msg_len = 3'(len);
    for (int k = 0; k < MAXF; k++) msg_data[k] = FLIT_DATA_W'(tag * 16 + k);
    while (!msg_ready) @(negedge clk);
    msg_valid = 1;
    @(negedge clk);   // taken at the edge in between
    msg_valid = 0;
  endtask

  initial begin
    msg_valid = 0; msg_dest_mask = '0; msg_vnet = '0; msg_len = '0; msg_data = '0;
    flit_in = '0;
    for (int k = 0; k < 4; k++) cd[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // multicast
    send_msg(16'h1204, 1, 3, 1);          // nodes 2, 9, 12
    repeat (40) @(posedge clk);
    check(got.size() == 9, "multicast: 9 flits");
    check(n_done == 1 && n_pkts == 3, $sformatf("multicast: 3 packets, one done (%0d %0d)", n_pkts, n_done));
    for (int k = 0; k < got.size() && k < 9; k++) begin
      int d;
      d = (k < 3) ? 2 : (k < 6) ? 9 : 12;
      check(int'(got[k].dest) == d, "multicast: destination order");
      check(int'(got[k].src) == 5, "source id");
      check(got[k].data == FLIT_DATA_W'(16 + k % 3), "flit data");
      check(got[k].ftype == ((k % 3 == 0) ? FLIT_HEAD : (k % 3 == 1) ? FLIT_BODY : FLIT_TAIL),
            "flit type");
      check(int'(got[k].vc) / VCS_PER_VNET == 1, "VC in vnet 1");
    end
    got.delete();
    // more one-flit packets than VCs
    send_msg(16'hF0C1, 0, 1, 2);   // 7 destinations
    repeat (80) @(posedge clk);
    check(got.size() == 7, $sformatf("vnet 0: 7 one-flit packets (%0d)", got.size()));
    for (int k = 0; k < got.size(); k++) begin
      check(got[k].ftype == FLIT_HEAD_TAIL, "one-flit packet type");
      check(int'(got[k].vc) / VCS_PER_VNET == 0, "VC in vnet 0");
    end
    check(n_done == 2 && n_pkts == 10, "second message done");
    // ejection
    for (int k = 0; k < 3; k++) begin
      flit_in = '0; flit_in.valid = 1; flit_in.vc = 3'(6); flit_in.dest = 6'd5;
      flit_in.ftype = (k == 0) ? FLIT_HEAD : (k == 1) ? FLIT_BODY : FLIT_TAIL;
      flit_in.data = FLIT_DATA_W'(900 + k);
      @(negedge clk);
      check(ej_flit.valid && ej_flit.data == FLIT_DATA_W'(900 + k), "eject flit");
      check(credit_out.valid && int'(credit_out.vc) == 6 && credit_out.free == (k == 2), "eject credit");
      check(ej_pkt_done == (k == 2), "eject packet done");
    end
    flit_in = '0;
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
