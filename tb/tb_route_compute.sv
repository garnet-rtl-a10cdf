// Self-checking test of route_compute in a 4x4 mesh at node (1,2):
// the reset table with X lighter than Y must give X-Y routes for every
// destination; after making Y lighter the routes become Y-X; a rewritten
// table entry must be followed. Expected ports come from a separate model.
module tb_route_compute;
  import garnet_pkg::*;
  localparam int MX = 4, MY = 4, X0 = 1, Y0 = 2;
  logic clk = 0, rst_n = 0;
  logic [NUM_PORTS-1:0][NODE_W-1:0] dest;
  logic [NUM_PORTS-1:0][PORT_W-1:0] out_port;
  logic tbl_wr = 0, wgt_wr = 0;
  logic [NODE_W-1:0] tbl_dest = '0;
  logic [NUM_PORTS-1:0] tbl_ports = '0;
  logic [PORT_W-1:0] wgt_port = '0;
  logic [3:0] wgt_value = '0;
  int checks = 0, failures = 0;

  route_compute #(.MESH_X(MX), .MESH_Y(MY), .MY_X(X0), .MY_Y(Y0)) dut (.*);
  always #5 clk = ~clk;

  function automatic int ref_route(int d, bit x_first);
    int dx, dy;
    dx = d % MX; dy = d / MX;
    if (x_first) begin
      if (dx > X0) return PORT_EAST;
      if (dx < X0) return PORT_WEST;
      if (dy > Y0) return PORT_NORTH;
      if (dy < Y0) return PORT_SOUTH;
    end else begin
      if (dy > Y0) return PORT_NORTH;
      if (dy < Y0) return PORT_SOUTH;
      if (dx > X0) return PORT_EAST;
      if (dx < X0) return PORT_WEST;
    end
    return PORT_LOCAL;
  endfunction

  task automatic sweep(bit x_first);
    for (int d = 0; d < MX*MY; d++) begin
      for (int l = 0; l < NUM_PORTS; l++) dest[l] = NODE_W'((d + l) % (MX*MY));
      #1;
      for (int l = 0; l < NUM_PORTS; l++) begin
        checks++;
        if (int'(out_port[l]) != ref_route((d + l) % (MX*MY), x_first)) begin
          failures++;
          $display("FAIL dest %0d lookup %0d: got %0d", (d + l) % (MX*MY), l, out_port[l]);
        end
      end
    end
  endtask

  initial begin
    dest = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    sweep(1'b1);
    // make Y links lighter than X links: Y-X routing
    @(negedge clk);
    wgt_wr = 1; wgt_port = PORT_EAST; wgt_value = 4'd5; @(negedge clk);
    wgt_port = PORT_WEST; @(negedge clk);
    wgt_wr = 0;
    sweep(1'b0);
    @(negedge clk);
    // rewrite the entry of node 15 (north-east of us): only east allowed
    tbl_wr = 1; tbl_dest = 6'd15; tbl_ports = 5'b00010; @(negedge clk);
    tbl_wr = 0;
    dest[0] = 6'd15; #1;
    checks++;
    if (out_port[0] != PORT_W'(PORT_EAST)) begin failures++; $display("FAIL table write"); end
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
