// tb_noc_top: end-to-end test of the mesh at a reduced size (4 x 4 nodes).
//
// tb_noc_env drives Poisson traffic from every node's master to random nodes
// and checks every word at the slaves (see there). This testbench adds
// monitors inside the nodes and requires each mechanism of the design to
// occur at least once: output contention between Routers, packets blocked
// behind a held output (wormhole), master throttling by the Network
// Interface, slave wait states pushed back into the network, pad words for
// even payloads, bursts split into several packets, local delivery, and hops
// in all four mesh directions.
module tb_noc_top;
  localparam int MX = 4, MY = 4, N = MX * MY;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        m_cyc [N], m_stb [N], m_we [N], m_ack [N];
  logic [31:0] m_adr [N], m_dat [N];
  logic [2:0]  m_cti [N];
  logic        s_cyc [N], s_stb [N], s_we [N], s_ack [N];
  logic [31:0] s_adr [N], s_dat [N];
  logic [2:0]  s_cti [N];

  int checks, failures, throttled, stalls, pads, splits, local_pkts;
  int dir_use [4];
  bit done;
  int contention = 0, blocked = 0;
  int xchecks = 0, xfail = 0;     // this testbench's own checks

  always #5 clk = ~clk;

  noc_top #(.MESH_X(MX), .MESH_Y(MY), .MAX_DATA(7)) dut (.*);

  tb_noc_env #(.MX(MX), .MY(MY), .MAXD(7), .PKTS(30), .GAP(40)) env (.*);

  for (genvar y = 0; y < MY; y++) begin : g_my
    for (genvar x = 0; x < MX; x++) begin : g_mx
      always @(posedge clk) if (rst_n) begin
        for (int o = 0; o < 5; o++) begin
          if ($countones(dut.g_y[y].g_x[x].u_node.arb_req[o]) > 1) contention++;
          if ((dut.g_y[y].g_x[x].u_node.arb_req[o] &
               ~dut.g_y[y].g_x[x].u_node.arb_grant[o]) != '0) blocked++;
        end
      end
    end
  end

  task automatic final_check(input bit ok, input string what);
    xchecks++;
    if (!ok) begin
      xfail++;
      $display("FAIL mechanism never seen: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + xchecks, failures + xfail + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    final_check(contention > 0, "contention");
    final_check(blocked > 0, "blocked");
    final_check(throttled > 0, "throttle");
    final_check(stalls > 0, "slave stall");
    final_check(pads > 0, "pad word");
    final_check(splits > 0, "burst split");
    final_check(local_pkts > 0, "local delivery");
    for (int d = 0; d < 4; d++) final_check(dir_use[d] > 0, "mesh direction");
    $display("contention=%0d blocked=%0d throttled=%0d stalls=%0d pads=%0d splits=%0d local=%0d",
             contention, blocked, throttled, stalls, pads, splits, local_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks + xchecks, failures + xfail);
    $finish;
  end

endmodule
