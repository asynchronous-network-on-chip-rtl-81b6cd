// tb_noc_top_full: the mesh at its default size (8 x 8 nodes, 7-word packets).
//
// The top is instantiated with all parameters at their defaults. tb_noc_env
// first sends a probe packet corner to corner through the empty mesh and
// checks its latency (15 nodes on the path, so 18 clocks), then every one of
// the 64 masters sends a few Poisson-spaced bursts to random nodes, and every
// word is checked at its slave.
module tb_noc_top_full;
  localparam int MX = 8, MY = 8, N = MX * MY;

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

  always #5 clk = ~clk;

  noc_top dut (.*);

  tb_noc_env #(.MX(MX), .MY(MY), .MAXD(7), .PKTS(6), .GAP(40)) env (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    $display("throttled=%0d stalls=%0d pads=%0d splits=%0d local=%0d",
             throttled, stalls, pads, splits, local_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
