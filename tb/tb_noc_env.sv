// tb_noc_env: traffic and checking environment for the whole mesh.
//
// One Wishbone master model and one Wishbone slave model per node. First a
// single probe packet crosses the empty mesh from node 0 to the far corner,
// and its latency is checked against the pipeline of this implementation:
// the first payload write reaches the slave H + 3 clocks after the master's
// write was acknowledged, H being the number of nodes on the path (one
// register stage per node; the payload STU trails its header by two clocks
// because each channel moves one STU per two clocks).
// Then every master sends PKTS bursts of 1..MAXD+3 words to random nodes
// (itself included), with exponentially distributed gaps of mean GAP clocks:
// Poisson traffic, as in the evaluation of the source design. Slaves insert
// random wait states. Each payload word names its source, destination, burst
// and position; a slave checks that each word arrives in order per source,
// with the right sender address and CTI, and measures the delay from the
// burst's generation to its last word. Counts of the mechanisms exercised are
// exported to the enclosing testbench.
module tb_noc_env #(
  parameter int MX   = 4,
  parameter int MY   = 4,
  parameter int MAXD = 7,
  parameter int PKTS = 20,
  parameter int GAP  = 20,
  localparam int N   = MX * MY
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        m_cyc [N],
  output logic        m_stb [N],
  output logic        m_we  [N],
  output logic [31:0] m_adr [N],
  output logic [31:0] m_dat [N],
  output logic [2:0]  m_cti [N],
  input  logic        m_ack [N],
  input  logic        s_cyc [N],
  input  logic        s_stb [N],
  input  logic        s_we  [N],
  input  logic [31:0] s_adr [N],
  input  logic [31:0] s_dat [N],
  input  logic [2:0]  s_cti [N],
  output logic        s_ack [N],
  output int          checks,
  output int          failures,
  output bit          done,
  output int          throttled,
  output int          stalls,
  output int          pads,
  output int          splits,
  output int          local_pkts,
  output int          dir_use [4]    // packets needing E, W, N, S hops
);

  typedef struct {
    logic [31:0] dat;
    logic [2:0]  cti;
    bit          burst_end;
    longint      t_gen;
  } exp_t;

  exp_t   expq [N * N][$];   // [src * N + dst]
  int     words_left;        // payload words still to be received
  int     gen_done;
  longint cycle;
  longint delay_sum;
  int     bursts_rx;
  bit     probe_phase;
  longint probe_t0;
  int     probe_lat;

  initial begin
    checks = 0; failures = 0; done = 0;
    throttled = 0; stalls = 0; pads = 0; splits = 0; local_pkts = 0;
    for (int d = 0; d < 4; d++) dir_use[d] = 0;
    words_left = 0; gen_done = 0; cycle = 0; delay_sum = 0; bursts_rx = 0;
    probe_phase = 1; probe_t0 = 0; probe_lat = -1;
  end

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] word_of(int src, int dst, int b, int k);
    return {8'(src), 8'(dst), 8'(b), 8'(k)};
  endfunction

  // One burst from master `src`; queues what the slave must see.
  task automatic send_burst(input int src, input int dst, input int b, input int n);
    int dxx, dyy;
    dxx = dst % MX - src % MX;
    dyy = dst / MX - src / MX;
    if (dxx > 0) dir_use[0]++;
    if (dxx < 0) dir_use[1]++;
    if (dyy > 0) dir_use[2]++;
    if (dyy < 0) dir_use[3]++;
    if (dxx == 0 && dyy == 0) local_pkts++;
    for (int k = 0; k < n; k++) begin
      exp_t e;
      bit pkt_end;
      pkt_end     = (k % MAXD == MAXD - 1) || (k == n - 1);
      e.dat       = word_of(src, dst, b, k);
      e.cti       = pkt_end ? 3'b111 : 3'b010;
      e.burst_end = (k == n - 1);
      e.t_gen     = cycle;
      expq[src * N + dst].push_back(e);
      words_left++;
      if (pkt_end && (k % MAXD) % 2 == 1) pads++;           // even payload
      if (pkt_end && k != n - 1) splits++;
    end
    @(negedge clk);
    for (int k = 0; k < n; k++) begin
      m_cyc[src] = 1'b1; m_stb[src] = 1'b1; m_we[src] = 1'b1;
      m_adr[src] = 32'({4'(dst / MX), 4'(dst % MX)});
      m_dat[src] = word_of(src, dst, b, k);
      m_cti[src] = (k == n - 1) ? 3'b111 : 3'b010;
      #1;
      while (!m_ack[src]) begin
        throttled++;
        @(negedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      if (probe_phase) probe_t0 = cycle;   // index of the accepting edge
    end
    m_cyc[src] = 1'b0; m_stb[src] = 1'b0;
  endtask

  for (genvar gs = 0; gs < N; gs++) begin : g_master
    initial begin
      m_cyc[gs] = 0; m_stb[gs] = 0; m_we[gs] = 0;
      m_adr[gs] = 0; m_dat[gs] = 0; m_cti[gs] = 0;
      @(posedge rst_n);
      if (gs == 0) send_burst(0, N - 1, 255, 1);
      wait (!probe_phase);
      for (int b = 0; b < PKTS; b++) begin
        int gap;
        real u;
        u   = (real'($urandom_range(1, 1000000))) / 1000000.0;
        gap = int'(-$ln(u) * real'(GAP));
        repeat (gap) @(negedge clk);
        send_burst(gs, $urandom_range(0, N - 1), b, $urandom_range(1, MAXD + 3));
      end
      gen_done++;
    end
  end

  for (genvar gd = 0; gd < N; gd++) begin : g_slave
    initial begin
      s_ack[gd] = 1'b0;
      forever begin
        @(negedge clk);
        s_ack[gd] = 1'b0;
        if (s_cyc[gd] && s_stb[gd]) begin
          int src, w;
          if (probe_phase && probe_lat < 0) probe_lat = int'(cycle - probe_t0);
          w = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 3) : 0;
          stalls += w;
          repeat (w) @(negedge clk);
          src = int'(s_adr[gd][7:4]) * MX + int'(s_adr[gd][3:0]);
          check(s_we[gd] && src < N && expq[src * N + gd].size() > 0,
                $sformatf("unexpected write at node %0d from %0d", gd, src));
          if (src < N && expq[src * N + gd].size() > 0) begin
            exp_t e;
            e = expq[src * N + gd].pop_front();
            check(s_dat[gd] == e.dat && s_cti[gd] == e.cti,
                  $sformatf("node %0d got %h cti %b, exp %h cti %b",
                            gd, s_dat[gd], s_cti[gd], e.dat, e.cti));
            words_left--;
            if (e.burst_end) begin
              delay_sum += cycle - e.t_gen;
              bursts_rx++;
            end
          end
          s_ack[gd] = 1'b1;
        end
      end
    end
  end

  initial begin
    @(posedge rst_n);
    wait (bursts_rx == 1);
    // H = nodes on the path from node 0 to node N-1
    check(probe_lat == (MX - 1) + (MY - 1) + 1 + 3,
          $sformatf("probe latency %0d, exp %0d", probe_lat, (MX - 1) + (MY - 1) + 4));
    $display("probe latency %0d clocks over %0d nodes", probe_lat, MX + MY - 1);
    repeat (5) @(negedge clk);
    probe_phase = 0;
    wait (gen_done == N && words_left == 0);
    repeat (50) @(negedge clk);
    for (int q = 0; q < N * N; q++)
      if (expq[q].size() != 0) check(1'b0, $sformatf("queue %0d not drained", q));
    check(words_left == 0, "all words delivered");
    $display("bursts %0d, mean delay %0d clocks (generation to last word)",
             bursts_rx, delay_sum / longint'(bursts_rx));
    done = 1;
  end

endmodule
