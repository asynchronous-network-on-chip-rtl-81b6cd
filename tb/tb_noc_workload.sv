// tb_noc_workload: the evaluation workload on the default 8 x 8 mesh.
//
// Reproduces the traffic the architecture was evaluated with. One measuring
// master at (3,3) sends to a slave at fixed distance, (5,5), four hops away.
// K - 1 background masters send to random nodes. Every master generates
// Poisson traffic: bursts start at exponentially distributed intervals with
// a mean of 100 us / lambda. At the 500 MHz clock this is 50000 / lambda
// clocks. A burst is 38 words, which is 1200 bits: lambda = 10 is stated to
// be 120 Mb/s per master, and 120 Mb/s / (10 per 100 us) = 1200 bits.
// The delay of a burst runs from its generation time to the arrival of its
// last word, so it includes any wait behind the master's earlier bursts.
// The testbench runs lambda = 10 and 100 with K = 3, 15 and 63 active
// masters. For each run it reports the mean delay of the measuring pair and
// of all bursts, in clocks and in ns at 500 MHz.
// Checks: every word arrives intact and in order; every run measures at
// least one burst of the pair; no run saturates, i.e. the mean delay with 63
// masters stays below three times that with 3 masters at the same lambda.
module tb_noc_workload;
  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int BURST = 38;
  localparam int MSRC = 3 * MX + 3, MDST = 5 * MX + 5;
  localparam int NRUN = 6;
  localparam int RUN_LAMBDA [NRUN] = '{10, 10, 10, 100, 100, 100};
  localparam int RUN_K      [NRUN] = '{3, 15, 63, 3, 15, 63};
  localparam int RUN_BURSTS = 12;   // bursts generated per active master per run

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        m_cyc [N], m_stb [N], m_we [N], m_ack [N];
  logic [31:0] m_adr [N], m_dat [N];
  logic [2:0]  m_cti [N];
  logic        s_cyc [N], s_stb [N], s_we [N], s_ack [N];
  logic [31:0] s_adr [N], s_dat [N];
  logic [2:0]  s_cti [N];

  noc_top dut (.*);

  always #5 clk = ~clk;   // one clock = 2 ns at 500 MHz when reported

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  typedef struct {
    logic [31:0] dat;
    bit          last;
    longint      t_gen;
  } exp_t;

  exp_t   expq [N * N][$];
  longint cycle = 0;
  int     run = -1;
  bit     active [N];
  int     gen_left;          // bursts still to be generated in this run
  int     words_left = 0;
  longint dsum_meas, dsum_all;
  int     n_meas, n_all;
  real    mean_meas [NRUN];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [31:0] word_of(int src, int b, int k);
    return {8'(src), 8'(run), 8'(b), 8'(k)};
  endfunction

  for (genvar gs = 0; gs < N; gs++) begin : g_master
    initial begin
      m_cyc[gs] = 0; m_stb[gs] = 0; m_we[gs] = 0;
      m_adr[gs] = 0; m_dat[gs] = 0; m_cti[gs] = 0;
      forever begin
        int myrun;
        longint next_gen;
        wait (run >= 0 && active[gs]);
        myrun = run;
        next_gen = cycle;
        for (int b = 0; b < RUN_BURSTS; b++) begin
          int dst;
          real u;
          u = real'($urandom_range(1, 1000000)) / 1000000.0;
          next_gen += longint'(-$ln(u) * 50000.0 / real'(RUN_LAMBDA[myrun]));
          while (cycle < next_gen) @(negedge clk);
          dst = (gs == MSRC) ? MDST : $urandom_range(0, N - 1);
          for (int k = 0; k < BURST; k++) begin
            exp_t e;
            e.dat = word_of(gs, b, k);
            e.last = (k == BURST - 1);
            e.t_gen = next_gen;
            expq[gs * N + dst].push_back(e);
            words_left++;
          end
          @(negedge clk);
          for (int k = 0; k < BURST; k++) begin
            m_cyc[gs] = 1'b1; m_stb[gs] = 1'b1; m_we[gs] = 1'b1;
            m_adr[gs] = 32'({4'(dst / MX), 4'(dst % MX)});
            m_dat[gs] = word_of(gs, b, k);
            m_cti[gs] = (k == BURST - 1) ? 3'b111 : 3'b010;
            #1;
            while (!m_ack[gs]) begin
              @(negedge clk);
              #1;
            end
            @(posedge clk);
            #1;
          end
          m_cyc[gs] = 1'b0; m_stb[gs] = 1'b0;
          gen_left--;
        end
        wait (run != myrun);
      end
    end
  end

  // Slaves acknowledge every write at once and check it.
  for (genvar gd = 0; gd < N; gd++) begin : g_slave
    assign s_ack[gd] = s_cyc[gd] && s_stb[gd];
    always @(negedge clk) if (rst_n && s_cyc[gd] && s_stb[gd]) begin
      int src;
      src = int'(s_adr[gd][7:4]) * MX + int'(s_adr[gd][3:0]);
      check(src < N && expq[src * N + gd].size() > 0, "unexpected write");
      if (src < N && expq[src * N + gd].size() > 0) begin
        exp_t e;
        e = expq[src * N + gd].pop_front();
        check(s_dat[gd] == e.dat && s_we[gd], "word intact and in order");
        words_left--;
        if (e.last) begin
          dsum_all += cycle - e.t_gen;
          n_all++;
          if (src == MSRC) begin
            dsum_meas += cycle - e.t_gen;
            n_meas++;
          end
        end
      end
    end
  end

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [N];
    for (int i = 0; i < N; i++) begin
      active[i] = 0;
      order[i] = i;
    end
    // fixed pseudo-random order of the background masters
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = (i * 37 + 11) % (i + 1);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRUN; r++) begin
      int k;
      dsum_meas = 0; dsum_all = 0; n_meas = 0; n_all = 0;
      for (int i = 0; i < N; i++) active[i] = 0;
      active[MSRC] = 1;
      k = 1;
      for (int i = 0; i < N && k < RUN_K[r]; i++)
        if (order[i] != MSRC) begin
          active[order[i]] = 1;
          k++;
        end
      gen_left = RUN_K[r] * RUN_BURSTS;
      @(negedge clk);
      run = r;
      wait (gen_left == 0 && words_left == 0);
      repeat (20) @(negedge clk);
      check(n_meas > 0, "measuring pair delivered bursts");
      check(n_all == RUN_K[r] * RUN_BURSTS, "every burst delivered");
      mean_meas[r] = real'(dsum_meas) / real'((n_meas > 0) ? n_meas : 1);
      $display("lambda=%0d masters=%0d: pair delay %0.1f clk (%0.1f ns), all %0.1f clk, %0d bursts",
               RUN_LAMBDA[r], RUN_K[r], mean_meas[r], 2.0 * mean_meas[r],
               real'(dsum_all) / real'((n_all > 0) ? n_all : 1), n_all);
      for (int i = 0; i < N; i++) active[i] = 0;
      run = -1;
      @(negedge clk);
    end
    check(mean_meas[2] < 3.0 * mean_meas[0], "lambda=10 not saturated at 63 masters");
    check(mean_meas[5] < 3.0 * mean_meas[3], "lambda=100 not saturated at 63 masters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
