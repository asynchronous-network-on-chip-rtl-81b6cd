// tb_noc_bus_workload: the evaluation workload on the shared Wishbone bus.
//
// The same Poisson traffic as the mesh workload, on the default 64-port
// shared bus: K active masters, each paired with a slave of its own, every
// master starting 38-word bursts (1200 bits) at exponentially distributed
// intervals of mean 100 us / lambda = 50000 / lambda clocks at 500 MHz. The
// delay of a burst runs from its generation time to the arrival of its last
// word and is averaged over all master-slave pairs. Slaves acknowledge at
// once. Runs: lambda = 10 and 100 with K = 3, 15 and 63 masters.
// Checks: every word arrives intact and in order at its slave; every burst
// is delivered; the single channel saturates where its offered load exceeds
// one word per clock, i.e. at lambda = 100 with 63 masters
// (63 x 38 / 500 = 4.8 words per clock) the mean delay is more than three
// times that with 3 masters.
module tb_noc_bus_workload;
  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int BURST = 38;
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

  noc_wb_bus dut (.*);

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
  longint dsum_all;
  int     n_all;
  real    mean_delay [NRUN];

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
          dst = gs;
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
      src = int'(s_dat[gd][31:24]);
      check(src < N && expq[src * N + gd].size() > 0, "unexpected write");
      if (src < N && expq[src * N + gd].size() > 0) begin
        exp_t e;
        e = expq[src * N + gd].pop_front();
        check(s_dat[gd] == e.dat && s_we[gd], "word intact and in order");
        words_left--;
        if (e.last) begin
          dsum_all += cycle - e.t_gen;
          n_all++;
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
    // fixed pseudo-random order in which masters become active
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = (i * 37 + 11) % (i + 1);
      t = order[i]; order[i] = order[j]; order[j] = t;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < NRUN; r++) begin
      int k;
      dsum_all = 0; n_all = 0;
      for (int i = 0; i < N; i++) active[i] = 0;
      k = 0;
      for (int i = 0; i < N && k < RUN_K[r]; i++) begin
        active[order[i]] = 1;
        k++;
      end
      gen_left = RUN_K[r] * RUN_BURSTS;
      @(negedge clk);
      run = r;
      wait (gen_left == 0 && words_left == 0);
      repeat (20) @(negedge clk);
      check(n_all == RUN_K[r] * RUN_BURSTS, "every burst delivered");
      mean_delay[r] = real'(dsum_all) / real'((n_all > 0) ? n_all : 1);
      $display("lambda=%0d masters=%0d: mean delay %0.1f clk (%0.1f ns), %0d bursts",
               RUN_LAMBDA[r], RUN_K[r], mean_delay[r], 2.0 * mean_delay[r], n_all);
      for (int i = 0; i < N; i++) active[i] = 0;
      run = -1;
      @(negedge clk);
    end
    check(mean_delay[5] > 3.0 * mean_delay[3], "lambda=100 saturates the bus at 63 masters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
