// tb_noc_wb_bus: self-checking testbench for the shared Wishbone bus.
//
// Five masters send write bursts of 1..8 words to random slaves among six
// (on a grid 3 wide), after random gaps; slaves insert random wait states.
// Each word names its master, burst and position. Checks: every word reaches
// the addressed slave, intact, in order and with its CTI; one master owns the
// bus for a whole burst (no other master's word appears in between); at most
// one slave sees a cycle at a time; every master wins the bus once per burst;
// masters often wait for each other, so the arbiter is exercised.
module tb_noc_wb_bus;
  localparam int NM = 5, NS = 6, GX = 3;
  localparam int BURSTS = 60;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        m_cyc [NM], m_stb [NM], m_we [NM], m_ack [NM];
  logic [31:0] m_adr [NM], m_dat [NM];
  logic [2:0]  m_cti [NM];
  logic        s_cyc [NS], s_stb [NS], s_we [NS], s_ack [NS];
  logic [31:0] s_adr [NS], s_dat [NS];
  logic [2:0]  s_cti [NS];

  noc_wb_bus #(.NM(NM), .NS(NS), .GRID_X(GX)) dut (.*);

  always #5 clk = ~clk;

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
    logic [2:0]  cti;
    int          slave;
  } exp_t;

  exp_t expq [NM][$];
  int   done_cnt = 0;
  int   words_left = 0;
  int   wins [NM];
  int   contended = 0;
  int   cur_owner = -1;       // master whose burst is on the bus, -1 between
  int   interleaved = 0;

  function automatic logic [31:0] word_of(int m, int b, int k);
    return {8'(m), 8'hB5, 8'(b), 8'(k)};
  endfunction

  for (genvar gm = 0; gm < NM; gm++) begin : g_master
    initial begin
      m_cyc[gm] = 0; m_stb[gm] = 0; m_we[gm] = 0;
      m_adr[gm] = 0; m_dat[gm] = 0; m_cti[gm] = 0;
      wins[gm] = 0;
      @(posedge rst_n);
      for (int b = 0; b < BURSTS; b++) begin
        int dst, n;
        bit first;
        repeat ($urandom_range(0, 6)) @(negedge clk);
        dst = $urandom_range(0, NS - 1);
        n   = $urandom_range(1, 8);
        for (int k = 0; k < n; k++) begin
          exp_t e;
          e.dat = word_of(gm, b, k);
          e.cti = (k == n - 1) ? 3'b111 : 3'b010;
          e.slave = dst;
          expq[gm].push_back(e);
          words_left++;
        end
        @(negedge clk);
        first = 1'b1;
        for (int k = 0; k < n; k++) begin
          m_cyc[gm] = 1'b1; m_stb[gm] = 1'b1; m_we[gm] = 1'b1;
          m_adr[gm] = 32'({4'(dst / GX), 4'(dst % GX)});
          m_dat[gm] = word_of(gm, b, k);
          m_cti[gm] = (k == n - 1) ? 3'b111 : 3'b010;
          #1;
          while (!m_ack[gm]) begin
            @(negedge clk);
            #1;
          end
          if (first) wins[gm]++;
          first = 1'b0;
          @(posedge clk);
          #1;
        end
        m_cyc[gm] = 1'b0; m_stb[gm] = 1'b0;
      end
      done_cnt++;
    end
  end

  // Contention: more than one master waiting at a clock edge
  always @(posedge clk) if (rst_n) begin
    int w;
    w = 0;
    for (int i = 0; i < NM; i++) if (m_cyc[i] && !m_ack[i]) w++;
    if (w > 1) contended++;
  end

  // At most one slave cycle at a time
  always @(negedge clk) if (rst_n) begin
    int c;
    c = 0;
    for (int j = 0; j < NS; j++) if (s_cyc[j]) c++;
    check(c <= 1, "one slave cycle at a time");
  end

  for (genvar gs = 0; gs < NS; gs++) begin : g_slave
    initial begin
      s_ack[gs] = 1'b0;
      forever begin
        @(negedge clk);
        s_ack[gs] = 1'b0;
        if (s_cyc[gs] && s_stb[gs]) begin
          int m;
          repeat (($urandom_range(0, 3) == 0) ? $urandom_range(1, 2) : 0) @(negedge clk);
          m = int'(s_dat[gs][31:24]);
          check(m < NM && expq[m].size() > 0, "write from a known master");
          if (m < NM && expq[m].size() > 0) begin
            exp_t e;
            e = expq[m].pop_front();
            check(s_dat[gs] == e.dat && s_cti[gs] == e.cti && e.slave == gs && s_we[gs],
                  $sformatf("slave %0d got %h cti %b, exp %h cti %b at slave %0d",
                            gs, s_dat[gs], s_cti[gs], e.dat, e.cti, e.slave));
            check(cur_owner == -1 || cur_owner == m, "burst not interleaved");
            if (cur_owner != -1 && cur_owner != m) interleaved++;
            cur_owner = (e.cti == 3'b111) ? -1 : m;
            words_left--;
          end
          s_ack[gs] = 1'b1;
          @(posedge clk);          // the word is taken at this edge
          s_ack[gs] = 1'b0;
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (done_cnt == NM && words_left == 0);
    repeat (10) @(negedge clk);
    check(words_left == 0, "all words delivered");
    for (int i = 0; i < NM; i++) begin
      check(wins[i] == BURSTS, $sformatf("master %0d won the bus %0d times", i, wins[i]));
      check(expq[i].size() == 0, "queue drained");
    end
    check(contended > 50, $sformatf("contention exercised (%0d clocks)", contended));
    $display("contended clocks %0d", contended);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
