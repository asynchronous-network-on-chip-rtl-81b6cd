// tb_noc_arbiter: self-checking test of one Arbiter.
//
// Five simulated Routers each offer packets of random length (header plus an
// odd number of data STUs) to the Arbiter; the testbench plays the crossbar by
// returning the granted Router's STU. A simulated receiver acknowledges the
// output channel after a random delay. The test checks that the grant is one
// of the requesters, that a packet holds the output until its last STU, that
// nothing is taken while the channel is busy, that every STU appears on the
// channel in order with a phase toggle, and that all five inputs win
// arbitration at some point (random choice, not a fixed priority).
module tb_noc_arbiter;
  import noc_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  logic [NDIR-1:0] req_vec;
  logic [NDIR-1:0] grant;
  logic            fire;
  stu_t            xb_data;
  logic            xb_last;
  chan_fwd_t       out_fwd;
  logic            out_ack;

  int checks = 0, failures = 0;

  noc_arbiter dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Per-input packet state of the simulated Routers.
  int   remain [NDIR];          // STUs left in the current packet (0 = none)
  int   seqno  [NDIR];
  bit   busy   [NDIR];          // pause between STUs
  int   wins   [NDIR];
  int   owner;                  // expected owner, -1 when free
  int   pkts_left;
  stu_t expect_q[$];
  logic            fire_s;
  logic [NDIR-1:0] grant_s;

  function automatic stu_t word_of(int i, int s);
    return stu_t'({i[7:0], 8'hA5, s[15:0]});
  endfunction

  always_comb begin
    req_vec = '0;
    for (int i = 0; i < NDIR; i++) req_vec[i] = (remain[i] > 0) && !busy[i];
    xb_data = '0;
    xb_last = 1'b0;
    for (int i = 0; i < NDIR; i++)
      if (grant[i]) begin
        xb_data = word_of(i, seqno[i]);
        xb_last = (remain[i] == 1);
      end
  end

  // Receiver: acknowledges after 0..3 cycles and checks the data.
  initial begin
    out_ack = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && out_fwd.req != out_ack) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check(expect_q.size() > 0, "output without fire");
        if (expect_q.size() > 0) begin
          stu_t e;
          e = expect_q.pop_front();
          check(out_fwd.data == e, $sformatf("out data %h exp %h", out_fwd.data, e));
        end
        out_ack = out_fwd.req;
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NDIR; i++) begin
      remain[i] = 0; seqno[i] = 0; busy[i] = 0; wins[i] = 0;
    end
    owner = -1;
    pkts_left = 400;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    while (pkts_left > 0 || remain.sum() != 0) begin
      // new packets appear at the Routers
      for (int i = 0; i < NDIR; i++) begin
        if (remain[i] == 0 && pkts_left > 0 && $urandom_range(0, 3) == 0) begin
          remain[i] = 2 + 2 * $urandom_range(0, 3);    // header + odd data
          pkts_left--;
        end
        busy[i] = (remain[i] > 0) && ($urandom_range(0, 4) == 0);
      end
      #1;
      check((grant & ~req_vec) == '0 && $onehot0(grant), "grant is a single requester");
      if (owner != -1) check(grant == '0 || grant[owner], "owner keeps the output");
      if (out_fwd.req != out_ack) check(!fire, "no fire while channel busy");
      if (owner != -1 && req_vec[owner] && out_fwd.req == out_ack)
        check(fire, "owner served when channel free");
      if (owner == -1 && req_vec != '0 && out_fwd.req == out_ack)
        check(fire, "free output serves a requester");
      fire_s  = fire;
      grant_s = grant;
      @(posedge clk);
      #1;
      if (fire_s) begin
        for (int i = 0; i < NDIR; i++)
          if (grant_s[i]) begin
            expect_q.push_back(word_of(i, seqno[i]));
            if (owner == -1) wins[i]++;
            seqno[i]++;
            remain[i]--;
            owner = (remain[i] == 0) ? -1 : i;
          end
      end
      @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check(expect_q.size() == 0, "all STUs delivered");
    for (int i = 0; i < NDIR; i++) check(wins[i] > 0, $sformatf("input %0d never won", i));
    $display("wins %0d %0d %0d %0d %0d", wins[0], wins[1], wins[2], wins[3], wins[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
