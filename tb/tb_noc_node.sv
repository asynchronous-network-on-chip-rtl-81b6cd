// tb_noc_node: self-checking test of a whole node.
//
// Five sender models, one per input direction, inject packets with random
// dX/dY in [-2, 2] and random payloads; five receiver models acknowledge the
// outputs after random delays. For every packet the testbench works out the
// output it must leave by (delta-XY, X first) and its rewritten header, and
// keeps it in a queue per (output, input). A receiver identifies the input of
// an arriving packet from the header's src_x field (set to the input index),
// and checks header, payload order and that no other packet's STUs are mixed
// in. It also counts output contention (two Routers asking for one output in
// the same cycle) and blocked cycles (an STU waiting while its output is held
// by another packet), and requires both to happen.
module tb_noc_node;
  import noc_pkg::*;

  localparam int PKTS = 120;   // packets per input

  logic      clk = 1'b0;
  logic      rst_n = 1'b0;
  chan_fwd_t in_fwd  [NDIR];
  logic      in_ack  [NDIR];
  chan_fwd_t out_fwd [NDIR];
  logic      out_ack [NDIR];

  int checks = 0, failures = 0;
  int contention = 0, blocked = 0, delivered = 0;

  typedef struct {
    header_t h;      // header as it must leave the node
    int      pid;
    int      nw;     // data STUs on the wire
  } pkt_t;

  pkt_t expq [NDIR][NDIR][$];    // [output][input]

  noc_node dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic stu_t word_of(int i, int pid, int k);
    return stu_t'({4'(i), 12'(pid), 16'(k)});
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // contention / blocking monitors
  always @(posedge clk) if (rst_n) begin
    for (int o = 0; o < NDIR; o++) begin
      if ($countones(dut.arb_req[o]) > 1) contention++;
      if ((dut.arb_req[o] & ~dut.arb_grant[o]) != '0) blocked++;
    end
  end

  for (genvar gi = 0; gi < NDIR; gi++) begin : g_src
    initial begin
      in_fwd[gi] = '0;
      @(posedge rst_n);
      @(negedge clk);
      for (int p = 0; p < PKTS; p++) begin
        int dx, dy, len, o, nw;
        header_t h;
        pkt_t e;
        dx = $urandom_range(0, 4) - 2;
        dy = $urandom_range(0, 4) - 2;
        len = $urandom_range(0, 6);
        h = '0;
        h.dx = 8'(dx); h.dy = 8'(dy); h.len = 8'(len);
        h.src_x = 4'(gi); h.src_y = 4'(p);
        e.h = h;
        if (dx > 0)      begin o = 1; e.h.dx = 8'(dx - 1); end
        else if (dx < 0) begin o = 3; e.h.dx = 8'(dx + 1); end
        else if (dy > 0) begin o = 0; e.h.dy = 8'(dy - 1); end
        else if (dy < 0) begin o = 2; e.h.dy = 8'(dy + 1); end
        else             o = 4;
        nw = len | 1;
        e.pid = p; e.nw = nw;
        expq[o][gi].push_back(e);
        for (int k = 0; k <= nw; k++) begin
          in_fwd[gi].data = (k == 0) ? stu_t'(h) : word_of(gi, p, k - 1);
          in_fwd[gi].req  = ~in_fwd[gi].req;
          while (in_ack[gi] != in_fwd[gi].req) @(posedge clk);
          #1;
          repeat ($urandom_range(0, 1)) @(negedge clk);
        end
      end
    end
  end

  int done_rx [NDIR];

  for (genvar go = 0; go < NDIR; go++) begin : g_rx
    initial begin
      int cur_i, k, nw;
      pkt_t e;
      out_ack[go] = 1'b0;
      cur_i = -1;
      done_rx[go] = 0;
      forever begin
        @(negedge clk);
        if (rst_n && out_fwd[go].req != out_ack[go]) begin
          repeat ($urandom_range(0, 2)) @(negedge clk);
          if (cur_i < 0) begin
            header_t h;
            h = header_t'(out_fwd[go].data);
            cur_i = int'(h.src_x);
            check(cur_i < NDIR && expq[go][cur_i].size() > 0, "header expected at this output");
            if (cur_i < NDIR && expq[go][cur_i].size() > 0) begin
              e = expq[go][cur_i].pop_front();
              check(h == e.h, $sformatf("out %0d header %h exp %h", go, h, e.h));
              nw = e.nw;
              k = 0;
            end else cur_i = -1;
          end else begin
            check(out_fwd[go].data == word_of(cur_i, e.pid, k),
                  $sformatf("out %0d data %h exp %h", go, out_fwd[go].data, word_of(cur_i, e.pid, k)));
            k++;
            if (k == nw) begin
              cur_i = -1;
              delivered++;
            end
          end
          out_ack[go] = out_fwd[go].req;
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (delivered == PKTS * NDIR);
    repeat (20) @(negedge clk);
    for (int o = 0; o < NDIR; o++)
      for (int i = 0; i < NDIR; i++)
        check(expq[o][i].size() == 0, "queue drained");
    check(contention > 0, "output contention happened");
    check(blocked > 0, "blocking happened");
    $display("delivered=%0d contention=%0d blocked=%0d", delivered, contention, blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
