// tb_noc_router: self-checking test of one Router.
//
// Sends random packets into the Router's channel with the 2-phase handshake.
// For each header the expected output direction and rewritten header are
// worked out here from the delta-XY rule (X first, then Y, Destination at
// zero distance). The test then checks that the request stays on that output
// for all len | 1 data STUs, that only the last one is flagged, that the
// Router never acknowledges without an accept, and that it does when accepted.
module tb_noc_router;
  import noc_pkg::*;

  logic            clk = 1'b0;
  logic            rst_n = 1'b0;
  chan_fwd_t       in_fwd;
  logic            in_ack;
  logic [NDIR-1:0] xb_req;
  stu_t            xb_data;
  logic            xb_last;
  logic            xb_accept;

  int checks = 0, failures = 0;

  noc_router dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Present one STU, hold it some cycles without accept, then accept it.
  task automatic send_stu(input stu_t d, input logic [NDIR-1:0] exp_req,
                          input stu_t exp_data, input bit exp_last,
                          input bit check_data);
    logic ack_before;
    ack_before = in_ack;
    in_fwd.data = d;
    in_fwd.req  = ~in_fwd.req;
    repeat ($urandom_range(0, 2)) begin
      @(negedge clk);
      check(xb_req == exp_req, "request held without accept");
    end
    #1;
    check(xb_req == exp_req, $sformatf("xb_req %b exp %b", xb_req, exp_req));
    if (check_data) check(xb_data == exp_data, $sformatf("xb_data %h exp %h", xb_data, exp_data));
    check(xb_last == exp_last, "xb_last");
    check(in_ack == ack_before, "no ack before accept");
    xb_accept = 1'b1;
    @(posedge clk);
    #1;
    xb_accept = 1'b0;
    check(in_ack != ack_before, "ack toggles on accept");
    check(xb_req == '0, "idle after accept");
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_fwd    = '0;
    xb_accept = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(xb_req == '0 && in_ack == 1'b0, "idle after reset");
    for (int p = 0; p < 200; p++) begin
      int dx, dy, len, nd;
      int edx, edy;
      logic [NDIR-1:0] ereq;
      header_t h, eh;
      dx  = $urandom_range(0, 6) - 3;
      dy  = $urandom_range(0, 6) - 3;
      if (p % 7 == 0) begin dx = 0; dy = 0; end
      len = $urandom_range(0, 6);
      edx = dx; edy = dy;
      if (dx > 0)      begin ereq = 5'b00010; edx = dx - 1; end   // East
      else if (dx < 0) begin ereq = 5'b01000; edx = dx + 1; end   // West
      else if (dy > 0) begin ereq = 5'b00001; edy = dy - 1; end   // North
      else if (dy < 0) begin ereq = 5'b00100; edy = dy + 1; end   // South
      else             begin ereq = 5'b10000; end                 // Destination
      h = '0;
      h.dx = 8'(dx); h.dy = 8'(dy); h.len = 8'(len);
      h.src_x = 4'($urandom_range(0, 15)); h.src_y = 4'($urandom_range(0, 15));
      eh = h; eh.dx = 8'(edx); eh.dy = 8'(edy);
      send_stu(stu_t'(h), ereq, stu_t'(eh), 1'b0, 1'b1);
      nd = (len % 2 == 0) ? len + 1 : len;      // odd count on the wire
      for (int k = 0; k < nd; k++) begin
        stu_t w;
        w = $urandom();
        send_stu(w, ereq, w, k == nd - 1, 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
