// tb_noc_ni_rx: self-checking test of the receiving Network Interface.
//
// A channel sender model delivers packets (header, payload, pad word when the
// payload is even) with the 2-phase handshake; a Wishbone slave model ACKs
// each write after a random wait. The test checks every write against the
// packet it came from: address = sender node, data in order, CTI 3'b010 then
// 3'b111 on the last word. Pad words must not reach the bus, and the channel
// must stay unacknowledged while the slave stalls.
module tb_noc_ni_rx;
  import noc_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  chan_fwd_t   in_fwd;
  logic        in_ack;
  logic        wb_cyc_o, wb_stb_o, wb_we_o;
  logic [31:0] wb_adr_o, wb_dat_o;
  logic [2:0]  wb_cti_o;
  logic        wb_ack_i;

  int checks = 0, failures = 0;
  int stalls = 0, pads = 0, writes = 0;

  typedef struct { logic [31:0] adr; logic [31:0] dat; logic [2:0] cti; } wr_t;
  wr_t expect_q[$];

  noc_ni_rx dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Wishbone slave: random wait states, checks each write.
  initial begin
    wb_ack_i = 1'b0;
    forever begin
      @(negedge clk);
      wb_ack_i = 1'b0;
      if (wb_cyc_o && wb_stb_o) begin
        int w;
        w = $urandom_range(0, 3);
        for (int k = 0; k < w; k++) begin
          logic a0;
          a0 = in_ack;
          stalls++;
          @(negedge clk);
          check(in_ack == a0, "channel held while slave stalls");
        end
        check(expect_q.size() > 0, "unexpected write");
        if (expect_q.size() > 0) begin
          wr_t e;
          e = expect_q.pop_front();
          check(wb_we_o && wb_adr_o == e.adr && wb_dat_o == e.dat && wb_cti_o == e.cti,
                $sformatf("write adr %h dat %h cti %b, exp %h %h %b",
                          wb_adr_o, wb_dat_o, wb_cti_o, e.adr, e.dat, e.cti));
        end
        writes++;
        wb_ack_i = 1'b1;
      end
    end
  end

  task automatic send_stu(input stu_t d);
    in_fwd.data = d;
    in_fwd.req  = ~in_fwd.req;
    while (in_ack != in_fwd.req) @(posedge clk);
    #1;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_fwd = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int p = 0; p < 200; p++) begin
      header_t h;
      int len;
      len = $urandom_range(0, 7);
      h = '0;
      h.src_x = 4'($urandom_range(0, 15));
      h.src_y = 4'($urandom_range(0, 15));
      h.len = 8'(len);
      send_stu(stu_t'(h));
      for (int k = 0; k < len; k++) begin
        wr_t e;
        e.adr = {24'h0, h.src_y, h.src_x};
        e.dat = $urandom();
        e.cti = (k == len - 1) ? 3'b111 : 3'b010;
        expect_q.push_back(e);
        send_stu(e.dat);
      end
      if (len % 2 == 0) begin
        pads++;
        send_stu(32'hDEAD_0000 | 32'(p));
      end
    end
    repeat (10) @(negedge clk);
    check(expect_q.size() == 0, "all writes done");
    check(stalls > 0 && pads > 0, "stalls and pad words exercised");
    $display("writes=%0d stalls=%0d pads=%0d", writes, stalls, pads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
