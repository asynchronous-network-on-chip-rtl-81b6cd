// tb_noc_ni_tx: self-checking test of the sending Network Interface.
//
// A Wishbone master model writes bursts of 1..10 words (CTI 3'b010, the last
// one 3'b111) to random destinations; a channel receiver model acknowledges
// STUs after a random delay. Expected packets are built here: bursts longer
// than MAX_DATA are cut into packets of MAX_DATA words, every packet starts
// with a header holding dX/dY relative to this node, the sender coordinates
// and the payload length, and an even payload is followed by one pad word.
// The test also checks that the slave throttles the master (ACK low) while it
// is still sending, and that this happens at least once.
module tb_noc_ni_tx;
  import noc_pkg::*;

  localparam int MAXD = 7;
  localparam int MYX = 2, MYY = 5;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        wb_cyc_i, wb_stb_i, wb_we_i;
  logic [31:0] wb_adr_i, wb_dat_i;
  logic [2:0]  wb_cti_i;
  logic        wb_ack_o;
  chan_fwd_t   out_fwd;
  logic        out_ack;

  int checks = 0, failures = 0;
  int throttled = 0, pads = 0, splits = 0;
  stu_t expect_q[$];

  noc_ni_tx #(.MAX_DATA(MAXD), .MY_X(MYX), .MY_Y(MYY)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Queue the expected STUs of one packet.
  task automatic expect_packet(input int dx_, input int dy_, input stu_t w[$]);
    header_t h;
    h = '0;
    h.dx = 8'(dx_); h.dy = 8'(dy_);
    h.src_x = 4'(MYX); h.src_y = 4'(MYY);
    h.len = 8'(w.size());
    expect_q.push_back(stu_t'(h));
    foreach (w[k]) expect_q.push_back(w[k]);
    if (w.size() % 2 == 0) begin
      expect_q.push_back('0);
      pads++;
    end
  endtask

  // Receiver on the channel.
  initial begin
    out_ack = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && out_fwd.req != out_ack) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check(expect_q.size() > 0, "unexpected STU");
        if (expect_q.size() > 0) begin
          stu_t e;
          e = expect_q.pop_front();
          check(out_fwd.data == e, $sformatf("STU %h exp %h", out_fwd.data, e));
        end
        out_ack = out_fwd.req;
      end
    end
  end

  task automatic wb_write(input logic [31:0] adr, input logic [31:0] dat, input logic [2:0] cti);
    wb_cyc_i = 1'b1; wb_stb_i = 1'b1; wb_we_i = 1'b1;
    wb_adr_i = adr; wb_dat_i = dat; wb_cti_i = cti;
    #1;
    while (!wb_ack_o) begin
      throttled++;
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    wb_stb_i = 1'b0;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0; wb_adr_i = 0; wb_dat_i = 0; wb_cti_i = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 150; b++) begin
      int n, dxx, dyy;
      stu_t words[$], chunk[$];
      words = {};
      n   = $urandom_range(1, 10);
      dxx = $urandom_range(0, 7);
      dyy = $urandom_range(0, 7);
      for (int k = 0; k < n; k++) words.push_back($urandom());
      // expected packets
      chunk = {};
      foreach (words[k]) begin
        chunk.push_back(words[k]);
        if (chunk.size() == MAXD || k == n - 1) begin
          expect_packet(dxx - MYX, dyy - MYY, chunk);
          if (chunk.size() == MAXD && k != n - 1) splits++;
          chunk = {};
        end
      end
      @(negedge clk);
      foreach (words[k])
        wb_write(32'(dyy * 16 + dxx), words[k], (k == n - 1) ? 3'b111 : 3'b010);
      wb_cyc_i = 1'b0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    repeat (60) @(negedge clk);
    check(expect_q.size() == 0, "all packets sent");
    check(throttled > 0, "master was throttled");
    check(pads > 0, "pad word sent");
    check(splits > 0, "long burst split");
    $display("throttled=%0d pads=%0d splits=%0d", throttled, pads, splits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
