// noc_router: the input side of one node direction (the "Router" of a node).
//
// It terminates one incoming channel. While no packet is in flight it treats a
// pending STU as a header: it makes the delta-XY routing decision (X first,
// then Y, local delivery when dX = dY = 0), decrements the distance on the axis
// it moves along, and asks the crossbar for that output. Once the header has
// been accepted by the output's Arbiter, the Router stays bound to that output
// and forwards the packet's data STUs (len | 1 of them) to it, flagging the
// last one so the Arbiter can release the output. Routing and address
// rewriting in the Router follow the source design; the one-hot crossbar
// request and the `last` flag are this design's choice.
//
// Interface:
//   in_fwd / in_ack  incoming channel, 2-phase: an STU is pending while
//                    in_fwd.req != in_ack. in_ack is a flip-flop.
//   xb_req           one-hot request for an output direction (combinational)
//   xb_data/xb_last  STU offered to that output (the header already rewritten)
//   xb_accept        the requested Arbiter takes the STU at this clock edge
// Timing: an STU arriving on in_fwd is offered in the same cycle; in_ack
// toggles at the edge where xb_accept is high. No data is stored here: the
// upstream sender holds it until acknowledged.
module noc_router
  import noc_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  chan_fwd_t       in_fwd,
  output logic            in_ack,
  output logic [NDIR-1:0] xb_req,
  output stu_t            xb_data,
  output logic            xb_last,
  input  logic            xb_accept
);

  logic             ack_q;
  logic             in_burst_q;    // header passed, data STUs follow
  dir_e             dir_q;         // output bound to the packet in flight
  logic [LEN_W-1:0] remain_q;      // data STUs still to forward

  logic    pending;
  header_t hdr_in, hdr_out;
  dir_e    hdr_dir;

  assign pending = in_fwd.req ^ ack_q;
  assign in_ack  = ack_q;
  assign hdr_in  = header_t'(in_fwd.data);

  always_comb begin
    hdr_dir = route(hdr_in, hdr_out);
    xb_req  = '0;
    xb_data = in_fwd.data;
    xb_last = 1'b0;
    if (pending) begin
      if (in_burst_q) begin
        xb_req[dir_q] = 1'b1;
        xb_last       = (remain_q == LEN_W'(1));
      end else begin
        xb_req[hdr_dir] = 1'b1;
        xb_data         = stu_t'(hdr_out);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q      <= 1'b0;
      in_burst_q <= 1'b0;
      dir_q      <= DIR_D;
      remain_q   <= '0;
    end else if (pending && xb_accept) begin
      ack_q <= ~ack_q;
      if (!in_burst_q) begin
        in_burst_q <= 1'b1;
        dir_q      <= hdr_dir;
        remain_q   <= wire_len(hdr_in.len);
      end else begin
        remain_q <= remain_q - 1'b1;
        if (remain_q == LEN_W'(1)) in_burst_q <= 1'b0;
      end
    end
  end

  // Channel rule: the sender holds req and data while an STU is pending.
  a_chan_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (pending && !xb_accept) |=> ($stable(in_fwd.req) && $stable(in_fwd.data)));
  // The crossbar only accepts what was requested.
  a_accept_pending: assert property (@(posedge clk) disable iff (!rst_n)
    xb_accept |-> pending);

endmodule
