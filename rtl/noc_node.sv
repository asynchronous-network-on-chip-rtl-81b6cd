// noc_node: one switching node of the mesh.
//
// A node joins channels from five directions: North, East, South, West and
// Destination (the local Network Interface). Each direction has a Router on
// its input and an Arbiter on its output, and a crossbar sits between them,
// as in the source design's node layout. A packet entering on any input is
// routed by that input's Router, wins its output through the output's Arbiter
// and then holds that path until its last STU has left (wormhole style). The
// only storage on the path is the one-STU output register of each Arbiter.
// The five directions and the Router/Arbiter/crossbar split follow the source
// design; holding a path per packet and the single register stage are this
// design's choices.
//
// Interface: in_fwd[d]/in_ack[d] are the incoming channels and
// out_fwd[d]/out_ack[d] the outgoing ones, d indexed by noc_pkg::dir_e.
// Timing: an idle node adds one clock of latency per STU (header routed and
// registered in the same cycle it arrives); sustained rate is one STU per two
// clocks per channel. SEED varies the Arbiters' random choices between nodes.
module noc_node
  import noc_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  chan_fwd_t in_fwd  [NDIR],
  output logic      in_ack  [NDIR],
  output chan_fwd_t out_fwd [NDIR],
  input  logic      out_ack [NDIR]
);

  logic [NDIR-1:0] rt_req    [NDIR];
  stu_t            rt_data   [NDIR];
  logic            rt_last   [NDIR];
  logic            rt_accept [NDIR];
  logic [NDIR-1:0] arb_req   [NDIR];
  logic [NDIR-1:0] arb_grant [NDIR];
  logic            arb_fire  [NDIR];
  stu_t            arb_data  [NDIR];
  logic            arb_last  [NDIR];

  for (genvar d = 0; d < NDIR; d++) begin : g_dir
    noc_router u_router (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_fwd    (in_fwd[d]),
      .in_ack    (in_ack[d]),
      .xb_req    (rt_req[d]),
      .xb_data   (rt_data[d]),
      .xb_last   (rt_last[d]),
      .xb_accept (rt_accept[d])
    );

    noc_arbiter #(
      .SEED ((SEED ^ (16'h1F35 * 16'(d + 1))) | 16'h0001)
    ) u_arbiter (
      .clk     (clk),
      .rst_n   (rst_n),
      .req_vec (arb_req[d]),
      .grant   (arb_grant[d]),
      .fire    (arb_fire[d]),
      .xb_data (arb_data[d]),
      .xb_last (arb_last[d]),
      .out_fwd (out_fwd[d]),
      .out_ack (out_ack[d])
    );
  end

  noc_crossbar u_crossbar (
    .rt_req    (rt_req),
    .rt_data   (rt_data),
    .rt_last   (rt_last),
    .rt_accept (rt_accept),
    .arb_req   (arb_req),
    .arb_grant (arb_grant),
    .arb_fire  (arb_fire),
    .arb_data  (arb_data),
    .arb_last  (arb_last)
  );

endmodule
