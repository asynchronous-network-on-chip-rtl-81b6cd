// noc_crossbar: the switch in the middle of a node.
//
// It connects each of the five Router inputs to each of the five Arbiter
// outputs. For every output it multiplexes the STU and `last` flag of the
// Router that output's Arbiter grants, and it routes each Arbiter's `fire`
// back to the granted Router as that Router's accept. It also gathers, per
// output, which Routers request it. The source design names the crossbar but
// does not describe it; a plain one-hot multiplexer per output is this
// design's choice. Purely combinational.
//
// Interface (index = direction, see noc_pkg::dir_e):
//   rt_req[i]   one-hot output request of Router i
//   rt_data[i], rt_last[i]  STU offered by Router i
//   rt_accept[i]            Router i's STU is taken at this edge
//   arb_req[o]  requesters of output o (bit i = Router i)
//   arb_grant[o], arb_fire[o]  from Arbiter o
//   arb_data[o], arb_last[o]   STU of the Router granted at output o
module noc_crossbar
  import noc_pkg::*;
(
  input  logic [NDIR-1:0] rt_req    [NDIR],
  input  stu_t            rt_data   [NDIR],
  input  logic            rt_last   [NDIR],
  output logic            rt_accept [NDIR],
  output logic [NDIR-1:0] arb_req   [NDIR],
  input  logic [NDIR-1:0] arb_grant [NDIR],
  input  logic            arb_fire  [NDIR],
  output stu_t            arb_data  [NDIR],
  output logic            arb_last  [NDIR]
);

  always_comb begin
    for (int o = 0; o < NDIR; o++) begin
      arb_data[o] = '0;
      arb_last[o] = 1'b0;
      for (int i = 0; i < NDIR; i++) begin
        arb_req[o][i] = rt_req[i][o];
        if (arb_grant[o][i]) begin
          arb_data[o] = arb_data[o] | rt_data[i];
          arb_last[o] = arb_last[o] | rt_last[i];
        end
      end
    end
    for (int i = 0; i < NDIR; i++) begin
      rt_accept[i] = 1'b0;
      for (int o = 0; o < NDIR; o++)
        rt_accept[i] = rt_accept[i] | (arb_fire[o] & arb_grant[o][i]);
    end
  end

endmodule
