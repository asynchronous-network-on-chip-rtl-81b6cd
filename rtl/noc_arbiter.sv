// noc_arbiter: the output side of one node direction (the "Arbiter" of a node).
//
// Up to five Routers may ask for this output. When the output is free of a
// packet, the Arbiter picks one requester at random, as the source design's
// MUTEX-based arbitration does; here the randomness comes from a 16-bit LFSR
// that sets the starting point of a rotating search over the requesters. The
// winner keeps the output until the STU flagged `last` has passed, so packets
// are never interleaved. Each accepted STU is loaded into the output register
// and announced by toggling out_fwd.req (2-phase handshake); the next STU is
// taken only after the receiver has toggled out_ack back to equality.
// The LFSR, the rotating search and the output register are this design's
// choices; the source design fixes only random arbitration and the channel.
//
// Interface:
//   req_vec      which Routers request this output
//   grant        one-hot selection, to the crossbar (combinational)
//   fire         the granted STU is taken at this edge (combinational)
//   xb_data/last STU of the granted Router, from the crossbar
//   out_fwd/out_ack outgoing channel
// Timing: an STU is taken in the cycle it is requested if the channel is free;
// out_fwd changes one cycle later. One STU per two cycles at best, because the
// receiver's acknowledge is registered.
module noc_arbiter
  import noc_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1   // LFSR start value, must be non-zero
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [NDIR-1:0] req_vec,
  output logic [NDIR-1:0] grant,
  output logic            fire,
  input  stu_t            xb_data,
  input  logic            xb_last,
  output chan_fwd_t       out_fwd,
  input  logic            out_ack
);

  logic            locked_q;
  logic [DIRB-1:0]  owner_q;
  logic [15:0]     lfsr_q;
  chan_fwd_t       out_q;

  logic             chan_free;
  logic [DIRB-1:0]  start, sel;
  logic             any;
  logic [DIRB:0]    idx;

  assign chan_free = (out_q.req == out_ack);
  assign out_fwd   = out_q;
  assign start     = DIRB'(lfsr_q % 16'(NDIR));

  // Random start, then the first requester found going round from it.
  always_comb begin
    sel = owner_q;
    any = 1'b0;
    idx = '0;
    if (locked_q) begin
      any = req_vec[owner_q];
    end else begin
      for (int k = NDIR - 1; k >= 0; k--) begin
        idx = {1'b0, start} + (DIRB + 1)'(k);
        if (idx >= (DIRB + 1)'(NDIR)) idx = idx - (DIRB + 1)'(NDIR);
        if (req_vec[idx[DIRB-1:0]]) begin
          sel = idx[DIRB-1:0];
          any = 1'b1;
        end
      end
    end
    grant = '0;
    if (any) grant[sel] = 1'b1;
    fire = any && chan_free;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q <= 1'b0;
      owner_q  <= '0;
      lfsr_q   <= SEED;
      out_q    <= '0;
    end else begin
      // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1
      lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
      if (fire) begin
        out_q.req  <= ~out_q.req;
        out_q.data <= xb_data;
        locked_q   <= !xb_last;
        owner_q    <= sel;
      end
    end
  end

  a_grant_onehot: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0(grant));
  a_grant_requested: assert property (@(posedge clk) disable iff (!rst_n)
    (grant & ~req_vec) == '0);

endmodule
