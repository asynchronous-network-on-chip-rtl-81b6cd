// noc_ni_rx: receive half of a Network Interface, from the NoC to a Wishbone slave.
//
// It terminates the channel leaving the node's Destination output. A header
// STU is acknowledged at once and its sender coordinates and payload length
// kept. Each following payload STU is written to the absorbing functional
// unit as a Wishbone write: address = sender node ({src_y, src_x} in bits
// [7:0]), CTI = incrementing burst (3'b010) and end-of-burst (3'b111) on the
// last word. The channel is acknowledged only when the slave ACKs, so a slow
// slave throttles the network. A pad word (sent when the payload is even) is
// acknowledged without a Wishbone cycle. The source design says only that the
// interface translates between the NoC and Wishbone; the address map and the
// write-only Wishbone master are this design's choices.
//
// Interface: incoming 2-phase channel (in_fwd, in_ack) and a Wishbone B3
// master (cyc, stb, we, adr, dat, cti, ack).
// Timing: STB rises in the cycle a payload STU arrives; in_ack toggles at the
// edge where ACK is seen. No data is buffered here.
module noc_ni_rx
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // incoming channel
  input  chan_fwd_t   in_fwd,
  output logic        in_ack,
  // Wishbone master
  output logic        wb_cyc_o,
  output logic        wb_stb_o,
  output logic        wb_we_o,
  output logic [31:0] wb_adr_o,
  output logic [31:0] wb_dat_o,
  output logic [2:0]  wb_cti_o,
  input  logic        wb_ack_i
);

  logic               ack_q;
  logic               in_pkt_q;   // header seen, data STUs follow
  logic [LEN_W-1:0]   len_q;      // payload words of this packet
  logic [LEN_W-1:0]   idx_q;      // data STUs taken so far
  logic [COORD_W-1:0] src_x_q, src_y_q;

  logic    pending, is_payload, take;
  header_t hdr;

  assign in_ack     = ack_q;
  assign pending    = in_fwd.req ^ ack_q;
  assign hdr        = header_t'(in_fwd.data);
  assign is_payload = in_pkt_q && (idx_q < len_q);

  assign wb_cyc_o = pending && is_payload;
  assign wb_stb_o = pending && is_payload;
  assign wb_we_o  = 1'b1;
  assign wb_adr_o = 32'({src_y_q, src_x_q});
  assign wb_dat_o = in_fwd.data;
  assign wb_cti_o = (idx_q == len_q - 1'b1) ? 3'b111 : 3'b010;

  // Header and pad words are taken at once; payload words on the slave's ACK.
  assign take = pending && (!is_payload || wb_ack_i);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack_q    <= 1'b0;
      in_pkt_q <= 1'b0;
      len_q    <= '0;
      idx_q    <= '0;
      src_x_q  <= '0;
      src_y_q  <= '0;
    end else if (take) begin
      ack_q <= ~ack_q;
      if (!in_pkt_q) begin
        in_pkt_q <= 1'b1;
        len_q    <= hdr.len;
        idx_q    <= '0;
        src_x_q  <= hdr.src_x;
        src_y_q  <= hdr.src_y;
      end else begin
        idx_q <= idx_q + 1'b1;
        if (idx_q + 1'b1 == wire_len(len_q)) in_pkt_q <= 1'b0;
      end
    end
  end

  // Channel rule: the sender holds req and data while an STU is pending.
  a_chan_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (pending && !take) |=> ($stable(in_fwd.req) && $stable(in_fwd.data)));
  // A packet arriving here has run out of distance on both axes.
  a_arrived: assert property (@(posedge clk) disable iff (!rst_n)
    (pending && !in_pkt_q) |-> (hdr.dx == 0 && hdr.dy == 0));

endmodule
