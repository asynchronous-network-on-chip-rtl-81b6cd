// noc_ni_tx: send half of a Network Interface, from a Wishbone master to the NoC.
//
// A data-generating functional unit writes a burst to this Wishbone slave. The
// first write's address names the destination node (bits [3:0] its x,
// bits [7:4] its y). Words are acknowledged in the same cycle as their strobe
// and collected in a buffer until the burst ends: a cycle type other than
// "incrementing burst" (CTI 3'b010), the buffer holding MAX_DATA words, or CYC
// dropping. The interface then sends one packet on its outgoing channel: a
// header with the relative distance dX = dest_x - MY_X, dY = dest_y - MY_Y,
// the sender coordinates and the payload length, followed by the payload. An
// even payload gets one pad word so the packet length (header + data) is even,
// as the source design's 2-phase node requires. While a packet is being sent
// the slave holds off new writes by withholding ACK (throttling).
// The source design says only that the interface translates Wishbone to the
// NoC protocol; buffering whole bursts, the address map and the header layout
// are this design's choices. Writes only: functional units send, not fetch.
//
// Interface: Wishbone B3 slave (cyc, stb, we, adr, dat, cti, ack) and one
// outgoing 2-phase channel (out_fwd, out_ack) to the node's Destination input.
// Timing: one word per clock while collecting; then header + (len | 1) STUs,
// each waiting for the previous one's acknowledge.
module noc_ni_tx
  import noc_pkg::*;
#(
  parameter int unsigned MAX_DATA = 7,   // payload words per packet
  parameter int unsigned MY_X     = 0,
  parameter int unsigned MY_Y     = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // Wishbone slave
  input  logic        wb_cyc_i,
  input  logic        wb_stb_i,
  input  logic        wb_we_i,
  input  logic [31:0] wb_adr_i,
  input  logic [31:0] wb_dat_i,
  input  logic [2:0]  wb_cti_i,
  output logic        wb_ack_o,
  // outgoing channel
  output chan_fwd_t   out_fwd,
  input  logic        out_ack
);

  localparam int unsigned CNT_W = $clog2(MAX_DATA + 2);

  typedef enum logic {S_COLLECT, S_SEND} state_e;

  state_e             state_q;
  stu_t               buf_q [MAX_DATA];
  logic [CNT_W-1:0]   cnt_q;     // payload words collected
  logic [CNT_W-1:0]   pos_q;     // STU being sent: 0 = header, k = data k
  logic [COORD_W-1:0] dst_x_q, dst_y_q;
  chan_fwd_t          out_q;

  logic       take, burst_end, chan_free;
  logic [CNT_W-1:0] wlen;
  header_t    hdr;
  stu_t       next_stu;

  assign out_fwd   = out_q;
  assign chan_free = (out_q.req == out_ack);
  assign take      = (state_q == S_COLLECT) && wb_cyc_i && wb_stb_i && wb_we_i;
  assign wb_ack_o  = take;
  assign burst_end = (wb_cti_i != 3'b010) || (cnt_q == CNT_W'(MAX_DATA - 1));
  assign wlen      = cnt_q | CNT_W'(1);

  always_comb begin
    hdr       = '0;
    hdr.dx    = DELTA_W'(signed'({1'b0, dst_x_q}) - signed'({1'b0, COORD_W'(MY_X)}));
    hdr.dy    = DELTA_W'(signed'({1'b0, dst_y_q}) - signed'({1'b0, COORD_W'(MY_Y)}));
    hdr.src_x = COORD_W'(MY_X);
    hdr.src_y = COORD_W'(MY_Y);
    hdr.len   = LEN_W'(cnt_q);
    next_stu  = stu_t'(hdr);
    if (pos_q != '0) begin
      next_stu = '0;                                   // pad word
      for (int k = 0; k < MAX_DATA; k++)
        if (pos_q == CNT_W'(k + 1) && pos_q <= cnt_q) next_stu = buf_q[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_COLLECT;
      cnt_q   <= '0;
      pos_q   <= '0;
      dst_x_q <= '0;
      dst_y_q <= '0;
      out_q   <= '0;
      for (int k = 0; k < MAX_DATA; k++) buf_q[k] <= '0;
    end else begin
      case (state_q)
        S_COLLECT: begin
          if (take) begin
            buf_q[cnt_q[$clog2(MAX_DATA)-1:0]] <= wb_dat_i;
            cnt_q <= cnt_q + 1'b1;
            if (cnt_q == '0) begin
              dst_x_q <= wb_adr_i[COORD_W-1:0];
              dst_y_q <= wb_adr_i[2*COORD_W-1:COORD_W];
            end
            if (burst_end) begin
              state_q <= S_SEND;
              pos_q   <= '0;
            end
          end else if (!wb_cyc_i && cnt_q != '0) begin
            state_q <= S_SEND;                         // burst cut short
            pos_q   <= '0;
          end
        end
        S_SEND: begin
          if (chan_free) begin
            out_q.req  <= ~out_q.req;
            out_q.data <= next_stu;
            if (pos_q == wlen) begin
              state_q <= S_COLLECT;
              cnt_q   <= '0;
            end else begin
              pos_q <= pos_q + 1'b1;
            end
          end
        end
        default: state_q <= S_COLLECT;
      endcase
    end
  end

  // Wishbone rule: a master holds its request until it is acknowledged.
  a_wb_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_cyc_i && wb_stb_i && !wb_ack_o) |=>
      (wb_stb_i && $stable(wb_adr_i) && $stable(wb_dat_i) && $stable(wb_cti_i)));
  a_write_only: assert property (@(posedge clk) disable iff (!rst_n)
    (wb_cyc_i && wb_stb_i) |-> wb_we_i);

endmodule
