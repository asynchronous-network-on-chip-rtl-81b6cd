// noc_top: a MESH_X x MESH_Y two-dimensional mesh network-on-chip with a
// Wishbone Network Interface at every node.
//
// Each node (noc_node) links to its four neighbours with one channel in each
// direction and to its local functional units through a Network Interface:
// noc_ni_tx turns Wishbone write bursts from a data-generating master into
// packets, noc_ni_rx turns arriving packets into Wishbone writes to an
// absorbing slave. Packets follow delta-XY routing, X first, and are switched
// wormhole style. Node n = y * MESH_X + x sits at (x, y); North is y + 1 and
// East is x + 1. The default 8 x 8 = 64 nodes matches the largest system the
// source design evaluates (63 background masters plus one measured pair).
//
// The mesh topology and the Wishbone interfaces follow the source design; the
// coordinate convention, the address map and the edge handling are this
// design's choices.
//
// Mesh-edge channels have nothing on the far side: their inputs are tied idle
// and their outputs acknowledged at once. Delta-XY routing never sends a
// packet there as long as destinations lie inside the mesh (asserted).
//
// Interface: per node n, a Wishbone slave m_* (from that node's master) and a
// Wishbone master s_* (to that node's slave); all in one clock domain. The
// address of a master's first write selects the destination: adr[3:0] = x,
// adr[7:4] = y. A slave sees the sender node in adr[7:0] the same way.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X   = 8,
  parameter int unsigned MESH_Y   = 8,
  parameter int unsigned MAX_DATA = 7,
  localparam int unsigned NNODE   = MESH_X * MESH_Y
) (
  input  logic        clk,
  input  logic        rst_n,
  // Wishbone slaves, driven by the masters of each node
  input  logic        m_cyc [NNODE],
  input  logic        m_stb [NNODE],
  input  logic        m_we  [NNODE],
  input  logic [31:0] m_adr [NNODE],
  input  logic [31:0] m_dat [NNODE],
  input  logic [2:0]  m_cti [NNODE],
  output logic        m_ack [NNODE],
  // Wishbone masters, driving the slaves of each node
  output logic        s_cyc [NNODE],
  output logic        s_stb [NNODE],
  output logic        s_we  [NNODE],
  output logic [31:0] s_adr [NNODE],
  output logic [31:0] s_dat [NNODE],
  output logic [2:0]  s_cti [NNODE],
  input  logic        s_ack [NNODE]
);

  chan_fwd_t in_fwd  [NNODE][NDIR];
  logic      in_ack  [NNODE][NDIR];
  chan_fwd_t out_fwd [NNODE][NDIR];
  logic      out_ack [NNODE][NDIR];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      noc_node #(
        .SEED (16'(16'hACE1 + 16'h3D1 * N) | 16'h0001)
      ) u_node (
        .clk     (clk),
        .rst_n   (rst_n),
        .in_fwd  (in_fwd[N]),
        .in_ack  (in_ack[N]),
        .out_fwd (out_fwd[N]),
        .out_ack (out_ack[N])
      );

      noc_ni_tx #(
        .MAX_DATA (MAX_DATA),
        .MY_X     (x),
        .MY_Y     (y)
      ) u_ni_tx (
        .clk      (clk),
        .rst_n    (rst_n),
        .wb_cyc_i (m_cyc[N]),
        .wb_stb_i (m_stb[N]),
        .wb_we_i  (m_we[N]),
        .wb_adr_i (m_adr[N]),
        .wb_dat_i (m_dat[N]),
        .wb_cti_i (m_cti[N]),
        .wb_ack_o (m_ack[N]),
        .out_fwd  (in_fwd[N][DIR_D]),
        .out_ack  (in_ack[N][DIR_D])
      );

      noc_ni_rx u_ni_rx (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_fwd   (out_fwd[N][DIR_D]),
        .in_ack   (out_ack[N][DIR_D]),
        .wb_cyc_o (s_cyc[N]),
        .wb_stb_o (s_stb[N]),
        .wb_we_o  (s_we[N]),
        .wb_adr_o (s_adr[N]),
        .wb_dat_o (s_dat[N]),
        .wb_cti_o (s_cti[N]),
        .wb_ack_i (s_ack[N])
      );

      // East link
      if (x + 1 < MESH_X) begin : g_e
        assign in_fwd[N][DIR_E]  = out_fwd[N + 1][DIR_W];
        assign out_ack[N][DIR_E] = in_ack[N + 1][DIR_W];
      end else begin : g_e_edge
        assign in_fwd[N][DIR_E]  = '0;
        assign out_ack[N][DIR_E] = out_fwd[N][DIR_E].req;
      end
      // West link
      if (x > 0) begin : g_w
        assign in_fwd[N][DIR_W]  = out_fwd[N - 1][DIR_E];
        assign out_ack[N][DIR_W] = in_ack[N - 1][DIR_E];
      end else begin : g_w_edge
        assign in_fwd[N][DIR_W]  = '0;
        assign out_ack[N][DIR_W] = out_fwd[N][DIR_W].req;
      end
      // North link
      if (y + 1 < MESH_Y) begin : g_n
        assign in_fwd[N][DIR_N]  = out_fwd[N + MESH_X][DIR_S];
        assign out_ack[N][DIR_N] = in_ack[N + MESH_X][DIR_S];
      end else begin : g_n_edge
        assign in_fwd[N][DIR_N]  = '0;
        assign out_ack[N][DIR_N] = out_fwd[N][DIR_N].req;
      end
      // South link
      if (y > 0) begin : g_s
        assign in_fwd[N][DIR_S]  = out_fwd[N - MESH_X][DIR_N];
        assign out_ack[N][DIR_S] = in_ack[N - MESH_X][DIR_N];
      end else begin : g_s_edge
        assign in_fwd[N][DIR_S]  = '0;
        assign out_ack[N][DIR_S] = out_fwd[N][DIR_S].req;
      end
    end
  end

  // Nothing may leave the mesh: an edge output never changes phase.
  for (genvar n = 0; n < NNODE; n++) begin : g_edge_chk
    if (n % MESH_X == MESH_X - 1) begin : g_ce
      a_no_exit_e: assert property (@(posedge clk) disable iff (!rst_n)
        $stable(out_fwd[n][DIR_E].req));
    end
    if (n % MESH_X == 0) begin : g_cw
      a_no_exit_w: assert property (@(posedge clk) disable iff (!rst_n)
        $stable(out_fwd[n][DIR_W].req));
    end
    if (n / MESH_X == MESH_Y - 1) begin : g_cn
      a_no_exit_n: assert property (@(posedge clk) disable iff (!rst_n)
        $stable(out_fwd[n][DIR_N].req));
    end
    if (n / MESH_X == 0) begin : g_cs
      a_no_exit_s: assert property (@(posedge clk) disable iff (!rst_n)
        $stable(out_fwd[n][DIR_S].req));
    end
  end

endmodule
