// noc_wb_bus: a shared Wishbone bus, the conventional interconnect that the
// mesh is measured against.
//
// NM masters and NS slaves share a single channel. One multiplexer routes the
// granted master's cycle to the addressed slave and a second routes that
// slave's acknowledge back to the master; only one transfer is ever in
// flight, so the bus slows down as masters are added. When the bus is idle,
// an arbiter picks one master whose CYC is high at random and keeps the bus
// with it until that master drops CYC, so a whole burst goes through in one
// tenure. The multiplexed shared bus and random arbitration follow the source
// design. A clocked 16-bit LFSR that sets the start of a rotating search
// stands in for its MUTEX element, like the mesh's Arbiter does; the
// one-clock grant register and the address map are this design's choices.
//
// Interface: per master i, a Wishbone slave port m_* (write bursts, CTI as
// the master drives it); per slave j, a Wishbone master port s_*. The slave
// addressed is adr[7:4] * GRID_X + adr[3:0], the same {y, x} map the mesh
// uses. ADR, DAT, WE and CTI go to every slave; CYC and STB only to the
// addressed one. A master that addresses a slave past NS gets no acknowledge.
// Timing: the grant takes one clock after CYC rises and one clock to release
// after CYC falls; in between, ACK is combinational from the slave, so a
// slave that acknowledges at once lets a burst move one word per clock.
module noc_wb_bus #(
  parameter int unsigned NM     = 64,
  parameter int unsigned NS     = 64,
  parameter int unsigned GRID_X = 8,
  parameter logic [15:0] SEED   = 16'hACE1,   // LFSR start value, must be non-zero
  localparam int unsigned MW    = (NM > 1) ? $clog2(NM) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // Wishbone slave ports, one per master
  input  logic        m_cyc [NM],
  input  logic        m_stb [NM],
  input  logic        m_we  [NM],
  input  logic [31:0] m_adr [NM],
  input  logic [31:0] m_dat [NM],
  input  logic [2:0]  m_cti [NM],
  output logic        m_ack [NM],
  // Wishbone master ports, one per slave
  output logic        s_cyc [NS],
  output logic        s_stb [NS],
  output logic        s_we  [NS],
  output logic [31:0] s_adr [NS],
  output logic [31:0] s_dat [NS],
  output logic [2:0]  s_cti [NS],
  input  logic        s_ack [NS]
);

  logic          busy_q;
  logic [MW-1:0] owner_q;
  logic [15:0]   lfsr_q;

  logic          any;
  logic [MW-1:0] start, pick;
  logic [MW:0]   idx;
  logic          o_cyc, o_stb, o_we;
  logic [31:0]   o_adr, o_dat;
  logic [2:0]    o_cti;
  int unsigned   sel;
  logic          sel_ack;

  assign start = MW'(lfsr_q % 16'(NM));

  // Random start, then the first master with CYC high going round from it.
  always_comb begin
    pick = '0;
    any  = 1'b0;
    idx  = '0;
    for (int k = NM - 1; k >= 0; k--) begin
      idx = {1'b0, start} + (MW + 1)'(k);
      if (idx >= (MW + 1)'(NM)) idx = idx - (MW + 1)'(NM);
      if (m_cyc[idx[MW-1:0]]) begin
        pick = idx[MW-1:0];
        any  = 1'b1;
      end
    end
  end

  // Master-to-slave multiplexer
  always_comb begin
    o_cyc = busy_q && m_cyc[owner_q];
    o_stb = busy_q && m_stb[owner_q];
    o_we  = m_we[owner_q];
    o_adr = m_adr[owner_q];
    o_dat = m_dat[owner_q];
    o_cti = m_cti[owner_q];
    sel   = int'(o_adr[7:4]) * GRID_X + int'(o_adr[3:0]);
  end

  for (genvar j = 0; j < NS; j++) begin : g_slave
    assign s_cyc[j] = o_cyc && (sel == j);
    assign s_stb[j] = o_stb && (sel == j);
    assign s_we[j]  = o_we;
    assign s_adr[j] = o_adr;
    assign s_dat[j] = o_dat;
    assign s_cti[j] = o_cti;
  end

  // Slave-to-master multiplexer
  always_comb begin
    sel_ack = 1'b0;
    for (int j = 0; j < NS; j++)
      if (sel == j) sel_ack = s_ack[j];
  end

  for (genvar i = 0; i < NM; i++) begin : g_master
    assign m_ack[i] = o_cyc && o_stb && (owner_q == MW'(i)) && sel_ack;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      owner_q <= '0;
      lfsr_q  <= SEED;
    end else begin
      // Galois LFSR, x^16 + x^14 + x^13 + x^11 + 1
      lfsr_q <= {1'b0, lfsr_q[15:1]} ^ (lfsr_q[0] ? 16'hB400 : 16'h0000);
      if (!busy_q) begin
        if (any) begin
          busy_q  <= 1'b1;
          owner_q <= pick;
        end
      end else if (!m_cyc[owner_q]) begin
        busy_q <= 1'b0;
      end
    end
  end

  // At most one slave sees a cycle and at most one master an acknowledge.
  logic [NS-1:0] s_cyc_v;
  logic [NM-1:0] m_ack_v;
  for (genvar j = 0; j < NS; j++) begin : g_sv
    assign s_cyc_v[j] = s_cyc[j];
  end
  for (genvar i = 0; i < NM; i++) begin : g_mv
    assign m_ack_v[i] = m_ack[i];
  end
  a_one_slave: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(s_cyc_v));
  a_ack_owner: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(m_ack_v));

endmodule
