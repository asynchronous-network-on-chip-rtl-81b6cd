// noc_pkg: types and constants shared by the mesh network-on-chip.
//
// The network moves 32-bit Space-Time-Units (STUs) over point-to-point
// channels. A channel has a request, an acknowledge and a data part and runs
// in one direction. The handshake is 2-phase: the sender toggles `req` when it
// presents a new STU and holds `data` stable; the receiver toggles `ack` when
// it has taken it. An STU is pending while req != ack (one XOR per end).
//
// A packet (burst) is one header STU followed by data STUs. The header carries
// the remaining hop distance as signed dX/dY, which every Router rewrites
// (delta-XY routing). The packet must have even length, so the number of data
// STUs on the wire is always odd: an even payload is padded with one word.
// The 32-bit STU width and the 5 node directions follow the source design;
// the header layout and the direction encoding are this design's choice.
package noc_pkg;

  localparam int unsigned STU_W  = 32;  // channel data width
  localparam int unsigned NDIR   = 5;   // N, E, S, W, Destination
  localparam int unsigned DIRB    = 3;   // bits of a direction index
  localparam int unsigned DELTA_W = 8;  // signed hop distance per axis
  localparam int unsigned COORD_W = 4;  // node coordinate width (up to 16x16)
  localparam int unsigned LEN_W   = 8;  // payload length field

  typedef logic [STU_W-1:0] stu_t;

  // Port index of each direction inside a node.
  typedef enum logic [DIRB-1:0] {
    DIR_N = 3'd0,   // towards y+1
    DIR_E = 3'd1,   // towards x+1
    DIR_S = 3'd2,   // towards y-1
    DIR_W = 3'd3,   // towards x-1
    DIR_D = 3'd4    // Destination: the local Network Interface
  } dir_e;

  // Header STU. len counts payload words; the wire carries len | 1 data STUs.
  typedef struct packed {
    logic signed [DELTA_W-1:0] dx;     // hops still to go East (+) / West (-)
    logic signed [DELTA_W-1:0] dy;     // hops still to go North (+) / South (-)
    logic [COORD_W-1:0]        src_x;  // sender coordinates
    logic [COORD_W-1:0]        src_y;
    logic [LEN_W-1:0]          len;    // payload words
  } header_t;

  // Forward half of a channel (sender to receiver); ack travels back alone.
  typedef struct packed {
    logic req;
    stu_t data;
  } chan_fwd_t;

  // Number of data STUs that follow a header: payload padded to an odd count.
  function automatic logic [LEN_W-1:0] wire_len(input logic [LEN_W-1:0] len);
    return len | LEN_W'(1);
  endfunction

  // Delta-XY routing: X first, then Y; the destination is reached at dX=dY=0.
  // Returns the output direction; `hout` is the header with the hop applied.
  function automatic dir_e route(input header_t hin, output header_t hout);
    hout = hin;
    if (hin.dx > 0) begin
      hout.dx = hin.dx - 1'b1;
      return DIR_E;
    end else if (hin.dx < 0) begin
      hout.dx = hin.dx + 1'b1;
      return DIR_W;
    end else if (hin.dy > 0) begin
      hout.dy = hin.dy - 1'b1;
      return DIR_N;
    end else if (hin.dy < 0) begin
      hout.dy = hin.dy + 1'b1;
      return DIR_S;
    end
    return DIR_D;
  endfunction

endpackage
