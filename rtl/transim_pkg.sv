// transim_pkg: shared constants, types and routing helpers of the 4x4 mesh
// network-on-chip that connects 14 processing cores (PCs).
//
// Flit format. A flit travels as FLIT_W data bits plus two sideband bits,
// {head, tail, data}. A packet is one header flit followed by LEN payload
// flits; the last payload flit carries tail=1. The header flit's data field
// holds the destination PC address, the source PC address and the payload
// length in flits (field layout below). The link width (64 bits, with 32 as
// the alternative), the 16 switches, the 14 PCs, the buffer depth of 64 and
// the PC-to-switch placement of the reference layout follow the original transaction-level model; the
// header layout, the port numbering and XY routing as the concrete
// "deterministic route scheme" are this design's own choices.
//
// Switch port numbering: 0 = local PC, 1 = north, 2 = east, 3 = south,
// 4 = west. Switches are numbered 0..15 row by row from the bottom-left corner
// (switch k here is switch k+1 of the reference layout); north is +y, east is +x.
package transim_pkg;

  localparam int unsigned MESH_X  = 4;    // switches per row
  localparam int unsigned MESH_Y  = 4;    // switches per column
  localparam int unsigned N_SW    = MESH_X * MESH_Y;  // 16 switches
  localparam int unsigned N_PC    = 14;   // processing cores
  localparam int unsigned N_PORT  = 5;    // local + four neighbours
  localparam int unsigned PORT_W  = 3;    // bits of a port number
  localparam int unsigned ADDR_W  = 4;    // bits of a PC address (0..13)
  localparam int unsigned LEN_W   = 10;   // bits of the payload length in flits
  localparam int unsigned SW_IDX_W = 4;   // bits of a switch index

  localparam int unsigned DEF_FLIT_W    = 64;  // link (channel) width
  localparam int unsigned DEF_BUF_DEPTH = 64;  // buffer depth in flits

  typedef enum logic [PORT_W-1:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,
    PORT_EAST  = 3'd2,
    PORT_SOUTH = 3'd3,
    PORT_WEST  = 3'd4
  } port_e;

  // The same port numbers as plain integers, for elaboration-time arithmetic.
  localparam int unsigned P_LOCAL = 0;
  localparam int unsigned P_NORTH = 1;
  localparam int unsigned P_EAST  = 2;
  localparam int unsigned P_SOUTH = 3;
  localparam int unsigned P_WEST  = 4;

  // Header field positions inside the data part of a header flit.
  localparam int unsigned HDR_DST_LSB = 0;
  localparam int unsigned HDR_SRC_LSB = ADDR_W;
  localparam int unsigned HDR_LEN_LSB = 2 * ADDR_W;
  localparam int unsigned HDR_BITS    = 2 * ADDR_W + LEN_W;

  // Switch (0-based) to which PC p (0-based, PC1 = 0) is attached. Read off
  // the reference layout: each PC tile hangs on the switch at its lower-left corner;
  // switches 14 and 15 have no PC.
  localparam logic [SW_IDX_W-1:0] PC_SWITCH [N_PC] = '{
    4'd12,  // PC1  (IOC)           -> S13
    4'd8,   // PC2  (SU,MCU1,MEU,LU) -> S9
    4'd5,   // PC3  (SU,MCU1,MEU,LU) -> S6
    4'd6,   // PC4  (SU,MCU1,MEU,LU) -> S7
    4'd1,   // PC5  (SU,MCU1,MEU,LU) -> S2
    4'd3,   // PC6  (SU,MCU1,MEU,LU) -> S4
    4'd13,  // PC7  (MCU2)          -> S14
    4'd4,   // PC8  (MCU2)          -> S5
    4'd0,   // PC9  (MCU2)          -> S1
    4'd9,   // PC10 (MCU2)          -> S10
    4'd10,  // PC11 (MCU2)          -> S11
    4'd2,   // PC12 (MCU2)          -> S3
    4'd11,  // PC13 (MCU2)          -> S12
    4'd7    // PC14 (MCU2)          -> S8
  };

  // Output port that switch `sw` uses for a packet to PC `dst`: dimension-
  // ordered XY routing, first along x, then along y, then to the local port.
  function automatic logic [PORT_W-1:0] xy_route(int unsigned sw, int unsigned dst);
    int unsigned x, y, dx, dy;
    x  = sw % MESH_X;
    y  = sw / MESH_X;
    dx = int'(PC_SWITCH[dst]) % MESH_X;
    dy = int'(PC_SWITCH[dst]) / MESH_X;
    if (dx > x)      return PORT_EAST;
    else if (dx < x) return PORT_WEST;
    else if (dy > y) return PORT_NORTH;
    else if (dy < y) return PORT_SOUTH;
    else             return PORT_LOCAL;
  endfunction

  // Neighbour of switch `sw` through port `p`, or N_SW when that side is the
  // mesh edge.
  function automatic int unsigned neighbour(int unsigned sw, int unsigned p);
    int unsigned x, y;
    x = sw % MESH_X;
    y = sw / MESH_X;
    case (p)
      P_NORTH: return (y + 1 < MESH_Y) ? sw + MESH_X : N_SW;
      P_SOUTH: return (y > 0)          ? sw - MESH_X : N_SW;
      P_EAST:  return (x + 1 < MESH_X) ? sw + 1      : N_SW;
      P_WEST:  return (x > 0)          ? sw - 1      : N_SW;
      default:    return N_SW;
    endcase
  endfunction

  // Port on the far side of a link that leaves through port `p`.
  function automatic int unsigned opposite(int unsigned p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default:    return P_LOCAL;
    endcase
  endfunction

  // PC attached to switch `sw`, or N_PC when none.
  function automatic int unsigned pc_at(int unsigned sw);
    for (int unsigned p = 0; p < N_PC; p++)
      if (int'(PC_SWITCH[p]) == sw) return p;
    return N_PC;
  endfunction

endpackage
