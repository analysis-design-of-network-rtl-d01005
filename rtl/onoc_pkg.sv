// onoc_pkg: types and constants shared by every block of the mesh network-on-chip.
//
// A flit is the smallest unit of transfer. Its header carries a 2-bit priority
// code, a generation timestamp and the source and destination mesh coordinates;
// the rest of the word is payload. The priority code doubles as the valid bit of
// every flit bus: 2'b00 means "no flit" (this follows the flit-type table of the
// design: 00 none, 01 high, 10 mid, 11 low). The same code is used on the
// request (dataInBuff) and grant (nodeGrant) lines between buffers and scheduler.
//
// Field widths other than the priority code, the 64-bit flit width taken as the
// main configuration, and the port numbering are choices of this implementation.
package onoc_pkg;

  // ---- flit format --------------------------------------------------------
  localparam int unsigned FLIT_W    = 64;  // 64-bit buffers are the main configuration
  localparam int unsigned TS_W      = 16;  // timestamp, cycles modulo 2^16
  localparam int unsigned COORD_W   = 2;   // enough for a 4x4 mesh
  localparam int unsigned PAYLOAD_W = FLIT_W - 2 - TS_W - 4 * COORD_W;

  typedef enum logic [1:0] {
    PRIO_NONE = 2'b00,   // no flit
    PRIO_HIGH = 2'b01,   // control: RD, WR, ACK, interrupts (single-flit packets)
    PRIO_MID  = 2'b10,   // real-time data
    PRIO_LOW  = 2'b11    // non-real-time block transfers
  } prio_e;

  typedef logic [COORD_W-1:0] coord_t;
  typedef logic [TS_W-1:0]    ts_t;

  typedef struct packed {
    prio_e                  prio;
    ts_t                    ts;
    coord_t                 src_x;
    coord_t                 src_y;
    coord_t                 dst_x;
    coord_t                 dst_y;
    logic [PAYLOAD_W-1:0]   payload;
  } flit_t;

  localparam flit_t NO_FLIT = '0;

  // ---- router ports -------------------------------------------------------
  localparam int unsigned NPORTS = 5;  // four mesh directions plus the local NI
  typedef enum logic [2:0] {
    PORT_LOCAL = 3'd0,
    PORT_NORTH = 3'd1,   // towards y-1
    PORT_EAST  = 3'd2,   // towards x+1
    PORT_SOUTH = 3'd3,   // towards y+1
    PORT_WEST  = 3'd4    // towards x-1
  } port_e;

  // ---- customisation options ---------------------------------------------
  // Service levels. Buffers use FCFS, PB and PBRR; the scheduler all four.
  typedef enum logic [1:0] {
    SL_FCFS = 2'd0,  // oldest first, priority ignored
    SL_RR   = 2'd1,  // round robin over requesters, priority ignored
    SL_PB   = 2'd2,  // strict priority, fixed order among equals
    SL_PBRR = 2'd3   // priority based, round robin among equals / classes
  } sl_e;

  typedef enum logic [1:0] {
    RT_XY        = 2'd0,  // X direction first (dimension order)
    RT_YX        = 2'd1,  // Y direction first
    RT_XY_RANDOM = 2'd2   // per flit, X first or Y first at random
  } route_e;

  typedef enum logic [1:0] {
    PAT_UNIFORM = 2'd0,   // destinations walk linearly over the nodes, H/M/L in turn
    PAT_RANDOM  = 2'd1,   // random destination, 10/20/70 % high/mid/low
    PAT_APP     = 2'd2    // application given: destination and priority from ports
  } pattern_e;

  // Rank used for strict priority: smaller is more urgent.
  function automatic logic [1:0] prio_rank(prio_e p);
    case (p)
      PRIO_HIGH: return 2'd0;
      PRIO_MID:  return 2'd1;
      PRIO_LOW:  return 2'd2;
      default:   return 2'd3;
    endcase
  endfunction

endpackage
