// noc_pkg: types and constants shared by the router blocks.
//
// A router has up to eight port slots, numbered clockwise starting at north:
// north, local 0, east, local 1, south, local 2, west, local 3. With one local
// port this gives the order north, local, east, south, west of the switch
// drawing, and the clockwise order is the one the fixed arbiter degrades in.
// A slot whose local port is not built is simply left out by generate blocks.
//
// The 8-bit header (the low 8 bits of the first flit of a packet) carries
// {dest_y[2:0], dest_x[2:0], dest_local[1:0]}. A router coordinate is the
// 6-bit {y, x}: y grows to the north, x grows to the east. The header layout
// of coordinate above two local-port bits is this design's reading of the
// text; the field widths are the document's.
package noc_pkg;

  localparam int NSLOT    = 8;   // 4 mesh ports + up to 4 local ports
  localparam int PKT_LEN  = 8;   // flits per packet (fixed by the design)
  localparam int HDR_W    = 8;   // header bits needed for routing

  typedef enum logic [2:0] {
    SLOT_N  = 3'd0,
    SLOT_L0 = 3'd1,
    SLOT_E  = 3'd2,
    SLOT_L1 = 3'd3,
    SLOT_S  = 3'd4,
    SLOT_L2 = 3'd5,
    SLOT_W  = 3'd6,
    SLOT_L3 = 3'd7
  } slot_e;

  // Arbitration units (codes of the component library in brackets).
  typedef enum logic [2:0] {
    ARB_FIXED = 3'd0,  // static fixed priority, also the custom ones (fa, cap, ca*)
    ARB_BUSY  = 3'd1,  // counting: most packets sent first (c1)
    ARB_WAIT  = 3'd2,  // counting: longest waiting first (c2)
    ARB_LEAST = 3'd3,  // counting: fewest packets sent first (c3)
    ARB_COIN  = 3'd4   // coin passing, round-robin-like (cp)
  } arb_e;

  // Counting-arbiter modes.
  typedef enum logic [1:0] {
    CNT_MOST_PACKETS  = 2'd0,
    CNT_LONGEST_WAIT  = 2'd1,
    CNT_FEWEST_PACKETS = 2'd2
  } cnt_mode_e;

  // Priority order: entry 0 is the slot with the highest priority.
  typedef logic [NSLOT-1:0][2:0] prio_t;

  // North first, then clockwise.
  localparam prio_t PRIO_CLOCKWISE = {3'd7, 3'd6, 3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};

  typedef logic [5:0] coord_t;

  // Slot index of local port l.
  function automatic int local_slot(int l);
    return 2 * l + 1;
  endfunction

  // True when slot s exists in a router with nl local ports.
  function automatic bit slot_exists(int s, int nl);
    return (s % 2 == 0) || ((s - 1) / 2 < nl);
  endfunction

  // True when a packet entering at slot 'from' may leave through slot 'to':
  // routing resolves y first, so east/west inputs never go north or south.
  function automatic bit path_exists(int from, int to);
    return !((to == int'(SLOT_N) || to == int'(SLOT_S)) &&
             (from == int'(SLOT_E) || from == int'(SLOT_W)));
  endfunction

endpackage
