// rbc_pkg: types and constants shared by the router-buffer-cache (RBC) mesh.
//
// A flit carries 64 data bits (8-byte flits) plus a 2-bit flit type and the
// virtual-channel number it travels on. The head flit's 64 bits are laid out
// as head_t: destination and source tile coordinates, a message type, a
// "serviced" flag that the home router sets when its RBC has already answered
// a read, and the 64-byte block address. A 64-byte block therefore travels as
// 9 flits: one head and eight body flits, the last one marked TAIL.
//
// From the source: 8-byte flits, 64-byte blocks, 4 KB pages, 5 router ports,
// 3 VCs per port, an 8x8 mesh, 9 flits per stored block, four zones per page,
// a 2-bit hit counter per RBC entry, and a sharer threshold of 5.
// Own choices: 48-bit physical addresses, the field order inside head_t, the
// message encoding, the port numbering and the buffer depth of 4 flits per VC.
package rbc_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned FLIT_W      = 64;  // 8-byte flit
  localparam int unsigned NUM_PORTS   = 5;   // local, east, west, north, south
  localparam int unsigned NUM_VC      = 3;   // VC0..VC2 per input port
  localparam int unsigned VC_W        = 2;
  localparam int unsigned PORT_W      = 3;
  localparam int unsigned BUF_DEPTH   = 4;   // flits per VC buffer
  localparam int unsigned COORD_W     = 3;   // up to 8 tiles per dimension
  localparam int unsigned PADDR_W     = 48;  // physical address bits
  localparam int unsigned BLK_OFF_W   = 6;   // 64-byte block
  localparam int unsigned PAGE_OFF_W  = 12;  // 4 KB page
  localparam int unsigned BLK_W       = PADDR_W - BLK_OFF_W;            // 42
  localparam int unsigned PAGE_W      = PADDR_W - PAGE_OFF_W;           // 36
  localparam int unsigned ZONE_W      = 2;   // four zones per page
  localparam int unsigned BODY_FLITS  = 8;   // 64 B / 8 B
  localparam int unsigned BLK_FLITS   = BODY_FLITS + 1;                 // 9
  localparam int unsigned HIT_CTR_W   = 2;   // two-bit saturating counter

  // The VC of the local input port on which the RBC injects its replies.
  localparam int unsigned RBC_VC      = NUM_VC - 1;

  // ---------------------------------------------------------------- ports
  typedef enum logic [PORT_W-1:0] {
    P_LOCAL = 3'd0,
    P_EAST  = 3'd1,   // +x
    P_WEST  = 3'd2,   // -x
    P_NORTH = 3'd3,   // -y
    P_SOUTH = 3'd4    // +y
  } port_e;

  // ---------------------------------------------------------------- flits
  typedef enum logic [1:0] {
    F_HEAD     = 2'd0,
    F_BODY     = 2'd1,
    F_TAIL     = 2'd2,
    F_HEADTAIL = 2'd3
  } ftype_e;

  typedef enum logic [2:0] {
    M_READ    = 3'd0,   // read miss from an L1 (GetS)
    M_WRITE   = 3'd1,   // write miss from an L1 (GetM)
    M_UPGRADE = 3'd2,   // write to a block held in S (upgrade)
    M_DATA    = 3'd3,   // reply carrying a block
    M_ACK     = 3'd4,   // reply without data (write permission)
    M_INV     = 3'd5,   // invalidation to a sharer
    M_INVACK  = 3'd6,   // acknowledgement of an invalidation
    M_OTHER   = 3'd7
  } msg_e;

  typedef logic [BLK_W-1:0] blk_t;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] src_y;
    msg_e               msg;
    logic               serviced;
    blk_t               blk;
    logic [5:0]         rsvd;
  } head_t;

  typedef struct packed {
    ftype_e            ftype;
    logic [VC_W-1:0]   vc;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // One direction of a router-to-router link: a flit and, flowing the other
  // way on the same link, a credit for one freed buffer slot of a VC.
  typedef struct packed {
    logic  valid;
    flit_t flit;
  } link_t;

  typedef struct packed {
    logic            valid;
    logic [VC_W-1:0] vc;
  } credit_t;

  // One 64-byte block as the RBC stores it: 9 flit payloads, head first.
  typedef logic [BLK_FLITS-1:0][FLIT_W-1:0] blk_flits_t;
  typedef logic [BODY_FLITS-1:0][FLIT_W-1:0] blk_data_t;

  // Event pulses of one tile, counted by whoever watches the mesh.
  typedef struct packed {
    logic rbc_read_hit;     // a read was answered from the RBC
    logic rbc_write_inv;    // a write or upgrade invalidated an RBC block
    logic rbc_llc_inv;      // the LLC controller invalidated an RBC block
    logic rbc_fill;         // a block was promoted into the RBC
    logic rbc_evict;        // a valid block was replaced (hits reported)
    logic rbc_reply_stall;  // a read hit waited for a free reply slot
    logic ht_insert;        // a high-sharer zone was recorded
    logic ht_hit;           // an E->S read found its zone in the table
    logic pollution;        // pollution control removed table entries
    logic spec_fail;        // a speculative switch grant was wasted
    logic credit_stall;     // a flit waited for a downstream credit
  } tile_events_t;

  // ---------------------------------------------------------------- helpers
  function automatic logic is_head(ftype_e t);
    return (t == F_HEAD) || (t == F_HEADTAIL);
  endfunction

  function automatic logic is_tail(ftype_e t);
    return (t == F_TAIL) || (t == F_HEADTAIL);
  endfunction

  function automatic logic is_request(msg_e m);
    return (m == M_READ) || (m == M_WRITE) || (m == M_UPGRADE);
  endfunction

  function automatic logic [PAGE_W-1:0] blk_page(blk_t b);
    return b[BLK_W-1 -: PAGE_W];
  endfunction

  // The zone is the top two bits of the block index within its page, so a
  // zone is 16 consecutive 64-byte blocks (1 KB).
  function automatic logic [ZONE_W-1:0] blk_zone(blk_t b);
    return b[PAGE_OFF_W-BLK_OFF_W-1 -: ZONE_W];
  endfunction

endpackage
