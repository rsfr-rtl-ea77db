// rsfr_pkg: types and constants shared by the RSFR router blocks.
//
// Directions use the order of the requisite register (west, east, south,
// north, as in bits 2..5 and the risky-direction code of Table 1 of the
// scheme): W=0, E=1, S=2, N=3. X grows towards the east, Y towards the north.
//
// Type-of-fault codes (register bits 1:0 and the header TOF field) read the
// scheme's table with bit 1 as MSB: 00 general fault (stuck-at-port,
// transient dropper, or turn and straight together), 10 turn fault,
// 01 straight fault, 11 fault-free. When the faulty-router field of a header
// holds the address of the router that sent the packet, the TOF is a
// self-announcement: 00 "I dropped a packet", 01 "backtracked packet",
// 11 "clearing: I no longer drop"; 10 is this design's own "nothing to report".
//
// A packet is a single flit: the header of the scheme (SOP, TTL, faulty
// router, force, risky, PID, TOF, destination, EOP) followed by a payload.
// Field widths are this design's choice: 4-bit coordinates cover the largest
// evaluated mesh (16x16), TTL is 8 bits, payload 32 bits.
package rsfr_pkg;

  localparam int COORD_W = 4;
  localparam int TTL_W   = 8;
  localparam int DATA_W  = 32;

  typedef enum logic [1:0] {
    DIR_W = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_N = 2'd3
  } dir_e;

  typedef enum logic [1:0] {
    TOF_GEN      = 2'b00,
    TOF_STRAIGHT = 2'b01,
    TOF_TURN     = 2'b10,
    TOF_OK       = 2'b11
  } tof_e;

  // Self-announcement codes (faulty-router field == sender's address)
  localparam tof_e SELF_DROPPER = TOF_GEN;
  localparam tof_e SELF_BT      = TOF_STRAIGHT;  // "01"
  localparam tof_e SELF_NONE    = TOF_TURN;      // "10"
  localparam tof_e SELF_CLEAR   = TOF_OK;        // "11"

  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } addr_t;

  typedef struct packed {
    logic             sop;
    logic [TTL_W-1:0] ttl;
    addr_t            faulty;
    logic             frc;     // "force" field
    logic             risky;
    dir_e             pid;     // penultimate input direction
    tof_e             tof;
    addr_t            dest;
    logic             eop;
  } hdr_t;

  typedef struct packed {
    hdr_t              hdr;
    logic [DATA_W-1:0] data;
  } pkt_t;

  // 8-bit requisite register (Fig. 8 layout)
  typedef struct packed {
    dir_e       risky_dir;   // bits 7:6
    logic [3:0] faulty;      // bits 5:2, index = dir_e (W,E,S,N)
    tof_e       tof;         // bits 1:0
  } reqreg_t;

  // Fault models a router can be forced into by the fault-injection unit
  typedef enum logic [2:0] {
    FM_NONE     = 3'd0,
    FM_SAP      = 3'd1,  // stuck-at-port: always sends to dir
    FM_MULTI    = 3'd2,  // multiple copies in space: extra copy to dir
    FM_TURN     = 3'd3,  // turn paths go to dir instead
    FM_STRAIGHT = 3'd4,  // straight paths go to dir instead
    FM_DROP     = 3'd5   // packets vanish
  } fmode_e;

  typedef struct packed {
    fmode_e mode;
    dir_e   dir;
  } fcfg_t;

  // One-cycle event flags of a router, for observation and statistics
  typedef struct packed {
    logic accept;       // routing logic took a packet
    logic deliver;      // ejected to the local port
    logic fwd;          // forwarded to a neighbour
    logic drop;         // dropped by the routing algorithm (incl. TTL)
    logic ttl_drop;     // dropped because TTL expired
    logic bt;           // backtracked through the input port
    logic bt_recv;      // received a backtracked packet
    logic misroute;     // detected that the previous router misrouted
    logic frc;          // forwarded on a lower-priority port (force bit set)
    logic took_risky;   // only a risky neighbour was left
    logic pred_cut;     // path prediction removed a candidate port
    logic faulty_fwd;   // forwarded to a turn- or straight-faulty neighbour
    logic lost_detect;  // found that its own previous packet was lost
    logic clear_sent;   // announced clearing of its dropper status
  } stat_t;

  function automatic dir_e opp(dir_e d);
    return dir_e'(d ^ 2'd1);
  endfunction

  // Negative-first forbids turning from a positive direction into a negative
  // one: north-going then west, east-going then south. A packet travelling
  // north enters through the south port, one travelling east through west.
  function automatic logic prohibited(dir_e in_port, dir_e out_port);
    return (in_port == DIR_S && out_port == DIR_W) ||
           (in_port == DIR_W && out_port == DIR_S);
  endfunction

endpackage
