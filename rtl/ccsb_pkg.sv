// ccsb_pkg: types and constants shared by the centrally controlled segmented
// bus (CCSB).
//
// The CCSB joins up to 16 elements on a closed-loop data bus that is cut into
// segments by one bidirectional switch per element, and a central bus
// controller that sets those switches. This package holds the encodings that
// the blocks exchange:
//   * the two switch control lines of Table 4.1 of the source design
//     (CW line, CCW line): 00 CCW flow, 01 isolated, 10 not allowed, 11 CW flow;
//   * the request record an element leaves in locations 0..3 of its control
//     interface memory (location 0: type bits 1:0, source bits 5:2, number of
//     destinations bits 7:6; location 1: start/end address or length;
//     location 2: destination 1 in bits 3:0, destination 2 in bits 7:4) --
//     these field positions follow the source design;
//   * the two-byte request to the allocation process (byte 1: bit 0 set/
//     dismantle, bit 1 CW/CCW, bits 5:2 source; byte 2: bits 3:0 furthest
//     destination) -- also from the source design; the reserved upper half
//     of byte 2 carries the requester's code here;
//   * the controller-to-element message written into locations 4 and 5, whose
//     codes are this design's own choice (the source design only says these
//     locations carry "read, write, type of information").
// Location 3 was left for future expansion by the source design; here bit 0
// marks a read (the requester receives) and bit 1 an urgent request.
package ccsb_pkg;

  // Element codes are four bits wide, so at most 16 elements.
  localparam int unsigned MAX_ELEM = 16;
  localparam int unsigned ID_W     = 4;
  // Control interface memory: 16 bytes.
  localparam int unsigned CI_BYTES = 16;
  localparam int unsigned CI_AW    = 4;
  // Mail box: locations 6..15.
  localparam int unsigned MAIL_LO  = 6;
  localparam int unsigned MAIL_HI  = 15;
  localparam int unsigned MAIL_MAX = MAIL_HI - MAIL_LO + 1;

  typedef logic [ID_W-1:0] elem_id_t;

  // Table 4.1: {CW control line, CCW control line}.
  typedef enum logic [1:0] {
    SW_CCW = 2'b00,   // data flows counter-clockwise through the switch
    SW_ISO = 2'b01,   // switch open: the two sides are isolated
    SW_BAD = 2'b10,   // forbidden setting
    SW_CW  = 2'b11    // data flows clockwise through the switch
  } sw_ctl_e;

  // Transaction type, location 0 bits 1:0.
  typedef enum logic [1:0] {
    TT_DATA_READY = 2'd0,  // mail for the controller to deliver is in memory
    TT_PATH_REQ   = 2'd1,  // request for a communication path
    TT_DIAG_DATA  = 2'd2,  // diagnostic data returned
    TT_COMPLETE   = 2'd3   // confirmation that a transaction completed
  } trans_e;

  // Location 0.
  typedef struct packed {
    logic [1:0] ndest;     // 0 controller, 1 one, 2 two, 3 broadcast
    elem_id_t   src;
    trans_e     ttype;
  } ci_loc0_t;

  // Location 3 (this design's use of the spare location).
  typedef struct packed {
    logic [5:0] rsv;
    logic       urgent;
    logic       read;      // requester is the receiver of the data
  } ci_loc3_t;

  // Message code written by the controller into location 4.
  typedef enum logic [3:0] {
    MSG_NONE    = 4'd0,
    MSG_GRANT   = 4'd1,    // path set; loc5: partner, role, direction
    MSG_MAIL    = 4'd2,    // mail in 6..; loc5: sender, byte count
    MSG_SUSPEND = 4'd3,    // path suspended; will be granted again later
    MSG_REJECT  = 4'd4,    // request invalid or refused
    MSG_TIMEOUT = 4'd5,    // completion not confirmed in time; path removed
    MSG_DONE    = 4'd6,    // completion confirmed; path removed
    MSG_CHECK   = 4'd7,    // path check; sender drives location 6 on the bus
    MSG_RETRY   = 4'd8     // mail buffer busy, request again later
  } msg_code_e;

  // Location 5 for GRANT and CHECK.
  typedef struct packed {
    logic [1:0] rsv;
    logic       ccw;       // path runs counter-clockwise from the sender
    logic       sender;    // this element drives the data bus
    elem_id_t   partner;
  } grant_loc5_t;

  // Request handed from the communication process to arbitration.
  typedef enum logic [1:0] {
    K_PATH     = 2'd0,
    K_COMPLETE = 2'd1,
    K_MAIL     = 2'd2,
    K_CHECK    = 2'd3
  } arb_kind_e;

  typedef struct packed {
    arb_kind_e  kind;
    elem_id_t   src;
    elem_id_t   dst0;
    elem_id_t   dst1;
    logic [1:0] ndest;
    logic [7:0] len;       // path: estimated bytes; mail: byte count
    logic       read;
    logic       urgent;
    logic [7:0] data0;     // check pattern
  } arb_req_t;

  // Message from arbitration to the communication process.
  typedef struct packed {
    msg_code_e       code;
    logic [MAX_ELEM-1:0] mask;   // elements to inform
    elem_id_t        a;          // sender / source
    elem_id_t        b;          // receiver / partner
    logic            ccw;
    logic [7:0]      data0;      // loc6 for CHECK, byte count for MAIL
  } msg_t;

  // Allocation request, two bytes (Section 4.5.1(c)).
  typedef struct packed {
    elem_id_t   tag;       // byte 2 bits 7:4 (reserved in the source
                           // design): requester, echoed back when done
    elem_id_t   far_dst;   // byte 2 bits 3:0
    logic [1:0] rsv1;      // byte 1 bits 7:6
    elem_id_t   src;       // byte 1 bits 5:2
    logic       ccw;       // byte 1 bit 1
    logic       dismantle; // byte 1 bit 0
  } alloc_req_t;

  // Decode of Table 4.1.
  function automatic logic sw_passes_cw(input logic [1:0] c);
    return c == SW_CW;
  endfunction
  function automatic logic sw_passes_ccw(input logic [1:0] c);
    return c == SW_CCW;
  endfunction

endpackage
