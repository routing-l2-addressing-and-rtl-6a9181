// lup_pkg: types and constants shared by the Lookup Processor (LUP).
//
// The LUP classifies a packet header in one run: a ternary first-match CAM
// searches the destination address together with the CAMList fields
// (source address, input interface, protocol), the result word attached to
// the matching CAM row gives the next hop (MAC address and interface) or the
// SW symbol (send to host), and a chain of comparison instructions held in
// SRAM finishes the filter by walking a decision diagram (FDD).
//
// The structure (CAM + attached results + SRAM comparison instructions, the
// CAMList "src addr, src iface, proto", SW outcome, MAC and interface of the
// next hop) follows the architecture description. All widths, the
// instruction format and the action encoding are this design's own choices:
// 32-bit IPv4 addresses (as in the rule example "src addr 1.2.3.0/24"),
// 4-bit interface numbers, 48-bit MAC addresses, 16-bit L4 ports.
package lup_pkg;

  localparam int unsigned ADDR_W  = 32;  // IPv4 address
  localparam int unsigned IF_W    = 4;   // interface number
  localparam int unsigned PROTO_W = 8;   // IP protocol
  localparam int unsigned PORT_W  = 16;  // L4 port
  localparam int unsigned MAC_W   = 48;  // Ethernet MAC
  localparam int unsigned IA_W    = 10;  // instruction address width
  localparam int unsigned VAL_W   = 32;  // width of a comparison operand

  // Packet header fields that the LUP can look at.
  typedef struct packed {
    logic [ADDR_W-1:0]  daddr;
    logic [ADDR_W-1:0]  saddr;
    logic [IF_W-1:0]    iif;    // interface the packet arrived on
    logic [PROTO_W-1:0] proto;
    logic [PORT_W-1:0]  sport;
    logic [PORT_W-1:0]  dport;
  } hdr_t;

  // CAM key: destination address, then the CAMList classes in order.
  localparam int unsigned KEY_W = ADDR_W + ADDR_W + IF_W + PROTO_W;  // 76
  typedef logic [KEY_W-1:0] key_t;

  // The L4 ports are not CAM columns; only the instructions test them.
  function automatic key_t make_key(hdr_t h);
    return {h.daddr, h.saddr, h.iif, h.proto};
  endfunction

  // Header field selected by a comparison instruction (an FDD variable class).
  typedef enum logic [2:0] {
    F_DADDR = 3'd0,
    F_SADDR = 3'd1,
    F_IIF   = 3'd2,
    F_PROTO = 3'd3,
    F_SPORT = 3'd4,
    F_DPORT = 3'd5
  } field_e;

  // Final decision of a lookup.
  typedef enum logic [1:0] {
    ACT_DROP    = 2'd0,  // filter terminal: discard
    ACT_FORWARD = 2'd1,  // filter terminal: accept, send to the next hop
    ACT_HOST    = 2'd2   // SW: hand the packet to the host OS
  } action_e;

  typedef enum logic {
    OP_TEST = 1'b0,  // FDD inner node: test variable, branch
    OP_TERM = 1'b1   // FDD terminal: filter action
  } opcode_e;

  // One comparison instruction = one FDD node. A variable is a closed range
  // [lo, hi] on one header field; exact match (lo == hi) and prefix match
  // (lo = prefix with zeros, hi = prefix with ones) are special cases.
  typedef struct packed {
    opcode_e          op;
    field_e           field;
    logic [VAL_W-1:0] lo;
    logic [VAL_W-1:0] hi;
    logic [IA_W-1:0]  nxt_hi;  // successor when the variable holds
    logic [IA_W-1:0]  nxt_lo;  // successor when it does not
    action_e          act;     // terminal action (OP_TERM only)
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

  // Outcome attached to a CAM row.
  typedef struct packed {
    logic             sw;    // SW symbol: packet must go to the host
    logic [MAC_W-1:0] mac;   // next-hop MAC address
    logic [IF_W-1:0]  oif;   // interface to reach the next hop
    logic [IA_W-1:0]  root;  // instruction address of FDD(CAMRow)
  } cam_res_t;

  localparam int unsigned RES_W = $bits(cam_res_t);

endpackage
