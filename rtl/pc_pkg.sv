// pc_pkg: widths and record types shared by the XnorBV packet classifier.
//
// The classifier looks at the standard 5-tuple of an IPv4 packet, 104 bits
// in all, in the field order source IP, destination IP, source port,
// destination port, protocol (field 1 in the most significant bits). The
// 104-bit total, the field order and the 16-bit ports follow the
// architecture; the 32-bit addresses and 8-bit protocol are the IPv4 sizes
// that make up the remainder.
//
// A rule stores a ternary pattern for each of the three XNOR-matched fields
// (a value and a "care" mask: a care bit of 0 is the '*' wildcard) and an
// inclusive lower and upper bound for each port. The mask encoding and the
// per-rule valid bit are this design's choices; the architecture only says
// that the fields accept '0', '1' and '*' and that the ports carry bounds.
package pc_pkg;

  localparam int unsigned IP_W       = 32;
  localparam int unsigned PORT_W     = 16;
  localparam int unsigned PROTO_W    = 8;
  localparam int unsigned HDR_W      = 2 * IP_W + 2 * PORT_W + PROTO_W;  // 104
  localparam int unsigned NUM_FIELDS = 5;

  // Incoming packet header; sip occupies bits 103:72.
  typedef struct packed {
    logic [IP_W-1:0]    sip;
    logic [IP_W-1:0]    dip;
    logic [PORT_W-1:0]  sport;
    logic [PORT_W-1:0]  dport;
    logic [PROTO_W-1:0] proto;
  } header_t;

  // One ruleset entry.
  typedef struct packed {
    logic               valid;       // entry takes part in matching
    logic [IP_W-1:0]    sip_value;
    logic [IP_W-1:0]    sip_care;    // 1 = bit must equal sip_value, 0 = '*'
    logic [IP_W-1:0]    dip_value;
    logic [IP_W-1:0]    dip_care;
    logic [PORT_W-1:0]  sport_lo;    // inclusive bounds
    logic [PORT_W-1:0]  sport_hi;
    logic [PORT_W-1:0]  dport_lo;
    logic [PORT_W-1:0]  dport_hi;
    logic [PROTO_W-1:0] proto_value;
    logic [PROTO_W-1:0] proto_care;
  } rule_t;

  // Bit-vector index of each field inside the aggregator input.
  typedef enum logic [2:0] {
    F_SIP   = 3'd0,
    F_DIP   = 3'd1,
    F_SPORT = 3'd2,
    F_DPORT = 3'd3,
    F_PROTO = 3'd4
  } field_e;

endpackage
