// ddos_pkg: types and constants shared by the DDoS filtering pipeline.
//
// The data path is a 256-bit AXI4-Stream (32 bytes per beat), the width of
// the packet buffer in the reference design. Byte 0 of a packet sits in
// tdata[7:0] and tkeep[i] qualifies byte i (the usual AXI4-Stream order);
// the 128-bit tuser side band follows the NetFPGA-10G stream convention and
// is carried through untouched. Both the byte order and the tuser width are
// this design's choices.
//
// pkt_hdr_t is what the PreDecode stage hands to the filters: source IP,
// destination IP and TTL of an IPv4 packet. Packets that are not IPv4 get
// is_ipv4 = 0 and are never dropped by the filters.
//
// The special-use address blocks that the ingress/egress filter blocks on
// reset are listed in PIEF_RULES (IANA special-purpose registry, as tabled
// in the reference design; 14 rules, 16 CAM slots).
package ddos_pkg;

  localparam int unsigned AXIS_DATA_W = 256;
  localparam int unsigned AXIS_KEEP_W = AXIS_DATA_W / 8;
  localparam int unsigned AXIS_USER_W = 128;

  typedef logic [31:0] ipv4_addr_t;
  typedef logic [7:0]  ttl_t;
  typedef logic [7:0]  hop_count_t;

  // One beat of the packet stream (everything but valid/ready).
  typedef struct packed {
    logic [AXIS_DATA_W-1:0] tdata;
    logic [AXIS_KEEP_W-1:0] tkeep;
    logic [AXIS_USER_W-1:0] tuser;
    logic                   tlast;
  } axis_beat_t;

  localparam int unsigned AXIS_BEAT_W = $bits(axis_beat_t);

  // Decoded header fields handed to the filtering modules.
  typedef struct packed {
    logic       is_ipv4;
    ipv4_addr_t src_ip;
    ipv4_addr_t dst_ip;
    ttl_t       ttl;
  } pkt_hdr_t;

  // Verdict of the Decision Maker for one packet.
  typedef enum logic {
    VERDICT_BYPASS = 1'b0,
    VERDICT_DROP   = 1'b1
  } verdict_e;

  // Ethernet / IPv4 byte offsets within a frame.
  localparam int unsigned ETHERTYPE_OFS = 12;
  localparam int unsigned IP_VER_OFS    = 14;
  localparam int unsigned IP_TTL_OFS    = 22;
  localparam int unsigned IP_SRC_OFS    = 26;
  localparam int unsigned IP_DST_OFS    = 30;
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;

  // Special-use address blocks (address, prefix length).
  typedef struct packed {
    ipv4_addr_t addr;
    logic [5:0] prefix_len;
  } ip_prefix_t;

  localparam int unsigned PIEF_NUM_RULES = 14;

  localparam ip_prefix_t PIEF_RULES [PIEF_NUM_RULES] = '{
    '{32'h00_00_00_00,  6'd8},   // 0.0.0.0/8        "this" network
    '{32'h0A_00_00_00,  6'd8},   // 10.0.0.0/8       private use
    '{32'h7F_00_00_00,  6'd8},   // 127.0.0.0/8      loopback
    '{32'hA9_FE_00_00,  6'd16},  // 169.254.0.0/16   link local
    '{32'hAC_10_00_00,  6'd12},  // 172.16.0.0/12    private use
    '{32'hC0_00_00_00,  6'd24},  // 192.0.0.0/24     IETF protocol assignments
    '{32'hC0_58_63_00,  6'd24},  // 192.88.99.0/24   6to4 relay anycast
    '{32'hC0_A8_00_00,  6'd16},  // 192.168.0.0/16   private use
    '{32'hC6_12_00_00,  6'd15},  // 198.18.0.0/15    benchmark testing
    '{32'hC6_33_64_00,  6'd24},  // 198.51.100.0/24  TEST-NET-2
    '{32'hCB_00_71_00,  6'd24},  // 203.0.113.0/24   TEST-NET-3
    '{32'hE0_00_00_00,  6'd4},   // 224.0.0.0/4      multicast
    '{32'hF0_00_00_00,  6'd4},   // 240.0.0.0/4      reserved
    '{32'hFF_FF_FF_FF,  6'd32}   // 255.255.255.255/32 limited broadcast
  };

  // Mask with the top 'len' bits set.
  function automatic ipv4_addr_t prefix_mask(input logic [5:0] len);
    ipv4_addr_t m;
    for (int i = 0; i < 32; i++) m[31-i] = (i < int'(len));
    return m;
  endfunction

  // Read byte 'ofs' of a beat.
  function automatic logic [7:0] beat_byte(input logic [AXIS_DATA_W-1:0] d,
                                           input int unsigned ofs);
    return d[ofs*8 +: 8];
  endfunction

endpackage
