// pre_decode: front end of the Base System.
//
// Receives raw Ethernet frames on a 256-bit AXI4-Stream, passes every beat
// unchanged to the packet buffer, and extracts from each frame the fields
// the filtering modules work on: IPv4 source address, destination address
// and TTL. Decoding runs in parallel with buffering, so the packet is never
// taken apart and rebuilt.
//
// Field positions (untagged Ethernet II, byte 0 in tdata[7:0]):
//   ethertype bytes 12-13, version/IHL byte 14, TTL byte 22,
//   source IP bytes 26-29 (beat 0), destination IP bytes 30-33 (spans beats
//   0 and 1). The header record is therefore complete after the second beat.
//
// Interface:
//   s_*      input stream (from the network side)
//   m_*      output stream (to the packet buffer), combinational pass-through
//   hold     when high, input is not accepted (downstream verdict queue full)
//   hdr_*    one header record per frame, valid for one cycle, one cycle
//            after the beat that completed it. Frames that are not IPv4, or
//            that end before byte 33, give a record with is_ipv4 = 0.
// Throughput: one beat per cycle; a header at most every cycle.
//
// The fields and the pass-through of the raw frame follow the reference
// architecture; VLAN tags and IP options are not interpreted (IP options
// follow the addresses and do not move them), and the byte order is this
// design's choice.
module pre_decode
  import ddos_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,

  input  logic       s_tvalid,
  output logic       s_tready,
  input  axis_beat_t s_beat,

  output logic       m_tvalid,
  input  logic       m_tready,
  output axis_beat_t m_beat,

  input  logic       hold,

  output logic       hdr_valid,
  output pkt_hdr_t   hdr
);

  // Beat position within the current frame: 0, 1, or 2 meaning "2 or more".
  logic [1:0] beat_pos;

  // Fields captured from beat 0.
  logic        b0_ipv4;
  ipv4_addr_t  b0_src;
  logic [15:0] b0_dst_hi;
  ttl_t        b0_ttl;

  logic fire;
  assign s_tready = m_tready && !hold;
  assign m_tvalid = s_tvalid && !hold;
  assign m_beat   = s_beat;
  assign fire     = s_tvalid && s_tready;

  // Combinational decode of the fields of beat 0.
  logic        cur_ipv4;
  ipv4_addr_t  cur_src;
  logic [15:0] cur_dst_hi;
  ttl_t        cur_ttl;
  always_comb begin
    cur_ipv4   = ({beat_byte(s_beat.tdata, ETHERTYPE_OFS),
                   beat_byte(s_beat.tdata, ETHERTYPE_OFS+1)} == ETHERTYPE_IPV4)
              && (beat_byte(s_beat.tdata, IP_VER_OFS) >> 4 == 8'd4)
              && s_beat.tkeep[AXIS_KEEP_W-1];
    cur_ttl    = beat_byte(s_beat.tdata, IP_TTL_OFS);
    cur_src    = {beat_byte(s_beat.tdata, IP_SRC_OFS),   beat_byte(s_beat.tdata, IP_SRC_OFS+1),
                  beat_byte(s_beat.tdata, IP_SRC_OFS+2), beat_byte(s_beat.tdata, IP_SRC_OFS+3)};
    cur_dst_hi = {beat_byte(s_beat.tdata, IP_DST_OFS),   beat_byte(s_beat.tdata, IP_DST_OFS+1)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat_pos  <= 2'd0;
      b0_ipv4   <= 1'b0;
      b0_src    <= '0;
      b0_dst_hi <= '0;
      b0_ttl    <= '0;
      hdr_valid <= 1'b0;
      hdr       <= '0;
    end else begin
      hdr_valid <= 1'b0;
      if (fire) begin
        if (s_beat.tlast) beat_pos <= 2'd0;
        else if (beat_pos != 2'd2) beat_pos <= beat_pos + 2'd1;

        if (beat_pos == 2'd0) begin
          b0_ipv4   <= cur_ipv4;
          b0_src    <= cur_src;
          b0_dst_hi <= cur_dst_hi;
          b0_ttl    <= cur_ttl;
          if (s_beat.tlast) begin
            // Frame too short to hold an IPv4 header.
            hdr_valid <= 1'b1;
            hdr       <= '{is_ipv4: 1'b0, src_ip: cur_src, dst_ip: '0, ttl: cur_ttl};
          end
        end else if (beat_pos == 2'd1) begin
          hdr_valid <= 1'b1;
          hdr       <= '{is_ipv4: b0_ipv4 && s_beat.tkeep[1],
                         src_ip:  b0_src,
                         dst_ip:  {b0_dst_hi, beat_byte(s_beat.tdata, 0), beat_byte(s_beat.tdata, 1)},
                         ttl:     b0_ttl};
        end
      end
    end
  end

endmodule
