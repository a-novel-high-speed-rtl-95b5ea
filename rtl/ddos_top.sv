// ddos_top: in-line filter that drops IP-spoofed packets.
//
// The design is split into a Base System, which only moves packets, and
// DDoS Filtering modules, which only see decoded header fields:
//
//   s_axis --> pre_decode --+--> packet_fifo (raw frames) --> post_decode --> m_axis
//                           |                                     ^
//                           +-> hdr --+--> pief --+               |
//                                     +--> hcf  --+-> decision_maker
//                                                      --> verdict queue
//
// pre_decode copies every frame into the packet buffer and, in parallel,
// extracts source IP, destination IP and TTL. The Port Ingress/Egress
// Filter (pief) flags sources in blocked address ranges; the Hop-Count
// Filter (hcf) flags sources whose hop-count differs from the one it
// learned for their /24 block. decision_maker ORs the two into DROP or
// BYPASS, which waits in a one-bit verdict queue until post_decode reaches
// that frame at the head of the buffer and forwards or discards it. New
// filters can be added beside pief and hcf without touching the Base
// System.
//
// Interface: 256-bit AXI4-Stream in and out (byte 0 in tdata[7:0], 128-bit
// tuser carried along); a rule write port for pief; hcf_learn_en enables
// learning of new source blocks; per-verdict strobes and frame counters.
// Timing: one beat per cycle through the whole path; a frame's verdict is
// ready 2 cycles after its second beat enters, long before that frame can
// leave the buffer. Input is held off when the packet buffer is full, or
// the verdict queue is almost full.
//
// Default sizes are the reference ones: 1024 x 256-bit packet buffer,
// 16 filter ranges, 128-entry IP-to-hop-count table. The verdict queue and
// its depth are this design's choice (one slot per possible buffered frame).
module ddos_top
  import ddos_pkg::*;
#(
  parameter int unsigned PKT_FIFO_DEPTH = 1024,
  parameter int unsigned PIEF_ENTRIES   = 16,
  parameter int unsigned HCF_ENTRIES    = 128,
  parameter int unsigned HCF_PREFIX_W   = 24
) (
  input  logic                           clk,
  input  logic                           rst_n,

  // Receive stream
  input  logic                           s_axis_tvalid,
  output logic                           s_axis_tready,
  input  logic [AXIS_DATA_W-1:0]         s_axis_tdata,
  input  logic [AXIS_KEEP_W-1:0]         s_axis_tkeep,
  input  logic [AXIS_USER_W-1:0]         s_axis_tuser,
  input  logic                           s_axis_tlast,

  // Transmit stream
  output logic                           m_axis_tvalid,
  input  logic                           m_axis_tready,
  output logic [AXIS_DATA_W-1:0]         m_axis_tdata,
  output logic [AXIS_KEEP_W-1:0]         m_axis_tkeep,
  output logic [AXIS_USER_W-1:0]         m_axis_tuser,
  output logic                           m_axis_tlast,

  // Ingress/egress rule programming
  input  logic                           pief_wr_en,
  input  logic [$clog2(PIEF_ENTRIES)-1:0] pief_wr_idx,
  input  logic                           pief_wr_valid,
  input  ipv4_addr_t                     pief_wr_addr,
  input  logic [5:0]                     pief_wr_len,

  // Hop-count table learning
  input  logic                           hcf_learn_en,

  // Status
  output logic                           verdict_valid,
  output logic                           verdict_drop,
  output logic                           verdict_bypass,
  output logic                           pief_hit,
  output logic                           hcf_spoofed,
  output logic                           hcf_learned,
  output logic                           hcf_hit,
  output logic [$clog2(PIEF_ENTRIES)-1:0] pief_rule,
  output logic [$clog2(PKT_FIFO_DEPTH+1)-1:0] buffer_level,
  output logic [31:0]                    frames_forwarded,
  output logic [31:0]                    frames_dropped
);

  axis_beat_t s_beat, pd_beat, fifo_beat, m_beat;
  logic       pd_valid, pd_ready, fifo_valid, fifo_ready;
  logic       hold;
  logic       hdr_valid;
  pkt_hdr_t   hdr;

  assign s_beat = '{tdata: s_axis_tdata, tkeep: s_axis_tkeep,
                    tuser: s_axis_tuser, tlast: s_axis_tlast};

  // ---------------------------------------------------------------- Base System
  pre_decode u_pre (
    .clk, .rst_n,
    .s_tvalid  (s_axis_tvalid),
    .s_tready  (s_axis_tready),
    .s_beat    (s_beat),
    .m_tvalid  (pd_valid),
    .m_tready  (pd_ready),
    .m_beat    (pd_beat),
    .hold      (hold),
    .hdr_valid (hdr_valid),
    .hdr       (hdr)
  );

  packet_fifo #(.WIDTH(AXIS_BEAT_W), .DEPTH(PKT_FIFO_DEPTH)) u_pkt_fifo (
    .clk, .rst_n,
    .in_valid    (pd_valid),
    .in_ready    (pd_ready),
    .in_data     (pd_beat),
    .out_valid   (fifo_valid),
    .out_ready   (fifo_ready),
    .out_data    (fifo_beat),
    .count       (buffer_level),
    .almost_full ()
  );

  // ------------------------------------------------------------- DDoS Filtering
  logic pief_valid, hcf_valid;

  pief #(.ENTRIES(PIEF_ENTRIES)) u_pief (
    .clk, .rst_n,
    .hdr_valid, .hdr,
    .wr_en     (pief_wr_en),
    .wr_idx    (pief_wr_idx),
    .wr_valid  (pief_wr_valid),
    .wr_addr   (pief_wr_addr),
    .wr_len    (pief_wr_len),
    .res_valid (pief_valid),
    .res_hit   (pief_hit),
    .res_idx   (pief_rule)
  );

  hcf #(.ENTRIES(HCF_ENTRIES), .PREFIX_W(HCF_PREFIX_W)) u_hcf (
    .clk, .rst_n,
    .learn_en    (hcf_learn_en),
    .hdr_valid, .hdr,
    .res_valid   (hcf_valid),
    .res_spoofed (hcf_spoofed),
    .res_hit     (hcf_hit),
    .res_learned (hcf_learned)
  );

  verdict_e dec_verdict;
  decision_maker u_dm (
    .clk, .rst_n,
    .pief_valid, .pief_hit,
    .hcf_valid,  .hcf_spoofed,
    .dec_valid   (verdict_valid),
    .dec_drop    (verdict_drop),
    .dec_bypass  (verdict_bypass),
    .dec_verdict (dec_verdict)
  );

  // ------------------------------------------------------------- verdict queue
  logic                                vq_in_ready, vq_valid, vq_ready, vq_afull;
  logic                                vq_out;

  packet_fifo #(.WIDTH(1), .DEPTH(PKT_FIFO_DEPTH), .AFULL_LEVEL(PKT_FIFO_DEPTH - 4)) u_vq (
    .clk, .rst_n,
    .in_valid    (verdict_valid),
    .in_ready    (vq_in_ready),
    .in_data     (dec_verdict == VERDICT_DROP),
    .out_valid   (vq_valid),
    .out_ready   (vq_ready),
    .out_data    (vq_out),
    .count       (),
    .almost_full (vq_afull)
  );

  // Up to three headers can be in flight between the input and the queue.
  assign hold = vq_afull;

  post_decode u_post (
    .clk, .rst_n,
    .s_tvalid  (fifo_valid),
    .s_tready  (fifo_ready),
    .s_beat    (fifo_beat),
    .v_valid   (vq_valid),
    .v_ready   (vq_ready),
    .v_verdict (vq_out ? VERDICT_DROP : VERDICT_BYPASS),
    .m_tvalid  (m_axis_tvalid),
    .m_tready  (m_axis_tready),
    .m_beat    (m_beat),
    .frames_forwarded,
    .frames_dropped
  );

  assign m_axis_tdata = m_beat.tdata;
  assign m_axis_tkeep = m_beat.tkeep;
  assign m_axis_tuser = m_beat.tuser;
  assign m_axis_tlast = m_beat.tlast;

  a_vq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                     verdict_valid |-> vq_in_ready)
    else $error("ddos_top: verdict queue overflow");

endmodule
