// hcf: Hop-Count Filtering module.
//
// An attacker can forge every header field, but not the number of routers
// a packet crossed. For each IPv4 header the module
//   1. infers the initial TTL and computes the hop-count Hc (hop_count_calc),
//   2. looks the source block (top PREFIX_W bits of the source address) up
//      in the IP-to-hop-count CAM (hcf_cam),
//   3. reads the stored hop-count Hs at the returned index from the
//      register array (hc_reg_array), and
//   4. compares: on a HIT with Hc != Hs the packet is spoofed; on a HIT
//      with Hc == Hs it is legitimate.
// A source block seen for the first time (MISS) is legitimate; when
// learn_en is high its key and Hc are written into the next slot of the
// table (slots are filled in order and, once all are used, the oldest is
// overwritten). A packet arriving with TTL 0 is flagged as spoofed.
//
// Interface: hdr_valid/hdr from PreDecode; one cycle later res_valid with
// res_spoofed (drop request), res_hit (block was in the table) and
// res_learned (block was added). The lookup, compare and table update all
// happen in the cycle the header arrives, so the next header, even in the
// very next cycle, already sees the new entry.
//
// The CAM + comparator + register array structure, the TTL candidates,
// MISS-means-learn and the /24 blocks follow the reference design; the
// replacement order, learn_en and the TTL-0 rule's placement here are
// this design's choices.
module hcf
  import ddos_pkg::*;
#(
  parameter int unsigned ENTRIES  = 128,
  parameter int unsigned PREFIX_W = 24
) (
  input  logic     clk,
  input  logic     rst_n,

  input  logic     learn_en,

  input  logic     hdr_valid,
  input  pkt_hdr_t hdr,

  output logic     res_valid,
  output logic     res_spoofed,
  output logic     res_hit,
  output logic     res_learned
);

  localparam int unsigned IW = $clog2(ENTRIES);

  ttl_t                init_ttl;
  hop_count_t          hc_calc, hc_stored;
  logic [PREFIX_W-1:0] key;
  logic                cam_hit;
  logic [IW-1:0]       cam_idx;
  logic [IW-1:0]       alloc_ptr;
  logic                learn, spoofed, active;

  assign key    = hdr.src_ip[31 -: PREFIX_W];
  assign active = hdr_valid && hdr.is_ipv4;

  hop_count_calc u_hc (
    .ttl       (hdr.ttl),
    .init_ttl  (init_ttl),
    .hop_count (hc_calc)
  );

  hcf_cam #(.ENTRIES(ENTRIES), .KEY_W(PREFIX_W)) u_cam (
    .clk, .rst_n,
    .search_key (key),
    .search_hit (cam_hit),
    .search_idx (cam_idx),
    .wr_en      (learn),
    .wr_idx     (alloc_ptr),
    .wr_key     (key),
    .wr_valid   (1'b1)
  );

  hc_reg_array #(.ENTRIES(ENTRIES), .DATA_W($bits(hop_count_t))) u_regs (
    .clk,
    .rd_idx  (cam_idx),
    .rd_data (hc_stored),
    .wr_en   (learn),
    .wr_idx  (alloc_ptr),
    .wr_data (hc_calc)
  );

  // Comparator.
  assign spoofed = active && ((hdr.ttl == 8'd0) || (cam_hit && (hc_calc != hc_stored)));
  assign learn   = active && learn_en && !cam_hit && (hdr.ttl != 8'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_ptr   <= '0;
      res_valid   <= 1'b0;
      res_spoofed <= 1'b0;
      res_hit     <= 1'b0;
      res_learned <= 1'b0;
    end else begin
      if (learn) alloc_ptr <= (alloc_ptr == IW'(ENTRIES - 1)) ? '0 : alloc_ptr + 1'b1;
      res_valid   <= hdr_valid;
      res_spoofed <= spoofed;
      res_hit     <= active && cam_hit;
      res_learned <= learn;
    end
  end

endmodule
