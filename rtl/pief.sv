// pief: Port Ingress/Egress Filtering module.
//
// A packet whose source address lies in one of the blocked ranges (the
// special-use blocks that never appear as genuine Internet sources, or
// ranges that do not belong to the port's network) is spoofed. The module
// searches the source address in its rule store (pief_cam): a HIT marks
// the packet illegitimate, a MISS legitimate. The comparator matches the
// address against every slot at once ((src & mask) == addr) and reduces
// the matches with an OR, so the search takes one cycle whatever the
// number of slots.
//
// Interface: hdr_valid/hdr from PreDecode; res_valid/res_hit one cycle
// later (res_hit = drop request to the Decision Maker). res_idx is the
// lowest matching slot, for diagnostics. Headers of non-IPv4 frames
// never hit. The wr_* port reprograms a slot (see pief_cam).
//
// The CAM-plus-comparator structure and HIT = illegitimate follow the
// reference design; the one-cycle registered result is this design's
// choice.
module pief
  import ddos_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,

  input  logic                       hdr_valid,
  input  pkt_hdr_t                   hdr,

  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,
  input  ipv4_addr_t                 wr_addr,
  input  logic [5:0]                 wr_len,

  output logic                       res_valid,
  output logic                       res_hit,
  output logic [$clog2(ENTRIES)-1:0] res_idx
);

  logic [ENTRIES-1:0] rule_valid;
  ipv4_addr_t         rule_addr [ENTRIES];
  ipv4_addr_t         rule_mask [ENTRIES];

  pief_cam #(.ENTRIES(ENTRIES)) u_cam (
    .clk, .rst_n,
    .wr_en, .wr_idx, .wr_valid, .wr_addr, .wr_len,
    .rule_valid, .rule_addr, .rule_mask
  );

  // Comparator: parallel masked compare against every slot.
  logic [ENTRIES-1:0]         match;
  logic [$clog2(ENTRIES)-1:0] first_idx;
  always_comb begin
    first_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      match[i] = rule_valid[i] && ((hdr.src_ip & rule_mask[i]) == rule_addr[i]);
      if (match[i]) first_idx = i[$clog2(ENTRIES)-1:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_idx   <= '0;
    end else begin
      res_valid <= hdr_valid;
      res_hit   <= hdr_valid && hdr.is_ipv4 && (|match);
      res_idx   <= first_idx;
    end
  end

endmodule
