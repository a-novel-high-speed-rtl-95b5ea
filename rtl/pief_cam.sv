// pief_cam: rule store of the Port Ingress/Egress Filter.
//
// Holds ENTRIES address ranges, each an IPv4 prefix (address, prefix
// length) with a valid bit. On reset the first rules are loaded with the
// special-use address blocks of ddos_pkg::PIEF_RULES (14 blocks; the
// remaining slots start invalid). A write port lets the control plane
// replace any slot at run time, so the blocked ranges can be changed
// without rebuilding the hardware.
//
// The stored rules are presented in parallel (as address/mask pairs) to
// the comparator in pief, which matches an address against all of them in
// one cycle, as a content-addressable memory does.
//
// Interface: wr_en/wr_idx/wr_valid/wr_addr/wr_len write one slot at the
// clock edge. rule_valid/rule_addr/rule_mask show every slot; rule_addr is
// stored already masked. Timing: a write is visible the cycle after.
//
// Sixteen slots and the reset contents follow the reference design; the
// prefix/mask encoding and the write port are this design's choices.
module pief_cam
  import ddos_pkg::*;
#(
  parameter int unsigned ENTRIES = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,

  input  logic                        wr_en,
  input  logic [$clog2(ENTRIES)-1:0]  wr_idx,
  input  logic                        wr_valid,
  input  ipv4_addr_t                  wr_addr,
  input  logic [5:0]                  wr_len,

  output logic       [ENTRIES-1:0]    rule_valid,
  output ipv4_addr_t                  rule_addr [ENTRIES],
  output ipv4_addr_t                  rule_mask [ENTRIES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(ENTRIES); i++) begin
        if (i < int'(PIEF_NUM_RULES)) begin
          rule_valid[i] <= 1'b1;
          rule_mask[i]  <= prefix_mask(PIEF_RULES[i].prefix_len);
          rule_addr[i]  <= PIEF_RULES[i].addr & prefix_mask(PIEF_RULES[i].prefix_len);
        end else begin
          rule_valid[i] <= 1'b0;
          rule_mask[i]  <= '1;
          rule_addr[i]  <= '0;
        end
      end
    end else if (wr_en) begin
      rule_valid[wr_idx] <= wr_valid;
      rule_mask[wr_idx]  <= prefix_mask(wr_len);
      rule_addr[wr_idx]  <= wr_addr & prefix_mask(wr_len);
    end
  end

endmodule
