// hcf_cam: binary content-addressable memory of the IP-to-hop-count table.
//
// Each of ENTRIES slots holds a KEY_W-bit key (the network part of a
// source address, a /24 block by default) and a valid bit. A search
// compares the key with every slot at once and returns HIT/MISS and the
// index of the matching slot; the hop-count itself lives in a separate
// register array at the same index (hc_reg_array), since a CAM only
// returns an index.
//
// Interface: search_key -> search_hit/search_idx combinationally (lowest
// index wins if a key were stored twice); wr_en/wr_idx/wr_key/wr_valid
// write one slot at the clock edge, visible to searches the next cycle.
// Reset clears all valid bits (empty table).
//
// 128 slots (the main configuration; 256 is the larger variant) and /24
// blocks follow the reference design; the lowest-index priority is this
// design's choice.
module hcf_cam #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned KEY_W   = 24
) (
  input  logic                       clk,
  input  logic                       rst_n,

  input  logic [KEY_W-1:0]           search_key,
  output logic                       search_hit,
  output logic [$clog2(ENTRIES)-1:0] search_idx,

  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [KEY_W-1:0]           wr_key,
  input  logic                       wr_valid
);

  logic [KEY_W-1:0]   keys [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk) begin
    if (wr_en) keys[wr_idx] <= wr_key;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid         <= '0;
    else if (wr_en) valid[wr_idx] <= wr_valid;
  end

  always_comb begin
    search_hit = 1'b0;
    search_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (valid[i] && keys[i] == search_key) begin
        search_hit = 1'b1;
        search_idx = i[$clog2(ENTRIES)-1:0];
      end
    end
  end

endmodule
