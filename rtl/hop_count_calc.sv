// hop_count_calc: hop-count of a packet from its final TTL.
//
// Operating systems start the TTL at one of a few values (30, 32, 60, 64,
// 128, 255). The initial TTL Ti is inferred as the smallest of these that
// is not below the received (final) TTL Tf, and the hop-count is
// Hc = Ti - Tf: the number of routers that decremented the TTL on the way.
//
// Interface: purely combinational; ttl in, init_ttl and hop_count out.
//
// The candidate initial TTLs and Hc = Ti - Tf follow the reference design;
// "smallest candidate not below Tf" is the usual Hop-Count Filtering rule
// and is this design's reading of "infer the initial TTL".
module hop_count_calc
  import ddos_pkg::*;
(
  input  ttl_t       ttl,
  output ttl_t       init_ttl,
  output hop_count_t hop_count
);

  always_comb begin
    if      (ttl <= 8'd30)  init_ttl = 8'd30;
    else if (ttl <= 8'd32)  init_ttl = 8'd32;
    else if (ttl <= 8'd60)  init_ttl = 8'd60;
    else if (ttl <= 8'd64)  init_ttl = 8'd64;
    else if (ttl <= 8'd128) init_ttl = 8'd128;
    else                    init_ttl = 8'd255;
    hop_count = init_ttl - ttl;
  end

endmodule
