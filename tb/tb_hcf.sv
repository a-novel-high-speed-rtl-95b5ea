// tb_hcf: streams of IPv4 headers through the hop-count filter, checked
// against a software IP-to-hop-count table with the same fill order.
// Covers learning on MISS, legitimate and spoofed HITs, TTL 0, non-IPv4
// headers, learning disabled, table wrap-around (a small table is used so
// entries get replaced) and headers on consecutive cycles from the same
// new block. The result must appear exactly one cycle after the header.
module tb_hcf;
  import ddos_pkg::*;
  import tb_frame_pkg::*;
  localparam int ENTRIES = 8;
  logic clk = 0, rst_n = 0, learn_en = 1;
  logic hdr_valid = 0;
  pkt_hdr_t hdr = '0;
  logic res_valid, res_spoofed, res_hit, res_learned;
  int checks = 0, failures = 0;
  int n_learn = 0, n_match = 0, n_spoof = 0, n_ttl0 = 0, n_wrap = 0;

  // Model of the table.
  logic [23:0] m_key [ENTRIES];
  int          m_hc  [ENTRIES];
  bit          m_vld [ENTRIES];
  int          m_ptr = 0;

  hcf #(.ENTRIES(ENTRIES), .PREFIX_W(24)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected outputs of the header presented this cycle.
  bit e_valid, e_spoof, e_hit, e_learn;
  bit p_valid, p_spoof, p_hit, p_learn;

  function automatic void model_step(input bit v, input pkt_hdr_t h);
    int idx = -1, hc;
    e_valid = v; e_spoof = 0; e_hit = 0; e_learn = 0;
    if (!v || !h.is_ipv4) return;
    hc = ref_init_ttl(h.ttl) - int'(h.ttl);
    for (int i = 0; i < ENTRIES; i++) if (m_vld[i] && m_key[i] == h.src_ip[31:8]) begin idx = i; break; end
    if (h.ttl == 0) begin e_spoof = 1; e_hit = (idx >= 0); n_ttl0++; return; end
    if (idx >= 0) begin
      e_hit = 1;
      e_spoof = (m_hc[idx] != hc);
      if (e_spoof) n_spoof++; else n_match++;
    end else if (learn_en) begin
      e_learn = 1; n_learn++;
      if (m_vld[m_ptr]) n_wrap++;
      m_key[m_ptr] = h.src_ip[31:8]; m_hc[m_ptr] = hc; m_vld[m_ptr] = 1;
      m_ptr = (m_ptr + 1) % ENTRIES;
    end
  endfunction

  // Compare each cycle: outputs now belong to the header of the previous cycle.
  always @(negedge clk) if (rst_n) begin
    checks++;
    if ({res_valid, res_spoofed, res_hit, res_learned} !== {p_valid, p_spoof, p_hit, p_learn}) begin
      failures++;
      $display("%0t: got v%0b s%0b h%0b l%0b expected v%0b s%0b h%0b l%0b", $time,
               res_valid, res_spoofed, res_hit, res_learned, p_valid, p_spoof, p_hit, p_learn);
    end
  end

  bit next_learn = 1;

  task automatic send(input bit v, input bit v4, input logic [31:0] ip, input logic [7:0] ttl);
    @(negedge clk);
    #1;
    learn_en = next_learn;
    hdr_valid = v; hdr = '{is_ipv4: v4, src_ip: ip, dst_ip: 32'h01020304, ttl: ttl};
    model_step(v, hdr);
    @(posedge clk);
    p_valid = e_valid; p_spoof = e_spoof; p_hit = e_hit; p_learn = e_learn;
  endtask

  // Pool of 12 source blocks, each with its "true" hop-count path TTL.
  logic [31:0] pool [12];
  logic [7:0]  pool_ttl [12];

  initial begin
    foreach (m_vld[i]) m_vld[i] = 0;
    p_valid = 0; p_spoof = 0; p_hit = 0; p_learn = 0;
    foreach (pool[i]) begin pool[i] = rand_public_ip(); pool_ttl[i] = 8'($urandom_range(1, 255)); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Example of the worked table: 134.170.188.221 at 10 hops from a 64 start.
    send(1, 1, 32'h86AABCDD, 8'd54);  // learn
    send(1, 1, 32'h86AABC01, 8'd54);  // same /24, same hops: legitimate hit
    send(1, 1, 32'h86AABCDD, 8'd50);  // forged TTL: spoofed
    send(1, 1, 32'h86AABCDD, 8'd0);   // TTL 0
    send(1, 0, 32'h86AABCDD, 8'd50);  // not IPv4: ignored
    send(0, 1, 32'h86AABCDD, 8'd50);  // idle
    // Same new block on consecutive cycles: second must hit.
    send(1, 1, 32'h45ABE601, 8'd108);
    send(1, 1, 32'h45ABE602, 8'd108);
    send(1, 1, 32'h45ABE603, 8'd107);
    // Random traffic over a pool larger than the table.
    repeat (4000) begin
      int k;
      logic [7:0] t;
      k = $urandom_range(0, 11);
      t = pool_ttl[k];
      if ($urandom_range(0, 9) == 0) t = 8'($urandom);
      if ($urandom_range(0, 7) == 0) next_learn = ~next_learn;
      send($urandom_range(0, 5) != 0, $urandom_range(0, 15) != 0, {pool[k][31:8], 8'($urandom)}, t);
    end
    send(0, 0, 0, 0);
    @(negedge clk);
    checks += 5;
    if (n_learn == 0) failures++;
    if (n_match == 0) failures++;
    if (n_spoof == 0) failures++;
    if (n_ttl0 == 0) failures++;
    if (n_wrap == 0) failures++;
    $display("learned %0d matched %0d spoofed %0d ttl0 %0d replaced %0d", n_learn, n_match, n_spoof, n_ttl0, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
