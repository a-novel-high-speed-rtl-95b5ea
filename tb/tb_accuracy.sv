// tb_accuracy: classification accuracy of the full-size filter on a mix of
// legitimate and spoofed traffic in the proportions of a 300,000-packet
// trace with 4.6 % spoofed packets (286,162 legitimate, 13,838 spoofed).
// N_TOTAL is the full 300,000.
//
// Legitimate packets come from 100 public /24 blocks, each seen first in
// a quiet learning phase and then always with the same hop-count. Spoofed
// packets either carry a source from one of 20 special-use /24 blocks
// (caught by the range filter) or claim a known source with a TTL that
// gives another hop-count (caught by the hop-count filter). The hop-count
// filter also learns the 20 special-use blocks, so 120 of its 128 entries
// are used and none is replaced. Frame sizes are drawn from six
// groups: 64, 65-128, 129-256, 257-512, 513-1024 and 1025-1500 bytes.
//
// Each verdict is compared with the packet's label, and detection rate
// (DR), false-positive rate (FPR) and false-negative rate (FNR) are printed
// per size group. With a table large enough for all sources every verdict
// must be right: DR 100 %, FPR 0 %, FNR 0 %. A second instance with the
// 256-entry hop-count table runs on the same input and must give the same
// verdict in every cycle. The output is random-ready so
// the buffer also fills and drains.
module tb_accuracy;
  import ddos_pkg::*;
  import tb_frame_pkg::*;

  localparam int N_TOTAL = 300000;
  localparam int N_SPOOF = int'(longint'(N_TOTAL) * 13838 / 300000);
  localparam int POOL    = 100;

  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid, s_axis_tready, s_axis_tlast;
  logic [255:0] s_axis_tdata;
  logic [31:0]  s_axis_tkeep;
  logic [127:0] s_axis_tuser;
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;
  logic [255:0] m_axis_tdata;
  logic [31:0]  m_axis_tkeep;
  logic [127:0] m_axis_tuser;
  logic verdict_valid, verdict_drop, verdict_bypass, pief_hit, hcf_spoofed, hcf_learned, hcf_hit;
  logic [3:0] pief_rule;
  logic [10:0] buffer_level;
  logic [31:0] frames_forwarded, frames_dropped;

  ddos_top dut (
    .clk, .rst_n,
    .s_axis_tvalid, .s_axis_tready, .s_axis_tdata, .s_axis_tkeep, .s_axis_tuser, .s_axis_tlast,
    .m_axis_tvalid, .m_axis_tready, .m_axis_tdata, .m_axis_tkeep, .m_axis_tuser, .m_axis_tlast,
    .pief_wr_en(1'b0), .pief_wr_idx(4'd0), .pief_wr_valid(1'b0), .pief_wr_addr(32'd0), .pief_wr_len(6'd0),
    .hcf_learn_en(1'b1),
    .verdict_valid, .verdict_drop, .verdict_bypass, .pief_hit, .pief_rule,
    .hcf_spoofed, .hcf_learned, .hcf_hit, .buffer_level, .frames_forwarded, .frames_dropped);

  // The larger table variant, fed the same traffic; its verdicts must agree.
  logic v256_valid, v256_drop;
  logic [31:0] fwd256, drop256;
  ddos_top #(.HCF_ENTRIES(256)) dut256 (
    .clk, .rst_n,
    .s_axis_tvalid, .s_axis_tready(), .s_axis_tdata, .s_axis_tkeep, .s_axis_tuser, .s_axis_tlast,
    .m_axis_tvalid(), .m_axis_tready, .m_axis_tdata(), .m_axis_tkeep(), .m_axis_tuser(), .m_axis_tlast(),
    .pief_wr_en(1'b0), .pief_wr_idx(4'd0), .pief_wr_valid(1'b0), .pief_wr_addr(32'd0), .pief_wr_len(6'd0),
    .hcf_learn_en(1'b1),
    .verdict_valid(v256_valid), .verdict_drop(v256_drop), .verdict_bypass(), .pief_hit(), .pief_rule(),
    .hcf_spoofed(), .hcf_learned(), .hcf_hit(), .buffer_level(), .frames_forwarded(fwd256), .frames_dropped(drop256));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [256+32+128+1-1:0] beat_t;
  beat_t in_q [$];
  typedef struct packed { bit spoofed; bit by_range; int grp; } label_t;
  label_t labels [$];

  always_comb begin
    s_axis_tvalid = (in_q.size() != 0);
    {s_axis_tdata, s_axis_tkeep, s_axis_tuser, s_axis_tlast} = (in_q.size() != 0) ? in_q[0] : '0;
  end

  always @(negedge clk) m_axis_tready <= ($urandom_range(0, 9) != 0);

  // Per size group: legit, legit dropped, spoofed, spoofed dropped.
  int n_legit [6], n_fp [6], n_spoof [6], n_tp [6];
  int n_range = 0, n_hop = 0, n_verdicts = 0, n_disagree = 0;

  always @(posedge clk) if (rst_n) begin
    if (s_axis_tvalid && s_axis_tready) void'(in_q.pop_front());
    if ({v256_valid, v256_drop} !== {verdict_valid, verdict_drop}) begin
      n_disagree++;
      if (n_disagree < 5) $display("%0t: 256-entry variant disagrees", $time);
    end
    if (verdict_valid) begin
      label_t l;
      n_verdicts++;
      checks++;
      if (labels.size() == 0) begin failures++; $display("verdict without packet"); end
      else begin
        l = labels.pop_front();
        if (l.grp >= 0) begin
          if (l.spoofed) begin n_spoof[l.grp]++; if (verdict_drop) n_tp[l.grp]++; end
          else begin n_legit[l.grp]++; if (verdict_drop) n_fp[l.grp]++; end
        end
        if (verdict_drop !== l.spoofed) begin
          failures++;
          if (failures < 10) $display("verdict %0d: drop=%0b, label spoofed=%0b", n_verdicts, verdict_drop, l.spoofed);
        end
      end
    end
  end

  logic [31:0] pool_ip [POOL];
  logic [7:0]  pool_ttl [POOL];
  int lo [6] = '{64, 65, 129, 257, 513, 1025};
  int hi [6] = '{64, 128, 256, 512, 1024, 1500};

  task automatic queue_frame(input int len, input logic [31:0] src, input logic [7:0] ttl,
                             input bit spoofed, input bit by_range, input int grp);
    bytes_t f;
    f = make_frame(len, 1, src, $urandom, ttl);
    for (int b = 0; b < num_beats(len); b++) begin
      logic [255:0] d; logic [31:0] kp; logic l;
      frame_beat(f, b, d, kp, l);
      in_q.push_back({d, kp, 128'($urandom), l});
    end
    labels.push_back('{spoofed: spoofed, by_range: by_range, grp: grp});
  endtask

  function automatic int hops(input logic [7:0] t);
    return ref_init_ttl(t) - int'(t);
  endfunction

  initial begin
    for (int k = 0; k < POOL; k++) begin
      bit dup;
      do begin
        pool_ip[k] = rand_public_ip();
        dup = 0;
        for (int j = 0; j < k; j++) if (pool_ip[j][31:8] == pool_ip[k][31:8]) dup = 1;
      end while (dup);
      pool_ttl[k] = 8'($urandom_range(1, 255));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // Quiet period: every genuine source is seen once.
    for (int k = 0; k < POOL; k++) queue_frame(64, pool_ip[k], pool_ttl[k], 0, 0, -1);
    // Mixed traffic, spoofed packets spread at random.
    begin
      int spoof_left, total_left;
      spoof_left = N_SPOOF;
      total_left = N_TOTAL;
      while (total_left > 0) begin
        int g, len, k;
        g   = $urandom_range(0, 5);
        len = $urandom_range(lo[g], hi[g]);
        k   = $urandom_range(0, POOL - 1);
        if ($urandom_range(1, total_left) <= spoof_left) begin
          if ($urandom_range(0, 1) == 0) begin
            logic [31:0] src;
            // Five /24 blocks in each of four special-use ranges.
            case ($urandom_range(0, 3))
              0: src = {8'd10, 8'd1, 8'($urandom_range(0, 4)), 8'($urandom)};
              1: src = {8'd172, 8'd20, 8'($urandom_range(0, 4)), 8'($urandom)};
              2: src = {8'd127, 8'd0, 8'($urandom_range(0, 4)), 8'($urandom)};
              default: src = {8'd233, 8'd7, 8'($urandom_range(0, 4)), 8'($urandom)};
            endcase
            queue_frame(len, src, pool_ttl[k], 1, 1, g);
            n_range++;
          end else begin
            logic [7:0] t;
            do t = 8'($urandom_range(1, 255)); while (hops(t) == hops(pool_ttl[k]));
            queue_frame(len, {pool_ip[k][31:8], 8'($urandom)}, t, 1, 0, g);
            n_hop++;
          end
          spoof_left--;
        end else begin
          queue_frame(len, {pool_ip[k][31:8], 8'($urandom)}, pool_ttl[k], 0, 0, g);
        end
        total_left--;
        // Keep the source queue short.
        while (in_q.size() > 2000) @(negedge clk);
      end
    end
    wait (in_q.size() == 0);
    repeat (2000) @(negedge clk);

    begin
      int tl = 0, tfp = 0, ts = 0, ttp = 0;
      for (int g = 0; g < 6; g++) begin
        $display("%4d-%4d bytes: legitimate %6d (dropped %0d), spoofed %5d (dropped %0d)  DR %6.2f%%  FPR %5.2f%%  FNR %5.2f%%",
                 lo[g], hi[g], n_legit[g], n_fp[g], n_spoof[g], n_tp[g],
                 n_spoof[g] ? 100.0 * n_tp[g] / n_spoof[g] : 0.0,
                 n_legit[g] ? 100.0 * n_fp[g] / n_legit[g] : 0.0,
                 n_spoof[g] ? 100.0 * (n_spoof[g] - n_tp[g]) / n_spoof[g] : 0.0);
        tl += n_legit[g]; tfp += n_fp[g]; ts += n_spoof[g]; ttp += n_tp[g];
      end
      $display("total: legitimate %0d, spoofed %0d (%0d by range, %0d by hop-count); DR %6.2f%%  FPR %5.2f%%  FNR %5.2f%%",
               tl, ts, n_range, n_hop, 100.0 * ttp / ts, 100.0 * tfp / tl, 100.0 * (ts - ttp) / ts);
      checks += 6;
      if (tl + ts != N_TOTAL) begin failures++; $display("only %0d verdicts", tl + ts); end
      if (ts != N_SPOOF) failures++;
      if (ttp != ts) failures++;          // DR 100 %, FNR 0 %
      if (tfp != 0) failures++;           // FPR 0 %
      if (frames_forwarded != 32'(tl + POOL)) begin failures++; $display("forwarded %0d", frames_forwarded); end
      if (n_range == 0 || n_hop == 0) failures++;
      checks += 2;
      if (n_disagree != 0) failures++;
      if (fwd256 != frames_forwarded || drop256 != frames_dropped) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
