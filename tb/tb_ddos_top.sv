// tb_ddos_top: end-to-end test of the whole filter at its default sizes
// (1024-beat packet buffer, 16 filter ranges, 128-entry hop-count table).
//
// Frames are built byte by byte and sent on the input stream; a reference
// model (special-use ranges written as octet tests, a software hop-count
// table with the same fill order) decides for each frame whether it must
// be dropped. The output stream must carry exactly the frames the model
// passes, beat for beat and in order, and each verdict strobe must match
// the model and come two cycles after the beat that completes the header.
//
// Phases: learning from legitimate traffic at full rate (checks one beat
// per cycle in and out), mixed attack traffic (blocked ranges, forged
// TTLs, TTL 0, non-IPv4 and runt frames), output back-pressure until the
// packet buffer fills, a flood of runt frames against a stopped output
// until the verdict queue holds the input off, a new range programmed at
// run time, learning switched off, and more source blocks than the table
// holds. Each of these mechanisms is counted and must occur.
module tb_ddos_top;
  import ddos_pkg::*;
  import tb_frame_pkg::*;

  logic clk = 0, rst_n = 0;
  logic s_axis_tvalid = 0, s_axis_tready, s_axis_tlast = 0;
  logic [255:0] s_axis_tdata = '0;
  logic [31:0]  s_axis_tkeep = '0;
  logic [127:0] s_axis_tuser = '0;
  logic m_axis_tvalid, m_axis_tready = 1, m_axis_tlast;
  logic [255:0] m_axis_tdata;
  logic [31:0]  m_axis_tkeep;
  logic [127:0] m_axis_tuser;
  logic pief_wr_en = 0, pief_wr_valid = 0;
  logic [3:0] pief_wr_idx = 0;
  logic [31:0] pief_wr_addr = 0;
  logic [5:0] pief_wr_len = 0;
  logic hcf_learn_en = 1;
  logic verdict_valid, verdict_drop, verdict_bypass, pief_hit, hcf_spoofed, hcf_learned, hcf_hit;
  logic [3:0] pief_rule;
  logic [10:0] buffer_level;
  logic [31:0] frames_forwarded, frames_dropped;

  ddos_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference model
  localparam int HCF_N = 128;
  logic [23:0] m_key [HCF_N];
  int          m_hc  [HCF_N];
  bit          m_vld [HCF_N];
  int          m_ptr = 0;
  bit          extra_rule = 0;

  int n_pief = 0, n_hcf_mismatch = 0, n_ttl0 = 0, n_learn = 0, n_replace = 0, n_hcf_match = 0;
  int n_not_ipv4 = 0, n_learn_off = 0, n_exp_drop = 0, n_exp_fwd = 0;

  function automatic bit model_frame(input bit v4, input logic [31:0] src, input logic [7:0] ttl);
    bit p, h = 0;
    int idx = -1, hc;
    if (!v4) begin n_not_ipv4++; return 0; end
    p = ref_blocked(src) || (extra_rule && src[31:22] == {8'd100, 2'b01});
    if (p) n_pief++;
    hc = ref_init_ttl(ttl) - int'(ttl);
    for (int i = 0; i < HCF_N; i++) if (m_vld[i] && m_key[i] == src[31:8]) begin idx = i; break; end
    if (ttl == 0) begin h = 1; n_ttl0++; end
    else if (idx >= 0) begin
      h = (m_hc[idx] != hc);
      if (h) n_hcf_mismatch++; else n_hcf_match++;
    end else if (hcf_learn_en) begin
      n_learn++;
      if (m_vld[m_ptr]) n_replace++;
      m_key[m_ptr] = src[31:8]; m_hc[m_ptr] = hc; m_vld[m_ptr] = 1;
      m_ptr = (m_ptr + 1) % HCF_N;
    end else n_learn_off++;
    return p || h;
  endfunction

  // ------------------------------------------------------------ expectations
  typedef struct packed {
    logic [255:0] tdata;
    logic [31:0]  tkeep;
    logic [127:0] tuser;
    logic         tlast;
  } beat_t;
  beat_t exp_out [$];
  bit    exp_verdict [$];
  int    verdict_due [$];   // cycle at which each verdict must appear

  // ------------------------------------------------------------ monitors
  bit completes;   // the beat on the input completes a header
  bit rand_ready = 0, stop_out = 0, gaps = 0;
  int n_in_beats = 0, n_out_beats = 0, n_in_stall = 0, n_buf_full = 0, n_vq_hold = 0;
  int n_out_stall = 0, n_wait_verdict = 0, n_learned_pulses = 0, n_hcf_hits = 0;
  int n_verdicts = 0, n_drop_strobes = 0;

  always @(negedge clk) m_axis_tready <= !stop_out && (!rand_ready || $urandom_range(0, 2) == 0);

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_axis_tvalid && s_axis_tready) begin
      n_in_beats++;
      if (completes) verdict_due.push_back(cyc + 2);
    end
    if (s_axis_tvalid && !s_axis_tready) begin
      n_in_stall++;
      if (buffer_level == 11'd1024) n_buf_full++;
      else n_vq_hold++;
    end
    if (m_axis_tvalid && !m_axis_tready) n_out_stall++;
    if (dut.fifo_valid && !dut.vq_valid) n_wait_verdict++;
    if (hcf_learned) n_learned_pulses++;
    if (hcf_hit) n_hcf_hits++;
    if (m_axis_tvalid && m_axis_tready) begin
      n_out_beats++;
      checks++;
      if (exp_out.size() == 0 ||
          {m_axis_tdata, m_axis_tkeep, m_axis_tuser, m_axis_tlast} !== exp_out[0]) begin
        failures++;
        if (failures < 10) $display("%0t: output beat %0d differs", $time, n_out_beats);
      end
      if (exp_out.size() != 0) void'(exp_out.pop_front());
    end
    if (verdict_valid) begin
      n_verdicts++;
      if (verdict_drop) n_drop_strobes++;
      checks += 3;
      if (exp_verdict.size() == 0 || verdict_due.size() == 0) begin
        failures++; $display("%0t: unexpected verdict", $time);
      end else begin
        bit e;
        int due;
        e = exp_verdict.pop_front();
        due = verdict_due.pop_front();
        if (verdict_drop !== e) begin
          failures++;
          if (failures < 10) $display("%0t: verdict %0d drop=%0b expected %0b", $time, n_verdicts, verdict_drop, e);
        end
        if (verdict_bypass !== !e) failures++;
        if (due != cyc) begin failures++; $display("verdict at cycle %0d, expected %0d", cyc, due); end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic send_frame(input int len, input bit v4, input logic [31:0] src, input logic [7:0] ttl);
    bytes_t f;
    bit drop;
    int nb;
    f  = make_frame(len, v4, src, $urandom, ttl);
    nb = num_beats(len);
    drop = model_frame(v4 && len >= 34, src, ttl);
    exp_verdict.push_back(drop);
    if (drop) n_exp_drop++; else n_exp_fwd++;
    for (int b = 0; b < nb; b++) begin
      beat_t x;
      frame_beat(f, b, x.tdata, x.tkeep, x.tlast);
      x.tuser = {4{$urandom}};
      if (!drop) exp_out.push_back(x);
      if (gaps) while ($urandom_range(0, 3) == 0) begin @(negedge clk); s_axis_tvalid = 0; end
      @(negedge clk);
      s_axis_tvalid = 1;
      {s_axis_tdata, s_axis_tkeep, s_axis_tuser, s_axis_tlast} = x;
      completes = (b == 1) || (b == 0 && x.tlast);
      do @(posedge clk); while (!(s_axis_tvalid && s_axis_tready));
    end
    @(negedge clk);
    s_axis_tvalid = 0;
    completes = 0;
  endtask

  task automatic idle(input int n);
    repeat (n) @(negedge clk);
  endtask

  // Legitimate sources: public /24 blocks, each with a fixed arrival TTL.
  localparam int POOL = 100;
  logic [31:0] pool_ip  [POOL];
  logic [7:0]  pool_ttl [POOL];

  function automatic logic [31:0] host_in(input int k);
    return {pool_ip[k][31:8], 8'($urandom)};
  endfunction

  function automatic int rand_len();
    case ($urandom_range(0, 3))
      0: return 64;
      1: return 1500;
      default: return $urandom_range(64, 1500);
    endcase
  endfunction

  int t_start, beats_start, out_start, stall_start;

  initial begin
    foreach (m_vld[i]) m_vld[i] = 0;
    completes = 0;
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
    idle(2);

    // 1. Learning at full rate: 60 sources, back-to-back frames, output always ready.
    t_start = cyc; beats_start = n_in_beats; stall_start = n_in_stall;
    for (int i = 0; i < 240; i++) send_frame(rand_len(), 1, host_in(i % 60), pool_ttl[i % 60]);
    checks += 2;
    if (n_in_stall != stall_start) begin failures++; $display("input stalled at full rate"); end
    // One accepted beat per cycle (the driver adds one idle cycle between frames).
    if ((n_in_beats - beats_start) + 240 < (cyc - t_start) - 2) begin
      failures++; $display("rate: %0d beats in %0d cycles", n_in_beats - beats_start, cyc - t_start);
    end
    $display("full-rate phase: %0d beats in %0d cycles", n_in_beats - beats_start, cyc - t_start);
    idle(20);
    checks++;
    if (exp_out.size() != 0) begin failures++; $display("output lags input after full-rate phase"); end

    // 2. Mixed attack traffic with input gaps and random output readiness.
    gaps = 1; rand_ready = 1;
    for (int i = 0; i < 600; i++) begin
      int k;
      k = $urandom_range(0, 59);
      case ($urandom_range(0, 9))
        0: send_frame(rand_len(), 1, {8'd10, 24'($urandom)}, pool_ttl[k]);               // private source
        1: send_frame(rand_len(), 1, {8'd192, 8'd168, 16'($urandom)}, pool_ttl[k]);      // private source
        2: send_frame(rand_len(), 1, {4'hE, 28'($urandom)}, pool_ttl[k]);                // multicast source
        3: send_frame(rand_len(), 1, host_in(k), 8'(pool_ttl[k] + $urandom_range(1, 5)));// forged TTL
        4: send_frame(rand_len(), 1, host_in(k), 8'd0);                                  // TTL 0
        5: send_frame(rand_len(), 0, host_in(k), pool_ttl[k]);                           // not IPv4
        6: send_frame($urandom_range(16, 33), 1, host_in(k), pool_ttl[k]);               // runt
        default: send_frame(rand_len(), 1, host_in(k), pool_ttl[k]);                     // legitimate
      endcase
    end
    gaps = 0;

    // 3. Output stopped: the packet buffer fills and holds the input off.
    stop_out = 1;
    fork
      begin idle(2000); stop_out = 0; end
    join_none
    for (int i = 0; i < 30; i++) send_frame(1500, 1, host_in(i), pool_ttl[i]);
    idle(10);
    rand_ready = 0;
    idle(2000);

    // 4. Verdict queue: runt frames (one beat each) against a stopped output.
    stop_out = 1;
    fork
      begin idle(3000); stop_out = 0; end
    join_none
    for (int i = 0; i < 1100; i++) send_frame(32, 1, host_in(0), pool_ttl[0]);
    idle(1200);

    // 5. Program 100.64.0.0/10 into a spare slot; such sources are now dropped.
    @(negedge clk); pief_wr_en = 1; pief_wr_idx = 14; pief_wr_valid = 1; pief_wr_addr = 32'h6440_0000; pief_wr_len = 10;
    @(negedge clk); pief_wr_en = 0; extra_rule = 1;
    for (int i = 0; i < 20; i++) send_frame(rand_len(), 1, {8'd100, 2'b01, 22'($urandom)}, 8'd60);
    send_frame(64, 1, 32'h64800001, 8'd60);   // just outside the new range

    // 6. Learning off: unknown blocks pass and are not added.
    idle(4); hcf_learn_en = 0; idle(4);
    for (int i = 60; i < 70; i++) send_frame(64, 1, host_in(i), pool_ttl[i]);
    for (int i = 60; i < 70; i++) send_frame(64, 1, host_in(i), 8'(pool_ttl[i] ^ 8'h01));
    idle(4); hcf_learn_en = 1; idle(4);

    // 7. More source blocks than the table holds: oldest entries are replaced.
    for (int i = 0; i < 200; i++) send_frame(64, 1, rand_public_ip(), 8'($urandom_range(1, 255)));
    for (int i = 0; i < 100; i++) begin
      int k;
      k = $urandom_range(0, POOL - 1);
      send_frame(rand_len(), 1, host_in(k), pool_ttl[k]);
    end
    idle(3000);

    // ------------------------------------------------------------ results
    checks += 6;
    if (exp_out.size() != 0) begin failures++; $display("%0d beats never came out", exp_out.size()); end
    if (exp_verdict.size() != 0) begin failures++; $display("%0d verdicts missing", exp_verdict.size()); end
    if (frames_forwarded != 32'(n_exp_fwd)) begin failures++; $display("forwarded %0d expected %0d", frames_forwarded, n_exp_fwd); end
    if (frames_dropped != 32'(n_exp_drop)) begin failures++; $display("dropped %0d expected %0d", frames_dropped, n_exp_drop); end
    if (n_drop_strobes != n_exp_drop) failures++;
    if (n_learned_pulses != n_learn) begin failures++; $display("learned %0d expected %0d", n_learned_pulses, n_learn); end

    $display("frames: %0d forwarded, %0d dropped", n_exp_fwd, n_exp_drop);
    $display("PIEF hits %0d, HCF mismatches %0d, HCF matches %0d, TTL0 %0d, non-IPv4/runt %0d",
             n_pief, n_hcf_mismatch, n_hcf_match, n_ttl0, n_not_ipv4);
    $display("HCF learned %0d (replacing %0d), unknown with learning off %0d",
             n_learn, n_replace, n_learn_off);
    $display("input stalls: buffer full %0d, verdict-queue hold %0d; output stalls %0d; verdict waits %0d",
             n_buf_full, n_vq_hold, n_out_stall, n_wait_verdict);
    // Every mechanism must have happened.
    begin
      int counts [12];
      counts = '{n_pief, n_hcf_mismatch, n_hcf_match, n_ttl0, n_not_ipv4, n_learn,
                          n_replace, n_learn_off, n_buf_full, n_vq_hold, n_out_stall, n_wait_verdict};
      foreach (counts[i]) begin
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
