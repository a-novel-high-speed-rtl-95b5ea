// tb_pre_decode: random Ethernet frames (IPv4 and other, 20 to 300 bytes)
// with random input gaps, output back-pressure and hold. Checks that every
// beat passes through unchanged, that nothing moves while held or not
// ready, and that each frame yields exactly one header record with the
// right source IP, destination IP, TTL and IPv4 flag, one cycle after the
// beat that completes it.
module tb_pre_decode;
  import ddos_pkg::*;
  import tb_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_tvalid = 0, s_tready, m_tvalid, m_tready = 0, hold = 0, hdr_valid;
  axis_beat_t s_beat = '0, m_beat;
  pkt_hdr_t hdr;
  int checks = 0, failures = 0, n_hdr = 0, n_short = 0, n_other = 0, n_ipv4 = 0, n_held = 0;

  pre_decode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_hdr_t exp_q [$];
  bit       due;       // a header must appear this cycle

  // Random readiness and hold, changed away from the clock edge.
  always @(negedge clk) begin
    m_tready <= ($urandom_range(0, 3) != 0);
    hold     <= ($urandom_range(0, 9) == 0);
  end

  // Monitor, sampled just before each rising edge.
  bit beat_completes;
  always @(posedge clk) if (rst_n) begin
    // Header check.
    checks++;
    if (hdr_valid !== due) begin failures++; $display("%0t: hdr_valid %0b expected %0b", $time, hdr_valid, due); end
    if (hdr_valid && due) begin
      pkt_hdr_t e;
      e = exp_q.pop_front();
      n_hdr++;
      checks++;
      if (hdr.is_ipv4 !== e.is_ipv4 ||
          (e.is_ipv4 && (hdr.src_ip !== e.src_ip || hdr.dst_ip !== e.dst_ip || hdr.ttl !== e.ttl))) begin
        failures++;
        $display("hdr %p expected %p", hdr, e);
      end
    end
    // Pass-through check.
    checks += 3;
    if (m_beat !== s_beat) failures++;
    if (m_tvalid !== (s_tvalid && !hold)) failures++;
    if (s_tready !== (m_tready && !hold)) failures++;
    if (s_tvalid && hold) n_held++;
    due = beat_completes && s_tvalid && s_tready;
  end

  task automatic send_frame(input int len, input bit v4);
    bytes_t f;
    logic [31:0] src = $urandom, dst = $urandom;
    logic [7:0]  ttl = 8'($urandom);
    int nb;
    f  = make_frame(len, v4, src, dst, ttl);
    nb = num_beats(len);
    exp_q.push_back('{is_ipv4: v4 && len >= 34, src_ip: src, dst_ip: dst, ttl: ttl});
    if (len < 34) n_short++; else if (!v4) n_other++; else n_ipv4++;
    for (int b = 0; b < nb; b++) begin
      logic [255:0] d; logic [31:0] k; logic l;
      frame_beat(f, b, d, k, l);
      while ($urandom_range(0, 4) == 0) begin
        @(negedge clk); s_tvalid = 0; s_beat = '{tdata: {8{$urandom}}, tkeep: 32'($urandom), tuser: '0, tlast: 1'($urandom)};
      end
      @(negedge clk);
      s_tvalid = 1;
      s_beat = '{tdata: d, tkeep: k, tuser: {4{$urandom}}, tlast: l};
      beat_completes = (b == 1) || (b == 0 && l);
      do @(posedge clk); while (!(s_tvalid && s_tready));
    end
    @(negedge clk); s_tvalid = 0; beat_completes = 0;
  endtask

  initial begin
    due = 0; beat_completes = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send_frame(64, 1); send_frame(1500, 1); send_frame(60, 0); send_frame(20, 1); send_frame(33, 1);
    send_frame(34, 1); send_frame(32, 1);
    repeat (600) send_frame($urandom_range(20, 300), $urandom_range(0, 5) != 0);
    repeat (4) @(negedge clk);
    checks += 5;
    if (exp_q.size() != 0) begin failures++; $display("%0d headers missing", exp_q.size()); end
    if (n_short == 0 || n_other == 0 || n_ipv4 == 0 || n_held == 0) failures++;
    $display("headers %0d (ipv4 %0d, other %0d, short %0d), held beats %0d", n_hdr, n_ipv4, n_other, n_short, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
