// tb_post_decode: frames from a model packet buffer and verdicts from a
// model verdict queue, both arriving at random times, with random output
// back-pressure. The output must be exactly the BYPASS frames, beat for
// beat and in order; DROP frames must be drained from the buffer without
// reaching the output; a frame must not start before its verdict; the
// frame counters must match. Also measures that a forwarded frame moves at
// one beat per cycle when nothing stalls.
module tb_post_decode;
  import ddos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_tvalid = 0, s_tready, v_valid = 0, v_ready, m_tvalid, m_tready = 0;
  axis_beat_t s_beat = '0, m_beat;
  verdict_e v_verdict = VERDICT_BYPASS;
  logic [31:0] frames_forwarded, frames_dropped;
  int checks = 0, failures = 0, n_fwd = 0, n_drop = 0, n_wait_verdict = 0, n_out_stall = 0;

  post_decode dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  axis_beat_t in_q [$];
  axis_beat_t exp_q [$];
  verdict_e   v_q [$];
  int         verdicts_released = 0;   // how many verdicts the model queue may show
  bit         s_rand = 1, m_rand = 1;
  bit         at_frame_start = 1;
  bit         s_pending = 0;
  bit         measuring = 0;
  int         cyc = 0, t_first = 0, t_last = 0, m_fires = 0;

  // Drive both sources and the sink away from the clock edge.
  always @(negedge clk) begin
    // A buffer never withdraws an offered beat.
    s_tvalid  = (in_q.size() != 0) && (s_pending || !s_rand || $urandom_range(0, 3) != 0);
    s_beat    = (in_q.size() != 0) ? in_q[0] : '0;
    v_valid   = (v_q.size() != 0) && (verdicts_released > 0);
    v_verdict = (v_q.size() != 0) ? v_q[0] : VERDICT_BYPASS;
    m_tready  = !m_rand || ($urandom_range(0, 3) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (s_tvalid && at_frame_start && !v_valid) begin
      n_wait_verdict++;
      checks++;
      if (s_tready || m_tvalid) begin failures++; $display("%0t: frame started without verdict", $time); end
    end
    cyc++;
    if (m_tvalid && !m_tready) n_out_stall++;
    if (measuring && m_tvalid && m_tready) begin
      if (m_fires == 0) t_first = cyc;
      t_last = cyc;
      m_fires++;
    end
    if (m_tvalid && m_tready) begin
      checks++;
      if (exp_q.size() == 0 || m_beat !== exp_q[0]) begin failures++; $display("%0t: unexpected output beat", $time); end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
    if (v_valid && v_ready) begin
      void'(v_q.pop_front());
      verdicts_released--;
    end
    s_pending = s_tvalid && !s_tready;
    if (s_tvalid && s_tready) begin
      void'(in_q.pop_front());
      at_frame_start = s_beat.tlast;
    end
  end

  task automatic add_frame(input int nbeats, input verdict_e v);
    for (int b = 0; b < nbeats; b++) begin
      axis_beat_t x;
      x = '{tdata: {8{$urandom}}, tkeep: '1, tuser: {4{$urandom}}, tlast: (b == nbeats - 1)};
      in_q.push_back(x);
      if (v == VERDICT_BYPASS) exp_q.push_back(x);
    end
    v_q.push_back(v);
    if (v == VERDICT_DROP) n_drop++; else n_fwd++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Frames whose verdicts come late.
    for (int i = 0; i < 300; i++) add_frame($urandom_range(1, 12), $urandom_range(0, 2) == 0 ? VERDICT_DROP : VERDICT_BYPASS);
    for (int i = 0; i < 300; i++) begin
      repeat ($urandom_range(0, 6)) @(posedge clk);
      verdicts_released++;
    end
    wait (in_q.size() == 0);
    repeat (5) @(posedge clk);
    // Throughput: 20 bypass frames of 47 beats, everything ready.
    s_rand = 0; m_rand = 0;
    verdicts_released += 20;
    for (int i = 0; i < 20; i++) add_frame(47, VERDICT_BYPASS);
    measuring = 1;
    wait (in_q.size() == 0);
    repeat (3) @(posedge clk);
    measuring = 0;
    checks++;
    if (m_fires != 20 * 47 || t_last - t_first + 1 != 20 * 47) begin
      failures++; $display("%0d beats took %0d cycles", m_fires, t_last - t_first + 1);
    end
    repeat (5) @(posedge clk);
    checks += 5;
    if (exp_q.size() != 0) begin failures++; $display("%0d beats not forwarded", exp_q.size()); end
    if (frames_forwarded != 32'(n_fwd)) begin failures++; $display("fwd %0d expected %0d", frames_forwarded, n_fwd); end
    if (frames_dropped != 32'(n_drop)) begin failures++; $display("drop %0d expected %0d", frames_dropped, n_drop); end
    if (n_wait_verdict == 0) failures++;
    if (n_out_stall == 0) failures++;
    $display("forwarded %0d dropped %0d, verdict waits %0d, output stalls %0d", n_fwd, n_drop, n_wait_verdict, n_out_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
