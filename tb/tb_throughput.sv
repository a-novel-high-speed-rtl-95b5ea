// tb_throughput: line-rate test of the full-size filter with back-to-back
// frames of 64, 128, 256, 512, 1024 and 1500 bytes.
//
// All frames are legitimate (public sources with consistent hop-counts),
// so every frame must come out, unchanged and in order. For each size the
// frames are queued without gaps and the output is always ready; the test
// checks that input and output both move one beat per cycle with no bubble
// between frames, and reports the frame throughput this gives at a
// 118.907 MHz clock, which must exceed the 9.869 Gb/s of a 10G port. The
// 20-byte preamble and inter-frame gap are not counted.
module tb_throughput;
  import ddos_pkg::*;
  import tb_frame_pkg::*;

  localparam int    N_FRAMES = 200;
  localparam real   F_MHZ    = 118.907;

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

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic [256+32+128+1-1:0] beat_t;
  beat_t in_q [$];
  beat_t exp_q [$];

  // Source: offers the head of in_q whenever it is not empty.
  always_comb begin
    s_axis_tvalid = (in_q.size() != 0);
    {s_axis_tdata, s_axis_tkeep, s_axis_tuser, s_axis_tlast} = (in_q.size() != 0) ? in_q[0] : '0;
  end

  int cyc = 0, in_first = -1, in_last = 0, out_first = -1, out_last = 0, in_beats = 0, out_beats = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (s_axis_tvalid && s_axis_tready) begin
      if (in_first < 0) in_first = cyc;
      in_last = cyc;
      in_beats++;
      void'(in_q.pop_front());
    end
    if (m_axis_tvalid && m_axis_tready) begin
      if (out_first < 0) out_first = cyc;
      out_last = cyc;
      out_beats++;
      checks++;
      if (exp_q.size() == 0 || {m_axis_tdata, m_axis_tkeep, m_axis_tuser, m_axis_tlast} !== exp_q[0]) begin
        failures++;
        if (failures < 10) $display("%0t: output beat differs", $time);
      end
      if (exp_q.size() != 0) void'(exp_q.pop_front());
    end
  end

  localparam int POOL = 32;
  logic [31:0] pool_ip [POOL];
  logic [7:0]  pool_ttl [POOL];
  int sizes [6] = '{64, 128, 256, 512, 1024, 1500};

  task automatic queue_frame(input int len, input int k);
    bytes_t f;
    f = make_frame(len, 1, {pool_ip[k][31:8], 8'($urandom)}, $urandom, pool_ttl[k]);
    for (int b = 0; b < num_beats(len); b++) begin
      beat_t x;
      logic [255:0] d; logic [31:0] kp; logic l;
      frame_beat(f, b, d, kp, l);
      x = {d, kp, 128'({$urandom, $urandom, $urandom, $urandom}), l};
      in_q.push_back(x);
      exp_q.push_back(x);
    end
  endtask

  initial begin
    for (int k = 0; k < POOL; k++) begin
      pool_ip[k] = rand_public_ip();
      pool_ttl[k] = 8'($urandom_range(1, 255));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Teach the hop-count table the sources first.
    @(negedge clk);
    for (int k = 0; k < POOL; k++) queue_frame(64, k);
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);

    foreach (sizes[s]) begin
      int beats_per, span_in, span_out;
      real gbps;
      beats_per = num_beats(sizes[s]);
      in_first = -1; out_first = -1; in_beats = 0; out_beats = 0;
      for (int i = 0; i < N_FRAMES; i++) queue_frame(sizes[s], i % POOL);
      wait (exp_q.size() == 0);
      repeat (5) @(negedge clk);
      span_in  = in_last - in_first + 1;
      span_out = out_last - out_first + 1;
      gbps = real'(N_FRAMES) * sizes[s] * 8.0 / (real'(span_out) / F_MHZ) / 1000.0;
      $display("%4d-byte frames: %0d beats in %0d cycles in, %0d cycles out -> %6.3f Gb/s at %.3f MHz",
               sizes[s], in_beats, span_in, span_out, gbps, F_MHZ);
      checks += 4;
      if (in_beats != N_FRAMES * beats_per || span_in != in_beats) begin failures++; $display("input not at one beat per cycle"); end
      if (out_beats != N_FRAMES * beats_per || span_out != out_beats) begin failures++; $display("output not at one beat per cycle"); end
      if (gbps < 9.869) begin failures++; $display("below 10G line rate"); end
      if (frames_dropped != 0) failures++;
    end
    checks++;
    if (frames_forwarded != 32'(POOL + 6 * N_FRAMES)) begin failures++; $display("forwarded %0d", frames_forwarded); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
