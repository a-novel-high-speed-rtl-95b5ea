// post_decode: back end of the Base System.
//
// Takes frames from the packet buffer and, for each frame, waits for its
// verdict from the verdict queue (verdicts arrive in frame order, one per
// frame). A BYPASS frame is sent out on the output stream beat by beat;
// a DROP frame is read out of the buffer and discarded at one beat per
// cycle, without ever appearing on the output.
//
// Interface:
//   s_*        stream from the packet buffer (first-word-fall-through)
//   v_valid/v_ready/v_verdict   verdict queue; a verdict is taken together
//              with the first beat of its frame
//   m_*        output stream to the transmit side
//   frames_forwarded / frames_dropped   running frame counts
// Timing: combinational from buffer to output; one beat per cycle when the
// output is ready. The first beat of a frame stalls until its verdict is
// there. An output beat, once offered, stays until accepted (checked by
// an assertion).
//
// Forward-or-drop per the filter decision follows the reference design;
// the verdict queue handshake and the counters are this design's choices.
module post_decode
  import ddos_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  input  logic        s_tvalid,
  output logic        s_tready,
  input  axis_beat_t  s_beat,

  input  logic        v_valid,
  output logic        v_ready,
  input  verdict_e    v_verdict,

  output logic        m_tvalid,
  input  logic        m_tready,
  output axis_beat_t  m_beat,

  output logic [31:0] frames_forwarded,
  output logic [31:0] frames_dropped
);

  logic     in_frame;     // inside a frame whose verdict is already taken
  verdict_e frame_verdict;
  verdict_e cur_verdict;
  logic     go, drop, fire, first;

  assign cur_verdict = in_frame ? frame_verdict : v_verdict;
  assign go          = in_frame || v_valid;
  assign drop        = (cur_verdict == VERDICT_DROP);

  assign m_tvalid = s_tvalid && go && !drop;
  assign m_beat   = s_beat;
  assign s_tready = go && (drop || m_tready);
  assign fire     = s_tvalid && s_tready;
  assign first    = !in_frame;
  assign v_ready  = fire && first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_frame         <= 1'b0;
      frame_verdict    <= VERDICT_BYPASS;
      frames_forwarded <= '0;
      frames_dropped   <= '0;
    end else if (fire) begin
      if (first) frame_verdict <= v_verdict;
      in_frame <= !s_beat.tlast;
      if (s_beat.tlast) begin
        if (drop) frames_dropped   <= frames_dropped + 1'b1;
        else      frames_forwarded <= frames_forwarded + 1'b1;
      end
    end
  end

  // AXI4-Stream rule: an offered beat stays stable until taken.
  logic       prev_stall;
  axis_beat_t prev_beat;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_stall <= 1'b0;
      prev_beat  <= '0;
    end else begin
      prev_stall <= m_tvalid && !m_tready;
      prev_beat  <= m_beat;
      if (prev_stall) begin
        assert (m_tvalid && m_beat == prev_beat)
          else $error("post_decode: output beat changed while stalled");
      end
    end
  end

endmodule
