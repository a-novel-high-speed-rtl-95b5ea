// tb_packet_fifo: random pushes and pops against a queue model on a small
// FIFO (order, data, count, full/almost-full, simultaneous read and write
// when full), then the default 1024 x 417-bit buffer filled to the brim
// and drained at one beat per cycle.
module tb_packet_fifo;
  import ddos_pkg::*;
  localparam int SD = 16;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, n_full = 0, n_rw_full = 0;

  // Small instance.
  logic s_in_valid = 0, s_in_ready, s_out_valid, s_out_ready = 0, s_afull;
  logic [15:0] s_in_data = 0, s_out_data;
  logic [4:0]  s_count;
  packet_fifo #(.WIDTH(16), .DEPTH(SD), .AFULL_LEVEL(12)) u_small (
    .clk, .rst_n, .in_valid(s_in_valid), .in_ready(s_in_ready), .in_data(s_in_data),
    .out_valid(s_out_valid), .out_ready(s_out_ready), .out_data(s_out_data),
    .count(s_count), .almost_full(s_afull));

  // Default instance.
  logic b_in_valid = 0, b_in_ready, b_out_valid, b_out_ready = 0, b_afull;
  axis_beat_t b_in_data = '0, b_out_data;
  logic [10:0] b_count;
  packet_fifo u_big (
    .clk, .rst_n, .in_valid(b_in_valid), .in_ready(b_in_ready), .in_data(b_in_data),
    .out_valid(b_out_valid), .out_ready(b_out_ready), .out_data(b_out_data),
    .count(b_count), .almost_full(b_afull));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] q [$];
  axis_beat_t  bq [$];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // ---- small FIFO, random traffic
    for (int cyc = 0; cyc < 5000; cyc++) begin
      @(negedge clk);
      s_in_valid  = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 70 : 30));
      s_in_data   = 16'($urandom);
      s_out_ready = ($urandom_range(0, 99) < ((cyc / 500) % 2 ? 30 : 70));
      #1;
      checks += 4;
      if (int'(s_count) != q.size()) begin failures++; $display("count %0d expected %0d", s_count, q.size()); end
      if (s_out_valid !== (q.size() != 0)) failures++;
      if (s_afull !== (q.size() >= 12)) failures++;
      if (s_in_ready !== (q.size() < SD || s_out_ready)) failures++;
      if (s_out_valid) begin
        checks++;
        if (s_out_data !== q[0]) begin failures++; $display("data %h expected %h", s_out_data, q[0]); end
      end
      if (q.size() == SD) begin
        n_full++;
        if (s_in_valid && s_out_ready) n_rw_full++;
      end
      @(posedge clk);
      if (s_out_valid && s_out_ready) void'(q.pop_front());
      if (s_in_valid && s_in_ready) q.push_back(s_in_data);
    end
    @(negedge clk); s_in_valid = 0; s_out_ready = 0;
    checks += 2;
    if (n_full == 0) failures++;
    if (n_rw_full == 0) failures++;

    // ---- default-size FIFO: fill completely, then drain back-to-back
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      b_in_valid = 1;
      b_in_data = '{tdata: {8{$urandom}}, tkeep: $urandom, tuser: {4{$urandom}}, tlast: 1'($urandom)};
      bq.push_back(b_in_data);
      #1; checks++;
      if (!b_in_ready) failures++;
    end
    @(negedge clk); b_in_valid = 1; #1;
    checks += 3;
    if (b_in_ready) begin failures++; $display("full FIFO accepts"); end
    if (b_count != 11'd1024) failures++;
    if (!b_afull) failures++;
    b_in_valid = 0;
    b_out_ready = 1;
    for (int i = 0; i < 1024; i++) begin
      #1; checks++;
      if (!b_out_valid || b_out_data !== bq[i]) begin failures++; $display("beat %0d wrong", i); end
      @(negedge clk);
    end
    #1; checks++;
    if (b_out_valid || b_count != 0) failures++;
    $display("small: full %0d times, read+write while full %0d times", n_full, n_rw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
