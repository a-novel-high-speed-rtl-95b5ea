// tb_pief: random and targeted source addresses through the ingress/egress
// filter; HIT must equal an octet-based model of the special-use ranges,
// arrive one cycle after the header, never fire for non-IPv4, and follow
// run-time rule changes (a range added, a range withdrawn).
module tb_pief;
  import ddos_pkg::*;
  import tb_frame_pkg::*;
  logic clk = 0, rst_n = 0;
  logic hdr_valid = 0;
  pkt_hdr_t hdr = '0;
  logic wr_en = 0, wr_valid = 0;
  logic [3:0] wr_idx = 0;
  logic [31:0] wr_addr = 0;
  logic [5:0] wr_len = 0;
  logic res_valid, res_hit;
  logic [3:0] res_idx;
  int checks = 0, failures = 0, hits = 0;
  bit extra_rule = 0, no_ten = 0;

  pief #(.ENTRIES(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit model(input logic [31:0] ip, input bit v4);
    if (!v4) return 0;
    if (extra_rule && ip[31:22] == {8'd100, 2'b01}) return 1;
    if (no_ten && ip[31:24] == 8'd10) return 0;
    return ref_blocked(ip);
  endfunction

  task automatic probe(input logic [31:0] ip, input bit v4);
    bit e;
    @(negedge clk);
    hdr_valid = 1; hdr = '{is_ipv4: v4, src_ip: ip, dst_ip: $urandom, ttl: 8'($urandom)};
    e = model(ip, v4);
    @(negedge clk);
    hdr_valid = 0;
    checks += 2;
    if (!res_valid) begin failures++; $display("no result for %h", ip); end
    if (res_hit !== e) begin failures++; $display("ip %h v4 %0b: hit %0b expected %0b", ip, v4, res_hit, e); end
    if (res_hit) hits++;
  endtask

  logic [31:0] edges [] = '{32'h00FFFFFF, 32'h01000000, 32'h09FFFFFF, 32'h0A000000, 32'h0AFFFFFF,
    32'h0B000000, 32'h7F000001, 32'hA9FE0101, 32'hA9FF0000, 32'hAC0FFFFF, 32'hAC100000,
    32'hAC1FFFFF, 32'hAC200000, 32'hC0000001, 32'hC0000100, 32'hC0586301, 32'hC0586401,
    32'hC0A80101, 32'hC0A90000, 32'hC611FFFF, 32'hC6120000, 32'hC613FFFF, 32'hC6140000,
    32'hC6336401, 32'hCB007101, 32'hCB007201, 32'hDFFFFFFF, 32'hE0000001, 32'hEFFFFFFF,
    32'hF0000000, 32'hFFFFFFFE, 32'hFFFFFFFF, 32'h86AABCDD, 32'h08080808};

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (edges[i]) probe(edges[i], 1);
    foreach (edges[i]) probe(edges[i], 0);
    repeat (3000) probe($urandom, 1);
    // Add 100.64.0.0/10 and re-check around it.
    @(negedge clk); wr_en = 1; wr_idx = 15; wr_valid = 1; wr_addr = 32'h64400000; wr_len = 10;
    @(negedge clk); wr_en = 0; extra_rule = 1;
    probe(32'h643FFFFF, 1); probe(32'h64400000, 1); probe(32'h647FFFFF, 1); probe(32'h64800000, 1);
    repeat (500) probe({8'd100, 24'($urandom)}, 1);
    // Withdraw 10.0.0.0/8 (slot 1): such sources now pass.
    @(negedge clk); wr_en = 1; wr_idx = 1; wr_valid = 0; wr_addr = 32'h0A000000; wr_len = 8;
    @(negedge clk); wr_en = 0; no_ten = 1;
    repeat (100) probe({8'd10, 24'($urandom)}, 1);
    probe(32'h7F000001, 1);
    // Back-to-back headers, one per cycle.
    for (int i = 0; i < 20; i++) begin
      @(negedge clk); hdr_valid = 1; hdr.is_ipv4 = 1; hdr.src_ip = (i % 2) ? 32'h7F000001 : 32'h08080808;
      if (i > 0) begin
        checks++;
        if (!res_valid || res_hit !== ((i - 1) % 2 == 1)) begin failures++; $display("stream %0d", i); end
      end
    end
    @(negedge clk); hdr_valid = 0;
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
