// tb_hcf_cam: fills the IP-to-hop-count CAM, searches present and absent
// keys, invalidates and overwrites slots, and checks HIT/MISS and the
// returned index against an associative model.
module tb_hcf_cam;
  localparam int ENTRIES = 128;
  localparam int KEY_W   = 24;
  logic clk = 0, rst_n = 0;
  logic [KEY_W-1:0] search_key = 0, wr_key = 0;
  logic search_hit, wr_en = 0, wr_valid = 0;
  logic [6:0] search_idx, wr_idx = 0;
  logic [KEY_W-1:0] keys [ENTRIES];
  bit               vld  [ENTRIES];
  int checks = 0, failures = 0;

  hcf_cam #(.ENTRIES(ENTRIES), .KEY_W(KEY_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int idx, input logic [KEY_W-1:0] k, input bit v);
    @(negedge clk); wr_en = 1; wr_idx = 7'(idx); wr_key = k; wr_valid = v;
    @(negedge clk); wr_en = 0;
    keys[idx] = k; vld[idx] = v;
  endtask

  task automatic search(input logic [KEY_W-1:0] k);
    int exp_idx = -1;
    for (int i = 0; i < ENTRIES; i++) if (vld[i] && keys[i] == k) begin exp_idx = i; break; end
    search_key = k; #1;
    checks++;
    if (search_hit !== (exp_idx >= 0)) begin
      failures++; $display("key %h: hit %0b expected %0b", k, search_hit, exp_idx >= 0);
    end else if (exp_idx >= 0) begin
      checks++;
      if (int'(search_idx) != exp_idx) begin failures++; $display("key %h: idx %0d expected %0d", k, search_idx, exp_idx); end
    end
  endtask

  initial begin
    foreach (vld[i]) vld[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Empty after reset.
    search(24'h86AABC);
    // The example table: 134.170.188/24 at 1, 69.171.230/24 at 2, 216.58.221/24 last.
    write(1, 24'h86AABC, 1);
    write(2, 24'h45ABE6, 1);
    write(ENTRIES-1, 24'hD83ADD, 1);
    search(24'h86AABC); search(24'h45ABE6); search(24'hD83ADD); search(24'h86AABD);
    // Fill every slot with distinct keys.
    for (int i = 0; i < ENTRIES; i++) write(i, KEY_W'(32'h100000 + i*977), 1);
    for (int i = 0; i < ENTRIES; i++) search(KEY_W'(32'h100000 + i*977));
    // Random writes/invalidations and searches.
    repeat (600) begin
      if ($urandom_range(0, 2) == 0) write($urandom_range(0, ENTRIES-1), KEY_W'($urandom_range(0, 300)), $urandom_range(0, 3) != 0);
      search(KEY_W'($urandom_range(0, 300)));
    end
    // Duplicate key: lowest index wins.
    write(70, 24'hABCDEF, 1); write(9, 24'hABCDEF, 1); search(24'hABCDEF);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
