// tb_pief_cam: checks the 14 special-use ranges loaded at reset (address
// and mask, written here as dotted values), the two spare slots, and that
// run-time writes replace and invalidate slots.
module tb_pief_cam;
  import ddos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, wr_valid = 0;
  logic [3:0] wr_idx = 0;
  logic [31:0] wr_addr = 0;
  logic [5:0] wr_len = 0;
  logic [15:0] rule_valid;
  logic [31:0] rule_addr [16];
  logic [31:0] rule_mask [16];
  int checks = 0, failures = 0;

  // Expected table: {a,b,c,d,mask}
  logic [31:0] exp_addr [14] = '{
    {8'd0,8'd0,8'd0,8'd0}, {8'd10,8'd0,8'd0,8'd0}, {8'd127,8'd0,8'd0,8'd0},
    {8'd169,8'd254,8'd0,8'd0}, {8'd172,8'd16,8'd0,8'd0}, {8'd192,8'd0,8'd0,8'd0},
    {8'd192,8'd88,8'd99,8'd0}, {8'd192,8'd168,8'd0,8'd0}, {8'd198,8'd18,8'd0,8'd0},
    {8'd198,8'd51,8'd100,8'd0}, {8'd203,8'd0,8'd113,8'd0}, {8'd224,8'd0,8'd0,8'd0},
    {8'd240,8'd0,8'd0,8'd0}, {8'd255,8'd255,8'd255,8'd255}};
  logic [31:0] exp_mask [14] = '{
    32'hFF000000, 32'hFF000000, 32'hFF000000, 32'hFFFF0000, 32'hFFF00000,
    32'hFFFFFF00, 32'hFFFFFF00, 32'hFFFF0000, 32'hFFFE0000, 32'hFFFFFF00,
    32'hFFFFFF00, 32'hF0000000, 32'hF0000000, 32'hFFFFFFFF};

  pief_cam #(.ENTRIES(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 14; i++) begin
      checks += 3;
      if (!rule_valid[i]) begin failures++; $display("slot %0d invalid", i); end
      if (rule_addr[i] !== exp_addr[i]) begin failures++; $display("slot %0d addr %h", i, rule_addr[i]); end
      if (rule_mask[i] !== exp_mask[i]) begin failures++; $display("slot %0d mask %h", i, rule_mask[i]); end
    end
    checks += 2;
    if (rule_valid[14] || rule_valid[15]) failures++;
    // Program 100.64.0.0/10 (shared address space) into spare slot 14.
    wr_en = 1; wr_idx = 14; wr_valid = 1; wr_addr = {8'd100, 8'd127, 8'd3, 8'd4}; wr_len = 10;
    @(negedge clk); wr_en = 0;
    if (!rule_valid[14] || rule_addr[14] !== {8'd100,8'd64,8'd0,8'd0} || rule_mask[14] !== 32'hFFC00000) begin
      failures++; $display("slot 14 %b %h %h", rule_valid[14], rule_addr[14], rule_mask[14]);
    end
    // Invalidate slot 1 (10/8).
    checks++;
    wr_en = 1; wr_idx = 1; wr_valid = 0; wr_addr = 0; wr_len = 0;
    @(negedge clk); wr_en = 0;
    if (rule_valid[1] || !rule_valid[0] || !rule_valid[2]) begin failures++; $display("invalidate failed"); end
    // Reset restores the table.
    rst_n = 0; @(negedge clk); rst_n = 1; @(negedge clk);
    checks++;
    if (!rule_valid[1] || rule_valid[14] || rule_addr[1] !== exp_addr[1]) begin failures++; $display("reset reload failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
