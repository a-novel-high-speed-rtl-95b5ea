// tb_hc_reg_array: random writes and reads of the hop-count register array
// against an array model; checks that a write shows the next cycle.
module tb_hc_reg_array;
  localparam int ENTRIES = 128;
  logic clk = 0, wr_en = 0;
  logic [6:0] rd_idx = 0, wr_idx = 0;
  logic [7:0] rd_data, wr_data = 0;
  logic [7:0] model [ENTRIES];
  bit         written [ENTRIES];
  int checks = 0, failures = 0;

  hc_reg_array #(.ENTRIES(ENTRIES), .DATA_W(8)) dut (.clk, .rd_idx, .rd_data, .wr_en, .wr_idx, .wr_data);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (written[i]) written[i] = 0;
    // Fill every word.
    for (int i = 0; i < ENTRIES; i++) begin
      @(negedge clk); wr_en = 1; wr_idx = 7'(i); wr_data = 8'($urandom); model[i] = wr_data; written[i] = 1;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = 7'(i); #1; checks++;
      if (rd_data !== model[i]) begin failures++; $display("idx %0d: %h expected %h", i, rd_data, model[i]); end
    end
    // Random traffic; read the word just written on the following cycle.
    repeat (2000) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); wr_idx = 7'($urandom); wr_data = 8'($urandom);
      rd_idx = 7'($urandom); #1;
      checks++;
      if (rd_data !== model[rd_idx]) begin failures++; $display("rd %0d: %h expected %h", rd_idx, rd_data, model[rd_idx]); end
      @(posedge clk); #1;
      if (wr_en) begin
        model[wr_idx] = wr_data;
        rd_idx = wr_idx; #1; checks++;
        if (rd_data !== wr_data) begin failures++; $display("after write %0d: %h expected %h", wr_idx, rd_data, wr_data); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
