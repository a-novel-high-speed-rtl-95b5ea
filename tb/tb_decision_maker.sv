// tb_decision_maker: all combinations of the two filter results; DROP when
// either filter flags the packet, BYPASS otherwise, nothing without valid.
module tb_decision_maker;
  import ddos_pkg::*;
  logic clk = 0, rst_n = 0;
  logic pief_valid = 0, pief_hit = 0, hcf_valid = 0, hcf_spoofed = 0;
  logic dec_valid, dec_drop, dec_bypass;
  verdict_e dec_verdict;
  int checks = 0, failures = 0;

  decision_maker dut (.*);

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
    for (int v = 0; v < 2; v++)
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++) begin
          @(negedge clk);
          pief_valid = v[0]; hcf_valid = v[0]; pief_hit = a[0]; hcf_spoofed = b[0];
          #1;
          checks += 4;
          if (dec_valid !== v[0]) failures++;
          if (dec_drop !== (v[0] & (a[0] | b[0]))) begin failures++; $display("drop v%0d a%0d b%0d", v, a, b); end
          if (dec_bypass !== (v[0] & ~(a[0] | b[0]))) begin failures++; $display("bypass v%0d a%0d b%0d", v, a, b); end
          if (v && ((dec_verdict == VERDICT_DROP) !== (a[0] | b[0]))) failures++;
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
