// tb_hop_count_calc: exhaustive check of the initial-TTL inference and the
// hop-count for all 256 TTL values against a table-search reference.
module tb_hop_count_calc;
  import tb_frame_pkg::*;

  logic [7:0] ttl, init_ttl, hop_count;
  int checks = 0, failures = 0;

  hop_count_calc dut (.ttl, .init_ttl, .hop_count);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 256; t++) begin
      ttl = 8'(t);
      #1;
      checks += 2;
      if (int'(init_ttl) != ref_init_ttl(t)) begin
        failures++; $display("ttl %0d: init %0d expected %0d", t, init_ttl, ref_init_ttl(t));
      end
      if (int'(hop_count) != ref_init_ttl(t) - t) begin
        failures++; $display("ttl %0d: hops %0d expected %0d", t, hop_count, ref_init_ttl(t) - t);
      end
    end
    // A few worked values (54 -> from 60, 118 -> from 128, 31 -> from 32).
    ttl = 8'd54;  #1; checks++; if (hop_count != 8'd6)  failures++;
    ttl = 8'd118; #1; checks++; if (hop_count != 8'd10) failures++;
    ttl = 8'd31;  #1; checks++; if (hop_count != 8'd1)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
