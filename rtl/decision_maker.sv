// decision_maker: combines the verdicts of the filtering modules.
//
// If either filter flags the packet (PIEF: source in a blocked range; HCF:
// hop-count mismatch) the packet gets DROP, otherwise BYPASS. The decision
// is combinational, so it reaches the verdict queue in the same cycle as
// the filter results.
//
// Interface: pief_valid/pief_hit and hcf_valid/hcf_spoofed arrive together
// (both filters have the same one-cycle latency; an assertion checks it).
// dec_valid marks a verdict; dec_drop and dec_bypass are one-hot while
// dec_valid is high, and dec_verdict carries the same as an enum.
//
// The OR of the two filter decisions and the DROP/BYPASS outputs follow
// the reference design.
module decision_maker
  import ddos_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,

  input  logic     pief_valid,
  input  logic     pief_hit,
  input  logic     hcf_valid,
  input  logic     hcf_spoofed,

  output logic     dec_valid,
  output logic     dec_drop,
  output logic     dec_bypass,
  output verdict_e dec_verdict
);

  assign dec_valid   = pief_valid;
  assign dec_drop    = pief_valid && (pief_hit || hcf_spoofed);
  assign dec_bypass  = pief_valid && !(pief_hit || hcf_spoofed);
  assign dec_verdict = (pief_hit || hcf_spoofed) ? VERDICT_DROP : VERDICT_BYPASS;

  // The two filters must deliver their results for the same packet together.
  a_in_step: assert property (@(posedge clk) disable iff (!rst_n) pief_valid == hcf_valid)
    else $error("decision_maker: filter results out of step");

endmodule
