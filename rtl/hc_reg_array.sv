// hc_reg_array: hop-count register array of the IP-to-hop-count table.
//
// ENTRIES hop-count values, indexed one-to-one with the slots of hcf_cam:
// if a source block is stored in the CAM at index k, its hop-count is word
// k here. Built from registers so that the value is available in the same
// cycle as the CAM index.
//
// Interface: rd_idx -> rd_data combinationally; wr_en/wr_idx/wr_data write
// at the clock edge. Contents are not reset: a word is only read after the
// CAM slot with the same index has been written, which writes it too.
//
// The register array and its one-to-one mapping follow the reference
// design.
module hc_reg_array #(
  parameter int unsigned ENTRIES = 128,
  parameter int unsigned DATA_W  = 8
) (
  input  logic                       clk,

  input  logic [$clog2(ENTRIES)-1:0] rd_idx,
  output logic [DATA_W-1:0]          rd_data,

  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic [DATA_W-1:0]          wr_data
);

  logic [DATA_W-1:0] regs [ENTRIES];

  always_ff @(posedge clk) begin
    if (wr_en) regs[wr_idx] <= wr_data;
  end

  assign rd_data = regs[rd_idx];

endmodule
