// packet_fifo: synchronous first-word-fall-through FIFO.
//
// In the Base System it is the Packet FIFO: it holds whole raw frames, one
// 256-bit stream beat (plus tkeep, tuser, tlast) per entry, while the
// filters classify them, so a frame never has to be split into header and
// payload and put back together. Default geometry is the reference one:
// 1024 entries of one beat, i.e. 32 KiB of frame data, enough for 21
// frames of 1500 bytes (47 beats each) or 512 frames of 64 bytes (2 beats).
// The same module, narrowed to one bit, queues the filter verdicts.
//
// Interface: valid/ready on both sides. out_data shows the oldest entry
// whenever out_valid is high; an entry is removed on out_valid && out_ready.
// A write and a read may happen in the same cycle, also when full (the
// read frees the slot). count is the fill level; almost_full is high when
// count >= AFULL_LEVEL. Reset empties the FIFO; the storage itself is not
// reset (it is never read before it is written).
//
// The reference design uses a vendor FIFO; this is a plain array with
// read/write pointers, written as this design's own.
module packet_fifo #(
  parameter int unsigned WIDTH       = ddos_pkg::AXIS_BEAT_W,
  parameter int unsigned DEPTH       = 1024,
  parameter int unsigned AFULL_LEVEL = DEPTH - 4
) (
  input  logic                     clk,
  input  logic                     rst_n,

  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,

  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,

  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     almost_full
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  logic do_wr, do_rd;
  assign out_valid   = (count != 0);
  assign in_ready    = (32'(count) < DEPTH) || out_ready;
  assign do_wr       = in_valid && in_ready;
  assign do_rd       = out_valid && out_ready;
  assign out_data    = mem[rd_ptr];
  assign almost_full = (32'(count) >= AFULL_LEVEL);

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

endmodule
