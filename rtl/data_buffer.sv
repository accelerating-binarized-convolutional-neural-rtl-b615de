// Feature-map data buffer (one of the two ping-pong buffers A and B).
//
// Each row holds F_IN words of WORD pixels, one word per lane, so one read returns
// the F_IN words that the F_IN convolvers consume in the same cycle. A binary conv
// layer keeps word k of map m in row (m / F_IN) * WPM + k, lane m % F_IN, where WPM
// is the number of words per map; dense layers see the buffer as a flat bit vector
// (row r, lane l is word r * F_IN + l). The quantized input image uses lane bits
// [23:0] of pixel p at row p / F_IN, lane p % F_IN.
//
// Read: address in one cycle, data registered out the next (synchronous RAM).
// Write: one lane of one row per cycle. Sizes follow the largest map stack of the
// network (128 maps of 32x32 bits); the banking into lanes is this design's choice.
// Two such buffers used alternately, holding all maps on chip, follow the
// published architecture; the row/lane layout and read latency are this design's.
module data_buffer
  import bnn_pkg::*;
#(
  parameter int F_IN = F_IN_DEF,
  parameter int ROWS = DBUF_WORDS / F_IN
) (
  input  logic                              clk,
  input  logic [$clog2(ROWS)-1:0]           rd_addr,
  output logic [F_IN-1:0][WORD-1:0]         rd_data,
  input  logic                              wr_en,
  input  logic [$clog2(ROWS)-1:0]           wr_addr,
  input  logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] wr_lane,
  input  logic [WORD-1:0]                   wr_data
);

  logic [F_IN-1:0][WORD-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr][wr_lane] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
