// Integer feature-map buffer: accumulates the partial conv sums of one output map
// (f_out = 1) over all input-map groups.
//
// Row k holds the WORD signed sums of output word k. An accumulate writes
// mem[k] <= (clear ? 0 : mem[k]) + acc_in at the clock edge; the read port is
// combinational so that the output stage can stream one row per cycle. DEPTH is
// the most words of any map (32x32 map / 64 bits = 16).
// The integer feature-map buffer is named in the published design; its depth and
// sum width are this design's choices.
module int_fmap_buffer
  import bnn_pkg::*;
#(
  parameter int DEPTH = (IMG_W * IMG_W) / WORD
) (
  input  logic                         clk,
  input  logic                         acc_en,
  input  logic                         acc_clear,
  input  logic [$clog2(DEPTH)-1:0]     acc_addr,
  input  logic signed [SUM_W-1:0]      acc_in  [WORD],
  input  logic [$clog2(DEPTH)-1:0]     rd_addr,
  output logic signed [SUM_W-1:0]      rd_data [WORD]
);

  logic signed [SUM_W-1:0] mem [DEPTH][WORD];

  always_ff @(posedge clk) begin
    if (acc_en) begin
      for (int j = 0; j < WORD; j++)
        mem[acc_addr][j] <= (acc_clear ? SUM_W'(0) : mem[acc_addr][j]) + acc_in[j];
    end
  end

  assign rd_data = mem[rd_addr];

endmodule
