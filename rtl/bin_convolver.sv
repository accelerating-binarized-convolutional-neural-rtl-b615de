// Binary convolver: a variable-width line buffer and the 3x3 XOR/popcount logic that
// convolves one input feature map word by word, all WORD pixels of a word at once.
//
// A word holds WORD/W whole rows of a W-wide map (W = 8, 16 or 32, given as
// lw = log2 W). Words of one map arrive in order, the first one flagged `in_first`;
// after the last word of a map the caller pulses `flush` (no word). The line buffer
// keeps the current word and the last row of the word before it; the partial sums of
// the current word are produced when the next word (which supplies the row below) or
// the flush arrives. Pixels outside the map count as zero (zero padding: the tap is
// skipped). Each partial sum is sum over valid taps of (+1 or -1) = taps - 2*popcount
// (pixel ^ weight), a signed value in [-9, 9].
//
// Timing: out_valid and out_sums are registered, one cycle after the in_valid or
// flush that completes a word. weights[ky*3+kx] is the kernel bit for row offset
// ky-1 and column offset kx-1 and must be valid in that same cycle.
// A convolver with a variable-width line buffer and XOR/popcount logic, fed one
// word per cycle, follows the published Bin-conv design; the line-buffer
// organisation and zero padding are this design's choices.
module bin_convolver
  import bnn_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [2:0]                  lw,
  input  logic                        in_valid,
  input  logic                        in_first,
  input  logic [WORD-1:0]             in_word,
  input  logic                        flush,
  input  logic [8:0]                  weights,
  output logic                        out_valid,
  output logic signed [4:0]           out_sums [WORD]
);

  logic [WORD-1:0] cur;
  logic [31:0]     above;          // last row of the previous word, right aligned
  logic            cur_valid, cur_first;
  logic            fire;
  logic signed [4:0] sums [WORD];

  assign fire = cur_valid && (flush || (in_valid && !in_first));

  always_comb begin
    int w, rows;
    w    = 1 << lw;
    rows = WORD >> lw;
    for (int j = 0; j < WORD; j++) begin
      int r, c, nv, nx;
      r  = j >> lw;
      c  = j & (w - 1);
      nv = 0;
      nx = 0;
      for (int ky = 0; ky < 3; ky++) begin
        for (int kx = 0; kx < 3; kx++) begin
          int rr, cc;
          logic v, b;
          rr = r + ky - 1;
          cc = c + kx - 1;
          v  = (cc >= 0) && (cc < w);
          b  = 1'b0;
          if (rr < 0) begin
            v = v && !cur_first;
            if (v) b = above[cc];
          end else if (rr >= rows) begin
            v = v && !flush;
            if (v) b = in_word[cc];
          end else if (v) begin
            b = cur[rr * w + cc];
          end
          if (v) begin
            nv = nv + 1;
            if (b ^ weights[ky*3+kx]) nx = nx + 1;
          end
        end
      end
      sums[j] = 5'(nv - 2 * nx);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur <= '0; above <= '0; cur_valid <= 1'b0; cur_first <= 1'b0;
      out_valid <= 1'b0;
      for (int j = 0; j < WORD; j++) out_sums[j] <= '0;
    end else begin
      out_valid <= fire;
      if (fire) out_sums <= sums;
      if (in_valid) begin
        above     <= 32'(cur >> (WORD - (1 << lw)));
        cur       <= in_word;
        cur_valid <= 1'b1;
        cur_first <= in_first;
      end else if (flush) begin
        cur_valid <= 1'b0;
      end
    end
  end

endmodule
