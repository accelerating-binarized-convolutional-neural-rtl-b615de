// 2x2 pooling of one word of integer conv sums.
//
// The input word holds WORD/W rows of a W-wide map (lw = log2 W); the output holds
// the WORD/4 pooled values of those rows in raster order (W/2 wide). Pooling is done
// on the integer sums, before batch norm: with use_min = 0 it takes the maximum,
// which equals max pooling of the binarized values when the batch-norm comparison
// is sum >= T. For a map whose comparison is sum <= T (flip) the binarization
// reverses the order, so the minimum is taken instead. Purely combinational.
// Pooling ahead of batch norm follows the published order; pooling the integer
// sums with min/max chosen by the batch-norm sign is this design's reading of the
// simplified pooling.
module pool_unit
  import bnn_pkg::*;
(
  input  logic [2:0]               lw,
  input  logic                     use_min,
  input  logic signed [SUM_W-1:0]  in_vals  [WORD],
  output logic signed [SUM_W-1:0]  out_vals [WORD/4]
);

  always_comb begin
    int w, hw;
    w  = 1 << lw;
    hw = w >> 1;
    for (int q = 0; q < WORD / 4; q++) begin
      int orow, ocol, base;
      logic signed [SUM_W-1:0] a, b, c, d, m;
      orow = q / hw;
      ocol = q % hw;
      base = 2 * orow * w + 2 * ocol;
      a = in_vals[base];
      b = in_vals[base + 1];
      c = in_vals[base + w];
      d = in_vals[base + w + 1];
      m = a;
      if (use_min) begin
        if (b < m) m = b;
        if (c < m) m = c;
        if (d < m) m = d;
      end else begin
        if (b > m) m = b;
        if (c > m) m = c;
        if (d > m) m = d;
      end
      out_vals[q] = m;
    end
  end

endmodule
