// Batch normalization and binarization of N integer sums, folded into one
// comparison per value: the result is +1 (bit 0) when sum >= T, or when sum <= T if
// the map's batch-norm scale is negative (flip), and -1 (bit 1) otherwise.
// Purely combinational.
// Binarization after batch norm, with biases removed, follows the published
// design; the threshold form and its widths are this design's choices.
module bn_binarize
  import bnn_pkg::*;
#(
  parameter int N = WORD
) (
  input  bn_t                      bn,
  input  logic signed [SUM_W-1:0]  vals [N],
  output logic [N-1:0]             bits
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic pos;
      pos     = bn.flip ? (vals[i] <= bn.thr) : (vals[i] >= bn.thr);
      bits[i] = !pos;
    end
  end

endmodule
