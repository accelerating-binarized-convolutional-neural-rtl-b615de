// Unit test of batch norm and binarization: random sums, thresholds and
// orientations, including values equal to the threshold; bit 0 (+1) is expected
// when sum >= T, or sum <= T for a flipped map.
module tb_bn_binarize;
  import bnn_pkg::*;

  bn_t bn;
  logic signed [SUM_W-1:0] vals [WORD];
  logic [WORD-1:0] bits;
  int checks = 0, failures = 0;

  bn_binarize #(.N(WORD)) dut (.*);

  initial begin
    for (int rep = 0; rep < 300; rep++) begin
      int t;
      t = $urandom_range(60) - 30;
      bn.thr  = SUM_W'(t);
      bn.flip = 1'($urandom);
      foreach (vals[j]) vals[j] = (j % 7 == 0) ? SUM_W'(t) : SUM_W'($urandom_range(80) - 40);
      #1;
      foreach (vals[j]) begin
        bit e;
        if (bn.flip) e = !(int'(vals[j]) <= t);
        else         e = !(int'(vals[j]) >= t);
        checks++;
        if (bits[j] != e) begin
          failures++;
          $display("FAIL v=%0d t=%0d flip=%0d bit=%b", vals[j], t, bn.flip, bits[j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
