// Unit test of the pooling unit: random integer words for map widths 8, 16 and 32,
// with max and min selection; each pooled value is compared with the 2x2 maximum
// (or minimum) worked out directly from row/column positions.
module tb_pool_unit;
  import bnn_pkg::*;

  logic [2:0] lw;
  logic use_min;
  logic signed [SUM_W-1:0] in_vals [WORD];
  logic signed [SUM_W-1:0] out_vals [WORD/4];
  int checks = 0, failures = 0;

  pool_unit dut (.*);

  initial begin
    for (int rep = 0; rep < 200; rep++) begin
      int w, e, v;
      lw = 3'(3 + rep % 3);
      use_min = rep[2];
      w = 1 << lw;
      foreach (in_vals[j]) in_vals[j] = SUM_W'($urandom_range(400) - 200);
      #1;
      for (int y = 0; y < (WORD / w) / 2; y++)
        for (int x = 0; x < w / 2; x++) begin
          e = int'(in_vals[2 * y * w + 2 * x]);
          for (int d = 0; d < 4; d++) begin
            v = int'(in_vals[(2 * y + d / 2) * w + 2 * x + d % 2]);
            if (use_min ? v < e : v > e) e = v;
          end
          checks++;
          if (int'(out_vals[y * (w / 2) + x]) != e) begin
            failures++;
            $display("FAIL lw=%0d min=%0d (%0d,%0d) = %0d expected %0d", lw, use_min, y, x,
                     out_vals[y * (w / 2) + x], e);
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
