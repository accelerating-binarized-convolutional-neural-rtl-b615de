// Unit test of the binary convolver: random maps of width 32, 16 and 8 (16, 4 and 1
// words per map), random kernels, words fed back to back with a flush after each
// map. Every partial sum is compared with a direct 3x3 zero-padded convolution in
// the +1/-1 domain, and each result must appear exactly one cycle after the word
// or flush that completes it.
module tb_bin_convolver;
  import bnn_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic [2:0] lw;
  logic in_valid = 1'b0, in_first = 1'b0, flush = 1'b0, out_valid;
  logic [WORD-1:0] in_word = '0;
  logic [8:0] weights = '0;
  logic signed [4:0] out_sums [WORD];

  bin_convolver dut (.*);

  int checks = 0, failures = 0;
  bit map [32*32];
  int exp_q [$];       // expected sums, 64 per completed word
  int expect_valid;    // cycles until an output is due (0: none)

  function automatic int ref_sum(int w, int y, int x, logic [8:0] k);
    int s = 0;
    for (int t = 0; t < 9; t++) begin
      int yy = y + t / 3 - 1, xx = x + t % 3 - 1;
      if (yy >= 0 && yy < w && xx >= 0 && xx < w) s += (map[yy * w + xx] ^ k[t]) ? -1 : 1;
    end
    return s;
  endfunction

  logic due;
  always @(posedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== due) begin
      failures++;
      $display("FAIL out_valid=%b expected %b", out_valid, due);
    end
    if (out_valid) begin
      for (int j = 0; j < WORD; j++) begin
        int e;
        e = exp_q.pop_front();
        checks++;
        if (int'(out_sums[j]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL sum[%0d]=%0d expected %0d", j, out_sums[j], e);
        end
      end
    end
  end

  initial begin
    due = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int rep = 0; rep < 6; rep++) begin
      for (int l = 3; l <= 5; l++) begin
        int w, nw;
        logic [8:0] k;
        w  = 1 << l;
        nw = (w * w) / WORD;
        k  = 9'($urandom);
        foreach (map[i]) map[i] = 1'($urandom);
        for (int kk = 0; kk < nw; kk++)
          for (int j = 0; j < WORD; j++) begin
            int p;
            p = kk * WORD + j;
            exp_q.push_back(ref_sum(w, p / w, p % w, k));
          end
        for (int kk = 0; kk <= nw; kk++) begin
          @(negedge clk);
          lw = 3'(l); weights = k;
          in_valid = (kk < nw); in_first = (kk == 0); flush = (kk == nw);
          for (int j = 0; j < WORD; j++) in_word[j] = (kk < nw) ? map[kk * WORD + j] : 1'b0;
          @(posedge clk);
          #1 due = (kk > 0);
        end
        @(negedge clk);
        in_valid = 1'b0; flush = 1'b0;
        @(posedge clk);
        #1 due = 1'b0;
        // an idle gap between maps
        @(posedge clk);
      end
    end
    @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d sums not produced", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
