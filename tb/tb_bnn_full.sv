// Full-size run: the accelerator with all parameters at their defaults (F_IN = 8,
// the complete 6-conv / 3-dense CIFAR-10 layer table) classifies one 32x32x3 image.
// All 10 class scores and the chosen class are checked against the reference model.
// The weight stream is driven without gaps, and the total cycle count is checked
// against the reported 5.94 ms per image at 143 MHz (849,420 cycles).
module tb_bnn_full;
  import bnn_pkg::*;

  localparam int PAPER_CYCLES = 849420;

  logic clk, rst_n, start, busy, done, img_wr_en, w_valid, w_ready, score_valid, finished;
  logic [$clog2(DBUF_WORDS / F_IN_DEF)-1:0] img_wr_addr;
  logic [$clog2(F_IN_DEF)-1:0] img_wr_lane;
  logic [WORD-1:0] img_wr_data, w_data;
  logic [13:0] score_idx, class_idx;
  logic signed [SUM_W-1:0] score;
  int checks, failures, run_cycles, stall_cycles;

  bnn_top dut (.*);

  bnn_tb_harness #(.STALL_PCT(0)) u_h (.*);

  initial begin
    int f;
    @(posedge finished);
    f = failures;
    $display("cycles per image %0d, reported %0d", run_cycles, PAPER_CYCLES);
    if (run_cycles > PAPER_CYCLES) begin
      $display("FAIL slower than the reported rate");
      f++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, f);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
