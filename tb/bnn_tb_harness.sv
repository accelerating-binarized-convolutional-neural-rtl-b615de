// Stimulus and checker for a whole accelerator run: generates the clock, reset,
// the image and the complete weight stream for the layer table, runs the reference
// model, and compares every class score and the chosen class. The weight stream is
// driven with random gaps (STALL_PCT percent of cycles without a beat) that obey
// the valid/ready rule (data held while valid waits for ready). When done pulses
// it also checks that the stream was consumed exactly and reports the run time.
module bnn_tb_harness
  import bnn_pkg::*;
  import bnn_tb_pkg::*;
#(
  parameter int              F_IN      = F_IN_DEF,
  parameter int              NL        = NL_BNN,
  parameter layer_t [NL-1:0] LAYERS    = BNN_CIFAR10,
  parameter int              STALL_PCT = 20,
  parameter int              IMG       = 0
) (
  output logic                          clk,
  output logic                          rst_n,
  output logic                          start,
  input  logic                          busy,
  input  logic                          done,
  output logic                          img_wr_en,
  output logic [$clog2(DBUF_WORDS / F_IN)-1:0] img_wr_addr,
  output logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] img_wr_lane,
  output logic [WORD-1:0]               img_wr_data,
  output logic                          w_valid,
  input  logic                          w_ready,
  output logic [WORD-1:0]               w_data,
  input  logic                          score_valid,
  input  logic [13:0]                   score_idx,
  input  logic signed [SUM_W-1:0]       score,
  input  logic [13:0]                   class_idx,
  output logic                          finished,
  output int                            checks,
  output int                            failures,
  output int                            run_cycles,
  output int                            stall_cycles
);

  logic [WORD-1:0] q [$];
  int              exp_score [];
  int              exp_class;
  int              nscores;
  logic            running;

  initial clk = 1'b0;
  always #5 clk = !clk;

  initial begin
    logic signed [PIX_W-1:0] im [];
    bit a [], b [];
    checks = 0; failures = 0; finished = 1'b0; nscores = 0; running = 1'b0;
    rst_n = 1'b0; start = 1'b0; img_wr_en = 1'b0; img_wr_addr = '0; img_wr_lane = '0;
    img_wr_data = '0;

    // reference model and weight stream
    image(IMG, im);
    for (int li = 0; li < NL; li++) begin
      layer_t l;
      l = LAYERS[li];
      layer_stream(li, l, F_IN, q);
      case (l.kind)
        L_FPCONV:  ref_fpconv(li, l, im, b);
        L_BINCONV: ref_binconv(li, l, a, b);
        default:   ref_fc(li, l, a, b, exp_score);
      endcase
      a = b;
    end
    exp_class = 0;
    foreach (exp_score[i]) if (exp_score[i] > exp_score[exp_class]) exp_class = i;
    $display("reference: %0d stream words, class %0d", q.size(), exp_class);

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int p = 0; p < IMG_W * IMG_W; p++) begin
      logic [WORD-1:0] w;
      w = '0;
      for (int c = 0; c < IMG_C; c++) w[c*PIX_W +: PIX_W] = im[(c * IMG_W + p / IMG_W) * IMG_W + p % IMG_W];
      img_wr_en   <= 1'b1;
      img_wr_addr <= $bits(img_wr_addr)'(p / F_IN);
      img_wr_lane <= $bits(img_wr_lane)'(p % F_IN);
      img_wr_data <= w;
      @(posedge clk);
    end
    img_wr_en <= 1'b0;
    start     <= 1'b1;
    running   <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    @(posedge clk);
    while (!done) @(posedge clk);
    running <= 1'b0;
    checks++;
    if (class_idx != 14'(exp_class)) begin
      failures++;
      $display("FAIL class %0d expected %0d", class_idx, exp_class);
    end
    checks++;
    if (nscores != exp_score.size()) begin
      failures++;
      $display("FAIL %0d scores seen, expected %0d", nscores, exp_score.size());
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL %0d weight words left unused", q.size());
    end
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    $display("run: %0d cycles, %0d stream stall cycles", run_cycles, stall_cycles);
    finished <= 1'b1;
  end

  // weight stream source
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_valid <= 1'b0; w_data <= '0;
    end else begin
      if (w_valid && w_ready) void'(q.pop_front());
      if (!w_valid || w_ready) begin
        // the accepted beat, if any, has already been popped above
        if (q.size() > 0 && $urandom_range(99) >= STALL_PCT) begin
          w_valid <= 1'b1;
          w_data  <= q[0];
        end else begin
          w_valid <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_cycles <= 0; stall_cycles <= 0;
    end else if (running) begin
      run_cycles <= run_cycles + 1;
      if (w_ready && !w_valid) stall_cycles <= stall_cycles + 1;
      if (score_valid) begin
        checks++;
        nscores++;
        if (int'(score_idx) >= exp_score.size() || int'(score) != exp_score[score_idx]) begin
          failures++;
          $display("FAIL score[%0d] = %0d expected %0d", score_idx, score,
                   int'(score_idx) < exp_score.size() ? exp_score[score_idx] : 0);
        end
      end
    end
  end

endmodule
