// End-to-end test of the accelerator on a reduced network that has every layer
// kind and every map width of the full CIFAR-10 network: FP-conv 3->8 (32x32),
// Bin-conv 8->8 at 32 (pooled), 16, 16 (pooled), 8, 8 (pooled, four maps per output
// word), Bin-FC 128->128 and the scoring layer 128->10, with F_IN = 2 and a stalling
// weight stream. Besides the scores it counts the mechanisms each run must show:
// every layer kind, pooling on and off, both batch-norm orientations, buffer
// ping-pong in both directions, stream stalls and packed pooled words.
module tb_bnn_top;
  import bnn_pkg::*;

  localparam int F_IN = 2;
  localparam int NL   = 9;
  localparam layer_t [NL-1:0] SMALL = {
    mk_layer(L_BINFC,    128,  10,  1, 1'b0, 1'b1),
    mk_layer(L_BINFC,    128, 128,  1, 1'b0, 1'b0),
    mk_layer(L_BINCONV,    8,   8,  8, 1'b1, 1'b0),
    mk_layer(L_BINCONV,    8,   8,  8, 1'b0, 1'b0),
    mk_layer(L_BINCONV,    8,   8, 16, 1'b1, 1'b0),
    mk_layer(L_BINCONV,    8,   8, 16, 1'b0, 1'b0),
    mk_layer(L_BINCONV,    8,   8, 32, 1'b1, 1'b0),
    mk_layer(L_FPCONV,     3,   8, 32, 1'b0, 1'b0),
    mk_layer(L_BINCONV,    2,   2,  8, 1'b0, 1'b0)  // unused tail entry
  };
  localparam layer_t [NL-2:0] LAYERS = SMALL[NL-1:1];

  logic clk, rst_n, start, busy, done, img_wr_en, w_valid, w_ready, score_valid, finished;
  logic [$clog2(DBUF_WORDS / F_IN)-1:0] img_wr_addr;
  logic [0:0]  img_wr_lane;
  logic [WORD-1:0] img_wr_data, w_data;
  logic [13:0] score_idx, class_idx;
  logic signed [SUM_W-1:0] score;
  int checks, failures, run_cycles, stall_cycles;

  bnn_top #(.F_IN(F_IN), .NL(NL - 1), .LAYERS(LAYERS)) dut (.*);

  bnn_tb_harness #(.F_IN(F_IN), .NL(NL - 1), .LAYERS(LAYERS), .STALL_PCT(25)) u_h (.*);

  // mechanism counters
  int n_fp, n_bc, n_fc, n_pool, n_nopool, n_flip, n_noflip, n_ab, n_ba, n_pack4, n_last;
  initial begin
    n_fp = 0; n_bc = 0; n_fc = 0; n_pool = 0; n_nopool = 0; n_flip = 0; n_noflip = 0;
    n_ab = 0; n_ba = 0; n_pack4 = 0; n_last = 0;
  end
  always @(posedge clk) begin
    if (dut.fp_start) n_fp++;
    if (dut.bc_start) begin
      n_bc++;
      if (dut.cfg.pool) n_pool++; else n_nopool++;
    end
    if (dut.fc_start) begin n_fc++; if (dut.cfg.last) n_last++; end
    if (dut.u_wb.loaded && dut.act.wb_load) begin
      if (dut.wb_bn.flip) n_flip++; else n_noflip++;
    end
    if (dut.u_ctrl.unit_done) begin if (dut.in_sel) n_ba++; else n_ab++; end
    if (dut.u_bc.wr_en && dut.u_bc.l.pool && dut.u_bc.l.width == 6'd8) n_pack4++;
  end

  task automatic need(string what, int n);
    $display("mechanism %-28s %0d", what, n);
    if (n == 0) begin
      $display("FAIL mechanism never happened: %s", what);
      failures++;
    end
    checks++;
  endtask

  initial begin
    @(posedge finished);
    need("fp-conv layer", n_fp);
    need("bin-conv layer", n_bc);
    need("bin-conv with pooling", n_pool);
    need("bin-conv without pooling", n_nopool);
    need("bin-fc layer", n_fc);
    need("scoring layer", n_last);
    need("batch norm flipped", n_flip);
    need("batch norm not flipped", n_noflip);
    need("buffer A->B", n_ab);
    need("buffer B->A", n_ba);
    need("four pooled maps per word", n_pack4);
    need("weight stream stall", stall_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
