// Unit test of the FP-conv unit with the weight buffer and a model of the data
// buffers, F_IN = 2: six output maps of a random 32x32x3 image with a randomly
// stalling weight stream. Every output bit is compared with the reference of
// bnn_tb_pkg (direct 3x3 convolution with zero padding).
module tb_fp_conv_unit;
  import bnn_pkg::*;
  import bnn_tb_pkg::*;

  localparam int F_IN = 2;
  localparam int ROWS = DBUF_WORDS / F_IN;
  localparam int WROWS = 512 / F_IN;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, done;
  always #5 clk = !clk;
  layer_t cfg;
  logic [$clog2(ROWS)-1:0] rd_addr, wr_addr;
  logic [F_IN-1:0][WORD-1:0] rd_data;
  logic wr_en;
  logic [0:0] wr_lane;
  logic [WORD-1:0] wr_data;
  logic wb_load, wb_loaded;
  logic [$clog2(WROWS):0] wb_load_rows;
  logic [$clog2(F_IN):0] wb_load_bpr;
  logic [$clog2(WROWS)-1:0] wb_rd_addr;
  logic [F_IN*WORD-1:0] wb_rd_data;
  bn_t wb_bn;
  logic s_valid, s_ready;
  logic [WORD-1:0] s_data;

  fp_conv_unit #(.F_IN(F_IN)) dut (.*);
  weight_buffer #(.F_IN(F_IN)) u_wb (.clk, .rst_n, .load(wb_load), .load_rows(wb_load_rows),
    .load_bpr(wb_load_bpr), .loaded(wb_loaded), .s_valid, .s_ready, .s_data,
    .rd_addr(wb_rd_addr), .rd_data(wb_rd_data), .bn(wb_bn));

  logic [WORD-1:0] inmem [ROWS*F_IN];
  logic [WORD-1:0] outmem [ROWS*F_IN];
  always_ff @(posedge clk) begin
    for (int i = 0; i < F_IN; i++) rd_data[i] <= inmem[int'(rd_addr) * F_IN + i];
    if (wr_en) outmem[int'(wr_addr) * F_IN + int'(wr_lane)] <= wr_data;
  end

  logic [WORD-1:0] q [$];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s_valid <= 1'b0; s_data <= '0; end
    else begin
      if (s_valid && s_ready) void'(q.pop_front());
      if (!s_valid || s_ready) begin
        if (q.size() > 0 && $urandom_range(99) >= 30) begin
          s_valid <= 1'b1; s_data <= q[0];
        end else s_valid <= 1'b0;
      end
    end
  end

  int checks = 0, failures = 0;

  task automatic run_layer(int li, layer_t l);
    bit a [], b [];
    int w, wo, bp, idx;
    logic signed [PIX_W-1:0] im [];
    w  = int'(l.width);
    wo = l.pool ? w / 2 : w;
    foreach (inmem[i]) inmem[i] = '0;
    foreach (outmem[i]) outmem[i] = '0;
    if (l.kind == L_FPCONV) begin
      image(li + 5, im);
      for (int p = 0; p < IMG_W * IMG_W; p++)
        for (int c = 0; c < IMG_C; c++)
          inmem[p][c*PIX_W +: PIX_W] = im[(c * IMG_W + p / IMG_W) * IMG_W + p % IMG_W];
      ref_fpconv(li, l, im, b);
    end else begin
      a = new[int'(l.cin) * w * w];
      foreach (a[j]) begin
        a[j] = h4(55, li, j, 1)[5];
        idx = word_of(j, w, F_IN, bp);
        inmem[idx][bp] = a[j];
      end
      ref_binconv(li, l, a, b);
    end
    layer_stream(li, l, F_IN, q);
    @(posedge clk);
    cfg <= l; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL stream left %0d", q.size()); end
    foreach (b[j]) begin
      idx = word_of(j, wo, F_IN, bp);
      checks++;
      if (outmem[idx][bp] !== b[j]) begin
        failures++;
        if (failures < 10) $display("FAIL layer %0d bit %0d = %b expected %b", li, j, outmem[idx][bp], b[j]);
      end
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run_layer(0, mk_layer(L_FPCONV, 3, 6, 32, 1'b0, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
