// Unit test of the Bin-FC unit with the weight buffer and a model of the data
// buffers: a hidden dense layer of 256 -> 70 neurons (binarized outputs, last output
// word only partly filled) and a scoring layer of 128 -> 10 (integer scores), with
// F_IN = 2 and a weight stream that stalls at random. Outputs are compared with the
// bit-level reference of bnn_tb_pkg.
module tb_bin_fc_unit;
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
  logic score_valid;
  logic [13:0] score_idx;
  logic signed [SUM_W-1:0] score;

  bin_fc_unit #(.F_IN(F_IN)) dut (.*);
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

  int checks = 0, failures = 0, nscore = 0;
  int exp_score [];

  always @(posedge clk) if (rst_n && score_valid) begin
    checks++; nscore++;
    if (int'(score_idx) >= exp_score.size() || int'(score) != exp_score[score_idx]) begin
      failures++;
      $display("FAIL score[%0d]=%0d", score_idx, score);
    end
  end

  task automatic run_layer(int li, layer_t l);
    bit a [], b [];
    int sc [];
    a = new[int'(l.cin)];
    foreach (a[j]) a[j] = h4(77, li, j, 0)[3];
    foreach (inmem[i]) inmem[i] = '0;
    foreach (outmem[i]) outmem[i] = '0;
    foreach (a[j]) inmem[j / WORD][j % WORD] = a[j];
    ref_fc(li, l, a, b, sc);
    exp_score = sc;
    nscore = 0;
    layer_stream(li, l, F_IN, q);
    @(posedge clk);
    cfg <= l; start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    while (!done) @(posedge clk);
    @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL stream left %0d", q.size()); end
    if (l.last) begin
      checks++;
      if (nscore != int'(l.cout)) begin failures++; $display("FAIL %0d scores", nscore); end
    end else begin
      for (int n = 0; n < int'(l.cout); n++) begin
        checks++;
        if (outmem[n / WORD][n % WORD] !== b[n]) begin
          failures++;
          $display("FAIL neuron %0d = %b expected %b", n, outmem[n / WORD][n % WORD], b[n]);
        end
      end
    end
  endtask

  initial begin
    cfg = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    run_layer(3, mk_layer(L_BINFC, 256, 70, 1, 1'b0, 1'b0));
    run_layer(4, mk_layer(L_BINFC, 128, 10, 1, 1'b0, 1'b1));
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
