// Bin-conv unit: runs one binary 3x3 conv layer, with optional 2x2 max pooling,
// batch norm and binarization, reading one data buffer and writing the other.
//
// Parallelism: F_IN convolvers take F_IN words (F_IN input maps, WORD pixels each)
// per cycle from one data-buffer row (input parallelism); all pixels of a word are
// convolved at once (pixel parallelism); one output map is produced at a time
// (f_out = 1). The F_IN partial-sum words are added and accumulated over the input
// map groups in the integer feature-map buffer. When a map is complete its words go
// through pooling, batch norm and binarization and are packed into output words.
//
// Per output map: (1) load its batch-norm word and its kernels into the weight
// buffer: Cin/F_IN rows of KW stream beats, lane l's kernel in row bits
// [l*9 +: 9]; (2) for each group g of F_IN input maps, read words
// k = 0..WPM-1 of row g*WPM+k, then one flush step; (3) stream the WPM integer
// words out. A pooled word gives WORD/4 bits, so four pooled words (of one map,
// or of four consecutive 8x8 maps) fill one output word. Output word f of the layer
// is written as word k' = f % WPMo of map m' = f / WPMo in the layout of
// data_buffer. Cycles per output map: about 1 + Cin/F_IN*KW (load, without stream
// stalls) + Cin/F_IN*(WPM+1) + 2 + WPM.
// `start` (one cycle, with cfg) begins a layer; `done` pulses when its last word
// has been written. Needs Cin a multiple of F_IN and W in {8, 16, 32}.
// f_in convolvers, pixel-parallel words, f_out = 1 and the pooling -> batch norm
// -> binarization order follow the published design; F_IN = 8, WORD = 64, the
// buffer layouts and the load-then-compute schedule are this design's choices.
module bin_conv_unit
  import bnn_pkg::*;
#(
  parameter int F_IN  = F_IN_DEF,
  parameter int ROWS  = DBUF_WORDS / F_IN,
  parameter int WROWS = 512 / F_IN
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  layer_t                        cfg,
  output logic                          done,
  // input data buffer
  output logic [$clog2(ROWS)-1:0]       rd_addr,
  input  logic [F_IN-1:0][WORD-1:0]     rd_data,
  // output data buffer
  output logic                          wr_en,
  output logic [$clog2(ROWS)-1:0]       wr_addr,
  output logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] wr_lane,
  output logic [WORD-1:0]               wr_data,
  // weight buffer
  output logic                          wb_load,
  output logic [$clog2(WROWS):0]        wb_load_rows,
  output logic [$clog2(F_IN):0]         wb_load_bpr,
  input  logic                          wb_loaded,
  output logic [$clog2(WROWS)-1:0]      wb_rd_addr,
  input  logic [F_IN*WORD-1:0]          wb_rd_data,
  input  bn_t                           wb_bn
);

  localparam int KW    = (F_IN * 9 + WORD - 1) / WORD;
  localparam int DEPTH = (IMG_W * IMG_W) / WORD;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_WAIT, S_CONV, S_DRAIN, S_OUT} state_t;
  state_t state;

  layer_t     l;
  logic [2:0] lw;
  int unsigned wpm, wpmo, ngroups;
  always_comb begin
    lw      = (l.width == 6'd32) ? 3'd5 : (l.width == 6'd16) ? 3'd4 : 3'd3;
    wpm     = 1 << (2 * lw - 6);
    wpmo    = l.pool ? ((wpm >= 4) ? wpm / 4 : 1) : wpm;
    ngroups = 32'(l.cin) / F_IN;
  end

  logic [13:0] o;             // output map
  logic [13:0] g;             // input group being issued
  logic [4:0]  k;             // word being issued (k == wpm: flush)
  logic        s1_valid, s1_first, s1_flush;
  logic [4:0]  oc_k;          // word index of the next convolver output
  logic [13:0] oc_g;          // group index of the next convolver output
  logic [4:0]  out_k;         // word being sent out
  logic [13:0] m_eff;         // output-layout map of the next written word
  logic [4:0]  k_eff;
  logic [1:0]  chunk;         // pooled chunks already in out_word
  logic [WORD-1:0] out_word;

  // ---------------- convolvers and lane adder ----------------
  logic                  cv_valid [F_IN];
  logic signed [4:0]     cv_sums  [F_IN][WORD];
  logic signed [SUM_W-1:0] lane_sum [WORD];

  for (genvar i = 0; i < F_IN; i++) begin : g_cv
    bin_convolver u_cv (
      .clk, .rst_n, .lw,
      .in_valid (s1_valid),
      .in_first (s1_first),
      .in_word  (rd_data[i]),
      .flush    (s1_flush),
      .weights  (wb_rd_data[i*9 +: 9]),
      .out_valid(cv_valid[i]),
      .out_sums (cv_sums[i])
    );
  end

  always_comb begin
    for (int j = 0; j < WORD; j++) begin
      lane_sum[j] = '0;
      for (int i = 0; i < F_IN; i++) lane_sum[j] = lane_sum[j] + SUM_W'(cv_sums[i][j]);
    end
  end

  // ---------------- integer feature-map buffer ----------------
  logic signed [SUM_W-1:0] ib_rd [WORD];
  int_fmap_buffer #(.DEPTH(DEPTH)) u_ib (
    .clk,
    .acc_en   (cv_valid[0]),
    .acc_clear(oc_g == 14'd0),
    .acc_addr ($clog2(DEPTH)'(oc_k)),
    .acc_in   (lane_sum),
    .rd_addr  ($clog2(DEPTH)'(out_k)),
    .rd_data  (ib_rd)
  );

  // ---------------- pooling, batch norm, binarization ----------------
  logic signed [SUM_W-1:0] pooled [WORD/4];
  logic signed [SUM_W-1:0] bn_in  [WORD];
  logic [WORD-1:0]         bits;

  pool_unit u_pool (.lw, .use_min(wb_bn.flip), .in_vals(ib_rd), .out_vals(pooled));

  always_comb begin
    for (int j = 0; j < WORD; j++)
      bn_in[j] = l.pool ? ((j < WORD / 4) ? pooled[j % (WORD / 4)] : '0) : ib_rd[j];
  end

  bn_binarize #(.N(WORD)) u_bn (.bn(wb_bn), .vals(bn_in), .bits);

  // ---------------- address generation ----------------
  always_comb begin
    rd_addr    = $clog2(ROWS)'(32'(g) * wpm + 32'(k));
    wb_rd_addr = $clog2(WROWS)'(g);
    wb_load_rows = ($clog2(WROWS) + 1)'(ngroups);
    wb_load_bpr  = ($clog2(F_IN) + 1)'(KW);
  end

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; l <= '0; done <= 1'b0; wb_load <= 1'b0;
      o <= '0; g <= '0; k <= '0;
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_flush <= 1'b0;
      oc_k <= '0; oc_g <= '0; out_k <= '0;
      m_eff <= '0; k_eff <= '0; chunk <= '0; out_word <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_lane <= '0; wr_data <= '0;
    end else begin
      done     <= 1'b0;
      wb_load  <= 1'b0;
      wr_en    <= 1'b0;
      s1_valid <= 1'b0; s1_first <= 1'b0; s1_flush <= 1'b0;

      if (cv_valid[0]) begin
        if (32'(oc_k) == wpm - 1) begin oc_k <= '0; oc_g <= oc_g + 1'b1; end
        else oc_k <= oc_k + 1'b1;
      end

      unique case (state)
        S_IDLE: if (start) begin
          l <= cfg; o <= '0; m_eff <= '0; k_eff <= '0; chunk <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          wb_load <= 1'b1;
          g <= '0; k <= '0; oc_k <= '0; oc_g <= '0; out_k <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (wb_loaded && !wb_load) state <= S_CONV;
        S_CONV: begin
          s1_valid <= (32'(k) < wpm);
          s1_first <= (k == '0);
          s1_flush <= (32'(k) == wpm);
          if (32'(k) == wpm) begin
            k <= '0;
            if (32'(g) == ngroups - 1) state <= S_DRAIN;
            else g <= g + 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DRAIN: if (32'(oc_g) == ngroups) state <= S_OUT;
        S_OUT: begin
          logic [WORD-1:0] w;
          logic            emit;
          w    = bits;
          emit = 1'b1;
          if (l.pool) begin
            w = out_word;
            w[chunk*(WORD/4) +: WORD/4] = bits[WORD/4-1:0];
            out_word <= w;
            chunk    <= chunk + 1'b1;
            emit     = (chunk == 2'd3);
          end
          if (emit) begin
            wr_en   <= 1'b1;
            wr_data <= w;
            wr_addr <= $clog2(ROWS)'((32'(m_eff) / F_IN) * wpmo + 32'(k_eff));
            wr_lane <= $bits(wr_lane)'(32'(m_eff) % F_IN);
            if (32'(k_eff) == wpmo - 1) begin k_eff <= '0; m_eff <= m_eff + 1'b1; end
            else k_eff <= k_eff + 1'b1;
          end
          if (32'(out_k) == wpm - 1) begin
            out_k <= '0;
            if (o == l.cout - 1'b1) begin
              done  <= 1'b1;
              state <= S_IDLE;
            end else begin
              o     <= o + 1'b1;
              state <= S_LOAD;
            end
          end else begin
            out_k <= out_k + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
