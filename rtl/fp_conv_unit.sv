// FP-conv unit: runs the first conv layer, whose input is the quantized image
// (IMG_C channels of signed PIX_W-bit pixels, IMG_W x IMG_W) instead of binary maps.
//
// For each output map it loads the batch-norm word and one weight beat holding the
// 27 kernel bits (bit c*9 + ky*3 + kx) into the weight buffer, then scans the image
// once in raster order, one pixel (all channels) per cycle, through a line buffer of
// 2*IMG_W+3 pixels. With pixel p in the newest slot, the 3x3 window of pixel
// q = p - IMG_W - 1 is complete; taps outside the image are skipped (zero padding).
// The sum of +/- pixel over the 27 taps goes through batch norm and binarization,
// and the output bits are packed 64 to a word and written as map o, word q / 64 in
// the data_buffer layout. The image is read from the input data buffer, pixel p at
// row p / F_IN, lane p % F_IN, bits [c*PIX_W +: PIX_W]. One output pixel per cycle:
// about IMG_W*IMG_W + IMG_W + 5 cycles per output map after the weight load.
// `start` (one cycle, with cfg) begins the layer; `done` pulses at its end.
// A separate, lightly parallel unit for the first layer follows the published
// design; its line-buffer structure, pixel width and layouts are this design's.
module fp_conv_unit
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
  output logic [$clog2(ROWS)-1:0]       rd_addr,
  input  logic [F_IN-1:0][WORD-1:0]     rd_data,
  output logic                          wr_en,
  output logic [$clog2(ROWS)-1:0]       wr_addr,
  output logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] wr_lane,
  output logic [WORD-1:0]               wr_data,
  output logic                          wb_load,
  output logic [$clog2(WROWS):0]        wb_load_rows,
  output logic [$clog2(F_IN):0]         wb_load_bpr,
  input  logic                          wb_loaded,
  output logic [$clog2(WROWS)-1:0]      wb_rd_addr,
  input  logic [F_IN*WORD-1:0]          wb_rd_data,
  input  bn_t                           wb_bn
);

  localparam int NPIX = IMG_W * IMG_W;
  localparam int LB   = 2 * IMG_W + 3;
  localparam int PXB  = IMG_C * PIX_W;
  localparam int LW   = $clog2(IMG_W);
  localparam int WPM  = NPIX / WORD;

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WAIT, S_SCAN} state_t;
  state_t state;

  layer_t      l;
  logic [13:0] o;
  logic [11:0] p;                 // pixel being issued (>= NPIX: flush)
  logic        s1_valid;          // pixel slot arriving from the buffer
  logic        s1_real;           // it is an image pixel, not flush padding
  logic [11:0] s1_p;
  logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] s1_lane;
  logic        s2_valid;
  logic [11:0] s2_p;              // newest pixel in the line buffer
  logic [PXB-1:0] lb [LB];        // lb[0] newest
  logic [WORD-1:0] out_word;

  always_comb begin
    rd_addr      = $clog2(ROWS)'(32'(p) / F_IN);
    wb_rd_addr   = '0;
    wb_load_rows = ($clog2(WROWS) + 1)'(1);
    wb_load_bpr  = ($clog2(F_IN) + 1)'(1);
  end

  // window sum for the centre pixel q = s2_p - IMG_W - 1
  logic signed [SUM_W-1:0] wsum;
  logic                    q_valid;
  int                      q;
  always_comb begin
    int y, x, age;
    logic signed [PIX_W-1:0] px;
    age     = 0;
    px      = '0;
    q       = int'(s2_p) - IMG_W - 1;
    q_valid = s2_valid && (q >= 0);
    y       = q >> LW;
    x       = q & (IMG_W - 1);
    wsum    = '0;
    for (int dy = -1; dy <= 1; dy++) begin
      for (int dx = -1; dx <= 1; dx++) begin
        age = IMG_W + 1 - dy * IMG_W - dx;
        if (y + dy >= 0 && y + dy < IMG_W && x + dx >= 0 && x + dx < IMG_W) begin
          for (int c = 0; c < IMG_C; c++) begin
            px = lb[age][c*PIX_W +: PIX_W];
            if (wb_rd_data[c*9 + (dy+1)*3 + (dx+1)]) wsum = wsum - SUM_W'(px);
            else                                     wsum = wsum + SUM_W'(px);
          end
        end
      end
    end
  end

  logic obit;
  assign obit = !(wb_bn.flip ? (wsum <= wb_bn.thr) : (wsum >= wb_bn.thr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; l <= '0; o <= '0; p <= '0; done <= 1'b0; wb_load <= 1'b0;
      s1_valid <= 1'b0; s1_real <= 1'b0; s1_p <= '0; s1_lane <= '0;
      s2_valid <= 1'b0; s2_p <= '0; out_word <= '0;
      for (int i = 0; i < LB; i++) lb[i] <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_lane <= '0; wr_data <= '0;
    end else begin
      done    <= 1'b0;
      wb_load <= 1'b0;
      wr_en   <= 1'b0;
      s1_valid <= 1'b0;
      s2_valid <= s1_valid;
      s2_p     <= s1_p;
      if (s1_valid) begin
        for (int i = LB - 1; i > 0; i--) lb[i] <= lb[i-1];
        lb[0] <= s1_real ? rd_data[s1_lane][PXB-1:0] : '0;
      end
      if (q_valid) begin
        logic [WORD-1:0] w;
        w = out_word;
        w[q % WORD] = obit;
        out_word <= w;
        if (q % WORD == WORD - 1) begin
          wr_en   <= 1'b1;
          wr_data <= w;
          wr_addr <= $clog2(ROWS)'((32'(o) / F_IN) * WPM + 32'(q / WORD));
          wr_lane <= $bits(wr_lane)'(32'(o) % F_IN);
        end
      end

      unique case (state)
        S_IDLE: if (start) begin
          l <= cfg; o <= '0; state <= S_LOAD;
        end
        S_LOAD: begin
          wb_load <= 1'b1; p <= '0; state <= S_WAIT;
        end
        S_WAIT: if (wb_loaded && !wb_load) state <= S_SCAN;
        S_SCAN: begin
          if (32'(p) < NPIX + IMG_W + 1) begin
            s1_valid <= 1'b1;
            s1_real  <= (32'(p) < NPIX);
            s1_p     <= p;
            s1_lane  <= $bits(s1_lane)'(32'(p) % F_IN);
            p        <= p + 1'b1;
          end else if (!s1_valid && !s2_valid) begin
            // last window done and its word written
            if (o == l.cout - 1'b1) begin done <= 1'b1; state <= S_IDLE; end
            else begin o <= o + 1'b1; state <= S_LOAD; end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
