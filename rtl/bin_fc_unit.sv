// Bin-FC unit: runs one binary dense layer.
//
// The input vector of Cin bits is read as R = Cin / (F_IN*WORD) data-buffer rows
// (flat layout, row r lane l = word r*F_IN + l). For each output neuron the unit
// loads the batch-norm word and R weight rows of F_IN beats into the weight buffer,
// then reads data row r and weight row r together, one pair per cycle, and adds
// popcount(data ^ weight); the dot product is Cin - 2*popcount. Hidden layers
// binarize it with the batch-norm comparison and pack 64 neurons per output word
// (neuron n in bit n % 64 of flat word n / 64); the last layer instead emits an
// integer class score sum - T (or T - sum when flip) on score_valid/score_idx/score.
// Cycles per neuron: 1 + R*F_IN (weight load, without stream stalls) + R + 3, so the
// dense layers are bound by the weight stream.
// `start` (one cycle, with cfg) begins a layer; `done` pulses after the last neuron.
// A Bin-FC unit bound by weight bandwidth follows the published design; its
// datapath width, stream format and scoring rule are this design's choices.
module bin_fc_unit
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
  input  bn_t                           wb_bn,
  output logic                          score_valid,
  output logic [13:0]                   score_idx,
  output logic signed [SUM_W-1:0]       score
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_WAIT, S_RUN, S_DRAIN, S_FIN} state_t;
  state_t state;

  layer_t      l;
  int unsigned nrows;
  logic [13:0] n;            // output neuron
  logic [13:0] r;            // row being issued
  logic        s1_valid;
  logic [13:0] pop;          // accumulated popcount
  logic [WORD-1:0] out_word;
  logic signed [SUM_W-1:0] dot;

  assign nrows = 32'(l.cin) / (F_IN * WORD);
  assign dot   = SUM_W'(32'(l.cin) - 2 * 32'(pop));

  always_comb begin
    rd_addr      = $clog2(ROWS)'(r);
    wb_rd_addr   = $clog2(WROWS)'(r);
    wb_load_rows = ($clog2(WROWS) + 1)'(nrows);
    wb_load_bpr  = ($clog2(F_IN) + 1)'(F_IN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; l <= '0; done <= 1'b0; wb_load <= 1'b0;
      n <= '0; r <= '0; s1_valid <= 1'b0; pop <= '0; out_word <= '0;
      wr_en <= 1'b0; wr_addr <= '0; wr_lane <= '0; wr_data <= '0;
      score_valid <= 1'b0; score_idx <= '0; score <= '0;
    end else begin
      done        <= 1'b0;
      wb_load     <= 1'b0;
      wr_en       <= 1'b0;
      score_valid <= 1'b0;
      s1_valid    <= 1'b0;
      if (s1_valid) pop <= pop + 14'($countones(rd_data ^ wb_rd_data));

      unique case (state)
        S_IDLE: if (start) begin
          l <= cfg; n <= '0; out_word <= '0;
          state <= S_LOAD;
        end
        S_LOAD: begin
          wb_load <= 1'b1; r <= '0; pop <= '0;
          state <= S_WAIT;
        end
        S_WAIT: if (wb_loaded && !wb_load) state <= S_RUN;
        S_RUN: begin
          s1_valid <= 1'b1;
          if (32'(r) == nrows - 1) state <= S_DRAIN;
          else r <= r + 1'b1;
        end
        S_DRAIN: if (!s1_valid) state <= S_FIN;
        S_FIN: begin
          logic pos;
          logic [WORD-1:0] w;
          pos = wb_bn.flip ? (dot <= wb_bn.thr) : (dot >= wb_bn.thr);
          if (l.last) begin
            score_valid <= 1'b1;
            score_idx   <= n;
            score       <= wb_bn.flip ? (wb_bn.thr - dot) : (dot - wb_bn.thr);
          end else begin
            w = out_word;
            w[n[5:0]] = !pos;
            out_word <= w;
            if (n[5:0] == 6'd63 || n == l.cout - 1'b1) begin
              wr_en    <= 1'b1;
              wr_data  <= w;
              wr_addr  <= $clog2(ROWS)'((32'(n) / WORD) / F_IN);
              wr_lane  <= $bits(wr_lane)'((32'(n) / WORD) % F_IN);
              out_word <= '0;
            end
          end
          if (n == l.cout - 1'b1) begin
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            n     <= n + 1'b1;
            state <= S_LOAD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
