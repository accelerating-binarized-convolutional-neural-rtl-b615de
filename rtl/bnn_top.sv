// Binarized CNN accelerator top level.
//
// Two feature-map data buffers (A and B) hold all activations on chip; each layer
// reads one and writes the other. A weight buffer is filled from the off-chip
// weight stream with the weights and batch-norm parameters of the output map or
// neuron being computed. Three compute units share them and run one at a time, in
// the order of the layer table: FP-conv for the first layer (quantized image in),
// Bin-conv for the binary conv layers, Bin-FC for the dense layers. The controller
// sequences the layers and reports the class with the largest final score.
//
// Use: with busy low, write the image into buffer A through img_wr_* (pixel p at
// row p / F_IN, lane p % F_IN, channel c in bits [c*8 +: 8]); pulse start; feed the
// weight stream (w_valid/w_ready/w_data, a beat moves when both valid and ready are
// high) in layer order: per output map or neuron one batch-norm word followed by its
// weight rows; the class scores appear on score_* and the winning class on class_idx
// when done pulses.
// The buffer/unit structure follows the published architecture; the host image
// port and the weight-stream interface stand for the DMA engine, which is this
// design's own interface choice.
module bnn_top
  import bnn_pkg::*;
#(
  parameter int              F_IN   = F_IN_DEF,
  parameter int              NL     = NL_BNN,
  parameter layer_t [NL-1:0] LAYERS = BNN_CIFAR10
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  input  logic                          img_wr_en,
  input  logic [$clog2(DBUF_WORDS / F_IN)-1:0] img_wr_addr,
  input  logic [$clog2(F_IN > 1 ? F_IN : 2)-1:0] img_wr_lane,
  input  logic [WORD-1:0]               img_wr_data,
  input  logic                          w_valid,
  output logic                          w_ready,
  input  logic [WORD-1:0]               w_data,
  output logic                          score_valid,
  output logic [13:0]                   score_idx,
  output logic signed [SUM_W-1:0]       score,
  output logic [13:0]                   class_idx
);

  localparam int ROWS  = DBUF_WORDS / F_IN;
  localparam int WROWS = 512 / F_IN;
  localparam int AW    = $clog2(ROWS);
  localparam int LNW   = $clog2(F_IN > 1 ? F_IN : 2);
  localparam int WAW   = $clog2(WROWS);

  // ---------------- controller ----------------
  layer_t cfg;
  logic fp_start, bc_start, fc_start, in_sel;
  logic fp_done, bc_done, fc_done;
  logic signed [SUM_W-1:0] class_score;

  bnn_controller #(.NL(NL), .LAYERS(LAYERS)) u_ctrl (
    .clk, .rst_n, .start, .busy, .done, .cfg,
    .fp_start, .bc_start, .fc_start,
    .unit_done(fp_done | bc_done | fc_done),
    .in_sel, .score_valid, .score_idx, .score,
    .class_idx, .class_score
  );

  // ---------------- per-unit buses ----------------
  typedef struct packed {
    logic [AW-1:0]   rd_addr;
    logic            wr_en;
    logic [AW-1:0]   wr_addr;
    logic [LNW-1:0]  wr_lane;
    logic [WORD-1:0] wr_data;
    logic            wb_load;
    logic [WAW:0]    wb_load_rows;
    logic [$clog2(F_IN):0] wb_load_bpr;
    logic [WAW-1:0]  wb_rd_addr;
  } unit_bus_t;

  unit_bus_t fp_b, bc_b, fc_b, act;

  logic [F_IN-1:0][WORD-1:0] rd_a, rd_b, rd_in;
  logic [F_IN*WORD-1:0]      wb_rd_data;
  logic                      wb_loaded;
  bn_t                       wb_bn;

  assign rd_in = in_sel ? rd_b : rd_a;

  fp_conv_unit #(.F_IN(F_IN), .ROWS(ROWS), .WROWS(WROWS)) u_fp (
    .clk, .rst_n, .start(fp_start), .cfg, .done(fp_done),
    .rd_addr(fp_b.rd_addr), .rd_data(rd_in),
    .wr_en(fp_b.wr_en), .wr_addr(fp_b.wr_addr), .wr_lane(fp_b.wr_lane), .wr_data(fp_b.wr_data),
    .wb_load(fp_b.wb_load), .wb_load_rows(fp_b.wb_load_rows), .wb_load_bpr(fp_b.wb_load_bpr),
    .wb_loaded, .wb_rd_addr(fp_b.wb_rd_addr), .wb_rd_data, .wb_bn
  );

  bin_conv_unit #(.F_IN(F_IN), .ROWS(ROWS), .WROWS(WROWS)) u_bc (
    .clk, .rst_n, .start(bc_start), .cfg, .done(bc_done),
    .rd_addr(bc_b.rd_addr), .rd_data(rd_in),
    .wr_en(bc_b.wr_en), .wr_addr(bc_b.wr_addr), .wr_lane(bc_b.wr_lane), .wr_data(bc_b.wr_data),
    .wb_load(bc_b.wb_load), .wb_load_rows(bc_b.wb_load_rows), .wb_load_bpr(bc_b.wb_load_bpr),
    .wb_loaded, .wb_rd_addr(bc_b.wb_rd_addr), .wb_rd_data, .wb_bn
  );

  bin_fc_unit #(.F_IN(F_IN), .ROWS(ROWS), .WROWS(WROWS)) u_fc (
    .clk, .rst_n, .start(fc_start), .cfg, .done(fc_done),
    .rd_addr(fc_b.rd_addr), .rd_data(rd_in),
    .wr_en(fc_b.wr_en), .wr_addr(fc_b.wr_addr), .wr_lane(fc_b.wr_lane), .wr_data(fc_b.wr_data),
    .wb_load(fc_b.wb_load), .wb_load_rows(fc_b.wb_load_rows), .wb_load_bpr(fc_b.wb_load_bpr),
    .wb_loaded, .wb_rd_addr(fc_b.wb_rd_addr), .wb_rd_data, .wb_bn,
    .score_valid, .score_idx, .score
  );

  // Only the unit of the current layer's kind drives the shared buffers.
  always_comb begin
    unique case (cfg.kind)
      L_FPCONV:  act = fp_b;
      L_BINCONV: act = bc_b;
      default:   act = fc_b;
    endcase
  end

  // ---------------- weight buffer ----------------
  weight_buffer #(.F_IN(F_IN), .ROWS(WROWS)) u_wb (
    .clk, .rst_n,
    .load(act.wb_load), .load_rows(act.wb_load_rows), .load_bpr(act.wb_load_bpr),
    .loaded(wb_loaded),
    .s_valid(w_valid), .s_ready(w_ready), .s_data(w_data),
    .rd_addr(act.wb_rd_addr), .rd_data(wb_rd_data), .bn(wb_bn)
  );

  // ---------------- data buffers A and B ----------------
  logic            a_we, b_we;
  logic [AW-1:0]   a_wa;
  logic [LNW-1:0]  a_wl;
  logic [WORD-1:0] a_wd;

  always_comb begin
    if (busy) begin
      a_we = act.wr_en && in_sel;
      a_wa = act.wr_addr;
      a_wl = act.wr_lane;
      a_wd = act.wr_data;
    end else begin
      a_we = img_wr_en;
      a_wa = img_wr_addr;
      a_wl = img_wr_lane;
      a_wd = img_wr_data;
    end
    b_we = busy && act.wr_en && !in_sel;
  end

  data_buffer #(.F_IN(F_IN), .ROWS(ROWS)) u_buf_a (
    .clk, .rd_addr(act.rd_addr), .rd_data(rd_a),
    .wr_en(a_we), .wr_addr(a_wa), .wr_lane(a_wl), .wr_data(a_wd)
  );

  data_buffer #(.F_IN(F_IN), .ROWS(ROWS)) u_buf_b (
    .clk, .rd_addr(act.rd_addr), .rd_data(rd_b),
    .wr_en(b_we), .wr_addr(act.wr_addr), .wr_lane(act.wr_lane), .wr_data(act.wr_data)
  );

endmodule
