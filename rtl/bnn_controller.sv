// Layer controller: executes the network one layer after another on the shared
// compute units, ping-ponging between the data buffers, and picks the class.
//
// On `start` it walks the layer table LAYERS (entry 0 first). For each layer it
// pulses the start of the unit of that kind (FP-conv, Bin-conv or Bin-FC) with the
// layer's descriptor on `cfg`, and waits for that unit's `done`. Layer i reads data
// buffer A and writes B when in_sel = 0, and the reverse when in_sel = 1; in_sel
// toggles after every layer, so each layer's output is the next layer's input.
// While the last layer streams its class scores, the running maximum is kept; the
// index of the largest score (the first one on a tie) is given on class_idx when
// `done` pulses. busy is high from start to done.
// The published design generates its controller with the tool flow; this
// sequencer is the simplest one that runs layers one after another on the shared
// units with ping-pong buffers.
module bnn_controller
  import bnn_pkg::*;
#(
  parameter int                 NL     = NL_BNN,
  parameter layer_t [NL-1:0]    LAYERS = BNN_CIFAR10
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  output layer_t                  cfg,
  output logic                    fp_start,
  output logic                    bc_start,
  output logic                    fc_start,
  input  logic                    unit_done,
  output logic                    in_sel,
  input  logic                    score_valid,
  input  logic [13:0]             score_idx,
  input  logic signed [SUM_W-1:0] score,
  output logic [13:0]             class_idx,
  output logic signed [SUM_W-1:0] class_score
);

  typedef enum logic [1:0] {C_IDLE, C_ISSUE, C_WAIT} cstate_t;
  cstate_t state;
  logic [$clog2(NL+1)-1:0] li;

  assign cfg = LAYERS[li[$clog2(NL > 1 ? NL : 2)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; li <= '0; busy <= 1'b0; done <= 1'b0; in_sel <= 1'b0;
      fp_start <= 1'b0; bc_start <= 1'b0; fc_start <= 1'b0;
      class_idx <= '0; class_score <= '0;
    end else begin
      done <= 1'b0;
      fp_start <= 1'b0; bc_start <= 1'b0; fc_start <= 1'b0;
      if (score_valid && (score_idx == '0 || score > class_score)) begin
        class_idx   <= score_idx;
        class_score <= score;
      end
      unique case (state)
        C_IDLE: if (start) begin
          li <= '0; in_sel <= 1'b0; busy <= 1'b1; state <= C_ISSUE;
        end
        C_ISSUE: begin
          unique case (cfg.kind)
            L_FPCONV:  fp_start <= 1'b1;
            L_BINCONV: bc_start <= 1'b1;
            default:   fc_start <= 1'b1;
          endcase
          state <= C_WAIT;
        end
        C_WAIT: if (unit_done) begin
          in_sel <= !in_sel;
          if (32'(li) == NL - 1) begin
            busy <= 1'b0; done <= 1'b1; state <= C_IDLE;
          end else begin
            li <= li + 1'b1; state <= C_ISSUE;
          end
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
