// Weight buffer: holds the weights and the batch-norm parameters of the output map
// (conv) or output neuron (dense) being computed, loaded from the off-chip weight
// stream.
//
// A load is started with a one-cycle `load` pulse giving the number of rows and the
// number of stream beats per row. The first accepted beat is the batch-norm word;
// the following beats fill the rows in order, beat b of a row going to bits
// [b*WORD +: WORD]. `loaded` rises when the last beat is taken and stays high until
// the next load. The stream uses a valid/ready handshake: a beat moves when both are
// high, and the source must hold its data while valid is high and ready low.
// Read: row address in one cycle, row registered out the next, matching the data
// buffers so that weights and pixels meet in the same cycle.
// That a weight buffer holds weights and batch-norm parameters fetched from
// off-chip follows the published architecture; its size, the per-map reload and
// the stream format are this design's choices. Assertions check the load and
// stream handshake rules.
module weight_buffer
  import bnn_pkg::*;
#(
  parameter int F_IN = F_IN_DEF,
  parameter int ROWS = 512 / F_IN
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // load command
  input  logic                       load,
  input  logic [$clog2(ROWS):0]      load_rows,
  input  logic [$clog2(F_IN):0]      load_bpr,
  output logic                       loaded,
  // off-chip weight stream
  input  logic                       s_valid,
  output logic                       s_ready,
  input  logic [WORD-1:0]            s_data,
  // read side
  input  logic [$clog2(ROWS)-1:0]    rd_addr,
  output logic [F_IN*WORD-1:0]       rd_data,
  output bn_t                        bn
);

  logic [F_IN*WORD-1:0] mem [ROWS];
  logic                  busy, bn_phase;
  logic [$clog2(ROWS):0] rows_left, row;
  logic [$clog2(F_IN):0] bpr, beat;
  logic [F_IN*WORD-1:0]  row_acc;
  logic                  fire;

  assign s_ready = busy;
  assign fire    = s_valid && s_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; bn_phase <= 1'b0; loaded <= 1'b0;
      rows_left <= '0; row <= '0; bpr <= '0; beat <= '0;
      row_acc <= '0; bn <= '0;
    end else if (load) begin
      busy <= 1'b1; bn_phase <= 1'b1; loaded <= 1'b0;
      rows_left <= load_rows; row <= '0; bpr <= load_bpr; beat <= '0;
      row_acc <= '0;
    end else if (fire) begin
      if (bn_phase) begin
        bn       <= bn_from_word(s_data);
        bn_phase <= 1'b0;
        if (rows_left == '0) begin busy <= 1'b0; loaded <= 1'b1; end
      end else begin
        row_acc[beat*WORD +: WORD] <= s_data;
        if (beat == bpr - 1'b1) begin
          beat <= '0;
          row  <= row + 1'b1;
          rows_left <= rows_left - 1'b1;
          if (rows_left == 1) begin busy <= 1'b0; loaded <= 1'b1; end
          row_acc <= '0;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  // Row write: the completed row (with the final beat merged in).
  always_ff @(posedge clk) begin
    if (fire && !bn_phase && beat == bpr - 1'b1) begin
      logic [F_IN*WORD-1:0] r;
      r = row_acc;
      r[beat*WORD +: WORD] = s_data;
      mem[row[$clog2(ROWS)-1:0]] <= r;
    end
    rd_data <= mem[rd_addr];
  end

  // Handshake rules: a new load is only requested when the previous one is
  // complete, and the stream source keeps a beat stable until it is accepted.
  a_load_when_idle: assert property (@(posedge clk) disable iff (!rst_n) load |-> !busy)
    else $error("weight_buffer: load requested during a load");
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_valid && !s_ready |=> s_valid && $stable(s_data))
    else $error("weight_buffer: stream beat dropped or changed before it was accepted");

endmodule
