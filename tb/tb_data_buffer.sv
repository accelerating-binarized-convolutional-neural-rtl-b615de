// Unit test of the data buffer (default F_IN = 8, 256 rows): random single-lane
// writes and row reads against a model, with the one-cycle read latency checked.
module tb_data_buffer;
  import bnn_pkg::*;

  localparam int F_IN = F_IN_DEF;
  localparam int ROWS = DBUF_WORDS / F_IN;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic [$clog2(ROWS)-1:0] rd_addr = '0, wr_addr = '0;
  logic [F_IN-1:0][WORD-1:0] rd_data;
  logic wr_en = 1'b0;
  logic [$clog2(F_IN)-1:0] wr_lane = '0;
  logic [WORD-1:0] wr_data = '0;
  logic [WORD-1:0] model [ROWS][F_IN];
  int checks = 0, failures = 0;

  data_buffer dut (.*);

  initial begin
    // fill everything once
    for (int r = 0; r < ROWS; r++)
      for (int l = 0; l < F_IN; l++) begin
        @(negedge clk);
        wr_en = 1'b1; wr_addr = 8'(r); wr_lane = 3'(l);
        wr_data = {$urandom, $urandom};
        model[r][l] = wr_data;
      end
    for (int op = 0; op < 3000; op++) begin
      logic [$clog2(ROWS)-1:0] ra;
      @(negedge clk);
      wr_en   = 1'(op % 3 != 0);
      wr_addr = 8'($urandom);
      wr_lane = 3'($urandom);
      wr_data = {$urandom, $urandom};
      ra      = (op % 5 == 0) ? wr_addr : 8'($urandom);
      rd_addr = ra;
      @(posedge clk);
      #1;
      // read data reflects memory before this edge's write
      for (int l = 0; l < F_IN; l++) begin
        checks++;
        if (rd_data[l] !== model[ra][l]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d lane %0d", ra, l);
        end
      end
      if (wr_en) model[wr_addr][wr_lane] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
