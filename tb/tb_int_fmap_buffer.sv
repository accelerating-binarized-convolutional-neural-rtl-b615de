// Unit test of the integer feature-map buffer: random accumulate/clear operations
// on random rows, checked through the combinational read port against a model.
module tb_int_fmap_buffer;
  import bnn_pkg::*;

  localparam int DEPTH = 16;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic acc_en = 1'b0, acc_clear = 1'b0;
  logic [3:0] acc_addr = '0, rd_addr = '0;
  logic signed [SUM_W-1:0] acc_in [WORD];
  logic signed [SUM_W-1:0] rd_data [WORD];
  int model [DEPTH][WORD];
  bit init [DEPTH];
  int checks = 0, failures = 0;

  int_fmap_buffer #(.DEPTH(DEPTH)) dut (.*);

  initial begin
    foreach (acc_in[j]) acc_in[j] = '0;
    for (int op = 0; op < 2000; op++) begin
      int a;
      @(negedge clk);
      a = $urandom_range(DEPTH - 1);
      acc_en    = 1'b1;
      acc_addr  = 4'(a);
      acc_clear = !init[a] || ($urandom_range(9) == 0);
      foreach (acc_in[j]) acc_in[j] = SUM_W'($urandom_range(36) - 18);
      foreach (acc_in[j]) model[a][j] = (acc_clear ? 0 : model[a][j]) + int'(acc_in[j]);
      init[a] = 1'b1;
      @(posedge clk);
      #1 acc_en = 1'b0;
      rd_addr = 4'($urandom_range(DEPTH - 1));
      #1;
      if (init[rd_addr]) begin
        foreach (rd_data[j]) begin
          checks++;
          if (int'(rd_data[j]) != model[rd_addr][j]) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d [%0d] = %0d expected %0d", rd_addr, j, rd_data[j], model[rd_addr][j]);
          end
        end
      end
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
