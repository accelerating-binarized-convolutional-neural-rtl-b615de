// Unit test of the weight buffer at its defaults (F_IN = 8, 64 rows of 512 bits):
// loads shaped like a binary conv map (64 rows of 2 beats), a dense neuron (16 rows
// of 8 beats) and the first layer (1 row of 1 beat), from a randomly stalling
// stream. Checks the batch-norm word, every row read back (one-cycle latency),
// that all the requested beats are taken and that ready drops afterwards.
module tb_weight_buffer;
  import bnn_pkg::*;

  localparam int F_IN = F_IN_DEF;
  localparam int ROWS = 512 / F_IN;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic load = 1'b0, loaded, s_valid, s_ready;
  logic [$clog2(ROWS):0] load_rows = '0;
  logic [$clog2(F_IN):0] load_bpr = '0;
  logic [WORD-1:0] s_data;
  logic [$clog2(ROWS)-1:0] rd_addr = '0;
  logic [F_IN*WORD-1:0] rd_data;
  bn_t bn;
  int checks = 0, failures = 0;

  weight_buffer dut (.*);

  logic [WORD-1:0] q [$];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin s_valid <= 1'b0; s_data <= '0; end
    else begin
      if (s_valid && s_ready) void'(q.pop_front());
      if (!s_valid || s_ready) begin
        if (q.size() > 0 && $urandom_range(99) >= 40) begin
          s_valid <= 1'b1; s_data <= q[0];
        end else s_valid <= 1'b0;
      end
    end
  end

  task automatic do_load(int rows, int bpr);
    logic [WORD-1:0] bnw;
    logic [F_IN*WORD-1:0] exp_rows [ROWS];
    bnw = {$urandom, $urandom};
    q.push_back(bnw);
    for (int r = 0; r < rows; r++) begin
      exp_rows[r] = '0;
      for (int b = 0; b < bpr; b++) begin
        logic [WORD-1:0] w;
        w = {$urandom, $urandom};
        exp_rows[r][b*WORD +: WORD] = w;
        q.push_back(w);
      end
    end
    @(negedge clk);
    load = 1'b1; load_rows = 7'(rows); load_bpr = 4'(bpr);
    @(negedge clk);
    load = 1'b0;
    while (!loaded) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (q.size() != 0 || s_ready) begin
      failures++;
      $display("FAIL %0d beats left, ready=%b", q.size(), s_ready);
    end
    checks++;
    if (bn !== bn_from_word(bnw)) begin failures++; $display("FAIL bn word"); end
    for (int r = 0; r < rows; r++) begin
      rd_addr = 6'(r);
      @(posedge clk);
      #1;
      checks++;
      if (rd_data !== exp_rows[r]) begin failures++; $display("FAIL row %0d", r); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    do_load(64, 2);
    do_load(16, 8);
    do_load(1, 1);
    do_load(64, 8);
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
