// Unit test of the layer controller with a five-layer table (every kind) and model
// compute units that finish after a random number of cycles. Checks that each
// layer starts the unit of its kind with its descriptor, that the data-buffer
// selection alternates, that done and busy come at the right time, and that the
// class is the first index of the largest of the scores streamed in the last layer.
// Two runs back to back.
module tb_bnn_controller;
  import bnn_pkg::*;

  localparam int NL = 5;
  localparam layer_t [NL-1:0] T = {
    mk_layer(L_BINFC,    512, 10,  1, 1'b0, 1'b1),
    mk_layer(L_BINFC,    512, 512, 1, 1'b0, 1'b0),
    mk_layer(L_BINCONV,  16,  32,  8, 1'b1, 1'b0),
    mk_layer(L_BINCONV,  16,  16, 32, 1'b0, 1'b0),
    mk_layer(L_FPCONV,   3,   16, 32, 1'b0, 1'b0)
  };

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0, busy, done, fp_start, bc_start, fc_start, unit_done = 1'b0, in_sel;
  layer_t cfg;
  logic score_valid = 1'b0;
  logic [13:0] score_idx = '0, class_idx;
  logic signed [SUM_W-1:0] score = '0, class_score;
  int checks = 0, failures = 0;

  bnn_controller #(.NL(NL), .LAYERS(T)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 2; run++) begin
      int best, bi;
      @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int li = 0; li < NL; li++) begin
        int guard;
        guard = 0;
        while (!(fp_start || bc_start || fc_start) && guard < 20) begin
          @(negedge clk); guard++;
        end
        check(32'(fp_start) + 32'(bc_start) + 32'(fc_start) == 1, "one unit started");
        check(fp_start == (T[li].kind == L_FPCONV) && bc_start == (T[li].kind == L_BINCONV) &&
              fc_start == (T[li].kind == L_BINFC), "unit of the layer's kind");
        check(cfg == T[li], "layer descriptor");
        check(in_sel == 1'(li % 2), "buffer selection");
        check(busy, "busy while running");
        repeat ($urandom_range(1, 8)) @(negedge clk);
        if (li == NL - 1) begin
          best = 0; bi = 0;
          for (int s = 0; s < 10; s++) begin
            int v;
            v = $urandom_range(40) - 20;
            if (s == 0 || v > best) begin best = v; bi = s; end
            score_valid = 1'b1; score_idx = 14'(s); score = SUM_W'(v);
            @(negedge clk);
            score_valid = 1'b0;
          end
        end
        unit_done = 1'b1;
        @(negedge clk);
        unit_done = 1'b0;
        if (li == NL - 1) check(done, "done after the last layer");
        else              check(!done, "no done before the last layer");
      end
      @(negedge clk);
      check(!busy, "idle after done");
      check(class_idx == 14'(bi), "class is the argmax");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
