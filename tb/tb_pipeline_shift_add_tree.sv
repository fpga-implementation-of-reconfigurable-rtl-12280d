// Self-checking test of the pipeline shift-add tree with Q = 2 (one level)
// and Q = 4 (two levels): random signed section results every cycle; the
// output must be sum_q 2^(R*q) * s_q, clog2(Q) cycles later.
module tb_pipeline_shift_add_tree;
  localparam int R = 4;
  localparam int IN_W = 10;
  localparam int OUT_W = 24;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid;
  logic signed [IN_W-1:0] d2 [2];
  logic signed [IN_W-1:0] d4 [4];
  logic v2, v4;
  logic signed [OUT_W-1:0] y2, y4;
  int checks = 0, failures = 0;

  pipeline_shift_add_tree #(.Q(2), .R(R), .IN_W(IN_W), .OUT_W(OUT_W)) dut2 (
    .clk, .rst_n, .in_valid, .din(d2), .out_valid(v2), .y(y2));
  pipeline_shift_add_tree #(.Q(4), .R(R), .IN_W(IN_W), .OUT_W(OUT_W)) dut4 (
    .clk, .rst_n, .in_valid, .din(d4), .out_valid(v4), .y(y4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint e2 [400], e4 [400];
  logic ev [400];

  initial begin
    in_valid = 0;
    for (int i = 0; i < 2; i++) d2[i] = '0;
    for (int i = 0; i < 4; i++) d4[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      if (c >= 1) begin
        checks++;
        if (v2 !== ev[c-1] || (ev[c-1] && y2 !== OUT_W'(e2[c-1]))) begin
          failures++; $display("FAIL Q=2 cycle %0d: y %0d expected %0d", c, y2, e2[c-1]);
        end
      end
      if (c >= 2) begin
        checks++;
        if (v4 !== ev[c-2] || (ev[c-2] && y4 !== OUT_W'(e4[c-2]))) begin
          failures++; $display("FAIL Q=4 cycle %0d: y %0d expected %0d", c, y4, e4[c-2]);
        end
      end
      in_valid = ($urandom % 4) != 0;
      ev[c] = in_valid;
      e2[c] = 0; e4[c] = 0;
      for (int q = 0; q < 2; q++) begin d2[q] = IN_W'($urandom); e2[c] += longint'(d2[q]) * (64'sd1 <<< (R*q)); end
      for (int q = 0; q < 4; q++) begin d4[q] = IN_W'($urandom); e4[c] += longint'(d4[q]) * (64'sd1 <<< (R*q)); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
