// Self-checking test of the pipeline adder tree: a new random operand set
// every cycle (valid toggling at random), checking that each sum and its tag
// appear exactly LAT = clog2(P) cycles later. A second instance with P = 3
// checks the zero padding of a non-power-of-two tree.
module tb_pipeline_adder_tree;
  localparam int IN_W = 6;
  localparam int OUT_W = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic in_valid;
  logic [1:0] in_tag;
  logic signed [IN_W-1:0] din4 [4];
  logic signed [IN_W-1:0] din3 [3];
  logic out_valid4, out_valid3;
  logic [1:0] out_tag4, out_tag3;
  logic signed [OUT_W-1:0] sum4, sum3;

  pipeline_adder_tree #(.P(4), .IN_W(IN_W), .OUT_W(OUT_W), .TAG_W(2)) dut4 (
    .clk, .rst_n, .in_valid, .in_tag, .din(din4),
    .out_valid(out_valid4), .out_tag(out_tag4), .sum(sum4));
  pipeline_adder_tree #(.P(3), .IN_W(IN_W), .OUT_W(OUT_W), .TAG_W(2)) dut3 (
    .clk, .rst_n, .in_valid, .in_tag, .din(din3),
    .out_valid(out_valid3), .out_tag(out_tag3), .sum(sum3));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected values per cycle: index = cycle the operands were presented
  int exp4 [400], exp3 [400];
  logic expv [400];
  logic [1:0] expt [400];

  initial begin
    in_valid = 0; in_tag = '0;
    for (int i = 0; i < 4; i++) din4[i] = '0;
    for (int i = 0; i < 3; i++) din3[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 300; c++) begin
      @(negedge clk);
      // compare the outputs belonging to the operands of cycle c-2
      if (c >= 2) begin
        checks += 2;
        if (out_valid4 !== expv[c-2] || (expv[c-2] && (sum4 !== OUT_W'(exp4[c-2]) || out_tag4 !== expt[c-2]))) begin
          failures++; $display("FAIL P=4 cycle %0d: sum %0d exp %0d", c, sum4, exp4[c-2]);
        end
        if (out_valid3 !== expv[c-2] || (expv[c-2] && sum3 !== OUT_W'(exp3[c-2]))) begin
          failures++; $display("FAIL P=3 cycle %0d: sum %0d exp %0d", c, sum3, exp3[c-2]);
        end
      end
      in_valid = ($urandom % 4) != 0;
      in_tag = 2'($urandom);
      exp4[c] = 0; exp3[c] = 0;
      for (int i = 0; i < 4; i++) begin din4[i] = IN_W'($urandom); exp4[c] += int'(din4[i]); end
      for (int i = 0; i < 3; i++) begin din3[i] = IN_W'($urandom); exp3[c] += int'(din3[i]); end
      expv[c] = in_valid; expt[c] = in_tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
