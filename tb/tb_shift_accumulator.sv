// Self-checking test of the shift-accumulator: random groups of R = 4
// signed inputs, most significant weight first, with random idle cycles
// inside and between groups; result must equal sum 2^(R-1-i) * d_i and
// out_valid must pulse once, one cycle after the last input. In random
// groups the first (sign-bit) input is given with negate and must be
// subtracted.
module tb_shift_accumulator;
  localparam int IN_W = 8;
  localparam int ACC_W = 12;
  localparam int R = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, acc_rst, last, negate;
  logic signed [IN_W-1:0] din;
  logic signed [ACC_W-1:0] result;
  logic out_valid;
  int checks = 0, failures = 0;

  shift_accumulator #(.IN_W(IN_W), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    logic neg_group;
    in_valid = 0; acc_rst = 0; last = 0; negate = 0; din = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      expected = 0;
      neg_group = 1'($urandom);
      for (int i = 0; i < R; i++) begin
        // idle cycles must not disturb the accumulator
        while ($urandom % 3 == 0) begin
          @(negedge clk);
          in_valid = 0; din = IN_W'($urandom); acc_rst = 1'($urandom); last = 1'($urandom); negate = 1'($urandom);
          checks++;
          if (out_valid !== 1'b0) begin failures++; $display("FAIL spurious out_valid"); end
        end
        @(negedge clk);
        checks++;
        if (out_valid !== 1'b0) begin failures++; $display("FAIL spurious out_valid"); end
        in_valid = 1; acc_rst = (i == 0); last = (i == R - 1);
        negate = neg_group && (i == 0);
        din = IN_W'($urandom);
        expected = expected * 2 + (negate ? -int'(din) : int'(din));
      end
      @(negedge clk);
      in_valid = 0; acc_rst = 0; last = 0; negate = 0;
      checks += 2;
      if (out_valid !== 1'b1) begin failures++; $display("FAIL group %0d: no out_valid", g); end
      if (result !== ACC_W'(expected)) begin
        failures++; $display("FAIL group %0d: result %0d expected %0d", g, result, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
