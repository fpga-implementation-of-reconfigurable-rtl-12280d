// Shift-accumulator of one filter section.
//
// A section receives, over R consecutive valid cycles, the adder-tree sums
// for the R bit positions it owns, most significant bit first. Each valid
// cycle the accumulator doubles its content and adds the new sum, so after
// R cycles it holds sum_r 2^r * S_r, the section's share of the filter
// output. acc_rst, given with the first sum of a sample, makes the cycle
// start from zero instead of the old content, ready for the next output.
// last marks the final sum; the completed value is then copied to result
// and out_valid pulses for one cycle. negate subtracts the input instead of
// adding it; it is used for the sign bit of two's-complement samples,
// whose weight is negative.
//
// Timing: one cycle from the last input to result. The clearing signal
// acc_rst and the R-cycle shift-accumulation follow the filter's
// architecture; processing the most significant bit first is this design's
// choice.
module shift_accumulator #(
  parameter int IN_W  = 8,   // input width (signed)
  parameter int ACC_W = 12   // accumulator width (signed)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    acc_rst,
  input  logic                    last,
  input  logic                    negate,
  input  logic signed [IN_W-1:0]  din,
  output logic signed [ACC_W-1:0] result,
  output logic                    out_valid
);

  logic signed [ACC_W-1:0] acc_q, acc_d, term;

  always_comb begin
    term  = negate ? -ACC_W'(din) : ACC_W'(din);
    acc_d = (acc_rst ? ACC_W'(0) : (acc_q <<< 1)) + term;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      result    <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && last;
      if (in_valid) begin
        acc_q <= acc_d;
        if (last) result <= acc_d;
      end
    end
  end

endmodule
