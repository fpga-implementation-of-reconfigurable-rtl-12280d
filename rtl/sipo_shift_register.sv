// Serial-in parallel-out sample register of one filter section.
//
// A section handles R of the L bits of every input sample. This register
// keeps that R-bit slice of the N most recent samples: word 0 is x(n),
// word k is x(n-k). Samples enter one at a time (serial in) when load is
// high; all N words shift by one place and the oldest is dropped.
// The parallel output gives, for every tap k, bit bit_sel of word k, so that
// one cycle presents bit r of all N delayed samples at once (parallel out).
// Bit index 0 is the least significant bit of the slice.
//
// Timing: load is sampled on the rising edge; taps is combinational from
// the stored words and bit_sel. Reset clears the history to zero samples,
// which is this design's choice.
module sipo_shift_register #(
  parameter int N = 16,  // taps
  parameter int R = 4,   // bits per section
  localparam int RW = (R > 1) ? $clog2(R) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic [R-1:0]               din,
  input  logic [RW-1:0]              bit_sel,
  output logic [N-1:0]               taps
);

  logic [R-1:0] word_q [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) word_q[k] <= '0;
    end else if (load) begin
      word_q[0] <= din;
      for (int k = 1; k < N; k++) word_q[k] <= word_q[k-1];
    end
  end

  always_comb begin
    for (int k = 0; k < N; k++) taps[k] = word_q[k][bit_sel];
  end

endmodule
