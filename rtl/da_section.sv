// One section of the DA filter: sample register, table addressing,
// pipeline adder tree and shift-accumulator.
//
// Section q owns bits qR .. qR+R-1 of every L-bit input sample. Its sample
// register keeps that R-bit slice of the last N samples. In time slot r the
// section takes bit (R-1-r) of the slice of every stored sample, i.e. the
// most significant bit first, and uses the bits of tap group p
// (taps pM .. pM+M-1, tap pM+m on address bit m) as the address of table p.
// The P table words that come back are the partial inner products
// S_p = sum_m h(pM+m) * bit(x(n-pM-m)); the adder tree sums them and the
// shift-accumulator weights the R slot sums by 2^bit. After the R slots,
// result holds sum_{j<R} 2^j * sum_k h(k) * bit_{qR+j}(x(n-k)).
// With NEG_MSB set (the section that owns the sign bit of two's-complement
// samples) the sum of slot 0, the top bit, is subtracted instead of added,
// giving the top bit its weight -2^(R-1).
//
// The tables themselves live outside the section (one dual-port table
// serves two sections); lut_addr goes out and lut_data comes back in the
// same cycle.
// Timing: result_valid pulses LAT_PAT + 1 cycles after the slot with last
// (LAT_PAT = clog2(P), at least 1), i.e. one result per R slots.
// Structure and signal flow follow the filter's architecture; the bit order
// and the pipeline depths are this design's choices.
module da_section
  import da_fir_pkg::*;
#(
  parameter int N   = 16,  // taps
  parameter int M   = 4,   // taps per table
  parameter int R   = 4,   // bits per section
  parameter int H_W = 4,   // coefficient width
  parameter bit NEG_MSB = 1'b0,  // top bit of the slice has negative weight
  localparam int P      = N / M,
  localparam int RW     = (R > 1) ? $clog2(R) : 1,
  localparam int LUT_W  = lut_width(H_W, M),
  localparam int PAT_W  = pat_width(H_W, M, P),
  localparam int SEC_W  = section_width(H_W, M, P, R)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic [R-1:0]            din,
  input  logic                    bit_valid,
  input  logic [RW-1:0]           bit_idx,
  input  logic                    acc_rst,
  input  logic                    last,
  output logic [M-1:0]            lut_addr [P],
  input  logic signed [LUT_W-1:0] lut_data [P],
  output logic signed [SEC_W-1:0] result,
  output logic                    result_valid
);

  logic [N-1:0]            taps;
  logic [RW-1:0]           bit_sel;
  logic                    pat_valid;
  logic [1:0]              pat_tag;
  logic signed [PAT_W-1:0] pat_sum;

  assign bit_sel = RW'(R - 1) - bit_idx;

  sipo_shift_register #(.N(N), .R(R)) u_sipo (
    .clk, .rst_n, .load, .din, .bit_sel, .taps
  );

  always_comb begin
    for (int p = 0; p < P; p++) lut_addr[p] = taps[p*M +: M];
  end

  pipeline_adder_tree #(.P(P), .IN_W(LUT_W), .OUT_W(PAT_W), .TAG_W(2)) u_pat (
    .clk, .rst_n,
    .in_valid (bit_valid),
    .in_tag   ({acc_rst, last}),
    .din      (lut_data),
    .out_valid(pat_valid),
    .out_tag  (pat_tag),
    .sum      (pat_sum)
  );

  shift_accumulator #(.IN_W(PAT_W), .ACC_W(SEC_W)) u_acc (
    .clk, .rst_n,
    .in_valid (pat_valid),
    .acc_rst  (pat_tag[1]),
    .last     (pat_tag[0]),
    .negate   (NEG_MSB && pat_tag[1]),
    .din      (pat_sum),
    .result,
    .out_valid(result_valid)
  );

endmodule
