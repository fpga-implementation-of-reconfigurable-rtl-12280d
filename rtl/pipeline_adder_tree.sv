// Pipeline adder tree (PAT) of one filter section.
//
// Adds the P partial inner products that the section's P look-up tables
// return in one cycle. The inputs are padded with zeros to the next power of
// two and summed pairwise, one tree level per clock cycle, so the latency is
// LAT = clog2(P) cycles (one cycle when P is 1) and a new set of inputs can
// enter every cycle. A valid bit and a TAG_W-bit side-band tag travel with
// the data so that control signals stay aligned with the sum.
//
// That the tree is pipelined follows the filter's architecture; one register
// per level is this design's choice. Inputs are sign-extended to OUT_W,
// which the caller sizes so that no sum overflows.
module pipeline_adder_tree #(
  parameter int P     = 4,   // number of operands
  parameter int IN_W  = 6,   // operand width (signed)
  parameter int OUT_W = 8,   // result width (signed)
  parameter int TAG_W = 2,   // side-band bits carried with the data
  localparam int LV   = (P > 1) ? $clog2(P) : 0,
  localparam int LAT  = (LV > 0) ? LV : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [TAG_W-1:0]        in_tag,
  input  logic signed [IN_W-1:0]  din [P],
  output logic                    out_valid,
  output logic [TAG_W-1:0]        out_tag,
  output logic signed [OUT_W-1:0] sum
);

  localparam int NP = 1 << LV;

  // level 0 is combinational (sign extension and padding); levels 1..LAT are registers
  logic signed [OUT_W-1:0] node [LAT+1][NP];
  logic                    vld  [LAT+1];
  logic [TAG_W-1:0]        tag  [LAT+1];

  always_comb begin
    for (int i = 0; i < NP; i++) node[0][i] = (i < P) ? OUT_W'(din[i]) : '0;
    vld[0] = in_valid;
    tag[0] = in_tag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l <= LAT; l++) begin
        vld[l] <= 1'b0;
        tag[l] <= '0;
        for (int i = 0; i < NP; i++) node[l][i] <= '0;
      end
    end else begin
      for (int l = 1; l <= LAT; l++) begin
        vld[l] <= vld[l-1];
        tag[l] <= tag[l-1];
        for (int i = 0; i < NP; i++) begin
          if (LV == 0) node[l][i] <= node[l-1][i];
          else if (i < (NP >> l)) node[l][i] <= node[l-1][2*i] + node[l-1][2*i+1];
          else node[l][i] <= '0;
        end
      end
    end
  end

  assign sum       = node[LAT][0];
  assign out_valid = vld[LAT];
  assign out_tag   = tag[LAT];

endmodule
