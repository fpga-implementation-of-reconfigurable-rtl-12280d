// Pipeline shift-add tree (PSAT): combines the section results into y(n).
//
// Section q owns input bits qR .. qR+R-1, so its result carries the weight
// 2^(R*q) and y = sum_q 2^(R*q) * s_q. The tree adds neighbouring sections
// pairwise: at level j the right operand of each pair is shifted left by
// R*2^j bits before the addition, so after clog2(Q) levels node 0 holds the
// full weighted sum. Each level is one register stage: latency
// LAT = clog2(Q) cycles (one when Q is 1), one new set of inputs per cycle.
//
// The PSAT and its function follow the filter's architecture; the pairwise
// organisation and one register per level are this design's choice.
module pipeline_shift_add_tree #(
  parameter int Q     = 2,   // number of sections
  parameter int R     = 4,   // bits per section (shift between neighbours)
  parameter int IN_W  = 12,  // section result width (signed)
  parameter int OUT_W = 14,  // output width (signed)
  localparam int LV   = (Q > 1) ? $clog2(Q) : 0,
  localparam int LAT  = (LV > 0) ? LV : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  din [Q],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  localparam int NQ = 1 << LV;

  logic signed [OUT_W-1:0] node [LAT+1][NQ];
  logic                    vld  [LAT+1];

  always_comb begin
    for (int i = 0; i < NQ; i++) node[0][i] = (i < Q) ? OUT_W'(din[i]) : '0;
    vld[0] = in_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 1; l <= LAT; l++) begin
        vld[l] <= 1'b0;
        for (int i = 0; i < NQ; i++) node[l][i] <= '0;
      end
    end else begin
      for (int l = 1; l <= LAT; l++) begin
        vld[l] <= vld[l-1];
        for (int i = 0; i < NQ; i++) begin
          if (LV == 0) node[l][i] <= node[l-1][i];
          else if (i < (NQ >> l))
            node[l][i] <= node[l-1][2*i] + (node[l-1][2*i+1] <<< (R << (l-1)));
          else node[l][i] <= '0;
        end
      end
    end
  end

  assign y         = node[LAT][0];
  assign out_valid = vld[LAT];

endmodule
