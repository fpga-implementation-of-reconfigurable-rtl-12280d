// Coefficient store and look-up-table loader (run-time reconfiguration).
//
// The filter's coefficients can change while it runs. The host writes
// coefficients h(k) into this block's register file (coef_we/coef_idx/
// coef_data, one per cycle, while coef_ready is high) and then pulses start.
// The loader waits until the filter is idle (no sample in flight), holds
// off new samples, and rewrites all P look-up tables in 2^M cycles: in cycle
// a it writes, into every table p at address a, the sum of the coefficients
// h(pM+m) whose address bit m is set. All P tables are written in parallel,
// one address per cycle. The stored sample history is untouched, so the
// next output already uses the new coefficients on the old samples.
// After reset the coefficients are zero and the tables are filled once
// automatically, so no table is ever read before it is written.
//
// Timing: start -> waits for idle -> 2^M write cycles -> busy falls.
// done pulses in the cycle after the last write.
// The table contents (all subset sums of M coefficients) follow the filter's
// architecture; the register file, the start/busy handshake and the
// automatic fill after reset are this design's choices.
module lut_loader
  import da_fir_pkg::*;
#(
  parameter int N   = 16,  // taps
  parameter int M   = 4,   // taps per table (address bits)
  parameter int H_W = 4,   // coefficient width (signed)
  localparam int P      = N / M,
  localparam int LUT_W  = lut_width(H_W, M),
  localparam int KW     = (N > 1) ? $clog2(N) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    coef_we,
  input  logic [KW-1:0]           coef_idx,
  input  logic signed [H_W-1:0]   coef_data,
  output logic                    coef_ready,
  input  logic                    start,
  input  logic                    filter_idle,
  output logic                    hold,
  output logic                    busy,
  output logic                    done,
  output logic                    lut_we,
  output logic [M-1:0]            lut_waddr,
  output logic signed [LUT_W-1:0] lut_wdata [P]
);

  logic signed [H_W-1:0] h_q [N];
  logic                  pending_q, writing_q;
  logic [M-1:0]          addr_q;

  assign coef_ready = !writing_q;
  assign hold       = pending_q || writing_q;
  assign busy       = hold;
  assign lut_we     = writing_q;
  assign lut_waddr  = addr_q;

  // subset sums for the current address, one per table
  always_comb begin
    for (int p = 0; p < P; p++) begin
      lut_wdata[p] = '0;
      for (int m = 0; m < M; m++)
        if (addr_q[m]) lut_wdata[p] = lut_wdata[p] + LUT_W'(h_q[p*M + m]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) h_q[k] <= '0;
      pending_q <= 1'b1;
      writing_q <= 1'b0;
      addr_q    <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (coef_we && coef_ready) h_q[coef_idx] <= coef_data;
      if (writing_q) begin
        addr_q <= addr_q + 1'b1;
        if (addr_q == '1) begin
          writing_q <= 1'b0;
          done      <= 1'b1;
        end
      end else if (pending_q && filter_idle) begin
        pending_q <= 1'b0;
        writing_q <= 1'b1;
        addr_q    <= '0;
      end
      if (start) pending_q <= 1'b1;
    end
  end

endmodule
