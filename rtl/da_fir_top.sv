// Reconfigurable distributed-arithmetic FIR filter (top level).
//
// y(n) = sum_{k=0}^{N-1} h(k) x(n-k), x unsigned L-bit (two's complement
// when X_SIGNED is set), h signed H_W-bit, computed without multipliers.
// The L sample bits are split into Q sections of R bits (L = R*Q); the N taps into P groups of M taps (N = P*M). Each
// tap group has a look-up table of the 2^M subset sums of its coefficients.
// In each of R time slots every section reads one bit of each stored sample,
// addresses its P tables with those bits, adds the P table words in a
// pipeline adder tree and shift-accumulates the slot sums. After R slots the
// pipeline shift-add tree weights section q by 2^(R*q) and adds the
// sections to form y(n). So the filter takes one sample and produces one
// output every R cycles, with Q*P table reads per cycle.
//
// The tables are dual-port distributed RAMs. Sections 2j and 2j+1 read the
// same table through its two ports, which halves the number of tables; with
// an odd Q the last section has a table of its own. The tables are
// rewritable: coefficients written through the coef_* port take effect when
// cfg_start is pulsed; the loader then waits for the running sample to
// leave the pipeline, holds off new samples and rewrites all tables in 2^M
// cycles (cfg_busy high). The sample history survives a reload.
//
// Interface
//   x_valid/x_ready/x_in : one sample per handshake (at most one per R cycles)
//   y_valid/y_out        : one output per accepted sample, exact full width
//   coef_we/coef_idx/coef_data/coef_ready : coefficient register writes
//   cfg_start/cfg_busy/cfg_done : table reload; cfg_done pulses when it ends
// Latency: y_valid comes R + clog2(P) + 1 + clog2(Q) cycles after the
// handshake cycle of x(n) (each clog2 at least 1): 8 cycles at the defaults.
// With X_SIGNED set, the partial sum of the sign bit is subtracted rather
// than added (the -A_0 term of the two's-complement DA expansion); the
// default is unsigned samples.
// The section/table/tree organisation follows the filter's architecture.
// The tap count N, the coefficient width, the handshakes, the bit order
// and the full-precision output are this design's choices.
module da_fir_top
  import da_fir_pkg::*;
#(
  parameter int N   = 16,  // taps
  parameter int M   = 4,   // taps per look-up table
  parameter int L   = 8,   // input sample width
  parameter int Q   = 2,   // sections
  parameter int H_W = 4,   // coefficient width
  parameter bit X_SIGNED = 1'b0,  // samples are two's complement
  localparam int P       = N / M,
  localparam int R       = L / Q,
  localparam int KW      = (N > 1) ? $clog2(N) : 1,
  localparam int RW      = (R > 1) ? $clog2(R) : 1,
  localparam int LUT_W   = lut_width(H_W, M),
  localparam int SEC_W   = section_width(H_W, M, P, R),
  localparam int Y_W     = output_width(H_W, N, L),
  localparam int LAT_PAT = (P > 1) ? $clog2(P) : 1,
  localparam int LAT_PST = (Q > 1) ? $clog2(Q) : 1,
  localparam int NT      = (Q + 1) / 2   // tables per tap group
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // samples
  input  logic                  x_valid,
  output logic                  x_ready,
  input  logic [L-1:0]          x_in,
  // outputs
  output logic                  y_valid,
  output logic signed [Y_W-1:0] y_out,
  // coefficients
  input  logic                  coef_we,
  input  logic [KW-1:0]         coef_idx,
  input  logic signed [H_W-1:0] coef_data,
  output logic                  coef_ready,
  input  logic                  cfg_start,
  output logic                  cfg_busy,
  output logic                  cfg_done
);

  // Default sizes (L = 8, N = 16) satisfy these; other sizes must too.
  initial begin
    assert (N % M == 0) else $error("N must be a multiple of M");
    assert (L % Q == 0) else $error("L must be a multiple of Q");
  end

  logic          load, bit_valid, acc_rst, last, idle, hold;
  logic [RW-1:0] bit_idx;

  logic                    lut_we;
  logic [M-1:0]            lut_waddr;
  logic signed [LUT_W-1:0] lut_wdata [P];

  logic [M-1:0]            sec_addr [Q][P];
  logic signed [LUT_W-1:0] sec_data [Q][P];
  logic signed [SEC_W-1:0] sec_result [Q];
  logic                    sec_valid [Q];

  da_controller #(.R(R), .DRAIN(LAT_PAT + 1 + LAT_PST)) u_ctrl (
    .clk, .rst_n, .x_valid, .x_ready, .hold, .load,
    .bit_valid, .bit_idx, .acc_rst, .last, .idle
  );

  lut_loader #(.N(N), .M(M), .H_W(H_W)) u_loader (
    .clk, .rst_n, .coef_we, .coef_idx, .coef_data, .coef_ready,
    .start(cfg_start), .filter_idle(idle), .hold, .busy(cfg_busy), .done(cfg_done),
    .lut_we, .lut_waddr, .lut_wdata
  );

  // sections
  for (genvar q = 0; q < Q; q++) begin : g_sec
    // the sign bit of a signed sample is the top bit of the last section
    da_section #(.N(N), .M(M), .R(R), .H_W(H_W), .NEG_MSB(X_SIGNED && (q == Q - 1))) u_sec (
      .clk, .rst_n, .load,
      .din         (x_in[q*R +: R]),
      .bit_valid, .bit_idx, .acc_rst, .last,
      .lut_addr    (sec_addr[q]),
      .lut_data    (sec_data[q]),
      .result      (sec_result[q]),
      .result_valid(sec_valid[q])
    );
  end

  // shared dual-port tables: table (p, j) serves sections 2j and 2j+1
  for (genvar p = 0; p < P; p++) begin : g_grp
    for (genvar j = 0; j < NT; j++) begin : g_tbl
      localparam int QA = 2 * j;
      localparam int QB = (2 * j + 1 < Q) ? 2 * j + 1 : 2 * j;
      logic signed [LUT_W-1:0] rd_b;
      dual_port_dram #(.AW(M), .DW(LUT_W)) u_dram (
        .clk,
        .we     (lut_we),
        .waddr  (lut_waddr),
        .wdata  (lut_wdata[p]),
        .addr_a (sec_addr[QA][p]),
        .rdata_a(sec_data[QA][p]),
        .addr_b (sec_addr[QB][p]),
        .rdata_b(rd_b)
      );
      if (QB != QA) begin : g_b
        assign sec_data[QB][p] = rd_b;
      end
    end
  end

  pipeline_shift_add_tree #(.Q(Q), .R(R), .IN_W(SEC_W), .OUT_W(Y_W)) u_psat (
    .clk, .rst_n,
    .in_valid (sec_valid[0]),
    .din      (sec_result),
    .out_valid(y_valid),
    .y        (y_out)
  );

endmodule
