// Self-checking test of one filter section (N = 16, M = 4, R = 4) with
// behavioural tables in the testbench filled with random words. The test
// plays the controller: for every sample it loads the R-bit slice, then runs
// R bit slots with acc_rst in the first and last in the final one, and
// checks result = sum_j 2^j * sum_p T_p[address of bit j] against a model
// of the sample history, and that result_valid comes LAT_PAT+1 = 3 cycles
// after the last slot.
module tb_da_section;
  localparam int N = 16;
  localparam int M = 4;
  localparam int R = 4;
  localparam int H_W = 4;
  localparam int P = N / M;
  localparam int LUT_W = H_W + 2;
  localparam int SEC_W = LUT_W + 2 + R;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load, bit_valid, acc_rst, last, result_valid;
  logic [R-1:0] din;
  logic [1:0] bit_idx;
  logic [M-1:0] lut_addr [P];
  logic signed [LUT_W-1:0] lut_data [P];
  logic signed [SEC_W-1:0] result;
  int checks = 0, failures = 0;

  da_section #(.N(N), .M(M), .R(R), .H_W(H_W)) dut (.*);

  // behavioural tables: combinational read like the real ones
  logic signed [LUT_W-1:0] tbl [P][2**M];
  always_comb for (int p = 0; p < P; p++) lut_data[p] = tbl[p][lut_addr[p]];

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [R-1:0] hist [N];
  int cycle = 0, last_cycle, valid_cycle;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (result_valid) valid_cycle = cycle;
  end

  function automatic int model();
    int y = 0;
    for (int j = 0; j < R; j++) begin
      int s = 0;
      for (int p = 0; p < P; p++) begin
        int a = 0;
        for (int m = 0; m < M; m++) a |= int'(hist[p*M + m][j]) << m;
        s += int'(tbl[p][a]);
      end
      y += s * (1 << j);
    end
    return y;
  endfunction

  initial begin
    int expected;
    load = 0; din = '0; bit_valid = 0; acc_rst = 0; last = 0; bit_idx = '0;
    for (int p = 0; p < P; p++) for (int a = 0; a < 2**M; a++) tbl[p][a] = LUT_W'($urandom);
    for (int k = 0; k < N; k++) hist[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 120; s++) begin
      @(negedge clk);
      load = 1; din = R'($urandom);
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = din;
      expected = model();
      for (int r = 0; r < R; r++) begin
        @(negedge clk);
        load = 0; bit_valid = 1; bit_idx = 2'(r); acc_rst = (r == 0); last = (r == R - 1);
        if (r == R - 1) last_cycle = cycle;
      end
      @(negedge clk);
      bit_valid = 0; acc_rst = 0; last = 0;
      repeat (3) @(negedge clk);
      checks += 2;
      if (result !== SEC_W'(expected)) begin
        failures++; $display("FAIL sample %0d: result %0d expected %0d", s, result, expected);
      end
      if (valid_cycle - last_cycle != 3) begin
        failures++; $display("FAIL sample %0d: latency %0d", s, valid_cycle - last_cycle);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
