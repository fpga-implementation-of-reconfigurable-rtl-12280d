// Self-checking test of the coefficient store and table loader (N = 16,
// M = 4): after reset it must fill the tables with zeros on its own; after
// random coefficient writes and start it must wait for filter_idle, then
// write all 2^M addresses of every table in 2^M consecutive cycles with the
// subset sums of that table's coefficients, holding the filter throughout.
module tb_lut_loader;
  localparam int N = 16;
  localparam int M = 4;
  localparam int H_W = 4;
  localparam int P = N / M;
  localparam int LUT_W = H_W + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we, coef_ready, start, filter_idle, hold, busy, done, lut_we;
  logic [3:0] coef_idx;
  logic signed [H_W-1:0] coef_data;
  logic [M-1:0] lut_waddr;
  logic signed [LUT_W-1:0] lut_wdata [P];
  int checks = 0, failures = 0;

  lut_loader #(.N(N), .M(M), .H_W(H_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h [N];
  int tbl [P][2**M];
  int nwrites, first_write, done_cycle, cycle;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (lut_we) begin
      for (int p = 0; p < P; p++) tbl[p][lut_waddr] = int'(lut_wdata[p]);
      if (nwrites == 0) first_write = cycle;
      nwrites++;
    end
    if (done) done_cycle = cycle;
  end

  task automatic check_tables();
    for (int p = 0; p < P; p++)
      for (int a = 0; a < 2**M; a++) begin
        int e = 0;
        for (int m = 0; m < M; m++) if (a[m]) e += h[p*M + m];
        checks++;
        if (tbl[p][a] != e) begin
          failures++; $display("FAIL table %0d addr %0d: %0d expected %0d", p, a, tbl[p][a], e);
        end
      end
  endtask

  task automatic reload(input int idle_delay);
    nwrites = 0;
    @(negedge clk); start = 1; filter_idle = 0;
    @(negedge clk); start = 0;
    checks++;
    if (!hold) begin failures++; $display("FAIL hold not raised after start"); end
    repeat (idle_delay) begin
      @(negedge clk);
      checks++;
      if (lut_we) begin failures++; $display("FAIL wrote tables while filter busy"); end
    end
    filter_idle = 1;
    wait (done_cycle > first_write && nwrites == 2**M);
    @(negedge clk);
    checks += 3;
    if (done_cycle - first_write != 2**M) begin failures++; $display("FAIL reload took %0d cycles", done_cycle - first_write); end
    if (hold || busy) begin failures++; $display("FAIL hold still high after reload"); end
    if (!coef_ready) begin failures++; $display("FAIL coef_ready low after reload"); end
    check_tables();
  endtask

  initial begin
    coef_we = 0; coef_idx = '0; coef_data = '0; start = 0; filter_idle = 0;
    cycle = 0; nwrites = 0; first_write = 0; done_cycle = 0;
    for (int k = 0; k < N; k++) h[k] = 0;
    for (int p = 0; p < P; p++) for (int a = 0; a < 2**M; a++) tbl[p][a] = 99;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // automatic fill after reset, once the filter reports idle
    repeat (3) @(negedge clk);
    checks++;
    if (!hold || lut_we) begin failures++; $display("FAIL reset fill did not wait for idle"); end
    filter_idle = 1;
    wait (nwrites == 2**M);
    repeat (2) @(negedge clk);
    check_tables();
    for (int round = 0; round < 6; round++) begin
      for (int i = 0; i < N + 4; i++) begin
        @(negedge clk);
        coef_we = 1; coef_idx = 4'($urandom); coef_data = H_W'($urandom);
        h[coef_idx] = int'(coef_data);
      end
      @(negedge clk); coef_we = 0;
      reload(round * 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
