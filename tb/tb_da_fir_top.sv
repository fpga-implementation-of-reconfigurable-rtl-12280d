// End-to-end test of the reconfigurable DA FIR filter at its default size
// (N = 16 taps, M = 4, L = 8-bit samples, Q = 2 sections, 4-bit coefficients).
//
// A reference model keeps the sample history and the coefficients that the
// tables currently hold, computes y(n) = sum h(k) x(n-k) for every accepted
// sample and checks each output's value and its latency (8 cycles from the
// sample handshake). The stimulus runs through these phases:
//   - back-to-back samples (x_valid always high): one sample and one output
//     every R = 4 cycles, checked;
//   - random gaps in x_valid;
//   - coefficient rewrites and table reloads while samples keep arriving,
//     so the loader must stall the input and the history must survive;
//   - full-scale values (x = 255 with all coefficients -8, then 7) to
//     check that no intermediate sum overflows.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_da_fir_top;
  localparam int N = 16;
  localparam int M = 4;
  localparam int L = 8;
  localparam int Q = 2;
  localparam int H_W = 4;
  localparam int R = L / Q;
  localparam int Y_W = H_W + $clog2(N) + L;
  localparam int LATENCY = R + $clog2(N / M) + 1 + $clog2(Q);

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid, x_ready, y_valid, coef_we, coef_ready, cfg_start, cfg_busy, cfg_done;
  logic [L-1:0] x_in;
  logic signed [Y_W-1:0] y_out;
  logic [$clog2(N)-1:0] coef_idx;
  logic signed [H_W-1:0] coef_data;
  int checks = 0, failures = 0;

  da_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  int h_reg [N];      // coefficient registers as written
  int h_tbl [N];      // coefficients the tables hold
  int hist [N];
  int exp_y [$];
  int exp_t [$];
  int cycle = 0, n_out = 0, last_out_cycle = -1;
  int n_back_to_back = 0, n_gap_accept = 0, n_reload_stall = 0, n_reload = 0, n_extreme = 0;
  int n_rate_checks = 0;
  logic extreme_phase = 1'b0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (coef_we && coef_ready) h_reg[coef_idx] = int'(coef_data);
      if (x_valid && x_ready) begin
        int y;
        y = 0;
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(x_in);
        for (int k = 0; k < N; k++) y += h_tbl[k] * hist[k];
        exp_y.push_back(y);
        exp_t.push_back(cycle);
        if (dut.u_ctrl.last) n_back_to_back++; else n_gap_accept++;
        if (extreme_phase) n_extreme++;
      end
      if (x_valid && !x_ready && cfg_busy) n_reload_stall++;
      if (cfg_done) n_reload++;
      // the tables take the register contents when the rewrite starts
      if (dut.lut_we && dut.lut_waddr == '0)
        for (int k = 0; k < N; k++) h_tbl[k] = h_reg[k];
      if (y_valid) begin
        checks += 2;
        if (exp_y.size() == 0) begin
          failures++; $display("FAIL output with no sample pending");
        end else begin
          int e, t;
          e = exp_y.pop_front();
          t = exp_t.pop_front();
          if (y_out !== Y_W'(e)) begin
            failures++; $display("FAIL output %0d: y %0d expected %0d", n_out, y_out, e);
          end
          if (cycle - t != LATENCY) begin
            failures++; $display("FAIL output %0d: latency %0d expected %0d", n_out, cycle - t, LATENCY);
          end
        end
        // with back-to-back samples outputs come exactly every R cycles
        if (last_out_cycle >= 0 && cycle - last_out_cycle < R) begin
          failures++; $display("FAIL outputs %0d cycles apart", cycle - last_out_cycle);
        end
        if (last_out_cycle >= 0 && cycle - last_out_cycle == R) n_rate_checks++;
        last_out_cycle = cycle;
        n_out++;
      end
      if (cfg_busy && dut.lut_we && !dut.idle) begin
        failures++; $display("FAIL tables rewritten while a sample is in flight");
      end
    end
  end

  // ---------------- stimulus ----------------
  int x_mode = 0;        // 0: no samples, 1: continuous, 2: random gaps
  int x_fixed = -1;      // >= 0: send this value

  always @(negedge clk) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x_in <= '0;
    end else begin
      x_valid <= (x_mode == 1) || (x_mode == 2 && ($urandom % 3) == 0);
      x_in <= (x_fixed >= 0) ? L'(x_fixed) : L'($urandom);
    end
  end

  task automatic write_coefs(input int mode);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      while (!coef_ready) @(negedge clk);
      coef_we = 1; coef_idx = $clog2(N)'(k);
      coef_data = (mode == 0) ? H_W'($urandom) : (mode == 1) ? H_W'(-(1 << (H_W - 1))) : H_W'((1 << (H_W - 1)) - 1);
    end
    @(negedge clk); coef_we = 0;
  endtask

  task automatic reload();
    @(negedge clk); cfg_start = 1;
    @(negedge clk); cfg_start = 0;
    while (cfg_busy) @(negedge clk);
  endtask

  initial begin
    coef_we = 0; coef_idx = '0; coef_data = '0; cfg_start = 0;
    for (int k = 0; k < N; k++) begin h_reg[k] = 0; h_tbl[k] = 0; hist[k] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    while (cfg_busy) @(negedge clk);
    // first coefficient set, loaded while idle
    write_coefs(0);
    reload();
    x_mode = 1;
    repeat (400) @(negedge clk);
    x_mode = 2;
    repeat (400) @(negedge clk);
    // run-time reconfiguration while samples keep coming
    for (int i = 0; i < 6; i++) begin
      x_mode = (i % 2) + 1;
      write_coefs(0);
      reload();
      repeat (120) @(negedge clk);
    end
    // full-scale values
    x_mode = 0; x_fixed = (1 << L) - 1; extreme_phase = 1;
    repeat (20) @(negedge clk);
    write_coefs(1);
    reload();
    x_mode = 1;
    repeat (100) @(negedge clk);
    x_mode = 0;
    write_coefs(2);
    reload();
    x_mode = 1;
    repeat (100) @(negedge clk);
    x_mode = 0;
    repeat (40) @(negedge clk);
    checks += 7;
    if (exp_y.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_y.size()); end
    if (n_back_to_back == 0) begin failures++; $display("FAIL no back-to-back sample"); end
    if (n_gap_accept == 0) begin failures++; $display("FAIL no sample after a gap"); end
    if (n_reload_stall == 0) begin failures++; $display("FAIL no input stall during a reload"); end
    if (n_reload < 9) begin failures++; $display("FAIL only %0d reloads", n_reload); end
    if (n_extreme == 0) begin failures++; $display("FAIL no full-scale samples"); end
    if (n_rate_checks == 0) begin failures++; $display("FAIL never one output per R cycles"); end
    $display("outputs=%0d back_to_back=%0d after_gap=%0d reload_stall_cycles=%0d reloads=%0d full_scale=%0d rate_R=%0d",
             n_out, n_back_to_back, n_gap_accept, n_reload_stall, n_reload, n_extreme, n_rate_checks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
