// Self-checking test of the controller (R = 4, DRAIN = 4): with x_valid
// always high, samples must be accepted exactly every R cycles with slots
// 0..R-1 between them; with gaps in x_valid a waiting sample is taken at
// once; hold must block new samples but let the running one finish; idle
// must rise DRAIN cycles after the last slot and not before.
module tb_da_controller;
  localparam int R = 4;
  localparam int DRAIN = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic x_valid, x_ready, hold, load, bit_valid, acc_rst, last, idle;
  logic [1:0] bit_idx;
  int checks = 0, failures = 0;

  da_controller #(.R(R), .DRAIN(DRAIN)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input logic got, exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time); end
  endtask

  // reference model state
  logic m_busy; int m_r; int m_drain;

  initial begin
    x_valid = 0; hold = 0;
    m_busy = 0; m_r = 0; m_drain = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      // phases: continuous input, random input, random hold
      if (c < 400) begin x_valid = 1; hold = 0; end
      else if (c < 1500) begin x_valid = ($urandom % 3) == 0; hold = 0; end
      else begin x_valid = ($urandom % 2) == 0; hold = ($urandom % 5) == 0; end
      #1;
      begin
        logic m_last, m_ready, m_load;
        m_last = m_busy && m_r == R - 1;
        m_ready = !hold && (!m_busy || m_last);
        m_load = x_valid && m_ready;
        expect_bit(x_ready, m_ready, "x_ready");
        expect_bit(load, m_load, "load");
        expect_bit(bit_valid, m_busy, "bit_valid");
        expect_bit(acc_rst, m_busy && m_r == 0, "acc_rst");
        expect_bit(last, m_last, "last");
        expect_bit(idle, !m_busy && m_drain == 0, "idle");
        if (m_busy) begin
          checks++;
          if (int'(bit_idx) != m_r) begin failures++; $display("FAIL bit_idx %0d exp %0d", bit_idx, m_r); end
        end
        @(posedge clk);
        if (m_busy) m_drain = DRAIN; else if (m_drain > 0) m_drain--;
        if (m_load) begin m_busy = 1; m_r = 0; end
        else if (m_last) begin m_busy = 0; m_r = 0; end
        else if (m_busy) m_r++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
