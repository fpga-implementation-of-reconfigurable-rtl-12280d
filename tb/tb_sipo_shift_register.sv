// Self-checking test of the section sample register: shifts in random
// R-bit slices (with idle cycles in between) and, for every bit position,
// compares the N parallel tap bits with a reference history.
module tb_sipo_shift_register;
  localparam int N = 16;
  localparam int R = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load;
  logic [R-1:0] din;
  logic [1:0] bit_sel;
  logic [N-1:0] taps;
  logic [R-1:0] hist [N];
  int checks = 0, failures = 0;

  sipo_shift_register #(.N(N), .R(R)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int b = 0; b < R; b++) begin
      bit_sel = 2'(b);
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (taps[k] !== hist[k][b]) begin
          failures++;
          $display("FAIL tap %0d bit %0d: got %b expected %b", k, b, taps[k], hist[k][b]);
        end
      end
    end
  endtask

  initial begin
    load = 0; din = '0; bit_sel = '0;
    for (int k = 0; k < N; k++) hist[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_all();
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      load = ($urandom % 3) != 0;
      din = R'($urandom);
      @(posedge clk);
      if (load) begin
        for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = din;
      end
      @(negedge clk);
      load = 0;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
