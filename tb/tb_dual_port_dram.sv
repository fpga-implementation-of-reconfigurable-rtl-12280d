// Self-checking test of the dual-port look-up table: fills it with random
// words, then reads random addresses on both ports each cycle and compares
// with a reference array; also checks that a read of the address being
// written returns the old word until the clock edge.
module tb_dual_port_dram;
  localparam int AW = 4;
  localparam int DW = 6;

  logic clk = 1'b0;
  logic we;
  logic [AW-1:0] waddr, addr_a, addr_b;
  logic signed [DW-1:0] wdata, rdata_a, rdata_b;
  logic signed [DW-1:0] ref_mem [2**AW];
  int checks = 0, failures = 0;

  dual_port_dram #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic signed [DW-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; addr_a = '0; addr_b = '0;
    for (int a = 0; a < 2**AW; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = DW'($urandom); ref_mem[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      addr_a = AW'($urandom); addr_b = AW'($urandom);
      // occasionally rewrite a word while reading it
      we = ($urandom % 4) == 0;
      waddr = addr_a; wdata = DW'($urandom);
      #1;
      check(rdata_a, ref_mem[addr_a], "port a");
      check(rdata_b, ref_mem[addr_b], "port b");
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
      #1;
      check(rdata_a, ref_mem[addr_a], "port a after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
