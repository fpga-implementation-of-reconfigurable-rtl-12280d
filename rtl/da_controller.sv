// Controller of the time-multiplexed DA filter.
//
// Every input sample is processed in R time slots: in slot r each section
// looks at one bit of its slice of the N stored samples. The controller
// counts the slots, accepts a new sample whenever the previous one is in its
// last slot (or the filter is idle), and raises acc_rst in slot 0 so that the
// section accumulators start a fresh output. With x_valid held high the
// filter therefore takes one sample, and later gives one output, every R
// cycles.
//
// Ports and timing
//   x_valid/x_ready : sample handshake; load = x_valid & x_ready is the
//                     cycle in which the sample registers capture x(n)
//   hold            : refuse new samples (asked for by the coefficient loader)
//   bit_valid       : a bit slot is active this cycle
//   bit_idx         : slot number r, 0 .. R-1
//   acc_rst, last   : first and last slot of a sample
//   idle            : no slot active and the DRAIN cycles of the pipeline
//                     behind the controller have passed; the look-up tables
//                     may then be rewritten without corrupting an output
// The R-slot schedule and acc_rst follow the filter's architecture; the
// valid/ready handshake, hold and idle are this design's choices.
module da_controller #(
  parameter int R     = 4,   // time slots per sample
  parameter int DRAIN = 4,   // cycles from the last slot to the output
  localparam int RW   = (R > 1) ? $clog2(R) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          x_valid,
  output logic          x_ready,
  input  logic          hold,
  output logic          load,
  output logic          bit_valid,
  output logic [RW-1:0] bit_idx,
  output logic          acc_rst,
  output logic          last,
  output logic          idle
);

  localparam int DW = $clog2(DRAIN + 1) + 1;

  logic          busy_q;
  logic [RW-1:0] r_q;
  logic [DW-1:0] drain_q;

  assign last      = busy_q && (r_q == RW'(R - 1));
  assign acc_rst   = busy_q && (r_q == '0);
  assign bit_valid = busy_q;
  assign bit_idx   = r_q;
  assign x_ready   = !hold && (!busy_q || last);
  assign load      = x_valid && x_ready;
  assign idle      = !busy_q && (drain_q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      r_q     <= '0;
      drain_q <= '0;
    end else begin
      if (load) begin
        busy_q <= 1'b1;
        r_q    <= '0;
      end else if (last) begin
        busy_q <= 1'b0;
        r_q    <= '0;
      end else if (busy_q) begin
        r_q <= r_q + 1'b1;
      end
      if (busy_q) drain_q <= DW'(DRAIN);
      else if (drain_q != '0) drain_q <= drain_q - 1'b1;
    end
  end

endmodule
