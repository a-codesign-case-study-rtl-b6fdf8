// speed_harness: timing frame for measuring the propagation delay of a
// combinational device under test (DUT).
//
// A start pulse loads the test word into the input register, which drives
// the DUT, and starts the programmable delay generator. The generator
// counts the programmed number of reference-clock periods and then clocks
// the output register, which captures the DUT's result. If the capture
// comes later than the DUT's delay the captured word is correct; sweeping
// the programmed delay and comparing the captured words against expected
// values brackets the DUT's propagation delay to one reference period.
//
// Interface: all registers are clocked by clk (the generator's reference
// clock). start is sampled on a rising edge while the harness is idle;
// starts arriving while a measurement runs are ignored. delay (>= 1,
// 0 is taken as 1) is the number of clk periods from the edge that loads
// the input register to the edge that loads the output register. done
// pulses for one cycle with dout holding the captured word. rst_n is an
// active-low synchronous reset.
// The two framing registers and a delay generator between their clocks are
// the published arrangement; building the generator as a down-counter on a
// reference clock, the busy lock-out and the done pulse are this design's
// own choices.
module speed_harness #(
  parameter int unsigned DIN_W  = 16,
  parameter int unsigned DOUT_W = 32,
  parameter int unsigned DLY_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DLY_W-1:0]  delay,
  input  logic [DIN_W-1:0]  din,
  output logic [DIN_W-1:0]  dut_in,   // input register, drives the DUT
  input  logic [DOUT_W-1:0] dut_out,  // DUT result
  output logic [DOUT_W-1:0] dout,     // output register
  output logic              done,
  output logic              busy
);
  logic [DLY_W-1:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dut_in <= '0;
      dout   <= '0;
      count  <= '0;
      busy   <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dut_in <= din;
          count  <= (delay == '0) ? DLY_W'(1) : delay;
          busy   <= 1'b1;
        end
      end else if (count == DLY_W'(1)) begin
        dout  <= dut_out;
        busy  <= 1'b0;
        done  <= 1'b1;
        count <= '0;
      end else begin
        count <= count - DLY_W'(1);
      end
    end
  end

  // A capture ends the measurement: done and busy are never high together,
  // and the counter is never zero while a measurement runs.
  a_done_idle : assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_count_set : assert property (@(posedge clk) disable iff (!rst_n) busy |-> count != '0);
endmodule
