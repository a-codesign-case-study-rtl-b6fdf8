// vecl_top: the whole design. Two independent parts stand side by side.
//
// 1. The vector length unit (vector_length): len = floor(sqrt(x^2 + y^2))
//    for 16-bit components, one vector per clock, two cycles of latency.
//    Chip 1 holds two split-in-four squaring units and a 32-bit ripple
//    carry adder; chip 2 holds the 32-bit CAS square root array.
//
// 2. The speed-measurement board: three timing frames (speed_harness), each
//    around one combinational unit under test, the 16-bit sliced squaring
//    unit (sq_*), the 32-bit CAS square root array (rt_*) and the 16-bit CAF
//    array squaring unit (ar_*). Each frame has its own start pulse and
//    programmable delay (in clk periods) and returns the captured result
//    with a done pulse.
//
// All registers share clk and the active-low synchronous reset rst_n. The
// host bus interface through which the board was driven is not part of
// this design; its signals are the ports of the measurement frames.
module vecl_top #(
  parameter int unsigned W     = vecl_pkg::COMP_W,  // component width
  parameter int unsigned DLY_W = 8                  // delay setting width
) (
  input  logic             clk,
  input  logic             rst_n,
  // vector length unit
  input  logic             vl_in_valid,
  input  logic [W-1:0]     vl_x,
  input  logic [W-1:0]     vl_y,
  output logic             vl_out_valid,
  output logic [W-1:0]     vl_len,
  output logic             vl_ovf,
  // measurement frame around the sliced squaring unit
  input  logic             sq_start,
  input  logic [DLY_W-1:0] sq_delay,
  input  logic [15:0]      sq_din,
  output logic [31:0]      sq_dout,
  output logic             sq_done,
  output logic             sq_busy,
  // measurement frame around the square root array
  input  logic             rt_start,
  input  logic [DLY_W-1:0] rt_delay,
  input  logic [2*W-1:0]   rt_din,
  output logic [W-1:0]     rt_dout,
  output logic             rt_done,
  output logic             rt_busy,
  // measurement frame around the CAF array squaring unit
  input  logic             ar_start,
  input  logic [DLY_W-1:0] ar_delay,
  input  logic [W-1:0]     ar_din,
  output logic [2*W-1:0]   ar_dout,
  output logic             ar_done,
  output logic             ar_busy
);
  // ---- vector length unit ----
  vector_length #(.W(W)) u_vl (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vl_in_valid),
    .x        (vl_x),
    .y        (vl_y),
    .out_valid(vl_out_valid),
    .len      (vl_len),
    .ovf      (vl_ovf)
  );

  // ---- measurement board: sliced squarer ----
  logic [15:0] sq_dut_in;
  logic [31:0] sq_dut_out;

  speed_harness #(.DIN_W(16), .DOUT_W(32), .DLY_W(DLY_W)) u_frame_sq (
    .clk(clk), .rst_n(rst_n), .start(sq_start), .delay(sq_delay),
    .din(sq_din), .dut_in(sq_dut_in), .dut_out(sq_dut_out),
    .dout(sq_dout), .done(sq_done), .busy(sq_busy)
  );
  sliced_squarer16 u_dut_sq (.x(sq_dut_in), .p(sq_dut_out));

  // ---- measurement board: square root array ----
  logic [2*W-1:0] rt_dut_in;
  logic [W-1:0]   rt_dut_out;

  speed_harness #(.DIN_W(2*W), .DOUT_W(W), .DLY_W(DLY_W)) u_frame_rt (
    .clk(clk), .rst_n(rst_n), .start(rt_start), .delay(rt_delay),
    .din(rt_din), .dut_in(rt_dut_in), .dut_out(rt_dut_out),
    .dout(rt_dout), .done(rt_done), .busy(rt_busy)
  );
  sqrt_array #(.N(2*W)) u_dut_rt (.a(rt_dut_in), .q(rt_dut_out));

  // ---- measurement board: CAF array squarer ----
  logic [W-1:0]   ar_dut_in;
  logic [2*W-1:0] ar_dut_out;

  speed_harness #(.DIN_W(W), .DOUT_W(2*W), .DLY_W(DLY_W)) u_frame_ar (
    .clk(clk), .rst_n(rst_n), .start(ar_start), .delay(ar_delay),
    .din(ar_din), .dut_in(ar_dut_in), .dut_out(ar_dut_out),
    .dout(ar_dout), .done(ar_done), .busy(ar_busy)
  );
  array_squarer #(.N(W)) u_dut_ar (.q(ar_dut_in), .a(ar_dut_out));
endmodule
