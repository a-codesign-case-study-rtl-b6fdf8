// tb_workload_speed_test: the board speed test. A random pattern is applied,
// one word per measurement, to the 16-bit sliced squaring unit and to the
// 32-bit square root array through their timing frames, at the shortest
// programmed delay and at a longer one, and every captured word is compared
// with independently computed values: 10^7 words per unit, half of them at
// each delay.
module tb_workload_speed_test;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NWORDS = 5_000_000;

  int checks = 0, failures = 0;

  logic        rst_n, vl_out_valid, vl_ovf;
  logic [15:0] vl_len;
  logic        sq_start, sq_done, sq_busy, rt_start, rt_done, rt_busy;
  logic        ar_done, ar_busy;
  logic [7:0]  dly;
  logic [15:0] sq_din, rt_dout;
  logic [31:0] sq_dout, rt_din, ar_dout;

  vecl_top dut (
    .clk(clk), .rst_n(rst_n),
    .vl_in_valid(1'b0), .vl_x(16'd0), .vl_y(16'd0),
    .vl_out_valid(vl_out_valid), .vl_len(vl_len), .vl_ovf(vl_ovf),
    .sq_start(sq_start), .sq_delay(dly), .sq_din(sq_din),
    .sq_dout(sq_dout), .sq_done(sq_done), .sq_busy(sq_busy),
    .rt_start(rt_start), .rt_delay(dly), .rt_din(rt_din),
    .rt_dout(rt_dout), .rt_done(rt_done), .rt_busy(rt_busy),
    .ar_start(1'b0), .ar_delay(8'd0), .ar_din(16'd0),
    .ar_dout(ar_dout), .ar_done(ar_done), .ar_busy(ar_busy)
  );

  initial begin
    repeat (2 * NWORDS * 8 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; sq_start = 1'b0; rt_start = 1'b0; dly = 8'd1;
    sq_din = '0; rt_din = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      dly = (pass == 0) ? 8'd1 : 8'd3;
      for (int i = 0; i < NWORDS; i++) begin
        logic [15:0] w16;
        logic [31:0] w32;
        w16 = 16'($urandom);
        w32 = $urandom;
        // both frames measured in parallel
        @(negedge clk);
        sq_din = w16; rt_din = w32; sq_start = 1'b1; rt_start = 1'b1;
        @(negedge clk);
        sq_start = 1'b0; rt_start = 1'b0;
        while (!(sq_done && rt_done)) @(negedge clk);
        checks += 2;
        if (sq_dout !== 32'(longint'(w16) * longint'(w16))) begin
          failures++;
          if (failures < 10) $display("square of %0d captured as %0d", w16, sq_dout);
        end
        if (longint'(rt_dout) != isqrt(longint'(w32))) begin
          failures++;
          if (failures < 10) $display("root of %0d captured as %0d", w32, rt_dout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
