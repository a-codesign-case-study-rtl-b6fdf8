// tb_workload_vector_stream: the image-analysis workload, a continuous
// stream of flow vectors through the vector length unit of the full design
// at its default sizes. The real stream is 75 M vectors (150 M 16-bit words)
// every three minutes; this test runs all 75 M of them back-to-back with
// no idle cycle, and checks every length against an
// integer square root. It also checks the rate: the whole stream must leave
// the unit within vector count + 2 clock periods, i.e. one vector per clock.
module tb_workload_vector_stream;
  import tb_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NVEC = 75_000_000;

  longint checks = 0;
  int failures = 0;
  int cycle = 0, first_in = -1, last_out = -1, n_out = 0;

  logic        rst_n, vl_in_valid, vl_out_valid, vl_ovf;
  logic [15:0] vl_x, vl_y, vl_len;
  logic [15:0] rt_dout;
  logic [31:0] sq_dout, ar_dout;
  logic        sq_done, sq_busy, rt_done, rt_busy, ar_done, ar_busy;

  vecl_top dut (
    .clk(clk), .rst_n(rst_n),
    .vl_in_valid(vl_in_valid), .vl_x(vl_x), .vl_y(vl_y),
    .vl_out_valid(vl_out_valid), .vl_len(vl_len), .vl_ovf(vl_ovf),
    .sq_start(1'b0), .sq_delay(8'd0), .sq_din(16'd0),
    .sq_dout(sq_dout), .sq_done(sq_done), .sq_busy(sq_busy),
    .rt_start(1'b0), .rt_delay(8'd0), .rt_din(32'd0),
    .rt_dout(rt_dout), .rt_done(rt_done), .rt_busy(rt_busy),
    .ar_start(1'b0), .ar_delay(8'd0), .ar_din(16'd0),
    .ar_dout(ar_dout), .ar_done(ar_done), .ar_busy(ar_busy)
  );

  always @(posedge clk) cycle <= cycle + 1;

  logic [16:0] expq[$];   // {ovf, len}

  always @(negedge clk) begin
    if (rst_n && vl_out_valid) begin
      logic [16:0] e;
      checks++;
      if (expq.size() == 0) begin
        failures++;
      end else begin
        e = expq.pop_front();
        if ({vl_ovf, vl_len} !== e) begin
          failures++;
          if (failures < 10) $display("len %0d ovf %0d, expected %0d %0d", vl_len, vl_ovf, e[15:0], e[16]);
        end
      end
      n_out++;
      last_out = cycle;
    end
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; vl_in_valid = 1'b0; vl_x = '0; vl_y = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < NVEC; i++) begin
      longint unsigned z;
      logic [15:0] vx, vy;
      logic o;
      // flow components: mostly moderate, some at full range
      if (i % 8 == 0) begin vx = 16'($urandom); vy = 16'($urandom); end
      else begin vx = 16'($urandom_range(0, 4095)); vy = 16'($urandom_range(0, 4095)); end
      z = longint'(vx) * longint'(vx) + longint'(vy) * longint'(vy);
      o = (z > 64'hFFFF_FFFF);
      expq.push_back({o, 16'(isqrt(o ? 64'hFFFF_FFFF : z))});
      @(negedge clk);
      if (i == 0) first_in = cycle + 1;
      vl_x = vx; vl_y = vy; vl_in_valid = 1'b1;
    end
    @(negedge clk) vl_in_valid = 1'b0;
    repeat (4) @(negedge clk);
    checks++;
    if (n_out != NVEC || expq.size() != 0) begin
      failures++;
      $display("%0d of %0d results", n_out, NVEC);
    end
    checks++;
    if (last_out - first_in + 1 > NVEC + 2) begin
      failures++;
      $display("%0d vectors took %0d clock periods", NVEC, last_out - first_in + 1);
    end
    $display("%0d vectors in %0d clock periods", n_out, last_out - first_in + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
